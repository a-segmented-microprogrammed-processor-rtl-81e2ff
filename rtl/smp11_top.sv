// smp11_top: the SMP-11, a segmented-microprogrammed processor that emulates
// the basic PDP-11 instruction set.
//
// Control is split into two levels. The handshake sequencer (upper level)
// steps through the task sequence of an instruction (fetch, source, dest,
// operation, post-op, service) and enables one segment controller per task:
// the memory access control unit (MACU) for fetch, addressing, store and
// special routines, or the arithmetic control unit (ACU) for the single-cycle
// operation. The enabled controller drives the shared 16-bit RALU (four 2901
// slices with a 2902 carry look-ahead), the D-bus multiplexer and, for the
// ACU, the PSW logic, and raises its finished line to step the sequencer.
// This is the cost-reduced single-RALU configuration: the ACU and MACU share
// the RALU through a control multiplexer, and the address arithmetic is done
// in the RALU. The instruction decoder supplies all task and routine start
// addresses; the interrupt controller decides at each end of instruction
// whether to enter the service routine; the bus interface runs the memory
// transfers and stops the clock (clock_ctrl) until data is ready.
//
// Interface: a simple asynchronous bus (address, data in/out, write, byte,
// msyn/ssyn handshake), a DMA request/grant pair, four interrupt request and
// grant levels with a device vector input, the INIT line, console continue and
// step inputs, the halted state and the two console display registers (loaded
// by HALT with R0 and the PC). por_n is the asynchronous power-up reset.
//
// Timing: one rising clock edge per major cycle; a cycle executes only when
// clock_ctrl's run is high. The structure follows the document's cost-reduced
// design; the single clock phase and the bus signal set are this design's
// choices. The control path from the 2901 Y output back through the D-bus
// multiplexer (used for sign extension and PSW loads) is structurally a
// combinational loop, but every word that selects Y onto the D bus takes the
// 2901 output from the A register (or from an operation on A only), so no
// value depends on itself.
module smp11_top (
  input  logic        clk,
  input  logic        por_n,
  // bus
  output logic [15:0] bus_addr,
  output logic [15:0] bus_dout,
  input  logic [15:0] bus_din,
  output logic        bus_wr,
  output logic        bus_byte,
  output logic        msyn,
  input  logic        ssyn,
  input  logic        npr,
  output logic        npg,
  input  logic [3:0]  br,
  output logic [3:0]  bg,
  input  logic [15:0] intr_vec,
  output logic        init,
  // console
  input  logic        cont,
  input  logic        step,
  output logic        halted,
  output logic [15:0] cons_addr,
  output logic [15:0] cons_data,
  output logic [7:0]  psw
);
  import smp11_pkg::*;

  logic        rst, run, hold;
  logic [15:0] ir, y, f, d, bar, bdr_in;
  logic        ir_we, br_true;
  dec_t        dec;
  ralu_flags_t flags;

  // ---------------------------------------------------------- sequencing
  hs_word_t       hs_word;
  logic [3:0]     hs_addr;
  logic           in_service, hs_step, dispatch, take_service;
  logic           acu_fin, macu_fin, service_req, wake;
  logic [15:0]    tvec;
  logic           trace_taken, intr_taken;

  hs_sequencer u_hs (
    .clk, .rst, .ce(run), .hs_sel(dec.hs_sel), .hs_spe(dec.hs_spe),
    .service_req, .acu_fin, .macu_fin, .word(hs_word), .addr(hs_addr),
    .in_service, .step(hs_step), .dispatch, .take_service
  );

  macs_word_t         mw;
  logic [MACS_AW-1:0] macs_addr;
  logic [3:0]         m_aadr, m_badr;
  logic [2:0]         reg_num;

  macu u_macu (
    .clk, .rst, .ce(run), .en(hs_word.macu_en), .hs_step, .macs_ld(hs_word.macs_ld),
    .sas(hs_word.sas), .dec, .in_service, .fzero(flags.zhi & flags.zlo), .wake,
    .word(mw), .addr(macs_addr), .aadr(m_aadr), .badr(m_badr), .reg_num, .fin(macu_fin)
  );

  acs_word_t         aw;
  logic [ACS_AW-1:0] acs_addr;
  logic              a_cn, byte_sel;
  logic [3:0]        a_aadr, a_badr;

  acu u_acu (
    .en(!hs_word.macu_en), .addr_dec(dec.acs_addr), .in_service, .byte_op(dec.byte_op),
    .op_a_dst(dec.op_a_dst), .cflag(psw[0]), .word(aw), .addr(acs_addr), .cn(a_cn),
    .byte_sel, .aadr(a_aadr), .badr(a_badr), .fin(acu_fin)
  );

  // ------------------------------------------- RALU control multiplexer
  ralu_i_t ri;
  logic    rcn;
  logic [3:0] raadr, rbadr;
  dsel_e   dsel;
  shin_e   shin;

  always_comb begin
    if (hs_word.macu_en) begin
      ri = mw.i;  rcn = mw.cn;  raadr = m_aadr; rbadr = m_badr;
      dsel = mw.dsel; shin = SHIN_ZERO;
    end else begin
      ri = aw.i;  rcn = a_cn;   raadr = a_aadr; rbadr = a_badr;
      dsel = aw.dsel; shin = aw.shin;
    end
  end

  // ------------------------------------------------------------ datapath
  ralu16 u_ralu (
    .clk, .ce(run), .i(ri), .cn(rcn), .byte_op(byte_sel), .aadr(raadr), .badr(rbadr),
    .d, .shin, .cflag(psw[0]), .y, .f, .flags
  );

  dbus_mux u_dmux (
    .sel(dsel), .bdr_in, .y, .psw, .ir, .br_true, .byte_op(dec.byte_op),
    .cinc_byte(dec.byte_op && reg_num < 3'd6), .bar0(bar[0]), .tvec, .nflag(psw[3]), .d
  );

  psw_unit u_psw (
    .clk, .rst, .ce(run), .ld(!hs_word.macu_en), .ctl(aw.psw), .byte_op(dec.byte_op),
    .flags, .ir, .dbus(d), .psw, .br_true
  );

  instr_decoder u_dec (.clk, .rst, .ir_we, .ir_d(bus_din), .ir, .dec);

  // ------------------------------------------- bus, interrupts and clock
  logic issue;
  assign issue = run && hs_word.macu_en;

  bus_interface u_bil (
    .clk, .rst, .issue, .ld_bar(mw.ld_bar), .ld_bdr(mw.ld_bdr), .ld_ir(mw.ld_ir),
    .op(mw.bus), .byte_op(dec.byte_op), .y, .d, .bus_addr, .bus_dout, .bus_din, .bus_wr,
    .bus_byte, .msyn, .ssyn, .npr, .npg, .bar, .bdr_in, .ir_we, .hold
  );

  interrupt_ctrl u_int (
    .clk, .rst, .psw, .trap(dec.trap), .dispatch, .take_service,
    .br, .intr_vec, .service_req, .wake, .tvec, .bg, .trace_taken, .intr_taken
  );

  clock_ctrl u_clk (
    .clk, .por_n, .hold, .halt_req(hs_word.macu_en && mw.misc == MI_HALT),
    .reset_req(hs_word.macu_en && mw.misc == MI_RESET), .cont, .step,
    .rst, .run, .halted, .init
  );

  // Console display registers, loaded by the HALT routine.
  always_ff @(posedge clk) begin
    if (rst) begin
      cons_addr <= 16'h0000;
      cons_data <= 16'h0000;
    end else if (issue) begin
      if (mw.misc == MI_CONS_DATA) cons_data <= y;
      if (mw.misc == MI_HALT)      cons_addr <= y;
    end
  end
endmodule
