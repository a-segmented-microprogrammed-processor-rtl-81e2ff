// ralu16: the SMP-11 16-bit register/ALU, built from four am2901 slices and an
// am2902 look-ahead carry generator.
//
// The sixteen 2901 registers hold R0-R7 of the PDP-11 (R6 = SP, R7 = PC) in
// the lower eight addresses and operand buffers and temporaries in the upper
// eight. External shift-link logic at the open end of a shift feeds a logical
// 0, the carry flag or the sign bit, so rotates, arithmetic and logical shifts
// of words and bytes take one cycle. Byte operations modify only the low byte:
// the two upper slices then receive a hardwired no-operation code (F = B,
// written back unchanged) instead of the microinstruction, and the shift link
// is made at bit 7. All these follow the document; the shift link being
// switched to bit 7 and the whole 9-bit high-byte code being replaced are this
// design's reading of the byte/word multiplexer of the ACU. The sign and zero
// flags of a shift are taken from the shifted value (F moved one place with
// the link bit inserted), which is what the PDP-11 condition codes need; the
// original board's way of getting them is not described, so this is a choice.
//
// Interface: i/cn/aadr/badr/d are the slice controls, byte_op selects the byte
// form, shin selects the shift-link input and cflag is the PSW carry. Outputs
// are the Y bus, the ALU result F and the status flags for the PSW. Registers
// change at the rising clock edge when ce is high; everything else is
// combinational. In the processor Y returns to D through the D-bus
// multiplexer; that structural loop is explained in am2901.
module ralu16 (
  input  logic                   clk,
  input  logic                   ce,
  input  smp11_pkg::ralu_i_t     i,
  input  logic                   cn,
  input  logic                   byte_op,
  input  logic [3:0]             aadr,
  input  logic [3:0]             badr,
  input  logic [15:0]            d,
  input  smp11_pkg::shin_e       shin,
  input  logic                   cflag,
  output logic [15:0]            y,
  output logic [15:0]            f,
  output smp11_pkg::ralu_flags_t flags
);
  import smp11_pkg::*;

  ralu_i_t    islice [4];
  logic [3:0] g, p, cout, ovr, fz, rmo, rlo, qmo, qlo, rmi, rli, qmi, qli;
  logic [4:0] cin;
  logic       link, cnx, cny, cnz, gout, pout;
  logic       up, down;

  assign islice[0] = i;
  assign islice[1] = i;
  assign islice[2] = byte_op ? RALU_HOLD : i;
  assign islice[3] = byte_op ? RALU_HOLD : i;

  assign down = (i.dst == DST_RAMD) || (i.dst == DST_RAMQD);
  assign up   = (i.dst == DST_RAMU) || (i.dst == DST_RAMQU);

  always_comb begin
    unique case (shin)
      SHIN_CARRY: link = cflag;
      SHIN_SIGN:  link = byte_op ? f[7] : f[15];
      default:    link = 1'b0;
    endcase
  end

  // Shift chains between slices; the open ends take the link input.
  always_comb begin
    for (int k = 0; k < 4; k++) begin
      rmi[k] = (k == 3) ? link : rlo[k+1 < 4 ? k+1 : 3];
      rli[k] = (k == 0) ? link : rmo[k > 0 ? k-1 : 0];
      qmi[k] = (k == 3) ? 1'b0 : qlo[k+1 < 4 ? k+1 : 3];
      qli[k] = (k == 0) ? 1'b0 : qmo[k > 0 ? k-1 : 0];
    end
    if (byte_op) rmi[1] = link;
  end

  assign cin = {1'b0, cnz, cny, cnx, cn};

  for (genvar k = 0; k < 4; k++) begin : g_slice
    am2901 u_slice (
      .clk, .ce, .i(islice[k]), .aadr, .badr, .d(d[4*k +: 4]), .cn(cin[k]),
      .ram_msb_in(rmi[k]), .ram_lsb_in(rli[k]), .q_msb_in(qmi[k]), .q_lsb_in(qli[k]),
      .ram_msb_out(rmo[k]), .ram_lsb_out(rlo[k]), .q_msb_out(qmo[k]), .q_lsb_out(qlo[k]),
      .y(y[4*k +: 4]), .f(f[4*k +: 4]), .g(g[k]), .p(p[k]), .cout(cout[k]),
      .ovr(ovr[k]), .fzero(fz[k])
    );
  end

  am2902 u_cla (.cn, .g, .p, .cnx, .cny, .cnz, .gout, .pout);

  assign flags.c16   = cout[3];
  assign flags.c8    = cout[1];
  assign flags.ovr16 = ovr[3];
  assign flags.ovr8  = ovr[1];
  // Sign and zero of the value written back: for shifts that is the shifted
  // F (built here from the same link bits the slices use), otherwise F itself
  // with the slices' F = 0 outputs.
  logic [15:0] res;
  always_comb begin
    res = f;
    if (down) res = byte_op ? {f[15:8], link, f[7:1]} : {link, f[15:1]};
    if (up)   res = byte_op ? {f[15:8], f[6:0], link} : {f[14:0], link};
  end

  assign flags.f15   = res[15];
  assign flags.f7    = res[7];
  assign flags.zhi   = (up || down) ? (res[15:8] == 8'h00) : (fz[3] & fz[2]);
  assign flags.zlo   = (up || down) ? (res[7:0] == 8'h00) : (fz[1] & fz[0]);
  assign flags.shout = down ? f[0] : (up ? (byte_op ? f[7] : f[15]) : 1'b0);
endmodule
