// macu: SMP-11 memory access control unit (fetch, addressing and store
// segment controller).
//
// The MACU runs every RALU cycle that is not an arithmetic operation:
// instruction fetch, the eight PDP-11 addressing modes for source and
// destination, the result store, and the control-transfer, trap, interrupt
// and console routines. Its control store (MACS) is addressed by an address
// register with a small sequencer: at the start of a task the register is
// loaded from a start-address multiplexer (fetch 1, fetch 2, or the decoder's
// source, destination, special or post-op routine; the service routine while
// an interrupt or trap is being serviced), then it counts up by one, or by two
// when a word asks to skip on a zero ALU result (used by SOB). A word whose
// finished bit is set steps the handshake sequencer.
//
// A MACS word drives the RALU (2901 source/function/destination, carry in),
// selects the A and B register addresses (PC, SP, R5, the instruction's
// register field, the operand buffer of the current task, or a fixed buffer),
// the D-bus source, the bus address and data register loads, the bus cycle,
// the instruction register load and a miscellaneous console/WAIT/RESET
// field. The store structure (two banks, increment/skip sequencer, start
// multiplexer, finished bit) follows the document. The routines themselves and
// their addresses are this design's own microcode; the document's store is 57
// words of 24 bits, this one has a 7-bit address and uses about 75 words.
//
// Timing: the store is read combinationally from the effective address (the
// start address in the first cycle of a task, else the address register), so
// every MACU cycle is one RALU cycle. State changes at the rising edge when
// ce is high. While the WAIT word is active, finished is held low until an
// interrupt is pending (wake). The first service task after reset starts
// half-way into the service routine, so only the vector pair (PC, PSW) is
// loaded: this power-up entry is this design's choice.
module macu (
  input  logic                         clk,
  input  logic                         rst,
  input  logic                         ce,
  input  logic                         en,         // MACU enabled by the HS word
  input  logic                         hs_step,    // handshake sequencer steps
  input  logic                         macs_ld,    // HS word asks for a start load
  input  smp11_pkg::sas_e              sas,
  input  smp11_pkg::dec_t              dec,
  input  logic                         in_service,
  input  logic                         fzero,      // RALU F == 0
  input  logic                         wake,       // interrupt pending (ends WAIT)
  output smp11_pkg::macs_word_t        word,
  output logic [smp11_pkg::MACS_AW-1:0] addr,      // effective MACS address
  output logic [3:0]                   aadr,
  output logic [3:0]                   badr,
  output logic [2:0]                   reg_num,    // register field in use
  output logic                         fin
);
  import smp11_pkg::*;

  // ------------------------------------------------------------ sequencer
  logic [MACS_AW-1:0] ar, start;
  logic               first, pwrup;

  always_comb begin
    unique case (sas)
      SAS_IF1:  start = MA_IF1;
      SAS_IF2:  start = MA_IF2;
      SAS_SRC:  start = dec.src_start;
      SAS_DST:  start = dec.dst_start;
      SAS_SPE:  start = pwrup ? MA_PWRUP : (in_service ? MA_SER : dec.spe_start);
      SAS_POST: start = dec.post_start;
      default:  start = MA_IF1;
    endcase
  end

  assign addr = (first && macs_ld) ? start : ar;

  always_ff @(posedge clk) begin
    if (rst) begin
      ar    <= MA_IF1;
      first <= 1'b1;
      pwrup <= 1'b1;
    end else if (ce) begin
      first <= hs_step;
      if (hs_step) pwrup <= 1'b0;
      if (en) begin
        if (word.misc == MI_WAIT && !wake) ar <= addr;
        else if (word.skz && fzero)        ar <= addr + MACS_AW'(2);
        else                               ar <= addr + MACS_AW'(1);
      end
    end
  end

  // --------------------------------------------------------- control store
  function automatic macs_word_t mw(reg_sel_e a, reg_sel_e b, alu_src_e s, alu_fn_e f,
                                    alu_dst_e d, logic c, dsel_e dm);
    macs_word_t w = '0;
    w.i    = '{dst: d, fn: f, src: s};
    w.cn   = c;
    w.asel = a;
    w.bsel = b;
    w.dsel = dm;
    w.bus  = BUS_NONE;
    w.misc = MI_NONE;
    return w;
  endfunction

  // Frequent operations. Y = A when the destination code is RAMA.
  function automatic macs_word_t nop();
    return mw(RS_PC, RS_PC, SRC_ZA, FN_OR, DST_NOP, 1'b0, DM_ZERO);
  endfunction
  // BAR <= X, X <= X + constant
  function automatic macs_word_t post_inc(reg_sel_e x, dsel_e k);
    macs_word_t w = mw(x, x, SRC_DA, FN_ADD, DST_RAMA, 1'b0, k);
    w.ld_bar = 1'b1;
    return w;
  endfunction
  // X <= X - constant, BAR <= new X
  function automatic macs_word_t pre_dec(reg_sel_e x, dsel_e k);
    macs_word_t w = mw(x, x, SRC_DA, FN_SUBR, DST_RAMF, 1'b1, k);
    w.ld_bar = 1'b1;
    return w;
  endfunction
  // X <= bus data in
  function automatic macs_word_t from_bdr(reg_sel_e x);
    return mw(RS_PC, x, SRC_DZ, FN_OR, DST_RAMF, 1'b0, DM_BDR);
  endfunction
  // destination X <= source register Y
  function automatic macs_word_t copy(reg_sel_e src, reg_sel_e dst);
    return mw(src, dst, SRC_ZA, FN_OR, DST_RAMF, 1'b0, DM_ZERO);
  endfunction

  always_comb begin
    word = nop();
    unique case (addr)
      // ---- instruction fetch
      7'd0:  begin word = post_inc(RS_PC, DM_C2); word.bus = BUS_READ; word.ld_ir = 1'b1;
                   word.fin = 1'b1; end
      7'd1:  begin word = nop(); word.fin = 1'b1; end                 // decode
      // ---- operand fetch, modes 0-7 (operand into the task's buffer)
      7'd2:  begin word = copy(RS_REG, RS_BUF); word.fin = 1'b1; end
      7'd3:  begin word = mw(RS_REG, RS_REG, SRC_ZA, FN_OR, DST_NOP, 1'b0, DM_ZERO);
                   word.ld_bar = 1'b1; word.bus = BUS_READ; end
      7'd4:  begin word = from_bdr(RS_BUF); word.fin = 1'b1; end
      7'd5:  begin word = post_inc(RS_REG, DM_CINC); word.bus = BUS_READ; end
      7'd6:  begin word = from_bdr(RS_BUF); word.fin = 1'b1; end
      7'd7:  begin word = post_inc(RS_REG, DM_C2); word.bus = BUS_READ; end
      7'd8:  begin word = mw(RS_PC, RS_PC, SRC_DZ, FN_OR, DST_NOP, 1'b0, DM_BDR);
                   word.ld_bar = 1'b1; word.bus = BUS_READ; end
      7'd9:  begin word = from_bdr(RS_BUF); word.fin = 1'b1; end
      7'd10: begin word = pre_dec(RS_REG, DM_CINC); word.bus = BUS_READ; end
      7'd11: begin word = from_bdr(RS_BUF); word.fin = 1'b1; end
      7'd12: begin word = pre_dec(RS_REG, DM_C2); word.bus = BUS_READ; end
      7'd13: begin word = mw(RS_PC, RS_PC, SRC_DZ, FN_OR, DST_NOP, 1'b0, DM_BDR);
                   word.ld_bar = 1'b1; word.bus = BUS_READ; end
      7'd14: begin word = from_bdr(RS_BUF); word.fin = 1'b1; end
      7'd15: begin word = post_inc(RS_PC, DM_C2); word.bus = BUS_READ; end
      7'd16: begin word = mw(RS_REG, RS_PC, SRC_DA, FN_ADD, DST_NOP, 1'b0, DM_BDR);
                   word.ld_bar = 1'b1; word.bus = BUS_READ; end
      7'd17: begin word = from_bdr(RS_BUF); word.fin = 1'b1; end
      7'd18: begin word = post_inc(RS_PC, DM_C2); word.bus = BUS_READ; end
      7'd19: begin word = mw(RS_REG, RS_PC, SRC_DA, FN_ADD, DST_NOP, 1'b0, DM_BDR);
                   word.ld_bar = 1'b1; word.bus = BUS_READ; end
      7'd20: begin word = mw(RS_PC, RS_PC, SRC_DZ, FN_OR, DST_NOP, 1'b0, DM_BDR);
                   word.ld_bar = 1'b1; word.bus = BUS_READ; end
      7'd21: begin word = from_bdr(RS_BUF); word.fin = 1'b1; end
      // ---- move-type destination modes: address only, no operand read;
      //      the address is also left in the buffer (jump targets)
      7'd22: begin word = copy(RS_REG, RS_BUF); word.fin = 1'b1; end
      7'd23: begin word = copy(RS_REG, RS_BUF); word.ld_bar = 1'b1; word.fin = 1'b1; end
      7'd24: begin word = post_inc(RS_REG, DM_CINC); word.fin = 1'b1; end
      7'd25: begin word = post_inc(RS_REG, DM_C2); word.bus = BUS_READ; end
      7'd26: begin word = from_bdr(RS_BUF); word.ld_bar = 1'b1; word.fin = 1'b1; end
      7'd27: begin word = pre_dec(RS_REG, DM_CINC); word.fin = 1'b1; end
      7'd28: begin word = pre_dec(RS_REG, DM_C2); word.bus = BUS_READ; end
      7'd29: begin word = from_bdr(RS_BUF); word.ld_bar = 1'b1; word.fin = 1'b1; end
      7'd30: begin word = post_inc(RS_PC, DM_C2); word.bus = BUS_READ; end
      7'd31: begin word = mw(RS_REG, RS_BUF, SRC_DA, FN_ADD, DST_RAMF, 1'b0, DM_BDR);
                   word.ld_bar = 1'b1; word.fin = 1'b1; end
      7'd32: begin word = post_inc(RS_PC, DM_C2); word.bus = BUS_READ; end
      7'd33: begin word = mw(RS_REG, RS_PC, SRC_DA, FN_ADD, DST_NOP, 1'b0, DM_BDR);
                   word.ld_bar = 1'b1; word.bus = BUS_READ; end
      7'd34: begin word = from_bdr(RS_BUF); word.ld_bar = 1'b1; word.fin = 1'b1; end
      // ---- jump addresses for (R)+ and -(R)
      7'd35: begin word = copy(RS_REG, RS_DB); end
      7'd36: begin word = mw(RS_REG, RS_REG, SRC_DA, FN_ADD, DST_RAMF, 1'b0, DM_C2);
                   word.fin = 1'b1; end
      7'd37: begin word = mw(RS_REG, RS_REG, SRC_DA, FN_SUBR, DST_RAMF, 1'b1, DM_C2); end
      7'd38: begin word = copy(RS_REG, RS_DB); word.fin = 1'b1; end
      // ---- post-op: result store
      7'd64: begin word = copy(RS_DB, RS_REG); word.fin = 1'b1; end
      7'd65: begin word = mw(RS_DB, RS_REG, SRC_DZ, FN_OR, DST_RAMA, 1'b0, DM_YSEXT);
                   word.fin = 1'b1; end
      7'd66: begin word = mw(RS_DB, RS_DB, SRC_ZA, FN_OR, DST_NOP, 1'b0, DM_YOUT);
                   word.ld_bdr = 1'b1; word.bus = BUS_WRITE_OP; word.fin = 1'b1; end
      7'd67: begin word = nop(); word.fin = 1'b1; end
      // ---- branches
      7'd68: begin word = mw(RS_PC, RS_PC, SRC_DA, FN_ADD, DST_RAMF, 1'b0, DM_BROFS);
                   word.fin = 1'b1; end
      7'd69: begin word = mw(RS_REG, RS_REG, SRC_ZB, FN_SUBR, DST_RAMF, 1'b0, DM_ZERO);
                   word.rsrc = 1'b1; word.skz = 1'b1; end
      7'd70: begin word = mw(RS_PC, RS_PC, SRC_DA, FN_SUBR, DST_RAMF, 1'b1, DM_IROFS6);
                   word.fin = 1'b1; end
      7'd71: begin word = nop(); word.fin = 1'b1; end
      // ---- JMP, JSR, RTS, MARK
      7'd72: begin word = copy(RS_DB, RS_PC); word.fin = 1'b1; end
      7'd73: begin word = pre_dec(RS_SP, DM_C2); end
      7'd74: begin word = mw(RS_REG, RS_REG, SRC_ZA, FN_OR, DST_NOP, 1'b0, DM_Y);
                   word.rsrc = 1'b1; word.ld_bdr = 1'b1; word.bus = BUS_WRITE; end
      7'd75: begin word = copy(RS_PC, RS_REG); word.rsrc = 1'b1; end
      7'd76: begin word = copy(RS_DB, RS_PC); word.fin = 1'b1; end
      7'd77: begin word = copy(RS_REG, RS_PC); end
      7'd78: begin word = post_inc(RS_SP, DM_C2); word.bus = BUS_READ; end
      7'd79: begin word = from_bdr(RS_REG); word.fin = 1'b1; end
      7'd80: begin word = mw(RS_PC, RS_SP, SRC_DA, FN_ADD, DST_RAMF, 1'b0, DM_IROFS6); end
      7'd81: begin word = copy(RS_R5, RS_PC); end
      7'd82: begin word = post_inc(RS_SP, DM_C2); word.bus = BUS_READ; end
      7'd83: begin word = from_bdr(RS_R5); word.fin = 1'b1; end
      // ---- RTI / RTT: pop PC, pop PSW into the source buffer
      7'd84: begin word = post_inc(RS_SP, DM_C2); word.bus = BUS_READ; end
      7'd85: begin word = from_bdr(RS_PC); end
      7'd86: begin word = post_inc(RS_SP, DM_C2); word.bus = BUS_READ; end
      7'd87: begin word = from_bdr(RS_SB); word.fin = 1'b1; end
      // ---- trap / interrupt service: push PSW and PC, load the new pair
      7'd88: begin word = pre_dec(RS_SP, DM_C2); end
      7'd89: begin word = mw(RS_PC, RS_PC, SRC_ZA, FN_OR, DST_NOP, 1'b0, DM_PSW);
                   word.ld_bdr = 1'b1; word.bus = BUS_WRITE; end
      7'd90: begin word = pre_dec(RS_SP, DM_C2); end
      7'd91: begin word = mw(RS_PC, RS_PC, SRC_ZA, FN_OR, DST_NOP, 1'b0, DM_Y);
                   word.ld_bdr = 1'b1; word.bus = BUS_WRITE; end
      7'd92: begin word = mw(RS_PC, RS_TB, SRC_DZ, FN_OR, DST_RAMF, 1'b0, DM_TVEC);
                   word.ld_bar = 1'b1; word.bus = BUS_READ; end
      7'd93: begin word = from_bdr(RS_PC); end
      7'd94: begin word = mw(RS_TB, RS_TB, SRC_DA, FN_ADD, DST_NOP, 1'b0, DM_C2);
                   word.ld_bar = 1'b1; word.bus = BUS_READ; end
      7'd95: begin word = from_bdr(RS_SB); word.fin = 1'b1; end
      // ---- HALT (R0 to the console data display, PC to the address
      //      display), WAIT, RESET
      7'd96: begin word = mw(RS_REG, RS_REG, SRC_ZA, FN_OR, DST_NOP, 1'b0, DM_ZERO);
                   word.misc = MI_CONS_DATA; end
      7'd97: begin word = mw(RS_PC, RS_PC, SRC_ZA, FN_OR, DST_NOP, 1'b0, DM_ZERO);
                   word.misc = MI_HALT; word.fin = 1'b1; end
      7'd98: begin word = nop(); word.misc = MI_WAIT; word.fin = 1'b1; end
      7'd99: begin word = nop(); word.misc = MI_RESET; word.fin = 1'b1; end
      default: begin word = nop(); word.fin = 1'b1; end
    endcase
  end

  // ------------------------------------------------- register address muxes
  logic use_src;
  assign use_src = (sas == SAS_SRC) || word.rsrc;
  assign reg_num = use_src ? dec.src_reg : dec.dst_reg;

  function automatic logic [3:0] rsel(reg_sel_e s, logic [2:0] r, sas_e t);
    unique case (s)
      RS_PC:  return RA_PC;
      RS_SP:  return RA_SP;
      RS_R5:  return RA_R5;
      RS_REG: return {1'b0, r};
      RS_BUF: return (t == SAS_SRC) ? RA_SB : RA_DB;
      RS_SB:  return RA_SB;
      RS_DB:  return RA_DB;
      RS_TB:  return RA_TB;
    endcase
  endfunction

  assign aadr = rsel(word.asel, reg_num, sas);
  assign badr = rsel(word.bsel, reg_num, sas);
  assign fin  = en && word.fin && !(word.misc == MI_WAIT && !wake);
endmodule
