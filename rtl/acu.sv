// acu: SMP-11 arithmetic control unit (OP-phase segment controller).
//
// Every PDP-11 arithmetic, logical and PSW operation of the basic instruction
// set runs in one RALU cycle, so this controller has no microsequencer: the
// instruction decoder supplies the address of one word of a 32-word control
// store, and the word's finished bit is always set, which steps the handshake
// sequencer as soon as the ACU is enabled. A word holds the 2901 source,
// function and destination codes, the carry-in choice, the shift-link choice,
// the D-bus source and the PSW input selection (which flags load, and from
// the RALU, the instruction register or the data bus). For byte instructions
// the upper-byte slices receive a hardwired no-operation code (byte_sel).
// During the OP phase the RALU A port reads the source buffer (or the
// destination buffer for single-operand instructions) and the B port the
// destination buffer, which also receives the result.
//
// The store's address map is the document's ACS table; the contents are this
// design's own microcode written for those operations (the printed bit
// strings are not reused). While a service sequence runs the address is
// forced to the PSW-load word.
//
// Purely combinational: the word drives the datapath in the cycle the ACU is
// enabled.
module acu (
  input  logic                          en,
  input  logic [smp11_pkg::ACS_AW-1:0]  addr_dec,
  input  logic                          in_service,
  input  logic                          byte_op,
  input  logic                          op_a_dst,
  input  logic                          cflag,
  output smp11_pkg::acs_word_t          word,
  output logic [smp11_pkg::ACS_AW-1:0]  addr,
  output logic                          cn,
  output logic                          byte_sel,
  output logic [3:0]                    aadr,
  output logic [3:0]                    badr,
  output logic                          fin
);
  import smp11_pkg::*;

  function automatic psw_ctl_t pc(flag_sel_e n, flag_sel_e z, flag_sel_e v, flag_sel_e c,
                                  vgen_e vg, cgen_e cg, logic cinv);
    psw_ctl_t p = PSW_HOLD;
    p.nsel = n; p.zsel = z; p.vsel = v; p.csel = c;
    p.vgen = vg; p.cgen = cg; p.cinv = cinv;
    return p;
  endfunction

  function automatic acs_word_t aw(alu_src_e s, alu_fn_e f, alu_dst_e d, cn_sel_e c,
                                   shin_e sh, dsel_e dm, psw_ctl_t p);
    acs_word_t w;
    w.i    = '{dst: d, fn: f, src: s};
    w.cn   = c;
    w.shin = sh;
    w.dsel = dm;
    w.psw  = p;
    w.fin  = 1'b1;
    return w;
  endfunction

  // Common condition-code settings.
  psw_ctl_t p_log, p_add, p_sub, p_inc, p_zero, p_tst, p_shift, p_data;
  always_comb begin
    p_log   = pc(FS_L, FS_L, FS_L, FS_P, VG_ZERO, CG_ZERO, 1'b0);   // N Z, V=0
    p_add   = pc(FS_L, FS_L, FS_L, FS_L, VG_OVR, CG_CARRY, 1'b0);
    p_sub   = pc(FS_L, FS_L, FS_L, FS_L, VG_OVR, CG_CARRY, 1'b1);
    p_inc   = pc(FS_L, FS_L, FS_L, FS_P, VG_OVR, CG_ZERO, 1'b0);
    p_zero  = pc(FS_L, FS_L, FS_L, FS_L, VG_ZERO, CG_ZERO, 1'b0);   // V=0, C=0
    p_tst   = p_zero;
    p_shift = pc(FS_L, FS_L, FS_L, FS_L, VG_NXC, CG_SHIFT, 1'b0);
    p_data  = pc(FS_D, FS_D, FS_D, FS_D, VG_ZERO, CG_ZERO, 1'b0);
    p_data.ld_t = 1'b1; p_data.ld_pri = 1'b1;
  end

  assign addr = in_service ? ACS_TRAP : addr_dec;

  always_comb begin
    psw_ctl_t p;
    p    = PSW_HOLD;
    word = aw(SRC_ZA, FN_OR, DST_NOP, CN_ZERO, SHIN_ZERO, DM_ZERO, PSW_HOLD);
    unique case (addr)
      5'd0, 5'd4: word = aw(SRC_ZA, FN_OR, DST_NOP, CN_ZERO, SHIN_ZERO, DM_Y, p_data); // PSW load
      5'd2: begin                                                                       // CC ops
        p = pc(FS_I, FS_I, FS_I, FS_I, VG_ZERO, CG_ZERO, 1'b0);
        word = aw(SRC_ZA, FN_OR, DST_NOP, CN_ZERO, SHIN_ZERO, DM_ZERO, p);
      end
      5'd3: begin                                                                       // SWAB
        p = p_zero; p.swab = 1'b1;
        word = aw(SRC_DZ, FN_OR, DST_RAMA, CN_ZERO, SHIN_ZERO, DM_YSWAP, p);
      end
      5'd8:  word = aw(SRC_ZB, FN_AND,   DST_RAMF, CN_ZERO, SHIN_ZERO,  DM_ZERO, p_zero); // CLR
      5'd9: begin                                                                         // COM
        p = p_zero; p.cgen = CG_ONE;
        word = aw(SRC_ZB, FN_EXNOR, DST_RAMF, CN_ZERO, SHIN_ZERO, DM_ZERO, p);
      end
      5'd10: word = aw(SRC_ZB, FN_ADD,   DST_RAMF, CN_ONE,  SHIN_ZERO,  DM_ZERO, p_inc);  // INC
      5'd11: word = aw(SRC_ZB, FN_SUBR,  DST_RAMF, CN_ZERO, SHIN_ZERO,  DM_ZERO, p_inc);  // DEC
      5'd12: word = aw(SRC_ZB, FN_SUBS,  DST_RAMF, CN_ONE,  SHIN_ZERO,  DM_ZERO, p_sub);  // NEG
      5'd13: word = aw(SRC_ZB, FN_ADD,   DST_RAMF, CN_C,    SHIN_ZERO,  DM_ZERO, p_add);  // ADC
      5'd14: word = aw(SRC_ZB, FN_SUBR,  DST_RAMF, CN_NOTC, SHIN_ZERO,  DM_ZERO, p_sub);  // SBC
      5'd15: word = aw(SRC_ZB, FN_OR,    DST_NOP,  CN_ZERO, SHIN_ZERO,  DM_ZERO, p_tst);  // TST
      5'd16: word = aw(SRC_ZB, FN_OR,    DST_RAMD, CN_ZERO, SHIN_CARRY, DM_ZERO, p_shift);// ROR
      5'd17: word = aw(SRC_ZB, FN_OR,    DST_RAMU, CN_ZERO, SHIN_CARRY, DM_ZERO, p_shift);// ROL
      5'd18: word = aw(SRC_ZB, FN_OR,    DST_RAMD, CN_ZERO, SHIN_SIGN,  DM_ZERO, p_shift);// ASR
      5'd19: word = aw(SRC_ZB, FN_OR,    DST_RAMU, CN_ZERO, SHIN_ZERO,  DM_ZERO, p_shift);// ASL
      5'd20: begin                                                                        // MTPS
        p = p_data; p.ld_t = 1'b0;
        word = aw(SRC_ZA, FN_OR, DST_NOP, CN_ZERO, SHIN_ZERO, DM_Y, p);
      end
      5'd22: word = aw(SRC_DZ, FN_OR,    DST_RAMF, CN_ZERO, SHIN_ZERO,  DM_PSW,  p_log);  // MFPS
      5'd23: begin                                                                        // SXT
        p = p_log; p.nsel = FS_P;
        word = aw(SRC_DZ, FN_OR, DST_RAMF, CN_ZERO, SHIN_ZERO, DM_NFILL, p);
      end
      5'd24: word = aw(SRC_AB, FN_SUBR,  DST_RAMF, CN_ONE,  SHIN_ZERO,  DM_ZERO, p_sub);  // SUB
      5'd25: word = aw(SRC_AB, FN_NOTRS, DST_RAMF, CN_ZERO, SHIN_ZERO,  DM_ZERO, p_log);  // BIC
      5'd26: word = aw(SRC_AB, FN_SUBS,  DST_NOP,  CN_ONE,  SHIN_ZERO,  DM_ZERO, p_sub);  // CMP
      5'd27: word = aw(SRC_AB, FN_ADD,   DST_RAMF, CN_ZERO, SHIN_ZERO,  DM_ZERO, p_add);  // ADD
      5'd28: word = aw(SRC_ZA, FN_OR,    DST_RAMF, CN_ZERO, SHIN_ZERO,  DM_ZERO, p_log);  // MOV
      5'd29: word = aw(SRC_AB, FN_OR,    DST_RAMF, CN_ZERO, SHIN_ZERO,  DM_ZERO, p_log);  // BIS
      5'd30: word = aw(SRC_AB, FN_AND,   DST_NOP,  CN_ZERO, SHIN_ZERO,  DM_ZERO, p_log);  // BIT
      5'd31: word = aw(SRC_AB, FN_EXOR,  DST_RAMF, CN_ZERO, SHIN_ZERO,  DM_ZERO, p_log);  // XOR
      default: ;
    endcase
  end

  always_comb begin
    unique case (word.cn)
      CN_ZERO: cn = 1'b0;
      CN_ONE:  cn = 1'b1;
      CN_C:    cn = cflag;
      CN_NOTC: cn = ~cflag;
    endcase
  end

  assign byte_sel = en & byte_op;
  assign aadr     = (op_a_dst && !in_service) ? RA_DB : RA_SB;
  assign badr     = RA_DB;
  assign fin      = en & word.fin;
endmodule
