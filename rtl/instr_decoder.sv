// instr_decoder: SMP-11 instruction register and instruction decoder.
//
// The instruction register is loaded from the bus when an instruction fetch
// read completes. The decoder then separates the instruction into the work of
// the three controllers, and its outputs stay valid for the whole instruction:
//  * handshake sequencer: a start-address select (hardwired DOP or SOP task
//    sequence, or the 4-bit address of a SPECIAL sequence);
//  * memory access controller: the SRC and DST addressing-mode routine start
//    addresses (one "PROM" function applied to each 3-bit mode field, with a
//    move-type variant that skips the operand read and a jump-type variant
//    that leaves the effective address in a buffer), the SPECIAL pre-op start
//    address and the post-op start address;
//  * arithmetic controller: a 5-bit ACS address. Double-operand instructions
//    use 24 + IR<12>,IR<13>,IR<14> with SUB forced to 24 and XOR to 31;
//    single-operand ones use IR<10:6>, except MFPS (22) and the traps (4).
//    This reproduces the ACS address map of the document's ACS table.
// The register fields IR<8:6> and IR<2:0> address the 2901 RAM directly.
// The document uses two FPLAs, two mode PROMs and gating logic; here the same
// tables are written as combinational case logic. The task-sequence entry
// points and routine addresses are this design's own microcode layout.
//
// Timing: IR loads at the rising edge when ir_we is high; decoding is
// combinational from the IR.
module instr_decoder (
  input  logic              clk,
  input  logic              rst,
  input  logic              ir_we,
  input  logic [15:0]       ir_d,
  output logic [15:0]       ir,
  output smp11_pkg::dec_t   dec
);
  import smp11_pkg::*;

  always_ff @(posedge clk) begin
    if (rst)        ir <= 16'h0000;
    else if (ir_we) ir <= ir_d;
  end

  function automatic logic [MACS_AW-1:0] mode_rom(logic [2:0] m);
    unique case (m)
      3'd0: return MA_MODE0;
      3'd1: return MA_MODE1;
      3'd2: return MA_MODE2;
      3'd3: return MA_MODE3;
      3'd4: return MA_MODE4;
      3'd5: return MA_MODE5;
      3'd6: return MA_MODE6;
      3'd7: return MA_MODE7;
    endcase
  endfunction

  function automatic logic [MACS_AW-1:0] mode_mv(logic [2:0] m);
    unique case (m)
      3'd0: return MA_MV0;
      3'd1: return MA_MV1;
      3'd2: return MA_MV2;
      3'd3: return MA_MV3;
      3'd4: return MA_MV4;
      3'd5: return MA_MV5;
      3'd6: return MA_MV6;
      3'd7: return MA_MV7;
    endcase
  endfunction

  function automatic logic [MACS_AW-1:0] mode_jmp(logic [2:0] m);
    unique case (m)
      3'd2:    return MA_JA2;
      3'd4:    return MA_JA4;
      default: return mode_mv(m);
    endcase
  endfunction

  logic [2:0] smode, dmode;
  logic       is_dop, is_xor, is_sob, is_jsr, is_br, is_jmp, is_rts, is_ccop, is_swab;
  logic       is_sop, is_mark, is_sxt, is_mtps, is_mfps, is_emt, is_trap;
  logic       test_dop, test_sop;

  assign smode = ir[11:9];
  assign dmode = ir[5:3];

  always_comb begin
    is_dop  = (ir[14:12] != 3'd0) && (ir[14:12] != 3'd7);
    is_xor  = (ir[15:9] == 7'o074);
    is_sob  = (ir[15:9] == 7'o077);
    is_jsr  = (ir[15:9] == 7'o004);
    is_br   = (ir[14:11] == 4'd0) && ((ir[15] == 1'b1) || (ir[10:8] != 3'd0));
    is_jmp  = (ir[15:6] == 10'o0001);
    is_rts  = (ir[15:3] == 13'o00020);
    is_ccop = (ir[15:5] == 11'o0005);
    is_swab = (ir[15:6] == 10'o0003);
    // CLR..ASL (byte and word forms), SXT, MTPS, MFPS
    is_sop  = (ir[14:9] == 6'o05) || (ir[14:6] >= 9'o060 && ir[14:6] <= 9'o063);
    is_mark = (ir[15:6] == 10'o0064);
    is_sxt  = (ir[15:6] == 10'o0067);
    is_mtps = (ir[15:6] == 10'o1064);
    is_mfps = (ir[15:6] == 10'o1067);
    is_emt  = (ir[15:8] == 8'o210);
    is_trap = (ir[15:8] == 8'o211);
    test_dop = (ir[14:12] == 3'd2) || (ir[14:12] == 3'd3);  // CMP, BIT
    test_sop = (ir[14:6] == 9'o057);                        // TST
  end

  always_comb begin
    dec            = '0;
    dec.hs_sel     = HSS_SPE;
    dec.hs_spe     = HS_SER;
    dec.src_start  = mode_rom(smode);
    dec.dst_start  = mode_rom(dmode);
    dec.spe_start  = MA_SER;
    dec.post_start = MA_NOSTORE;
    dec.acs_addr   = ACS_TRAP;
    dec.src_reg    = ir[8:6];
    dec.dst_reg    = ir[2:0];
    dec.trap       = TRAP_RSVD;

    if (is_dop) begin
      dec.trap      = TRAP_NONE;
      dec.hs_sel    = HSS_DOP;
      dec.byte_op   = ir[15] && (ir[14:12] != 3'd6);
      dec.acs_addr  = (ir[14:12] == 3'd6 && ir[15]) ? 5'd24 : {2'b11, ir[12], ir[13], ir[14]};
      if (ir[14:12] == 3'd1) dec.dst_start = mode_mv(dmode);
      if (test_dop)             dec.post_start = MA_NOSTORE;
      else if (dmode != 3'd0)   dec.post_start = MA_ST_MEM;
      else if (ir[15] && ir[14:12] == 3'd1) dec.post_start = MA_ST_SEXT;  // MOVB to register
      else                      dec.post_start = MA_ST_REG;
    end else if (is_xor) begin
      dec.trap       = TRAP_NONE;
      dec.hs_sel     = HSS_DOP;
      dec.src_start  = MA_MODE0;
      dec.acs_addr   = 5'd31;
      dec.post_start = (dmode != 3'd0) ? MA_ST_MEM : MA_ST_REG;
    end else if (is_sop || is_swab || is_sxt || is_mtps || is_mfps) begin
      dec.trap     = TRAP_NONE;
      dec.hs_sel   = HSS_SOP;
      dec.op_a_dst = 1'b1;
      dec.byte_op  = ir[15];
      dec.acs_addr = is_mfps ? ACS_MFPS : ir[10:6];
      // CLR, SXT and MFPS overwrite a memory destination without reading it.
      if ((ir[14:6] == 9'o050 || is_sxt || is_mfps) && dmode != 3'd0)
        dec.dst_start = mode_mv(dmode);
      if (test_sop || is_mtps)  dec.post_start = MA_NOSTORE;
      else if (dmode != 3'd0)   dec.post_start = MA_ST_MEM;
      else if (is_mfps)         dec.post_start = MA_ST_SEXT;
      else                      dec.post_start = MA_ST_REG;
    end else if (is_br) begin
      dec.trap = TRAP_NONE; dec.hs_spe = HS_POST; dec.post_start = MA_BR;
    end else if (is_sob) begin
      dec.trap = TRAP_NONE; dec.hs_spe = HS_POST; dec.post_start = MA_SOB;
    end else if (is_ccop) begin
      dec.trap = TRAP_NONE; dec.hs_spe = HS_OPO; dec.acs_addr = ACS_CCOP;
    end else if ((is_jmp || is_jsr) && dmode != 3'd0) begin
      dec.trap       = TRAP_NONE;
      dec.hs_spe     = HS_DPO;
      dec.dst_start  = mode_jmp(dmode);
      dec.post_start = is_jmp ? MA_JMP : MA_JSR;
    end else if (is_rts) begin
      dec.trap = TRAP_NONE; dec.hs_spe = HS_POST; dec.post_start = MA_RTS;
    end else if (is_mark) begin
      dec.trap = TRAP_NONE; dec.hs_spe = HS_POST; dec.post_start = MA_MARK;
    end else if (ir == 16'o000000) begin
      dec.trap = TRAP_NONE; dec.hs_spe = HS_POST; dec.post_start = MA_HALT;
    end else if (ir == 16'o000001) begin
      dec.trap = TRAP_NONE; dec.hs_spe = HS_POST; dec.post_start = MA_WAIT;
    end else if (ir == 16'o000005) begin
      dec.trap = TRAP_NONE; dec.hs_spe = HS_POST; dec.post_start = MA_RESET;
    end else if (ir == 16'o000002 || ir == 16'o000006) begin
      dec.trap = TRAP_NONE; dec.spe_start = MA_RTI; dec.acs_addr = ACS_LDPSW;
    end else if (ir == 16'o000003) begin
      dec.trap = TRAP_BPT;
    end else if (ir == 16'o000004) begin
      dec.trap = TRAP_IOT;
    end else if (is_emt) begin
      dec.trap = TRAP_EMT;
    end else if (is_trap) begin
      dec.trap = TRAP_TRAP;
    end
  end
endmodule
