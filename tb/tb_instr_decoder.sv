// tb_instr_decoder: self-checking test of the instruction register and
// decoder.
//
// Random double-operand instructions (word and byte) are loaded through the
// instruction register and their decoded ACS address, byte flag, task
// sequence, addressing-mode routine addresses and store routine are compared
// with values derived from the opcode name. Single-operand instructions,
// branches, SOB, JSR/JMP, RTS, MARK, the system control instructions, the
// traps and some reserved codes are checked from a table.
module tb_instr_decoder;
  import smp11_pkg::*;

  logic        clk = 1'b0, rst, ir_we;
  logic [15:0] ir_d, ir;
  dec_t        dec;

  instr_decoder dut (.clk, .rst, .ir_we, .ir_d, .ir, .dec);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s (ir=%06o): got %0d expected %0d", what, ir, got, exp);
    end
  endtask

  task automatic load(input logic [15:0] v);
    ir_d = v; ir_we = 1; @(posedge clk); #1; ir_we = 0; #1;
    chk("IR load", ir, v);
  endtask

  function automatic logic [MACS_AW-1:0] mrom(int m);
    logic [MACS_AW-1:0] t[8] = '{MA_MODE0, MA_MODE1, MA_MODE2, MA_MODE3, MA_MODE4, MA_MODE5,
                                 MA_MODE6, MA_MODE7};
    return t[m];
  endfunction
  function automatic logic [MACS_AW-1:0] mmv(int m);
    logic [MACS_AW-1:0] t[8] = '{MA_MV0, MA_MV1, MA_MV2, MA_MV3, MA_MV4, MA_MV5, MA_MV6, MA_MV7};
    return t[m];
  endfunction

  task automatic special(input logic [15:0] v, input logic [3:0] hs, input logic [MACS_AW-1:0] post,
                         input trap_e tr);
    load(v);
    chk("HS select", dec.hs_sel, HSS_SPE);
    chk("HS start", dec.hs_spe, hs);
    if (hs == HS_POST || hs == HS_DPO) chk("post routine", dec.post_start, post);
    chk("trap", dec.trap, tr);
  endtask

  int op, sm, dm, byt, acs;
  logic [15:0] v;
  initial begin
    rst = 1; ir_we = 0; ir_d = 0;
    @(posedge clk); #1; rst = 0;
    // double operand: MOV CMP BIT BIC BIS ADD/SUB
    for (int t = 0; t < 2000; t++) begin
      op = $urandom_range(1, 6); byt = $urandom_range(0, 1);
      sm = $urandom_range(0, 7); dm = $urandom_range(0, 7);
      v = {1'(byt), 3'(op), 3'(sm), 3'($urandom), 3'(dm), 3'($urandom)};
      load(v);
      unique case ({byt[0], 3'(op)})
        4'b0001, 4'b1001: acs = 28;  // MOV
        4'b0010, 4'b1010: acs = 26;  // CMP
        4'b0011, 4'b1011: acs = 30;  // BIT
        4'b0100, 4'b1100: acs = 25;  // BIC
        4'b0101, 4'b1101: acs = 29;  // BIS
        4'b0110:          acs = 27;  // ADD
        default:          acs = 24;  // SUB
      endcase
      chk("ACS address", dec.acs_addr, acs);
      chk("HS select", dec.hs_sel, HSS_DOP);
      chk("byte", dec.byte_op, (byt == 1) && (op != 6));
      chk("src routine", dec.src_start, mrom(sm));
      chk("dst routine", dec.dst_start, (op == 1) ? mmv(dm) : mrom(dm));
      chk("post routine", dec.post_start,
          (op == 2 || op == 3) ? MA_NOSTORE : (dm != 0) ? MA_ST_MEM :
          (op == 1 && byt == 1) ? MA_ST_SEXT : MA_ST_REG);
      chk("registers", {dec.src_reg, dec.dst_reg}, {v[8:6], v[2:0]});
      chk("no trap", dec.trap, TRAP_NONE);
    end
    // single operand CLR..ASL, word and byte
    for (int t = 0; t < 500; t++) begin
      op = $urandom_range(0, 11); byt = $urandom_range(0, 1); dm = $urandom_range(0, 7);
      v = {1'(byt), 9'(9'o050 + op), 3'(dm), 3'($urandom)};
      load(v);
      chk("SOP ACS", dec.acs_addr, 8 + op);
      chk("SOP HS", dec.hs_sel, HSS_SOP);
      chk("SOP byte", dec.byte_op, byt);
      chk("SOP A = dest", dec.op_a_dst, 1);
      chk("SOP post", dec.post_start, (op == 7) ? MA_NOSTORE : (dm != 0) ? MA_ST_MEM : MA_ST_REG);
    end
    load(16'o000301); chk("SWAB ACS", dec.acs_addr, 3);
    load(16'o006701); chk("SXT ACS", dec.acs_addr, 23);
    load(16'o106427); chk("MTPS ACS", dec.acs_addr, 20); chk("MTPS post", dec.post_start, MA_NOSTORE);
    load(16'o106701); chk("MFPS ACS", dec.acs_addr, 22); chk("MFPS post", dec.post_start, MA_ST_SEXT);
    load(16'o074305); chk("XOR ACS", dec.acs_addr, 31); chk("XOR HS", dec.hs_sel, HSS_DOP);
    load(16'o000257); chk("CCC HS", dec.hs_spe, HS_OPO); chk("CCC ACS", dec.acs_addr, ACS_CCOP);
    special(16'o000407, HS_POST, MA_BR, TRAP_NONE);       // BR
    special(16'o101377, HS_POST, MA_BR, TRAP_NONE);       // BHI
    special(16'o077105, HS_POST, MA_SOB, TRAP_NONE);      // SOB
    special(16'o000137, HS_DPO, MA_JMP, TRAP_NONE);       // JMP @#
    chk("JMP dst routine", dec.dst_start, MA_MV3);
    special(16'o004712, HS_DPO, MA_JSR, TRAP_NONE);       // JSR PC,(R2)
    chk("JSR dst routine", dec.dst_start, MA_MV1);
    special(16'o000122, HS_DPO, MA_JMP, TRAP_NONE);       // JMP (R2)+
    chk("JMP (R)+ routine", dec.dst_start, MA_JA2);
    special(16'o000205, HS_POST, MA_RTS, TRAP_NONE);      // RTS R5
    special(16'o006403, HS_POST, MA_MARK, TRAP_NONE);     // MARK 3
    special(16'o000000, HS_POST, MA_HALT, TRAP_NONE);     // HALT
    special(16'o000001, HS_POST, MA_WAIT, TRAP_NONE);     // WAIT
    special(16'o000005, HS_POST, MA_RESET, TRAP_NONE);    // RESET
    special(16'o000002, HS_SER, '0, TRAP_NONE);           // RTI
    chk("RTI routine", dec.spe_start, MA_RTI); chk("RTI ACS", dec.acs_addr, ACS_LDPSW);
    special(16'o000006, HS_SER, '0, TRAP_NONE);           // RTT
    special(16'o000003, HS_SER, '0, TRAP_BPT);
    special(16'o000004, HS_SER, '0, TRAP_IOT);
    special(16'o104123, HS_SER, '0, TRAP_EMT);
    special(16'o104523, HS_SER, '0, TRAP_TRAP);
    chk("trap routine", dec.spe_start, MA_SER); chk("trap ACS", dec.acs_addr, ACS_TRAP);
    special(16'o000010, HS_SER, '0, TRAP_RSVD);
    special(16'o000100, HS_SER, '0, TRAP_RSVD);           // JMP R0 is illegal
    special(16'o170000, HS_SER, '0, TRAP_RSVD);           // floating point: not provided
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
