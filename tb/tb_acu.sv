// tb_acu: self-checking test of the arithmetic control unit, run together
// with the RALU, the D-bus multiplexer and the PSW logic it controls.
//
// For each test the bench loads random operands into the source and
// destination buffers and a random PSW, then enables the ACU for one cycle at
// the ACS address of a random PDP-11 operation (all double-operand, single-
// operand, shift, SWAB, SXT, MFPS and MTPS operations, word and byte forms).
// The destination buffer and the new PSW are compared with a reference model
// written from the PDP-11 instruction definitions (results and N, Z, V, C).
// The finished line, the single-cycle timing and the forced PSW-load address
// during service are checked as well.
module tb_acu;
  import smp11_pkg::*;

  logic        clk = 1'b0;
  logic        en, in_service, byte_op, op_a_dst;
  logic [4:0]  addr_dec, addr;
  acs_word_t   word;
  logic        cn, byte_sel, fin;
  logic [3:0]  aadr, badr;

  logic [7:0]  psw;
  logic        br_true;
  logic [15:0] y, f, d, dmux, tb_d;
  ralu_flags_t flags;

  logic        tb_ctl, tb_psw;
  ralu_i_t     tb_i;
  logic [3:0]  tb_a, tb_b;
  psw_ctl_t    ld_all;

  acu dut (.en, .addr_dec, .in_service, .byte_op, .op_a_dst, .cflag(psw[0]), .word, .addr,
           .cn, .byte_sel, .aadr, .badr, .fin);

  ralu16 u_ralu (.clk, .ce(1'b1), .i(tb_ctl ? tb_i : word.i), .cn(tb_ctl ? 1'b0 : cn),
                 .byte_op(tb_ctl ? 1'b0 : byte_sel), .aadr(tb_ctl ? tb_a : aadr),
                 .badr(tb_ctl ? tb_b : badr), .d, .shin(tb_ctl ? SHIN_ZERO : word.shin),
                 .cflag(psw[0]), .y, .f, .flags);

  dbus_mux u_dm (.sel(word.dsel), .bdr_in(16'h0), .y, .psw, .ir(16'h0), .br_true,
                 .byte_op, .cinc_byte(1'b0), .bar0(1'b0), .tvec(16'h0), .nflag(psw[3]),
                 .d(dmux));
  assign d = tb_ctl ? tb_d : dmux;

  psw_unit u_psw (.clk, .rst(1'b0), .ce(1'b1), .ld(tb_psw || !tb_ctl),
                  .ctl(tb_psw ? ld_all : word.psw), .byte_op, .flags, .ir(16'h0), .dbus(d),
                  .psw, .br_true);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h (acs %0d byte %b)", what, got, exp, addr_dec, byte_op);
    end
  endtask

  task automatic put(input logic [3:0] r, input logic [15:0] v);
    tb_ctl = 1; tb_psw = 0; tb_i = '{dst: DST_RAMF, fn: FN_OR, src: SRC_DZ}; tb_b = r; tb_d = v;
    @(posedge clk); #1;
  endtask
  task automatic setpsw(input logic [7:0] v);
    tb_ctl = 1; tb_psw = 1; tb_i = '{dst: DST_NOP, fn: FN_OR, src: SRC_ZA}; tb_d = {8'h0, v};
    @(posedge clk); #1; tb_psw = 0;
  endtask
  task automatic get(input logic [3:0] r, output logic [15:0] v);
    tb_ctl = 1; tb_psw = 0; tb_i = '{dst: DST_NOP, fn: FN_OR, src: SRC_ZA}; tb_a = r; #1;
    v = y;
  endtask

  localparam int OPS[24] = '{24, 25, 26, 27, 28, 29, 30, 31, 8, 9, 10, 11, 12, 13, 14, 15,
                             16, 17, 18, 19, 3, 23, 22, 20};

  logic [15:0] sb, db, res, rd, msk, sgn;
  logic [7:0]  p0, pn;
  logic        N, Z, V, C, st, wb;
  int          op;
  initial begin
    ld_all = PSW_HOLD;
    ld_all.nsel = FS_D; ld_all.zsel = FS_D; ld_all.vsel = FS_D; ld_all.csel = FS_D;
    ld_all.ld_t = 1; ld_all.ld_pri = 1;
    en = 0; in_service = 0; byte_op = 0; op_a_dst = 0; addr_dec = 0;
    tb_ctl = 1; tb_psw = 0; tb_i = '{dst: DST_NOP, fn: FN_OR, src: SRC_ZA}; tb_a = 0; tb_b = 0;
    tb_d = 0;
    @(posedge clk); #1;
    for (int t = 0; t < 4000; t++) begin
      op = OPS[$urandom_range(0, 23)];
      sb = 16'($urandom); db = 16'($urandom);
      if ($urandom_range(0, 7) == 0) db = 16'h8000;
      if ($urandom_range(0, 7) == 0) db = 16'h7FFF;
      if ($urandom_range(0, 7) == 0) db = 16'h0000;
      if ($urandom_range(0, 7) == 0) sb = db;
      p0 = 8'($urandom);
      put(RA_SB, sb); put(RA_DB, db); setpsw(p0);
      // operand width
      byte_op = 1'($urandom);
      if (op == 24 || op == 27 || op == 31 || op == 3 || op == 23) byte_op = 0;
      if (op == 22 || op == 20) byte_op = 1;
      op_a_dst = (op < 24);
      msk = byte_op ? 16'h00FF : 16'hFFFF; sgn = byte_op ? 16'h0080 : 16'h8000;
      {N, Z, V, C} = p0[3:0];
      st = 1; wb = 1; pn = p0;
      sb &= 16'hFFFF;
      case (op)
        28: begin res = sb; V = 0; end                                   // MOV
        26: begin res = sb - db; wb = 0; V = ((sb ^ db) & sgn) != 0 && ((res ^ db) & sgn) == 0;
                  C = (sb & msk) < (db & msk); end                       // CMP
        30: begin res = sb & db; wb = 0; V = 0; end                      // BIT
        25: begin res = ~sb & db; V = 0; end                             // BIC
        29: begin res = sb | db; V = 0; end                              // BIS
        27: begin res = sb + db; V = ((~(sb ^ db)) & (sb ^ res) & sgn) != 0;
                  C = (32'(sb) + 32'(db)) > 32'hFFFF; end                // ADD
        24: begin res = db - sb; V = ((sb ^ db) & sgn) != 0 && ((res ^ sb) & sgn) == 0;
                  C = db < sb; end                                       // SUB
        31: begin res = sb ^ db; V = 0; end                              // XOR
        8:  begin res = 0; V = 0; C = 0; end                             // CLR
        9:  begin res = ~db; V = 0; C = 1; end                           // COM
        10: begin res = db + 1; V = (db & msk) == (sgn - 1); end         // INC
        11: begin res = db - 1; V = (db & msk) == sgn; end               // DEC
        12: begin res = -db; V = (res & msk) == sgn; C = (res & msk) != 0; end   // NEG
        13: begin res = db + 16'(C); V = ((db & msk) == sgn - 1) && C;
                  C = ((db & msk) == msk) && C; end                      // ADC
        14: begin res = db - 16'(C); V = ((db & msk) == sgn) && C;
                  C = ((db & msk) == 0) && C; end                        // SBC
        15: begin res = db; wb = 0; V = 0; C = 0; end                    // TST
        16: begin res = ((db & msk) >> 1) | (C ? sgn : 16'h0); C = db[0]; end      // ROR
        17: begin res = ((db << 1) | 16'(C)); C = (db & sgn) != 0; end  // ROL
        18: begin res = ((db & msk) >> 1) | (db & sgn); C = db[0]; end  // ASR
        19: begin res = db << 1; C = (db & sgn) != 0; end               // ASL
        3:  begin res = {db[7:0], db[15:8]}; V = 0; C = 0; end           // SWAB
        23: begin res = N ? 16'hFFFF : 16'h0000; V = 0; end              // SXT
        22: begin res = {8'h00, p0}; V = 0; end                          // MFPS
        default: begin res = db; wb = 0; st = 0; end                     // MTPS
      endcase
      if (op >= 16 && op <= 19) begin
        N = (res & sgn) != 0; V = N ^ C;
      end
      if (op == 3) begin N = res[7]; Z = res[7:0] == 0; end
      else if (op == 23) Z = !N;
      else if (st) begin N = (res & sgn) != 0; Z = (res & msk) == 0; end
      if (op == 20) pn = {db[7:5], p0[4], db[3:0]};
      else pn = {p0[7:4], N, Z, V, C};
      rd = wb ? ((res & msk) | (db & ~msk)) : db;
      // run the ACU for one cycle
      tb_ctl = 0; en = 1; addr_dec = 5'(op); #1;
      chk("finished", fin, 1);
      chk("address", addr, op);
      @(posedge clk); #1;
      en = 0;
      get(RA_DB, res);
      chk("result", res, rd);
      chk("PSW", psw, pn);
    end
    // service forces the PSW-load word
    in_service = 1; addr_dec = 5'd27; #1;
    chk("service address", addr, ACS_TRAP);
    chk("service A port", aadr, RA_SB);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
