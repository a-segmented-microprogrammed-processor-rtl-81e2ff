// tb_psw_unit: self-checking test of the processor status word logic.
//
// Random PSW control words, RALU flags, instruction and data-bus values are
// applied; a reference model written from the PDP-11 rules (flags kept,
// generated from the RALU, set/cleared by condition-code instructions, loaded
// from the data bus; V = N xor C for shifts; carry inverted for subtracts;
// byte forms taking bit 7 and the low-byte zero) gives the expected PSW after
// each clock. The branch condition is checked for every conditional branch
// opcode against a table of the PDP-11 branch definitions.
module tb_psw_unit;
  import smp11_pkg::*;

  logic        clk = 1'b0, rst, ld, byte_op, br_true;
  psw_ctl_t    ctl;
  ralu_flags_t flags;
  logic [15:0] ir, dbus;
  logic [7:0]  psw;

  psw_unit dut (.clk, .rst, .ce(1'b1), .ld, .ctl, .byte_op, .flags, .ir, .dbus, .psw, .br_true);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  function automatic logic pick(flag_sel_e s, logic prev, logic gen, logic irb, logic db);
    unique case (s)
      FS_P: return prev;
      FS_L: return gen;
      FS_I: return irb ? ir[4] : prev;
      FS_D: return db;
    endcase
  endfunction

  logic [7:0] m;
  logic n, z, v, c, nl, zl, cl, vl;
  logic N, Z, V, C, exp_br;
  initial begin
    rst = 1; ld = 0; byte_op = 0; ctl = PSW_HOLD; flags = '0; ir = 0; dbus = 0;
    @(posedge clk); #1; rst = 0;
    m = 8'h00;
    chk("reset", psw, 0);
    for (int t = 0; t < 3000; t++) begin
      ctl     = psw_ctl_t'($urandom);
      if (ctl.vgen == 2'd3) ctl.vgen = VG_ZERO;
      flags   = ralu_flags_t'($urandom);
      ir      = 16'($urandom); dbus = 16'($urandom);
      byte_op = 1'($urandom); ld = ($urandom_range(0, 7) != 0);
      #1;
      nl = (byte_op | ctl.swab) ? flags.f7 : flags.f15;
      zl = (byte_op | ctl.swab) ? flags.zlo : (flags.zlo & flags.zhi);
      unique case (ctl.cgen)
        CG_ZERO: cl = 0;
        CG_ONE: cl = 1;
        CG_CARRY: cl = (byte_op ? flags.c8 : flags.c16) ^ ctl.cinv;
        default: cl = flags.shout;
      endcase
      n = pick(ctl.nsel, m[3], nl, ir[3], dbus[3]);
      z = pick(ctl.zsel, m[2], zl, ir[2], dbus[2]);
      c = pick(ctl.csel, m[0], cl, ir[0], dbus[0]);
      vl = (ctl.vgen == VG_NXC) ? (n ^ c) : (ctl.vgen == VG_OVR) ? (byte_op ? flags.ovr8 : flags.ovr16) : 1'b0;
      v = pick(ctl.vsel, m[1], vl, ir[1], dbus[1]);
      if (ld) begin
        m[3:0] = {n, z, v, c};
        if (ctl.ld_t) m[4] = dbus[4];
        if (ctl.ld_pri) m[7:5] = dbus[7:5];
      end
      @(posedge clk); #1;
      chk("PSW", psw, m);
    end
    // branch conditions
    ld = 0;
    for (int t = 0; t < 2000; t++) begin
      @(posedge clk); #1;
      ld = 1; ctl = PSW_HOLD; ctl.nsel = FS_D; ctl.zsel = FS_D; ctl.vsel = FS_D; ctl.csel = FS_D;
      dbus = 16'($urandom);
      @(posedge clk); #1; ld = 0;
      {N, Z, V, C} = dbus[3:0];
      ir = {$urandom_range(0, 1) == 1 ? 1'b1 : 1'b0, 4'b0000, 3'($urandom_range(0, 7)), 8'($urandom)};
      if (ir[15:8] == 8'h00) ir[8] = 1'b1;   // 000000-000377 are not branches
      #1;
      unique casez (ir[15:8])
        8'o001: exp_br = 1;              // BR
        8'o002: exp_br = !Z;             // BNE
        8'o003: exp_br = Z;              // BEQ
        8'o004: exp_br = !(N ^ V);       // BGE
        8'o005: exp_br = N ^ V;          // BLT
        8'o006: exp_br = !(Z | (N ^ V)); // BGT
        8'o007: exp_br = Z | (N ^ V);    // BLE
        8'o200: exp_br = !N;             // BPL
        8'o201: exp_br = N;              // BMI
        8'o202: exp_br = !(C | Z);       // BHI
        8'o203: exp_br = C | Z;          // BLOS
        8'o204: exp_br = !V;             // BVC
        8'o205: exp_br = V;              // BVS
        8'o206: exp_br = !C;             // BCC
        8'o207: exp_br = C;              // BCS
        default: exp_br = 1'bx;
      endcase
      chk("branch", br_true, exp_br);
    end
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
