// tb_ralu16: self-checking test of the 16-bit RALU (four 2901 slices and the
// 2902 look-ahead carry generator).
//
// A 16-bit reference model computes the result, Y output, carries (out of the
// word and out of the low byte), overflows, sign and zero flags, and the value
// written back, for random arithmetic and logic operations, word and byte
// forms, and up/down shifts with each shift-link choice (0, carry, sign). Byte
// forms must leave the upper byte of the destination unchanged. Each write is
// checked by reading the register back through the A port.
module tb_ralu16;
  import smp11_pkg::*;

  logic        clk = 1'b0;
  ralu_i_t     i;
  logic        cn, byte_op, cflag;
  logic [3:0]  aadr, badr;
  logic [15:0] d, y, f;
  shin_e       shin;
  ralu_flags_t flags;

  ralu16 dut (.clk, .ce(1'b1), .i, .cn, .byte_op, .aadr, .badr, .d, .shin, .cflag,
              .y, .f, .flags);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h (fn=%0d src=%0d dst=%0d byte=%b)", what, got, exp,
               i.fn, i.src, i.dst, byte_op);
    end
  endtask

  logic [15:0] m [16];

  localparam alu_src_e SRCS[4] = '{SRC_AB, SRC_DA, SRC_ZB, SRC_ZA};
  localparam alu_dst_e DSTS[5] = '{DST_RAMF, DST_NOP, DST_RAMA, DST_RAMD, DST_RAMU};

  logic [15:0] r, s, ro, so, ef, ey, res, wr;
  logic [16:0] sum;
  logic [8:0]  sumb;
  logic [7:0]  s7;
  logic [15:0] s15;
  logic        ar, link, dn, up;
  initial begin
    cn = 0; byte_op = 0; cflag = 0; shin = SHIN_ZERO; aadr = 0; badr = 0; d = 0;
    for (int k = 0; k < 16; k++) begin
      i = '{dst: DST_RAMF, fn: FN_OR, src: SRC_DZ}; badr = 4'(k); d = 16'($urandom);
      m[k] = d; @(posedge clk); #1;
    end
    for (int t = 0; t < 4000; t++) begin
      i.fn  = alu_fn_e'($urandom_range(0, 7));
      i.src = SRCS[$urandom_range(0, 3)];
      i.dst = DSTS[$urandom_range(0, 4)];
      aadr = 4'($urandom); badr = 4'($urandom); d = 16'($urandom);
      if ($urandom_range(0, 3) == 0) d = 16'h0000;
      cn = 1'($urandom); byte_op = 1'($urandom); cflag = 1'($urandom);
      shin = shin_e'($urandom_range(0, 2));
      #1;
      unique case (i.src)
        SRC_AB: begin r = m[aadr]; s = m[badr]; end
        SRC_DA: begin r = d; s = m[aadr]; end
        SRC_ZB: begin r = 0; s = m[badr]; end
        default: begin r = 0; s = m[aadr]; end
      endcase
      ar  = (i.fn == FN_ADD) || (i.fn == FN_SUBR) || (i.fn == FN_SUBS);
      ro  = (i.fn == FN_SUBR) ? ~r : r;
      so  = (i.fn == FN_SUBS) ? ~s : s;
      sum = ro + so + cn;
      sumb = ro[7:0] + so[7:0] + cn;
      s7  = ro[6:0] + so[6:0] + cn;
      s15 = ro[14:0] + so[14:0] + cn;
      unique case (i.fn)
        FN_OR:    ef = r | s;
        FN_AND:   ef = r & s;
        FN_NOTRS: ef = ~r & s;
        FN_EXOR:  ef = r ^ s;
        FN_EXNOR: ef = ~(r ^ s);
        default:  ef = sum[15:0];
      endcase
      if (byte_op) ef[15:8] = m[badr][15:8];
      ey = (i.dst == DST_RAMA) ? (byte_op ? {m[badr][15:8], m[aadr][7:0]} : m[aadr]) : ef;
      link = (shin == SHIN_CARRY) ? cflag : (shin == SHIN_SIGN) ? (byte_op ? ef[7] : ef[15]) : 1'b0;
      dn = (i.dst == DST_RAMD); up = (i.dst == DST_RAMU);
      res = ef;
      if (dn) res = byte_op ? {ef[15:8], link, ef[7:1]} : {link, ef[15:1]};
      if (up) res = byte_op ? {ef[15:8], ef[6:0], link} : {ef[14:0], link};
      chk("F", f, ef);
      chk("Y", y, ey);
      chk("C8", flags.c8, ar & sumb[8]);
      chk("OVR8", flags.ovr8, ar & (sumb[8] ^ s7[7]));
      if (!byte_op) begin
        chk("C16", flags.c16, ar & sum[16]);
        chk("OVR16", flags.ovr16, ar & (sum[16] ^ s15[15]));
        chk("N15", flags.f15, res[15]);
        chk("Zhi", flags.zhi, res[15:8] == 0);
      end
      chk("N7", flags.f7, res[7]);
      chk("Zlo", flags.zlo, res[7:0] == 0);
      if (dn) chk("shift out", flags.shout, ef[0]);
      if (up) chk("shift out", flags.shout, byte_op ? ef[7] : ef[15]);
      if (i.dst != DST_NOP) m[badr] = res;
      @(posedge clk); #1;
      i = '{dst: DST_NOP, fn: FN_OR, src: SRC_ZA}; byte_op = 0; aadr = badr; #1;
      chk("register", y, m[badr]);
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
