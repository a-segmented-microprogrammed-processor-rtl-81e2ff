// tb_am2901: self-checking test of one 4-bit 2901 slice.
//
// A reference model of the slice (16 registers, Q, the eight source pairs,
// eight functions and eight destination codes with shifts) runs beside the
// slice. After loading every register and Q through the D input, the bench
// applies random microinstructions, register addresses, data, carry and shift
// inputs, and compares Y, F, carry out, overflow, the F = 0 output and the
// shift outputs every cycle, and the A-port value that shows the written
// register afterwards.
module tb_am2901;
  import smp11_pkg::*;

  logic       clk = 1'b0;
  ralu_i_t    i;
  logic [3:0] aadr, badr, d, y, f;
  logic       cn, rmi, rli, qmi, qli, rmo, rlo, qmo, qlo, g, p, cout, ovr, fzero;

  am2901 dut (.clk, .ce(1'b1), .i, .aadr, .badr, .d, .cn,
              .ram_msb_in(rmi), .ram_lsb_in(rli), .q_msb_in(qmi), .q_lsb_in(qli),
              .ram_msb_out(rmo), .ram_lsb_out(rlo), .q_msb_out(qmo), .q_lsb_out(qlo),
              .y, .f, .g, .p, .cout, .ovr, .fzero);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h (i=%03b_%03b_%03b)", what, got, exp, i.dst, i.fn, i.src);
    end
  endtask

  logic [3:0] mram [16];
  logic [3:0] mq;

  task automatic model(output logic [3:0] ef, output logic [3:0] ey, output logic ec,
                       output logic eo);
    logic [3:0] r, s, ro, so;
    logic [4:0] sum;
    logic [3:0] s3;
    logic       ar;
    unique case (i.src)
      SRC_AQ: begin r = mram[aadr]; s = mq; end
      SRC_AB: begin r = mram[aadr]; s = mram[badr]; end
      SRC_ZQ: begin r = 0; s = mq; end
      SRC_ZB: begin r = 0; s = mram[badr]; end
      SRC_ZA: begin r = 0; s = mram[aadr]; end
      SRC_DA: begin r = d; s = mram[aadr]; end
      SRC_DQ: begin r = d; s = mq; end
      SRC_DZ: begin r = d; s = 0; end
    endcase
    ar = (i.fn == FN_ADD) || (i.fn == FN_SUBR) || (i.fn == FN_SUBS);
    ro = (i.fn == FN_SUBR) ? ~r : r;
    so = (i.fn == FN_SUBS) ? ~s : s;
    sum = ro + so + cn;
    s3  = ro[2:0] + so[2:0] + cn;
    unique case (i.fn)
      FN_OR:    ef = r | s;
      FN_AND:   ef = r & s;
      FN_NOTRS: ef = ~r & s;
      FN_EXOR:  ef = r ^ s;
      FN_EXNOR: ef = ~(r ^ s);
      default:  ef = sum[3:0];
    endcase
    ec = ar & sum[4];
    eo = ar & (sum[4] ^ s3[3]);
    ey = (i.dst == DST_RAMA) ? mram[aadr] : ef;
  endtask

  task automatic update(input logic [3:0] ef);
    unique case (i.dst)
      DST_QREG: mq = ef;
      DST_RAMA, DST_RAMF: mram[badr] = ef;
      DST_RAMQD: begin mram[badr] = {rmi, ef[3:1]}; mq = {qmi, mq[3:1]}; end
      DST_RAMD:  mram[badr] = {rmi, ef[3:1]};
      DST_RAMQU: begin mram[badr] = {ef[2:0], rli}; mq = {mq[2:0], qli}; end
      DST_RAMU:  mram[badr] = {ef[2:0], rli};
      default: ;
    endcase
  endtask

  logic [3:0] ef, ey;
  logic       ec, eo;
  initial begin
    {rmi, rli, qmi, qli, cn} = '0;
    aadr = 0; badr = 0; d = 0;
    i = '{dst: DST_NOP, fn: FN_OR, src: SRC_DZ};
    // initialise registers and Q
    for (int k = 0; k < 16; k++) begin
      i = '{dst: DST_RAMF, fn: FN_OR, src: SRC_DZ}; badr = 4'(k); d = 4'($urandom);
      mram[k] = d; @(posedge clk); #1;
    end
    i = '{dst: DST_QREG, fn: FN_OR, src: SRC_DZ}; d = 4'($urandom); mq = d; @(posedge clk); #1;

    for (int t = 0; t < 3000; t++) begin
      i    = ralu_i_t'(9'($urandom));
      aadr = 4'($urandom); badr = 4'($urandom); d = 4'($urandom);
      cn   = 1'($urandom); rmi = 1'($urandom); rli = 1'($urandom);
      qmi  = 1'($urandom); qli = 1'($urandom);
      #1;
      model(ef, ey, ec, eo);
      chk("F", f, ef);
      chk("Y", y, ey);
      chk("Cn+4", cout, ec);
      chk("OVR", ovr, eo);
      chk("F=0", fzero, ef == 0);
      chk("RAM0 out", rlo, ef[0]);
      chk("RAM3 out", rmo, ef[3]);
      chk("Q0 out", qlo, mq[0]);
      update(ef);
      @(posedge clk); #1;
      // read back the written register through the A port
      i = '{dst: DST_NOP, fn: FN_OR, src: SRC_ZA}; aadr = badr; #1;
      chk("RAM write", y, mram[badr]);
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
