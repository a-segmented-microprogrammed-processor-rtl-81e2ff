// tb_am2902: exhaustive test of the 2902 carry look-ahead generator.
//
// Every combination of carry in and the four generate/propagate pairs is
// applied; the carries into slices 1-3 are compared with the carries of a
// ripple chain of the same generate/propagate signals, and the group
// generate/propagate outputs with their definitions.
module tb_am2902;
  logic       cn, cnx, cny, cnz, gout, pout;
  logic [3:0] g, p;

  am2902 dut (.cn, .g, .p, .cnx, .cny, .cnz, .gout, .pout);

  int checks = 0, failures = 0;
  task automatic chk(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: cn=%b g=%b p=%b got %b", what, cn, g, p, got);
    end
  endtask

  logic c [5];
  logic g0;
  initial begin
    for (int v = 0; v < 512; v++) begin
      {cn, g, p} = 9'(v);
      #1;
      c[0] = cn;
      for (int k = 0; k < 4; k++) c[k+1] = g[k] | (p[k] & c[k]);
      g0 = 1'b0;
      for (int k = 0; k < 4; k++) g0 = g[k] | (p[k] & g0);
      chk("Cn+x", cnx, c[1]);
      chk("Cn+y", cny, c[2]);
      chk("Cn+z", cnz, c[3]);
      chk("G", gout, g0);
      chk("P", pout, &p);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
