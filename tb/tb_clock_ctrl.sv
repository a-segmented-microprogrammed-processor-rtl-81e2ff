// tb_clock_ctrl: self-checking test of the clock control.
//
// Checks the synchronised power-up reset (two cycles after por_n rises), run
// low during reset, bus hold and halt, the halt set by the HALT request, the
// single-cycle step while halted (one run cycle per step pulse, however long
// the pulse), continue, and the INIT pulse of the RESET request (INIT_CYCLES
// long, overridden to a random small value here).
module tb_clock_ctrl;
  localparam int unsigned IC = 5;

  logic clk = 1'b0, por_n, hold, halt_req, reset_req, cont, step;
  logic rst, run, halted, init;

  clock_ctrl #(.INIT_CYCLES(IC)) dut (.clk, .por_n, .hold, .halt_req, .reset_req, .cont, .step,
                                      .rst, .run, .halted, .init);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  int runs, n;
  initial begin
    por_n = 0; hold = 0; halt_req = 0; reset_req = 0; cont = 0; step = 0;
    repeat (3) @(posedge clk); #1;
    chk("reset held", rst, 1); chk("no run in reset", run, 0); chk("INIT in reset", init, 1);
    por_n = 1;
    @(posedge clk); #1; chk("reset sync 1", rst, 1);
    @(posedge clk); #1; chk("reset released", rst, 0); chk("running", run, 1);
    for (int t = 0; t < 200; t++) begin
      hold = 1'($urandom); #1;
      chk("run follows hold", run, !hold);
      @(posedge clk); #1;
    end
    hold = 0;
    // halt
    halt_req = 1; @(posedge clk); #1; halt_req = 0;
    chk("halted", halted, 1); chk("stopped", run, 0);
    for (int t = 0; t < 20; t++) begin
      n = $urandom_range(1, 4);
      runs = 0;
      step = 1;
      repeat (n) begin #1 if (run) runs++; @(posedge clk); end
      step = 0; #1;
      repeat (2) begin if (run) runs++; @(posedge clk); #1; end
      chk("one cycle per step", runs, 1);
    end
    cont = 1; @(posedge clk); #1; cont = 0;
    chk("continue", halted, 0); chk("running again", run, 1);
    // RESET instruction: INIT pulse
    reset_req = 1; @(posedge clk); #1; reset_req = 0;
    n = 0;
    while (init && n < 50) begin n++; @(posedge clk); #1; end
    chk("INIT length", n, IC);
    // halt request ignored while held
    hold = 1; halt_req = 1; @(posedge clk); #1; halt_req = 0; hold = 0;
    chk("no halt while held", halted, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
