// tb_interrupt_ctrl: self-checking test of the interrupt and trap logic.
//
// Random processor priorities and bus request patterns check the service
// request (a request level above the priority, or an armed trace trap), the
// wake signal, the choice of the highest level, the one-cycle grant pulse on
// that level and the vector taken from the device. Trap instructions check
// the vector table (reserved 010, BPT 014, IOT 020, EMT 030, TRAP 034), and
// the trace trap is checked to be armed only by dispatching an instruction
// with T set and to take vector 014 ahead of a bus interrupt.
module tb_interrupt_ctrl;
  import smp11_pkg::*;

  logic        clk = 1'b0, rst, dispatch, take_service;
  logic [7:0]  psw;
  trap_e       trap;
  logic [3:0]  br, bg;
  logic [15:0] intr_vec, tvec;
  logic        service_req, wake, trace_taken, intr_taken;

  interrupt_ctrl dut (.clk, .rst, .psw, .trap, .dispatch, .take_service, .br, .intr_vec,
                      .service_req, .wake, .tvec, .bg, .trace_taken, .intr_taken);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  function automatic int top_level(logic [3:0] b);
    for (int k = 3; k >= 0; k--) if (b[k]) return 4 + k;
    return 0;
  endfunction

  localparam trap_e TR[5] = '{TRAP_EMT, TRAP_TRAP, TRAP_BPT, TRAP_IOT, TRAP_RSVD};
  localparam int    TV[5] = '{'o30, 'o34, 'o14, 'o20, 'o10};

  int lvl, k;
  logic exp_int;
  initial begin
    rst = 1; psw = 0; trap = TRAP_NONE; dispatch = 0; take_service = 0; br = 0; intr_vec = 0;
    @(posedge clk); #1; rst = 0;
    chk("power-up vector", tvec, 'o24);
    for (int t = 0; t < 2000; t++) begin
      psw = {3'($urandom), 1'b0, 4'($urandom)};
      br = 4'($urandom); intr_vec = {8'h0, 6'($urandom), 2'b00};
      #1;
      lvl = top_level(br);
      exp_int = (lvl != 0) && (lvl > psw[7:5]);
      chk("service request", service_req, exp_int);
      chk("wake", wake, exp_int);
      if (exp_int) begin
        take_service = 1; @(posedge clk); #1; take_service = 0;
        chk("grant level", bg, 1 << (lvl - 4));
        chk("device vector", tvec, intr_vec);
        chk("interrupt taken", intr_taken, 1);
        @(posedge clk); #1;
        chk("grant is a pulse", bg, 0);
      end
      // trap instruction
      k = $urandom_range(0, 4); trap = TR[k]; br = 0;
      dispatch = 1; @(posedge clk); #1; dispatch = 0; trap = TRAP_NONE;
      chk("trap vector", tvec, TV[k]);
      chk("no trace without T", service_req, 0);
    end
    // trace trap: armed at dispatch with T set, has priority over a bus request
    psw = 8'h10; #1;
    chk("T alone does not request", service_req, 0);
    dispatch = 1; @(posedge clk); #1; dispatch = 0;
    psw = 8'h00; br = 4'b1000; #1;
    chk("trace armed", service_req, 1);
    take_service = 1; @(posedge clk); #1; take_service = 0;
    chk("trace vector", tvec, 'o14); chk("trace taken", trace_taken, 1); chk("no grant", bg, 0);
    #1; chk("interrupt still pending", service_req, 1);
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
