// tb_hs_sequencer: self-checking test of the handshake sequencer.
//
// A model of the two segment controllers raises the finished line of the
// enabled unit after a random number of cycles. For each instruction class
// (double operand, single operand, operate-only, destination + post-op,
// post-op only, special/service) the sequence of task addresses, the enabled
// unit of each task and the MACU start-select of each task are compared with
// the expected task sequence, with and without a pending service request at
// the end of the instruction. The power-up entry into the service sequence
// and the in_service flag are checked too, as are random clock-enable gaps.
module tb_hs_sequencer;
  import smp11_pkg::*;

  logic       clk = 1'b0, rst, ce, service_req, acu_fin, macu_fin;
  hs_sel_e    hs_sel;
  logic [3:0] hs_spe, addr;
  hs_word_t   word;
  logic       in_service, step, dispatch, take_service;

  hs_sequencer dut (.clk, .rst, .ce, .hs_sel, .hs_spe, .service_req, .acu_fin, .macu_fin,
                    .word, .addr, .in_service, .step, .dispatch, .take_service);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Wait for the current task to finish: finished comes after 0-3 cycles.
  task automatic run_task(input int exp_addr, input int exp_macu, input int exp_sas);
    int w;
    chk("task address", addr, exp_addr);
    chk("enabled unit", word.macu_en, exp_macu);
    if (exp_macu == 1) chk("start select", word.sas, exp_sas);
    w = $urandom_range(0, 3);
    repeat (w) begin acu_fin = 0; macu_fin = 0; ce = 1'($urandom); @(posedge clk); #1; end
    ce = 0; acu_fin = !word.macu_en; macu_fin = word.macu_en; #1;
    chk("no step without ce", step, 0);
    ce = 1; #1;
    chk("step", step, 1);
    @(posedge clk); #1;
    acu_fin = 0; macu_fin = 0;
  endtask

  localparam int M = 1, A = 0;

  task automatic instr(input hs_sel_e sel, input logic [3:0] spe, input logic svc);
    hs_sel = sel; hs_spe = spe; service_req = 0;
    run_task(0, M, SAS_IF1);
    run_task(1, M, SAS_IF2);
    case (sel)
      HSS_DOP: begin
        run_task(2, M, SAS_SRC); run_task(3, M, SAS_DST); run_task(4, A, 0);
        service_req = svc; run_task(5, M, SAS_POST);
      end
      HSS_SOP: begin
        run_task(3, M, SAS_DST); run_task(4, A, 0);
        service_req = svc; run_task(5, M, SAS_POST);
      end
      default: begin
        unique case (spe)
          HS_OPO: begin service_req = svc; run_task(6, A, 0); end
          HS_DPO: begin run_task(12, M, SAS_DST); service_req = svc; run_task(13, M, SAS_POST); end
          HS_POST: begin service_req = svc; run_task(13, M, SAS_POST); end
          default: begin run_task(14, M, SAS_SPE); service_req = svc; run_task(15, A, 0); end
        endcase
      end
    endcase
    service_req = 0;
    chk("in_service after end", in_service, svc);
    if (svc) begin
      run_task(14, M, SAS_SPE);
      run_task(15, A, 0);
      chk("service left", in_service, 0);
    end
  endtask

  hs_sel_e sel;
  logic [3:0] spe_t[4] = '{HS_OPO, HS_DPO, HS_POST, HS_SER};
  initial begin
    rst = 1; ce = 0; acu_fin = 0; macu_fin = 0; service_req = 0; hs_sel = HSS_DOP; hs_spe = 0;
    @(posedge clk); #1; rst = 0;
    chk("power-up in service", in_service, 1);
    run_task(14, M, SAS_SPE);
    run_task(15, A, 0);
    chk("power-up done", in_service, 0);
    for (int t = 0; t < 300; t++) begin
      sel = hs_sel_e'($urandom_range(0, 2));
      instr(sel, spe_t[$urandom_range(0, 3)], 1'($urandom));
    end
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
