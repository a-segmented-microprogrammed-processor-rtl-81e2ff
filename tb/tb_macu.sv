// tb_macu: self-checking test of the memory access control unit.
//
// The bench plays the handshake sequencer: it selects a task (start-address
// select and decoder outputs), enables the MACU and raises the step line when
// the MACU reports finished. For every addressing mode in the source and the
// destination task, and for the move-type destination routines, it counts the
// cycles, bus reads and bus-address loads up to finished and checks them
// against the PDP-11 memory references of that mode, and checks that the
// register field and operand buffer of the right task are addressed. It also
// checks the SOB skip (two-step increment on a zero result), the WAIT hold
// until wake, the service routine (two writes, two reads, eight cycles), the
// power-up entry and random clock-enable gaps.
module tb_macu;
  import smp11_pkg::*;

  logic        clk = 1'b0, rst, ce, en, hs_step, macs_ld, in_service, fzero, wake;
  sas_e        sas;
  dec_t        dec;
  macs_word_t  word;
  logic [6:0]  addr;
  logic [3:0]  aadr, badr;
  logic [2:0]  reg_num;
  logic        fin;

  macu dut (.clk, .rst, .ce, .en, .hs_step, .macs_ld, .sas, .dec, .in_service, .fzero, .wake,
            .word, .addr, .aadr, .badr, .reg_num, .fin);

  always #5 clk = ~clk;
  assign hs_step = ce && fin;

  int checks = 0, failures = 0;
  task automatic chk(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  int cyc, reads, writes, bars;
  int first_a, last_b;
  int seq [$];
  // Run one task to its finished word, with random ce gaps.
  task automatic run(input sas_e s);
    sas = s; en = 1; macs_ld = 1;
    cyc = 0; reads = 0; writes = 0; bars = 0; seq.delete();
    forever begin
      ce = ($urandom_range(0, 3) != 0);
      #1;
      if (ce) begin
        if (cyc == 0) first_a = aadr;
        last_b = badr;
        seq.push_back(addr);
        cyc++;
        if (word.bus == BUS_READ) reads++;
        if (word.bus == BUS_WRITE || word.bus == BUS_WRITE_OP) writes++;
        if (word.ld_bar) bars++;
      end
      if (fin && ce) begin @(posedge clk); #1; break; end
      @(posedge clk); #1;
      if (cyc > 20) begin chk("task ends", 0, 1); break; end
    end
    ce = 0;
  endtask

  localparam int CYC[8] = '{1, 2, 2, 3, 2, 3, 3, 4};
  localparam int RD[8]  = '{0, 1, 1, 2, 1, 2, 2, 3};
  localparam int MCYC[8] = '{1, 1, 1, 2, 1, 2, 2, 3};
  localparam int MRD[8]  = '{0, 0, 0, 1, 0, 1, 1, 2};
  localparam logic [6:0] MR[8] = '{MA_MODE0, MA_MODE1, MA_MODE2, MA_MODE3, MA_MODE4, MA_MODE5,
                                   MA_MODE6, MA_MODE7};
  localparam logic [6:0] MV[8] = '{MA_MV0, MA_MV1, MA_MV2, MA_MV3, MA_MV4, MA_MV5, MA_MV6, MA_MV7};

  int m, rs, rdst;
  initial begin
    rst = 1; ce = 0; en = 0; macs_ld = 0; sas = SAS_IF1; dec = '0; in_service = 0;
    fzero = 0; wake = 0;
    @(posedge clk); #1; rst = 0;
    // power-up entry
    run(SAS_SPE);
    chk("power-up start", seq[0], MA_PWRUP);
    chk("power-up reads", reads, 2);
    // fetch
    run(SAS_IF1);
    chk("fetch cycles", cyc, 1); chk("fetch read", reads, 1);
    chk("fetch loads IR", seq[0], MA_IF1);
    for (int t = 0; t < 400; t++) begin
      m = $urandom_range(0, 7); rs = $urandom_range(0, 5); rdst = $urandom_range(0, 5);
      dec.src_reg = 3'(rs); dec.dst_reg = 3'(rdst);
      dec.src_start = MR[m]; dec.dst_start = MR[m];
      run(SAS_SRC);
      chk("src cycles", cyc, CYC[m]); chk("src reads", reads, RD[m]);
      if (m >= 1 && m <= 5) chk("src register", first_a, rs);
      chk("src buffer", last_b, (m >= 6) ? RA_SB : (m == 0 ? RA_SB : RA_SB));
      run(SAS_DST);
      chk("dst cycles", cyc, CYC[m]); chk("dst reads", reads, RD[m]);
      if (m >= 1 && m <= 5) chk("dst register", first_a, rdst);
      chk("dst buffer", last_b, RA_DB);
      dec.dst_start = MV[m];
      run(SAS_DST);
      chk("move cycles", cyc, MCYC[m]); chk("move reads", reads, MRD[m]);
      if (m != 0) chk("move address loaded", bars > 0, 1);
    end
    // SOB: count register reaches zero (skip) or not
    dec.post_start = MA_SOB; dec.src_reg = 3'd3;
    fzero = 1; run(SAS_POST);
    chk("SOB exit cycles", cyc, 2); chk("SOB exit skips", seq[1], MA_SOB + 2);
    chk("SOB uses source field", reg_num, 3);
    fzero = 0; run(SAS_POST);
    chk("SOB loop cycles", cyc, 2); chk("SOB loop branch word", seq[1], MA_SOB + 1);
    // WAIT holds until wake
    dec.post_start = MA_WAIT;
    fork
      run(SAS_POST);
      begin repeat (12) @(posedge clk); #2 wake = 1; end
    join
    chk("WAIT held", cyc >= 5, 1);
    wake = 0;
    // service routine
    in_service = 1; run(SAS_SPE);
    chk("service start", seq[0], MA_SER);
    chk("service cycles", cyc, 8); chk("service writes", writes, 2); chk("service reads", reads, 2);
    in_service = 0;
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
