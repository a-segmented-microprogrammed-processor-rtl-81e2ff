// tb_smp11_top: end-to-end test of the SMP-11 running a PDP-11 program.
//
// The testbench holds an 8 KB memory on the processor bus that answers each
// transfer after a random number of wait cycles, assembles a test program
// into it, starts the processor from the power-up vector and lets it run to a
// HALT. The program uses all eight addressing modes, word and byte operations
// (including odd-address bytes), double and single operand arithmetic and
// logic, shifts and rotates, SWAB, SXT-like sign extension (MOVB, MFPS),
// MTPS, branches taken and not taken, SOB, JSR/RTS, JMP, the EMT, TRAP, IOT,
// BPT and reserved-instruction traps, the trace trap (T bit set by RTI), WAIT
// ended by a device interrupt, RESET and HALT. Results are stored into memory
// and compared with values worked out by hand. A DMA device requests the bus
// at random moments. After the first HALT the console display registers are
// checked, the console continue input is pulsed, and a second HALT is reached.
//
// Each mechanism of the design is counted (bus wait stalls, DMA grants, trap
// instructions, interrupts, trace traps, WAIT cycles, SOB skip, taken and
// untaken branches, odd-byte writes, INIT pulse, halts) and one that never
// happened counts as a failure. The top has no parameters, so this is also the
// full-size run.
module tb_smp11_top;
  import smp11_pkg::*;

  logic        clk = 1'b0;
  logic        por_n;
  logic [15:0] bus_addr, bus_dout, bus_din, intr_vec;
  logic        bus_wr, bus_byte, msyn, ssyn, npr, npg, init, cont, step, halted;
  logic [3:0]  br, bg;
  logic [15:0] cons_addr, cons_data;
  logic [7:0]  psw;

  smp11_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input string what, input logic [15:0] got, input logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %06o expected %06o", what, got, exp);
    end
  endtask

  // ------------------------------------------------------------ memory
  logic [15:0] mem [4096];
  int          wait_cnt;
  logic        busy;

  always_ff @(posedge clk) begin
    if (!por_n) begin
      ssyn     <= 1'b0;
      busy     <= 1'b0;
      wait_cnt <= 0;
      bus_din  <= 16'h0000;
    end else if (msyn && !ssyn) begin
      if (!busy) begin
        busy     <= 1'b1;
        wait_cnt <= int'($urandom_range(0, 3));
      end else if (wait_cnt > 0) begin
        wait_cnt <= wait_cnt - 1;
      end else begin
        if (bus_wr) begin
          if (!bus_byte)       mem[bus_addr[12:1]]       <= bus_dout;
          else if (bus_addr[0]) mem[bus_addr[12:1]][15:8] <= bus_dout[15:8];
          else                 mem[bus_addr[12:1]][7:0]  <= bus_dout[7:0];
        end
        bus_din <= mem[bus_addr[12:1]];
        ssyn    <= 1'b1;
        busy    <= 1'b0;
      end
    end else if (!msyn) begin
      ssyn <= 1'b0;
    end
  end

  // ---------------------------------------------------------- assembler
  logic [15:0] apc;
  task automatic e(input logic [15:0] v);
    mem[apc[12:1]] = v;
    apc += 16'd2;
  endtask
  task automatic org(input logic [15:0] a);
    apc = a;
  endtask
  task automatic vec(input logic [15:0] a, input logic [15:0] pc, input logic [15:0] ps);
    mem[a[12:1]]     = pc;
    mem[a[12:1] + 1] = ps;
  endtask

  logic [15:0] halt1_next;

  task automatic load_program();
    for (int k = 0; k < 4096; k++) mem[k] = 16'h0000;
    vec(16'o000004, 16'o001740, 16'o0);
    vec(16'o000010, 16'o001100, 16'o0);
    vec(16'o000014, 16'o001200, 16'o0);
    vec(16'o000020, 16'o001300, 16'o0);
    vec(16'o000024, 16'o002000, 16'o0);     // power-up
    vec(16'o000030, 16'o001400, 16'o0);
    vec(16'o000034, 16'o001500, 16'o0);
    vec(16'o000120, 16'o001600, 16'o340);   // device interrupt
    // trap handlers: count in memory, return
    org(16'o001100); e(16'o005237); e(16'o003110); e(16'o000002);
    org(16'o001200); e(16'o005237); e(16'o003106);
                     e(16'o042766); e(16'o000020); e(16'o000002);   // BIC #20,2(SP)
                     e(16'o000002);
    org(16'o001300); e(16'o005237); e(16'o003104); e(16'o000002);
    org(16'o001400); e(16'o005237); e(16'o003100); e(16'o000002);
    org(16'o001500); e(16'o005237); e(16'o003102); e(16'o000002);
    org(16'o001600); e(16'o005237); e(16'o003112); e(16'o000002);
    org(16'o001700); e(16'o005200); e(16'o000207);                  // SUB: INC R0; RTS PC
    org(16'o001740); e(16'o000000);

    org(16'o002000);
    e(16'o012706); e(16'o001000);            // MOV #1000,SP
    e(16'o012700); e(16'o000005);            // MOV #5,R0
    e(16'o012701); e(16'o000003);            // MOV #3,R1
    e(16'o060100);                           // ADD R1,R0
    e(16'o010037); e(16'o003000);            // MOV R0,@#3000
    e(16'o012702); e(16'o003002);            // MOV #3002,R2
    e(16'o012722); e(16'o001234);            // MOV #1234,(R2)+
    e(16'o014203);                           // MOV -(R2),R3
    e(16'o160003);                           // SUB R0,R3
    e(16'o010337); e(16'o003004);            // MOV R3,@#3004
    e(16'o012701); e(16'o000004);            // MOV #4,R1
    e(16'o005005);                           // CLR R5
    e(16'o062705); e(16'o000003);            // L1: ADD #3,R5
    e(16'o077103);                           // SOB R1,L1
    e(16'o010537); e(16'o003006);            // MOV R5,@#3006
    e(16'o012702); e(16'o003010);            // MOV #3010,R2
    e(16'o112712); e(16'o000201);            // MOVB #201,(R2)
    e(16'o112762); e(16'o000102); e(16'o000001); // MOVB #102,1(R2)
    e(16'o105262); e(16'o000001);            // INCB 1(R2)
    e(16'o116203); e(16'o000001);            // MOVB 1(R2),R3
    e(16'o111204);                           // MOVB (R2),R4
    e(16'o010337); e(16'o003012);            // MOV R3,@#3012
    e(16'o010437); e(16'o003014);            // MOV R4,@#3014
    e(16'o020027); e(16'o000010);            // CMP R0,#10
    e(16'o001402);                           // BEQ .+6
    e(16'o012700); e(16'o177777);            // MOV #-1,R0 (skipped)
    e(16'o001002);                           // BNE .+6 (not taken)
    e(16'o005200);                           // INC R0
    e(16'o004737); e(16'o001700);            // JSR PC,@#SUB
    e(16'o010037); e(16'o003016);            // MOV R0,@#3016
    e(16'o012701); e(16'o100000);            // MOV #100000,R1
    e(16'o006301);                           // ASL R1
    e(16'o005501);                           // ADC R1
    e(16'o006001);                           // ROR R1
    e(16'o006101);                           // ROL R1
    e(16'o010137); e(16'o003030);            // MOV R1,@#3030
    e(16'o012701); e(16'o001402);            // MOV #1402,R1
    e(16'o000301);                           // SWAB R1
    e(16'o010137); e(16'o003032);            // MOV R1,@#3032
    e(16'o074105);                           // XOR R1,R5
    e(16'o010537); e(16'o003020);            // MOV R5,@#3020
    e(16'o005405);                           // NEG R5
    e(16'o010537); e(16'o003022);            // MOV R5,@#3022
    e(16'o005105);                           // COM R5
    e(16'o042705); e(16'o000006);            // BIC #6,R5
    e(16'o052705); e(16'o100000);            // BIS #100000,R5
    e(16'o010537); e(16'o003024);            // MOV R5,@#3024
    e(16'o106427); e(16'o000340);            // MTPS #340
    e(16'o106701);                           // MFPS R1
    e(16'o010137); e(16'o003026);            // MOV R1,@#3026
    e(16'o106427); e(16'o000000);            // MTPS #0
    e(16'o104000);                           // EMT 0
    e(16'o104400);                           // TRAP 0
    e(16'o000004);                           // IOT
    e(16'o000003);                           // BPT
    e(16'o000010);                           // reserved instruction
    e(16'o012746); e(16'o000020);            // MOV #20,-(SP)   PSW with T
    e(16'o012746); e(apc + 16'd4);           // MOV #L2,-(SP)
    e(16'o000002);                           // RTI
    e(16'o000241);                           // L2: CLC
    e(16'o000001);                           // WAIT
    e(16'o000005);                           // RESET
    e(16'o000137); e(apc + 16'd8);           // JMP @#L3
    e(16'o012737); e(16'o000001); e(16'o003114); // MOV #1,@#3114 (skipped)
    e(16'o012700); e(16'o052525);            // L3: MOV #52525,R0
    e(16'o000000);                           // HALT
    halt1_next = apc;
    e(16'o012737); e(16'o000001); e(16'o003116); // MOV #1,@#3116
    e(16'o000000);                           // HALT
  endtask

  // ------------------------------------------------ devices and counters
  int n_stall, n_dma, n_trapi, n_intr, n_trace, n_wait, n_skip, n_brt, n_brn;
  int n_oddw, n_init, n_halt, n_instr;
  int dma_hold;
  logic halted_d;

  always_ff @(posedge clk) begin
    if (!por_n) begin
      npr <= 1'b0; dma_hold <= 0; br <= 4'b0000; intr_vec <= 16'o000120;
      halted_d <= 1'b0;
    end else begin
      // DMA device: random requests, releases two cycles after the grant
      if (!npr && $urandom_range(0, 199) == 0) npr <= 1'b1;
      if (npg) begin
        if (dma_hold == 2) begin npr <= 1'b0; dma_hold <= 0; end
        else dma_hold <= dma_hold + 1;
      end
      // interrupting device: requests while the processor waits
      if (dut.hs_word.macu_en && dut.mw.misc == MI_WAIT && !dut.wake) br[0] <= 1'b1;
      if (bg[0]) br[0] <= 1'b0;
      halted_d <= halted;
    end
  end

  always @(posedge clk) if (por_n) begin
    if (dut.hold) n_stall++;
    if (npg && !dut.u_bil.hold) ;
    if (dut.u_bil.state == 2'd3 && npg) n_dma++;
    if (dut.dispatch && dut.dec.trap != TRAP_NONE) n_trapi++;
    if (dut.intr_taken) n_intr++;
    if (dut.trace_taken) n_trace++;
    if (dut.run && dut.hs_word.macu_en && dut.mw.misc == MI_WAIT && !dut.wake) n_wait++;
    if (dut.run && dut.hs_word.macu_en && dut.mw.skz && dut.flags.zhi && dut.flags.zlo) n_skip++;
    if (dut.run && dut.hs_word.macu_en && dut.macs_addr == MA_BR) begin
      if (dut.br_true) n_brt++; else n_brn++;
    end
    if (msyn && bus_wr && bus_byte && bus_addr[0] && !ssyn) n_oddw++;
    if (init && !dut.rst) n_init++;
    if (halted && !halted_d) n_halt++;
    if (dut.ir_we) n_instr++;
  end

  // ------------------------------------------------------------- stimulus
  int cyc;
  initial begin
    por_n = 1'b0; cont = 1'b0; step = 1'b0;
    {n_stall, n_dma, n_trapi, n_intr, n_trace, n_wait, n_skip, n_brt, n_brn} = '0;
    {n_oddw, n_init, n_halt, n_instr} = '0;
    load_program();
    repeat (4) @(posedge clk);
    por_n = 1'b1;

    cyc = 0;
    while (!halted && cyc < 20000) begin @(posedge clk); cyc++; end
    repeat (2) @(posedge clk);
    check("first HALT reached", {15'd0, halted}, 16'd1);
    check("console data = R0", cons_data, 16'o052525);
    check("console address = PC", cons_addr, halt1_next);

    check("ADD / MOV to absolute", mem[16'o3000 >> 1], 16'o000010);
    check("(R)+ store", mem[16'o3002 >> 1], 16'o001234);
    check("-(R) load, SUB", mem[16'o3004 >> 1], 16'o001224);
    check("SOB loop", mem[16'o3006 >> 1], 16'o000014);
    check("byte stores, odd byte INCB", mem[16'o3010 >> 1], 16'h4381);
    check("MOVB odd byte to register", mem[16'o3012 >> 1], 16'o000103);
    check("MOVB sign extension", mem[16'o3014 >> 1], 16'o177601);
    check("branches, JSR/RTS", mem[16'o3016 >> 1], 16'o000012);
    check("XOR", mem[16'o3020 >> 1], 16'o001017);
    check("NEG", mem[16'o3022 >> 1], 16'o176761);
    check("COM BIC BIS", mem[16'o3024 >> 1], 16'o101010);
    check("MFPS", mem[16'o3026 >> 1], 16'o177740);
    check("ASL ADC ROR ROL", mem[16'o3030 >> 1], 16'o000001);
    check("SWAB", mem[16'o3032 >> 1], 16'o001003);
    check("EMT handler", mem[16'o3100 >> 1], 16'd1);
    check("TRAP handler", mem[16'o3102 >> 1], 16'd1);
    check("IOT handler", mem[16'o3104 >> 1], 16'd1);
    check("BPT + trace handler", mem[16'o3106 >> 1], 16'd2);
    check("reserved instruction", mem[16'o3110 >> 1], 16'd1);
    check("device interrupt", mem[16'o3112 >> 1], 16'd1);
    check("JMP skipped store", mem[16'o3114 >> 1], 16'd0);
    check("stack pointer restored", dut.u_ralu.g_slice[0].u_slice.ram[6] |
          (16'(dut.u_ralu.g_slice[1].u_slice.ram[6]) << 4) |
          (16'(dut.u_ralu.g_slice[2].u_slice.ram[6]) << 8) |
          (16'(dut.u_ralu.g_slice[3].u_slice.ram[6]) << 12), 16'o001000);
    check("PSW after program", {8'h00, psw}, 16'h0000);

    // console continue
    @(posedge clk); cont = 1'b1; @(posedge clk); cont = 1'b0;
    cyc = 0;
    while (halted && cyc < 10) begin @(posedge clk); cyc++; end
    cyc = 0;
    while (!halted && cyc < 2000) begin @(posedge clk); cyc++; end
    repeat (2) @(posedge clk);
    check("continue after HALT", mem[16'o3116 >> 1], 16'd1);

    $display("instructions %0d: stall %0d dma %0d trapinstr %0d intr %0d trace %0d wait %0d skip %0d br_taken %0d br_not %0d oddbyte %0d init %0d halt %0d",
             n_instr, n_stall, n_dma, n_trapi, n_intr, n_trace, n_wait, n_skip, n_brt, n_brn,
             n_oddw, n_init, n_halt);
    check("mechanism: bus wait stall", 16'(n_stall > 0), 16'd1);
    check("mechanism: DMA grant", 16'(n_dma > 0), 16'd1);
    check("mechanism: trap instructions", 16'(n_trapi), 16'd5);
    check("mechanism: interrupt", 16'(n_intr), 16'd1);
    check("mechanism: trace trap", 16'(n_trace), 16'd1);
    check("mechanism: WAIT", 16'(n_wait > 0), 16'd1);
    check("mechanism: SOB skip", 16'(n_skip), 16'd1);
    check("mechanism: branch taken", 16'(n_brt > 0), 16'd1);
    check("mechanism: branch not taken", 16'(n_brn > 0), 16'd1);
    check("mechanism: odd byte write", 16'(n_oddw > 0), 16'd1);
    check("mechanism: INIT by RESET", 16'(n_init > 0), 16'd1);
    check("mechanism: halts", 16'(n_halt), 16'd2);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
