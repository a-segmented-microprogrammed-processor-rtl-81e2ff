// tb_smp11_timing: instruction timing of the SMP-11 against the published
// per-instruction microcycle and memory-cycle counts.
//
// The processor runs a program of single instructions from a memory that
// answers every transfer in the next cycle. For each instruction the bench
// counts the executed major cycles (clock edges with run high, so bus waits
// are not counted) and the bus transfers, from one instruction dispatch to
// the next, and compares them with the expected counts:
//   cycles    = fetch + source mode + destination mode + operation
//   transfers = 1 (fetch) + source mode + destination mode + operation
// The per-mode and per-instruction counts are the reference figures for this
// machine (mode 0: 0/1, mode 1: 1/2, 2: 1/2, 3: 2/3, 4: 1/2, 5: 2/3, 6: 2/3,
// 7: 3/4 as transfers/cycles; ADD and the other two-operand and one-operand
// operations 2 cycles, of which the second stores the result; compare and
// test 1 cycle; MOV 1 cycle, with the destination read skipped; branch taken
// 1, not taken 0; SOB 2 or 1; JSR 3 and JMP 0 plus the address calculation
// without the operand read; RTS 3 with one read; RTI 4 with two reads; trap
// instructions 9; MARK 4 with one read). The fetch takes 2 cycles in this design, and a trap makes
// four transfers (two pushes, two vector reads). Where this design knowingly
// takes one cycle more (compare, test and bit test have a separate no-store
// cycle; MOV stores in its own cycle; a branch or SOB that is not taken still
// runs its one-cycle routine; JSR and JMP end with a separate cycle; RTI
// loads the PSW in a separate arithmetic-unit cycle) the
// expectation is the reference plus that cycle, and the reference is printed.
module tb_smp11_timing;
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

  // zero-wait memory
  logic [15:0] mem [4096];
  always_ff @(posedge clk) begin
    if (!por_n) begin
      ssyn <= 1'b0; bus_din <= 16'h0000;
    end else if (msyn && !ssyn) begin
      if (bus_wr) begin
        if (!bus_byte)        mem[bus_addr[12:1]]       <= bus_dout;
        else if (bus_addr[0]) mem[bus_addr[12:1]][15:8] <= bus_dout[15:8];
        else                  mem[bus_addr[12:1]][7:0]  <= bus_dout[7:0];
      end
      bus_din <= mem[bus_addr[12:1]];
      ssyn    <= 1'b1;
    end else if (!msyn) ssyn <= 1'b0;
  end

  // measured counts per instruction, indexed by the instruction's address
  int cyc, xfr, n_inst;
  logic msyn_d;
  logic [15:0] cur_pc;
  int m_cyc [logic [15:0]];
  int m_xfr [logic [15:0]];
  always_ff @(posedge clk) begin
    msyn_d <= msyn;
    if (!por_n) begin
      cyc <= 0; xfr <= 0; n_inst <= 0; cur_pc <= 16'h0;
    end else begin
      if (dut.u_hs.dispatch) begin
        m_cyc[cur_pc] = cyc;
        m_xfr[cur_pc] = xfr;
        cur_pc <= bus_addr;        // address of the instruction just fetched
        n_inst <= n_inst + 1;
        cyc <= 1;                  // this (IF2) cycle belongs to the new one
        xfr <= 0;
      end else begin
        cyc <= cyc + (dut.run ? 1 : 0);
        xfr <= xfr + ((msyn && !msyn_d) ? 1 : 0);
      end
    end
  end

  // program
  logic [15:0] apc, mark_sp;
  typedef struct { logic [15:0] pc; string name; int cyc; int xfr; int adj; } exp_t;
  int adj_next = 0;   // extra cycles of this design over the reference, for the next ins()
  exp_t exps [$];
  localparam int IF_CYC = 2;
  localparam int MR [8] = '{0, 1, 1, 2, 1, 2, 2, 3};
  localparam int MC [8] = '{1, 2, 2, 3, 2, 3, 3, 4};

  task automatic e(input logic [15:0] v);
    mem[apc[12:1]] = v; apc += 16'd2;
  endtask
  // an instruction (with optional extension word) and its expected counts
  task automatic ins(input string name, input logic [15:0] w, input int c, input int x,
                     input logic ext = 1'b0, input logic [15:0] xw = 16'h0);
    exps.push_back('{apc, name, c + adj_next, x, adj_next});
    adj_next = 0;
    e(w); if (ext) e(xw);
  endtask

  task automatic load_program();
    for (int k = 0; k < 4096; k++) mem[k] = 16'h0000;
    mem['o24 >> 1] = 16'o002000; mem['o26 >> 1] = 16'o000000;
    mem['o20 >> 1] = 16'o001300; mem['o22 >> 1] = 16'o000000;   // IOT
    mem['o30 >> 1] = 16'o001300; mem['o32 >> 1] = 16'o000000;   // EMT
    mem['o34 >> 1] = 16'o001300; mem['o36 >> 1] = 16'o000000;   // TRAP
    mem['o14 >> 1] = 16'o001300; mem['o16 >> 1] = 16'o000000;   // BPT
    apc = 16'o001300; adj_next = 1; ins("RTI", 16'o000002, IF_CYC + 4, 1 + 2);
    apc = 16'o001400; ins("RTS", 16'o000207, IF_CYC + 3, 1 + 1);
    mem['o3002 >> 1] = 16'o003000;      // pointer for @2(R0)
    mem['o3020 >> 1] = 16'o003000;      // pointer table for @(R3)+ and @-(R3)
    mem['o3022 >> 1] = 16'o003000;
    apc = 16'o002000;
    e(16'o012706); e(16'o001000);       // MOV #1000,SP
    e(16'o012700); e(16'o003000);       // MOV #3000,R0
    e(16'o012702); e(16'o003010);       // MOV #3010,R2
    e(16'o012703); e(16'o003020);       // MOV #3020,R3
    e(16'o012704); e(16'o000002);       // MOV #2,R4
    e(16'o012705); e(16'o001400);       // MOV #1400,R5
    // source addressing modes, ADD src,R1
    ins("ADD R0,R1",      16'o060001, IF_CYC + MC[0] + MC[0] + 2, 1 + MR[0]);
    ins("ADD (R0),R1",    16'o061001, IF_CYC + MC[1] + MC[0] + 2, 1 + MR[1]);
    ins("ADD (R2)+,R1",   16'o062201, IF_CYC + MC[2] + MC[0] + 2, 1 + MR[2]);
    ins("ADD @(R3)+,R1",  16'o063301, IF_CYC + MC[3] + MC[0] + 2, 1 + MR[3]);
    ins("ADD -(R2),R1",   16'o064201, IF_CYC + MC[4] + MC[0] + 2, 1 + MR[4]);
    ins("ADD @-(R3),R1",  16'o065301, IF_CYC + MC[5] + MC[0] + 2, 1 + MR[5]);
    ins("ADD 2(R0),R1",   16'o066001, IF_CYC + MC[6] + MC[0] + 2, 1 + MR[6], 1'b1, 16'o2);
    ins("ADD @2(R0),R1",  16'o067001, IF_CYC + MC[7] + MC[0] + 2, 1 + MR[7], 1'b1, 16'o2);
    // destination in memory: read and write back
    ins("ADD R0,(R0)",    16'o060010, IF_CYC + MC[0] + MC[1] + 2, 1 + MR[1] + 1);
    ins("INC (R0)",       16'o005210, IF_CYC + MC[1] + 2,         1 + MR[1] + 1);
    adj_next = 1; ins("MOV R0,(R0)", 16'o010010, IF_CYC + MC[0] + (MC[1] - 1) + 1, 1 + 1);
    // register operations
    adj_next = 1; ins("MOV R0,R1",   16'o010001, IF_CYC + MC[0] + MC[0] + 1, 1);
    ins("SUB R0,R1",      16'o160001, IF_CYC + 2 + 2, 1);
    ins("BIC R0,R1",      16'o040001, IF_CYC + 2 + 2, 1);
    ins("BIS R0,R1",      16'o050001, IF_CYC + 2 + 2, 1);
    adj_next = 1; ins("CMP R0,R1",   16'o020001, IF_CYC + 2 + 1, 1);
    adj_next = 1; ins("BIT R0,R1",   16'o030001, IF_CYC + 2 + 1, 1);
    ins("CLR R1",         16'o005001, IF_CYC + 1 + 2, 1);
    ins("COM R1",         16'o005101, IF_CYC + 1 + 2, 1);
    ins("INC R1",         16'o005201, IF_CYC + 1 + 2, 1);
    ins("DEC R1",         16'o005301, IF_CYC + 1 + 2, 1);
    ins("NEG R1",         16'o005401, IF_CYC + 1 + 2, 1);
    ins("ADC R1",         16'o005501, IF_CYC + 1 + 2, 1);
    ins("SBC R1",         16'o005601, IF_CYC + 1 + 2, 1);
    adj_next = 1; ins("TST R1",      16'o005701, IF_CYC + 1 + 1, 1);
    ins("ROR R1",         16'o006001, IF_CYC + 1 + 2, 1);
    ins("ROL R1",         16'o006101, IF_CYC + 1 + 2, 1);
    ins("ASR R1",         16'o006201, IF_CYC + 1 + 2, 1);
    ins("ASL R1",         16'o006301, IF_CYC + 1 + 2, 1);
    ins("SWAB R1",        16'o000301, IF_CYC + 1 + 2, 1);
    ins("SXT R1",         16'o006701, IF_CYC + 1 + 2, 1);
    ins("SEC",            16'o000261, IF_CYC + 1, 1);
    ins("SEZ",            16'o000264, IF_CYC + 1, 1);
    adj_next = 1; ins("BNE (false)", 16'o001000, IF_CYC + 0, 1);
    ins("BEQ (true)",     16'o001400, IF_CYC + 1, 1);
    ins("BR (true)",      16'o000400, IF_CYC + 1, 1);
    ins("SOB (true)",     16'o077400, IF_CYC + 2, 1);
    adj_next = 1; ins("SOB (false)", 16'o077400, IF_CYC + 1, 1);
    adj_next = 1; ins("JSR PC,(R5)", 16'o004715, IF_CYC + (MC[1] - 1) + 3, 1 + 1);
    adj_next = 1; ins("JMP 0(PC)",   16'o000167, IF_CYC + (MC[6] - 1) + 0, 2, 1'b1, 16'o0);
    // JMP to the next instruction
    ins("IOT",            16'o000004, IF_CYC + 9, 1 + 4);
    ins("EMT",            16'o104000, IF_CYC + 9, 1 + 4);
    ins("TRAP",           16'o104400, IF_CYC + 9, 1 + 4);
    ins("BPT",            16'o000003, IF_CYC + 9, 1 + 4);
    // MARK 0 with R5 pointing past the word after it: PC := R5, R5 := that
    // word (popped), SP := the address after it
    e(16'o012705); e(apc + 16'd6);       // MOV #target,R5
    ins("MARK 0",         16'o006400, IF_CYC + 4, 1 + 1);
    e(16'o123456);                      // word popped into R5
    e(16'o010537); e(16'o003100);       // target: MOV R5,@#3100
    e(16'o010637); e(16'o003102);       // MOV SP,@#3102
    mark_sp = apc - 16'd8;
    e(16'o000000);                                             // HALT
  endtask

  initial begin
    por_n = 1'b0; npr = 1'b0; br = 4'h0; intr_vec = 16'h0; cont = 1'b0; step = 1'b0;
    load_program();
    repeat (4) @(posedge clk);
    por_n = 1'b1;
    wait (halted);
    repeat (2) @(posedge clk);
    foreach (exps[k]) begin
      int c, x;
      c = m_cyc.exists(exps[k].pc) ? m_cyc[exps[k].pc] : -1;
      x = m_xfr.exists(exps[k].pc) ? m_xfr[exps[k].pc] : -1;
      checks += 2;
      if (c != exps[k].cyc || x != exps[k].xfr) begin
        failures += (c != exps[k].cyc) + (x != exps[k].xfr);
        $display("FAIL %-16s cycles %0d (expected %0d)  transfers %0d (expected %0d)",
                 exps[k].name, c, exps[k].cyc, x, exps[k].xfr);
      end else
        $display("     %-16s cycles %0d  transfers %0d%s", exps[k].name, c, x,
                 exps[k].adj != 0 ? $sformatf("  (reference %0d cycles)", exps[k].cyc - exps[k].adj) : "");
    end
    checks += 2;
    if (mem['o3100 >> 1] != 16'o123456 || mem['o3102 >> 1] != mark_sp) begin
      failures++;
      $display("FAIL MARK results: R5 %06o SP %06o (expected 123456 %06o)",
               mem['o3100 >> 1], mem['o3102 >> 1], mark_sp);
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
