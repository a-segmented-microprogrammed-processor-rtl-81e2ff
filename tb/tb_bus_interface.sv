// tb_bus_interface: self-checking test of the bus interface logic.
//
// A behavioural memory answers msyn with ssyn after a random delay and drops
// ssyn after msyn falls. The bench issues random read, word write and byte
// write cycles (with the address loaded from Y and the data from D in the
// same cycle), and checks the address and data on the bus, the byte flag, the
// data latched into the bus data in register, the instruction-register load
// pulse for fetches, and that hold stays high from the issuing edge until the
// handshake is complete. Random DMA requests check that the grant is given
// only between processor transfers and holds the processor while it lasts.
module tb_bus_interface;
  import smp11_pkg::*;

  logic        clk = 1'b0, rst, issue, ld_bar, ld_bdr, ld_ir, byte_op;
  bus_op_e     op;
  logic [15:0] y, d, bus_addr, bus_dout, bus_din, bar, bdr_in;
  logic        bus_wr, bus_byte, msyn, ssyn, npr, npg, ir_we, hold;

  bus_interface dut (.clk, .rst, .issue, .ld_bar, .ld_bdr, .ld_ir, .op, .byte_op, .y, .d,
                     .bus_addr, .bus_dout, .bus_din, .bus_wr, .bus_byte, .msyn, .ssyn, .npr,
                     .npg, .bar, .bdr_in, .ir_we, .hold);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  // memory
  logic [15:0] mem [256];
  int dly;
  always_ff @(posedge clk) begin
    if (rst) begin ssyn <= 0; dly <= 0; bus_din <= 0; end
    else if (msyn && !ssyn) begin
      if (dly < 2) dly <= dly + 1 + int'($urandom_range(0, 1));
      else begin
        dly <= 0; ssyn <= 1;
        bus_din <= mem[bus_addr[8:1]];
        if (bus_wr) begin
          if (!bus_byte) mem[bus_addr[8:1]] <= bus_dout;
          else if (bus_addr[0]) mem[bus_addr[8:1]][15:8] <= bus_dout[15:8];
          else mem[bus_addr[8:1]][7:0] <= bus_dout[7:0];
        end
      end
    end else if (!msyn) ssyn <= 0;
  end

  logic [15:0] model [256];
  logic [15:0] a, v;
  int kind, irw, hcyc, grants;
  initial begin
    rst = 1; issue = 0; ld_bar = 0; ld_bdr = 0; ld_ir = 0; byte_op = 0; op = BUS_NONE;
    y = 0; d = 0; npr = 0;
    for (int k = 0; k < 256; k++) begin mem[k] = 16'($urandom); model[k] = mem[k]; end
    @(posedge clk); #1; rst = 0;
    grants = 0;
    for (int t = 0; t < 1500; t++) begin
      // DMA request between transfers
      if ($urandom_range(0, 5) == 0) begin
        npr = 1; @(posedge clk); #1;
        chk("grant", npg, 1); chk("hold during grant", hold, 1);
        grants++;
        repeat ($urandom_range(0, 3)) begin @(posedge clk); #1; chk("grant kept", npg, 1); end
        npr = 0; @(posedge clk); #1;
        chk("grant released", npg, 0);
      end
      a = {7'h0, 8'($urandom), 1'($urandom)}; v = 16'($urandom);
      kind = $urandom_range(0, 3);
      issue = 1; ld_bar = 1; y = a; ld_bdr = (kind != 0); d = v;
      op = (kind == 0 || kind == 3) ? BUS_READ : (kind == 1 ? BUS_WRITE : BUS_WRITE_OP);
      ld_ir = (kind == 3); byte_op = 1'($urandom);
      if (op != BUS_WRITE_OP) a[0] = 1'b0;
      y = a;
      @(posedge clk); #1;
      issue = 0; ld_bar = 0; ld_bdr = 0; op = BUS_NONE; ld_ir = 0;
      chk("address", bus_addr, a);
      chk("hold from issue", hold, 1);
      chk("write flag", bus_wr, (kind == 1 || kind == 2));
      chk("byte flag", bus_byte, (kind == 2) && byte_op);
      if (kind == 1 || kind == 2) chk("write data", bus_dout, v);
      irw = 0; hcyc = 0;
      while (hold) begin
        if (ir_we) begin irw++; chk("IR data", bus_din, model[a[8:1]]); end
        @(posedge clk); #1; hcyc++;
        if (hcyc > 20) break;
      end
      chk("handshake completes", hcyc <= 20, 1);
      chk("IR load pulse", irw, kind == 3);
      if (kind == 0 || kind == 3) chk("read data", bdr_in, model[a[8:1]]);
      if (kind == 1) model[a[8:1]] = v;
      if (kind == 2) begin
        if (!byte_op) model[a[8:1]] = v;
        else if (a[0]) model[a[8:1]][15:8] = v[15:8];
        else model[a[8:1]][7:0] = v[7:0];
      end
    end
    for (int k = 0; k < 256; k++) chk("memory", mem[k], model[k]);
    chk("DMA grants seen", grants > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
