// clock_ctrl: SMP-11 clock control, power-up reset and halt/run state.
//
// The processor clock is modelled as a clock enable (run): a major cycle
// executes on a rising edge when run is high. The clock is stopped while the
// bus interface holds the processor for a transfer, while the processor is
// halted, and during reset. A HALT instruction sets the halted state; the
// console's continue input clears it, and its step input lets exactly one
// major cycle execute while halted (single step at the microcycle level). The
// power-up reset input is synchronised and also drives the bus INIT line,
// which the RESET instruction pulses as well. The clock-stop on bus wait and
// the need for single stepping follow the document; the multiphase clock
// (CLK1-CLK3) is replaced by one edge, and the console interface and INIT
// length are this design's choices.
//
// Timing: rst is por_n synchronised through two flip-flops; halted changes at
// the rising edge; run is combinational.
module clock_ctrl #(
  parameter int unsigned INIT_CYCLES = 8   // length of the bus INIT pulse
) (
  input  logic clk,
  input  logic por_n,         // power-up reset, active low, asynchronous
  input  logic hold,          // bus interface waits for data ready
  input  logic halt_req,      // HALT microinstruction executed
  input  logic reset_req,     // RESET microinstruction executed
  input  logic cont,          // console continue
  input  logic step,          // console single cycle step while halted
  output logic rst,
  output logic run,
  output logic halted,
  output logic init
);
  logic [1:0] sync;
  logic [$clog2(INIT_CYCLES+1)-1:0] icnt;
  logic step_d;

  always_ff @(posedge clk or negedge por_n) begin
    if (!por_n) sync <= 2'b00;
    else        sync <= {sync[0], 1'b1};
  end
  assign rst = ~sync[1];

  always_ff @(posedge clk) begin
    if (rst) begin
      halted <= 1'b0;
      icnt   <= '0;
      step_d <= 1'b0;
    end else begin
      step_d <= step;
      if (run && halt_req)  halted <= 1'b1;
      else if (cont)        halted <= 1'b0;
      if (run && reset_req) icnt <= ($bits(icnt))'(INIT_CYCLES);
      else if (icnt != '0)  icnt <= icnt - 1'b1;
    end
  end

  assign run  = !rst && !hold && (!halted || (step && !step_d));
  assign init = rst || (icnt != '0);
endmodule
