// interrupt_ctrl: SMP-11 CPU interrupt and trap logic with the trap vector
// address memory.
//
// Three kinds of request reach the service routine: trap instructions (EMT,
// TRAP, BPT, IOT and reserved instructions), the trace trap (T bit of the PSW)
// and interrupt requests from bus devices on four priority levels (4-7). The
// controller decides at every end of instruction whether the service routine
// runs before the next fetch (service_req), arbitrates with a fixed priority
// (trace trap first, then the highest bus level above the processor priority)
// and holds the vector address for the service routine. Vectors of the
// hardwired traps come from a small constant table (the standard PDP-11
// addresses); a bus interrupt's vector is taken from the requesting device
// when the request is granted. The fixed-priority arbitration, the vector
// table and the external vector follow the document; the level encoding, the
// one-cycle grant pulse and taking the device vector from a separate input
// (instead of through the bus data register) are this design's choices.
//
// The trace trap is armed when an instruction is dispatched with the T bit
// set and taken at that instruction's end, so an instruction that sets T
// (RTI or RTT alike) is not itself traced.
//
// Timing: vectors are latched at the rising edge when a trap instruction is
// dispatched or when the sequencer enters service (take_service). bg is a
// one-cycle grant pulse for the level being served. wake (used to end WAIT) is
// combinational.
module interrupt_ctrl (
  input  logic              clk,
  input  logic              rst,
  input  logic [7:0]        psw,
  input  smp11_pkg::trap_e  trap,
  input  logic              dispatch,
  input  logic              take_service,
  input  logic [3:0]        br,         // bus requests, levels 4..7
  input  logic [15:0]       intr_vec,   // vector supplied by the granted device
  output logic              service_req,
  output logic              wake,
  output logic [15:0]       tvec,
  output logic [3:0]        bg,
  output logic              trace_taken,
  output logic              intr_taken
);
  import smp11_pkg::*;

  function automatic logic [15:0] trap_vector(trap_e t);
    unique case (t)
      TRAP_RSVD: return 16'o000010;
      TRAP_BPT:  return 16'o000014;
      TRAP_IOT:  return 16'o000020;
      TRAP_EMT:  return 16'o000030;
      TRAP_TRAP: return 16'o000034;
      default:   return 16'o000004;
    endcase
  endfunction

  logic [2:0] pri;
  logic       tbit, trace, intr, trace_pend;
  logic [1:0] lvl;     // highest requesting level - 4
  logic       any_br;

  assign pri  = psw[7:5];
  assign tbit = psw[4];

  always_comb begin
    any_br = |br;
    lvl    = 2'd0;
    for (int k = 0; k < 4; k++) if (br[k]) lvl = 2'(k);
  end

  assign intr        = any_br && ({1'b1, lvl} > pri);
  assign trace       = trace_pend;
  assign service_req = trace || intr;
  assign wake        = intr;

  always_ff @(posedge clk) begin
    if (rst) begin
      tvec        <= 16'o000024;   // power-up vector
      trace_pend  <= 1'b0;
      bg          <= 4'b0000;
      trace_taken <= 1'b0;
      intr_taken  <= 1'b0;
    end else begin
      bg          <= 4'b0000;
      trace_taken <= 1'b0;
      intr_taken  <= 1'b0;
      if (dispatch) trace_pend <= tbit;
      if (take_service) begin
        if (trace) begin
          trace_pend  <= 1'b0;
          tvec        <= 16'o000014;
          trace_taken <= 1'b1;
        end else begin
          tvec       <= intr_vec;
          bg[lvl]    <= 1'b1;
          intr_taken <= 1'b1;
        end
      end else if (dispatch && trap != TRAP_NONE) begin
        tvec <= trap_vector(trap);
      end
    end
  end
endmodule
