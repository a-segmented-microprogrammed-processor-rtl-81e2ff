// dbus_mux: source multiplexer of the 2901 D (direct data) bus.
//
// The 2901s have a single data input, so every value entering the RALU from
// outside passes through this multiplexer: bus data in, the RALU's own Y
// output, the PSW, instruction-register offsets, the trap vector address and
// hardwired constants. The high and low bytes have separate multiplexer
// trees, which allows byte swapping of bus and Y data and sign extension of
// the low byte. A byte operand read from or written to an odd address is
// swapped automatically, so the byte always sits in bits 7:0 inside the RALU
// and in bits 15:8 on the bus. The source list and the byte trees follow the
// document; the exact offsets (branch offset already doubled and gated to zero
// when the branch condition is false, 2 x IR<5:0> for SOB and MARK) are this
// design's choice of "instruction register provided offsets". The
// autoincrement/autodecrement constant is 1 when cinc_byte is set (a byte
// instruction on R0-R5) and 2 otherwise.
//
// Purely combinational. The output also feeds the bus data out register and
// the PSW data inputs.
module dbus_mux (
  input  smp11_pkg::dsel_e sel,
  input  logic [15:0]      bdr_in,
  input  logic [15:0]      y,
  input  logic [7:0]       psw,
  input  logic [15:0]      ir,
  input  logic             br_true,
  input  logic             byte_op,
  input  logic             cinc_byte,
  input  logic             bar0,
  input  logic [15:0]      tvec,
  input  logic             nflag,
  output logic [15:0]      d
);
  import smp11_pkg::*;

  logic swap_odd;
  assign swap_odd = byte_op & bar0;

  always_comb begin
    unique case (sel)
      DM_ZERO:   d = 16'h0000;
      DM_BDR:    d = swap_odd ? {bdr_in[7:0], bdr_in[15:8]} : bdr_in;
      DM_Y:      d = y;
      DM_YOUT:   d = swap_odd ? {y[7:0], y[15:8]} : y;
      DM_YSWAP:  d = {y[7:0], y[15:8]};
      DM_YSEXT:  d = {{8{y[7]}}, y[7:0]};
      DM_PSW:    d = {8'h00, psw};
      DM_BROFS:  d = br_true ? {{7{ir[7]}}, ir[7:0], 1'b0} : 16'h0000;
      DM_IROFS6: d = {9'h000, ir[5:0], 1'b0};
      DM_CINC:   d = cinc_byte ? 16'd1 : 16'd2;
      DM_C2:     d = 16'd2;
      DM_TVEC:   d = tvec;
      DM_NFILL:  d = {16{nflag}};
      default:   d = 16'h0000;
    endcase
  end
endmodule
