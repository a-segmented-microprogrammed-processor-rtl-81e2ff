// bus_interface: SMP-11 bus interface logic (BIL) with the bus address and
// bus data registers.
//
// The processor side loads the bus address register (BAR) from the RALU Y
// bus and the bus data out register from the D bus, and asks for a read or a
// write cycle. The interface then runs an asynchronous master/slave
// handshake: it drives the address (and data for a write) with msyn, waits for
// the slave's ssyn, latches read data into the bus data in register (and into
// the instruction register for a fetch), drops msyn and waits for ssyn to drop.
// While a transfer is in progress hold is high, which stops the processor
// clock at the end of the cycle that started it. Between processor transfers
// the interface grants the bus to a non-processor (DMA) request: npg stays high
// while npr is held, and the processor is held meanwhile. Registers, the
// clock-stop on data ready and the bus grant follow the document; the
// four-state handshake and the signal names are this design's simplified
// form of the bus protocol.
//
// Timing: a transfer requested by the word executed in cycle t starts at the
// edge ending t; the processor resumes in the cycle after ssyn falls.
module bus_interface (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 issue,      // the current cycle executes (clock running)
  input  logic                 ld_bar,
  input  logic                 ld_bdr,
  input  logic                 ld_ir,
  input  smp11_pkg::bus_op_e   op,
  input  logic                 byte_op,
  input  logic [15:0]          y,
  input  logic [15:0]          d,
  // bus side
  output logic [15:0]          bus_addr,
  output logic [15:0]          bus_dout,
  input  logic [15:0]          bus_din,
  output logic                 bus_wr,
  output logic                 bus_byte,
  output logic                 msyn,
  input  logic                 ssyn,
  input  logic                 npr,
  output logic                 npg,
  // processor side
  output logic [15:0]          bar,
  output logic [15:0]          bdr_in,
  output logic                 ir_we,
  output logic                 hold
);
  import smp11_pkg::*;

  typedef enum logic [1:0] {BI_IDLE, BI_XFER, BI_END, BI_GRANT} bi_state_e;
  bi_state_e state;
  logic      fetch;

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= BI_IDLE;
      bar      <= 16'h0000;
      bus_dout <= 16'h0000;
      bdr_in   <= 16'h0000;
      bus_wr   <= 1'b0;
      bus_byte <= 1'b0;
      fetch    <= 1'b0;
    end else begin
      unique case (state)
        BI_IDLE: begin
          if (issue) begin
            if (ld_bar) bar      <= y;
            if (ld_bdr) bus_dout <= d;
            if (op != BUS_NONE) begin
              state    <= BI_XFER;
              bus_wr   <= (op == BUS_WRITE) || (op == BUS_WRITE_OP);
              bus_byte <= (op == BUS_WRITE_OP) && byte_op;
              fetch    <= ld_ir;
            end
          end else if (npr) begin
            state <= BI_GRANT;
          end
        end
        BI_XFER: if (ssyn) begin
          if (!bus_wr) bdr_in <= bus_din;
          state <= BI_END;
        end
        BI_END:   if (!ssyn) state <= BI_IDLE;
        BI_GRANT: if (!npr) state <= BI_IDLE;
        default:  state <= BI_IDLE;
      endcase
    end
  end

  assign bus_addr = bar;
  assign msyn     = (state == BI_XFER);
  assign npg      = (state == BI_GRANT);
  assign ir_we    = (state == BI_XFER) && ssyn && fetch && !bus_wr;
  assign hold     = (state != BI_IDLE);
endmodule
