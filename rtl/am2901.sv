// am2901: one 4-bit register/ALU slice in the style of the Am2901.
//
// A 16-word two-port RAM is read at addresses A and B; both words and the Q
// register feed the R and S source multiplexers (either may also select zero,
// and R may select the external D input). The ALU forms one of three
// arithmetic or five logical functions of R and S. The destination code
// decides whether F (straight or shifted one place up or down) is written to
// the RAM word at address B, whether Q is loaded or shifted, and whether the
// Y output carries F or the A-port word. Nine control lines in three groups
// (source, function, destination) follow the document; the code assignment is
// that of the standard Am2901.
//
// Timing: A/B reads are combinational, RAM and Q are written at the rising
// clock edge when ce is high, so a read-modify-write of one word takes one
// cycle. Shift lines are split into separate inputs and outputs instead of
// bidirectional pins. Carry generate/propagate outputs are active high; for
// logical functions G, P, carry out and overflow are 0 (design choice).
//
// In the processor the Y output returns to the D input through the D-bus
// multiplexer (for sign extension, byte swap and PSW loads), so the path
// D -> R/S -> F -> Y is a structural combinational loop and lint tools report
// the ALU signals here as circular. It never closes in value: every control
// word that routes Y onto the D bus makes Y the A-port word (or F of the A
// word alone), which does not depend on D in that cycle.
module am2901 (
  input  logic                clk,
  input  logic                ce,
  input  smp11_pkg::ralu_i_t  i,
  input  logic [3:0]          aadr,
  input  logic [3:0]          badr,
  input  logic [3:0]          d,
  input  logic                cn,
  input  logic                ram_msb_in,   // RAM3 input for down shifts
  input  logic                ram_lsb_in,   // RAM0 input for up shifts
  input  logic                q_msb_in,
  input  logic                q_lsb_in,
  output logic                ram_msb_out,  // F3 leaving on an up shift
  output logic                ram_lsb_out,  // F0 leaving on a down shift
  output logic                q_msb_out,
  output logic                q_lsb_out,
  output logic [3:0]          y,
  output logic [3:0]          f,
  output logic                g,
  output logic                p,
  output logic                cout,
  output logic                ovr,
  output logic                fzero
);
  import smp11_pkg::*;

  logic [3:0] ram [16];
  logic [3:0] q;
  logic [3:0] a_lat, b_lat, r, s;

  assign a_lat = ram[aadr];
  assign b_lat = ram[badr];

  always_comb begin
    unique case (i.src)
      SRC_AQ: begin r = a_lat; s = q;     end
      SRC_AB: begin r = a_lat; s = b_lat; end
      SRC_ZQ: begin r = 4'h0;  s = q;     end
      SRC_ZB: begin r = 4'h0;  s = b_lat; end
      SRC_ZA: begin r = 4'h0;  s = a_lat; end
      SRC_DA: begin r = d;     s = a_lat; end
      SRC_DQ: begin r = d;     s = q;     end
      SRC_DZ: begin r = d;     s = 4'h0;  end
    endcase
  end

  // Arithmetic operand pair after inversion for the subtract functions.
  logic [3:0] ro, so;
  logic [4:0] sum;
  logic [3:0] sum3;  // sum of the low three bits, for the carry into bit 3
  logic       arith;
  always_comb begin
    ro = r; so = s; arith = 1'b1;
    unique case (i.fn)
      FN_ADD:  begin ro = r;  so = s;  end
      FN_SUBR: begin ro = ~r; so = s;  end
      FN_SUBS: begin ro = r;  so = ~s; end
      default: arith = 1'b0;
    endcase
    sum  = {1'b0, ro} + {1'b0, so} + {4'b0, cn};
    sum3 = {1'b0, ro[2:0]} + {1'b0, so[2:0]} + {3'b0, cn};
  end

  always_comb begin
    unique case (i.fn)
      FN_ADD, FN_SUBR, FN_SUBS: f = sum[3:0];
      FN_OR:    f = r | s;
      FN_AND:   f = r & s;
      FN_NOTRS: f = ~r & s;
      FN_EXOR:  f = r ^ s;
      FN_EXNOR: f = ~(r ^ s);
    endcase
  end

  assign g     = arith & ((({1'b0, ro} + {1'b0, so}) >> 4) != 5'd0);
  assign p     = arith & ((ro | so) == 4'hF) & ((ro ^ so) == 4'hF);
  assign cout  = arith & sum[4];
  assign ovr   = arith & (sum3[3] ^ sum[4]);
  assign fzero = (f == 4'h0);

  assign y           = (i.dst == DST_RAMA) ? a_lat : f;
  assign ram_lsb_out = f[0];
  assign ram_msb_out = f[3];
  assign q_lsb_out   = q[0];
  assign q_msb_out   = q[3];

  always_ff @(posedge clk) begin
    if (ce) begin
      unique case (i.dst)
        DST_QREG:  q <= f;
        DST_NOP:   ;
        DST_RAMA,
        DST_RAMF:  ram[badr] <= f;
        DST_RAMQD: begin ram[badr] <= {ram_msb_in, f[3:1]}; q <= {q_msb_in, q[3:1]}; end
        DST_RAMD:  ram[badr] <= {ram_msb_in, f[3:1]};
        DST_RAMQU: begin ram[badr] <= {f[2:0], ram_lsb_in}; q <= {q[2:0], q_lsb_in}; end
        DST_RAMU:  ram[badr] <= {f[2:0], ram_lsb_in};
      endcase
    end
  end
endmodule
