// am2902: look-ahead carry generator for up to four slices, in the style of
// the Am2902.
//
// From the carry-in and the generate/propagate pairs of the three lower slices
// it forms the carries into slices 1, 2 and 3 (Cn+x, Cn+y, Cn+z) in parallel,
// so no carry ripples through a slice. It also forms the group generate and
// propagate of all four slices. Signals are active high (the original part
// uses active-low G and P; this design's choice). Purely combinational.
module am2902 (
  input  logic       cn,
  input  logic [3:0] g,
  input  logic [3:0] p,
  output logic       cnx,
  output logic       cny,
  output logic       cnz,
  output logic       gout,
  output logic       pout
);
  assign cnx  = g[0] | (p[0] & cn);
  assign cny  = g[1] | (p[1] & g[0]) | (p[1] & p[0] & cn);
  assign cnz  = g[2] | (p[2] & g[1]) | (p[2] & p[1] & g[0]) | (p[2] & p[1] & p[0] & cn);
  assign gout = g[3] | (p[3] & g[2]) | (p[3] & p[2] & g[1]) | (p[3] & p[2] & p[1] & g[0]);
  assign pout = &p;
endmodule
