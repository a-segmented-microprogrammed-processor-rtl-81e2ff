// psw_unit: SMP-11 processor status word and branch condition logic.
//
// Holds the low byte of the PDP-11 PSW: priority P2-P0 (bits 7:5), trace bit
// T (4) and the condition codes N, Z, V, C (3:0). Each condition code has its
// own multiplexer choosing the previous value (P), the value generated from
// the RALU flags (L), the instruction register (I: set/clear CC instructions,
// where IR bit 4 is the new value and IR bits 3..0 select N, Z, V, C) or the
// data bus (D). The generated N/Z come from bit 15 / the whole word, or from
// bit 7 / the low byte for byte operations and SWAB; V is 0, N xor C or the
// RALU overflow; C is 0, 1, the RALU carry (inverted for subtract-type
// operations, where the PDP-11 C is a borrow) or the bit shifted out. T and
// the priority load only from the data bus. This structure follows the
// document's PSW figure; the select encodings are this design's own.
//
// The branch logic evaluates the PDP-11 branch condition named by IR<15>,
// IR<10:9> and inverted by IR<8> from the stored flags (combinational).
// The PSW changes at the rising clock edge when ce and ld are both high; only
// the arithmetic controller raises ld, so only the OP phase changes it.
module psw_unit (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   ce,
  input  logic                   ld,
  input  smp11_pkg::psw_ctl_t    ctl,
  input  logic                   byte_op,
  input  smp11_pkg::ralu_flags_t flags,
  input  logic [15:0]            ir,
  input  logic [15:0]            dbus,
  output logic [7:0]             psw,
  output logic                   br_true
);
  import smp11_pkg::*;

  logic [2:0] pri;
  logic       t, n, z, v, c;
  logic       nl, zl, cl, vl, nn, zn, vn, cn;

  function automatic logic fsel(flag_sel_e s, logic prev, logic gen, logic irbit, logic dbit,
                                logic irval);
    unique case (s)
      FS_P: return prev;
      FS_L: return gen;
      FS_I: return irbit ? irval : prev;
      FS_D: return dbit;
    endcase
  endfunction

  always_comb begin
    nl = (byte_op || ctl.swab) ? flags.f7 : flags.f15;
    zl = (byte_op || ctl.swab) ? flags.zlo : (flags.zhi & flags.zlo);
    unique case (ctl.cgen)
      CG_ZERO:  cl = 1'b0;
      CG_ONE:   cl = 1'b1;
      CG_CARRY: cl = (byte_op ? flags.c8 : flags.c16) ^ ctl.cinv;
      CG_SHIFT: cl = flags.shout;
    endcase
    nn = fsel(ctl.nsel, n, nl, ir[3], dbus[3], ir[4]);
    zn = fsel(ctl.zsel, z, zl, ir[2], dbus[2], ir[4]);
    cn = fsel(ctl.csel, c, cl, ir[0], dbus[0], ir[4]);
    unique case (ctl.vgen)
      VG_NXC:  vl = nn ^ cn;
      VG_OVR:  vl = byte_op ? flags.ovr8 : flags.ovr16;
      default: vl = 1'b0;
    endcase
    vn = fsel(ctl.vsel, v, vl, ir[1], dbus[1], ir[4]);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      {pri, t, n, z, v, c} <= '0;
    end else if (ce && ld) begin
      n <= nn; z <= zn; v <= vn; c <= cn;
      if (ctl.ld_t)   t   <= dbus[4];
      if (ctl.ld_pri) pri <= dbus[7:5];
    end
  end

  assign psw = {pri, t, n, z, v, c};

  // Branch condition: base condition chosen by IR<15>,IR<10:9>, IR<8> = 1
  // takes it as is, IR<8> = 0 inverts it.
  logic base;
  always_comb begin
    unique case ({ir[15], ir[10:9]})
      3'b000: base = 1'b1;             // BR
      3'b001: base = z;                // BNE / BEQ
      3'b010: base = n ^ v;            // BGE / BLT
      3'b011: base = z | (n ^ v);      // BGT / BLE
      3'b100: base = n;                // BPL / BMI
      3'b101: base = c | z;            // BHI / BLOS
      3'b110: base = v;                // BVC / BVS
      3'b111: base = c;                // BCC / BCS
    endcase
    br_true = ir[8] ? base : ~base;
  end
endmodule
