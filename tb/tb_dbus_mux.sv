// tb_dbus_mux: self-checking test of the D-bus source multiplexer.
//
// For random inputs and every select code, the output is compared with the
// value expected from the source list: bus data (swapped for an odd-address
// byte), Y straight, swapped, sign-extended and swapped for output, the PSW,
// the branch offset (doubled, sign-extended, zero when the condition fails),
// the 6-bit SOB/MARK offset, the increment constant, the trap vector and the
// N fill for SXT.
module tb_dbus_mux;
  import smp11_pkg::*;

  dsel_e       sel;
  logic [15:0] bdr_in, y, ir, tvec, d;
  logic [7:0]  psw;
  logic        br_true, byte_op, cinc_byte, bar0, nflag;

  dbus_mux dut (.sel, .bdr_in, .y, .psw, .ir, .br_true, .byte_op, .cinc_byte, .bar0, .tvec,
                .nflag, .d);

  int checks = 0, failures = 0;
  logic [15:0] e;
  logic        sw;
  initial begin
    for (int t = 0; t < 5000; t++) begin
      sel = dsel_e'($urandom_range(0, 12));
      bdr_in = 16'($urandom); y = 16'($urandom); ir = 16'($urandom); tvec = 16'($urandom);
      psw = 8'($urandom); {br_true, byte_op, cinc_byte, bar0, nflag} = 5'($urandom);
      #1;
      sw = byte_op & bar0;
      unique case (sel)
        DM_ZERO:   e = 0;
        DM_BDR:    e = sw ? {bdr_in[7:0], bdr_in[15:8]} : bdr_in;
        DM_Y:      e = y;
        DM_YOUT:   e = sw ? {y[7:0], y[15:8]} : y;
        DM_YSWAP:  e = {y[7:0], y[15:8]};
        DM_YSEXT:  e = 16'($signed(y[7:0]));
        DM_PSW:    e = {8'h00, psw};
        DM_BROFS:  e = br_true ? 16'($signed(ir[7:0])) * 16'd2 : 16'd0;
        DM_IROFS6: e = 16'(ir[5:0]) * 16'd2;
        DM_CINC:   e = cinc_byte ? 16'd1 : 16'd2;
        DM_C2:     e = 16'd2;
        DM_TVEC:   e = tvec;
        DM_NFILL:  e = nflag ? 16'hFFFF : 16'h0000;
        default:   e = 0;
      endcase
      checks++;
      if (d !== e) begin
        failures++;
        $display("FAIL sel=%0d got %h expected %h", sel, d, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
