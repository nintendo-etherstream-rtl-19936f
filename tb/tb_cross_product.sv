// Self-checking test of cross_product against 64-bit integer arithmetic
// for random 13-bit signed vectors, including the extreme values, and the
// orthogonality of the result (a.c = 0).
module tb_cross_product;
  logic signed [12:0] a [3], b [3];
  logic signed [26:0] c [3];
  int checks = 0, failures = 0;

  cross_product #(.IN_W(13), .OUT_W(27)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      longint ea [3], eb [3], ec [3];
      for (int i = 0; i < 3; i++) begin
        a[i] = (t < 4) ? ((t[0]) ? -13'sd4096 : 13'sd4095) : 13'($urandom);
        b[i] = (t < 4) ? ((t[1]) ? -13'sd4096 : 13'sd4095) : 13'($urandom);
        ea[i] = a[i]; eb[i] = b[i];
      end
      ec[0] = ea[1] * eb[2] - ea[2] * eb[1];
      ec[1] = ea[2] * eb[0] - ea[0] * eb[2];
      ec[2] = ea[0] * eb[1] - ea[1] * eb[0];
      #1;
      for (int i = 0; i < 3; i++) begin
        checks++;
        if (longint'(c[i]) != ec[i]) begin failures++; $display("FAIL t=%0d i=%0d %0d vs %0d", t, i, c[i], ec[i]); end
      end
      checks++;
      if (ea[0] * c[0] + ea[1] * c[1] + ea[2] * c[2] != 0) begin failures++; $display("FAIL not orthogonal"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
