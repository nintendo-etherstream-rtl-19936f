// Self-checking test of dot_product (12-bit by 27-bit signed vectors)
// against 64-bit integer arithmetic, random and extreme values.
module tb_dot_product;
  logic signed [11:0] a [3];
  logic signed [26:0] b [3];
  logic signed [40:0] d;
  int checks = 0, failures = 0;

  dot_product #(.A_W(12), .B_W(27), .OUT_W(41)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      longint e;
      e = 0;
      for (int i = 0; i < 3; i++) begin
        a[i] = (t < 2) ? (t[0] ? -12'sd2048 : 12'sd2047) : 12'($urandom);
        b[i] = (t < 2) ? -27'sd67108864 : 27'($urandom);
        e += longint'(a[i]) * longint'(b[i]);
      end
      #1;
      checks++;
      if (longint'(d) != e) begin failures++; $display("FAIL t=%0d %0d vs %0d", t, d, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
