// Self-checking test of crc32_eth: the standard check value of CRC-32 over
// "123456789" (CBF43926) and random messages against a bit-serial
// reference computed in the testbench; stalls between bytes must not
// change the result.
module tb_crc32_eth;
  logic clk = 0, init = 1, data_valid = 0;
  logic [7:0] data_in = 0;
  logic [31:0] crc, fcs;
  int checks = 0, failures = 0;

  crc32_eth dut (.*);
  always #5 clk = ~clk;

  function automatic logic [31:0] ref_crc(logic [7:0] msg [], int n);
    logic [31:0] c = 32'hFFFFFFFF;
    for (int i = 0; i < n; i++)
      for (int b = 0; b < 8; b++) begin
        logic fb = c[0] ^ msg[i][b];
        c = c >> 1;
        if (fb) c = c ^ 32'hEDB88320;
      end
    return ~c;
  endfunction

  task automatic run(logic [7:0] msg [], int n);
    @(negedge clk) init = 1;
    @(negedge clk) init = 0;
    for (int i = 0; i < n; i++) begin
      data_in = msg[i]; data_valid = 1;
      @(negedge clk) data_valid = 0;
      if ($urandom_range(0, 3) == 0) @(negedge clk);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] m [];
    m = new[9];
    for (int i = 0; i < 9; i++) m[i] = 8'h31 + 8'(i);
    run(m, 9);
    checks++;
    if (fcs != 32'hCBF43926) begin failures++; $display("FAIL check value %h", fcs); end
    for (int t = 0; t < 100; t++) begin
      int n;
      n = $urandom_range(1, 100);
      m = new[n];
      for (int i = 0; i < n; i++) m[i] = 8'($urandom);
      run(m, n);
      checks++;
      if (fcs != ref_crc(m, n)) begin failures++; $display("FAIL message %0d: %h vs %h", t, fcs, ref_crc(m, n)); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
