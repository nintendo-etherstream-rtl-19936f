// Self-checking test of byte_transmitter: a burst of random bytes must come
// out as dibits, least significant pair first, one dibit per 2 clocks with
// txen high throughout and no gap between bytes (8 clocks per byte).
module tb_byte_transmitter;
  logic clk = 0, rst = 1;
  logic [7:0] in_data = 0;
  logic in_valid = 0, in_ready;
  logic [1:0] txd;
  logic txen;
  int checks = 0, failures = 0;
  logic [7:0] sent [$];
  logic [7:0] got [$];
  int txen_cycles = 0;

  byte_transmitter #(.DIBIT_CYCLES(2)) dut (.*);
  always #5 clk = ~clk;

  // receiver: sample every second cycle of txen
  logic [7:0] sh; int nd = 0, ph = 0;
  always @(negedge clk) if (txen) begin
    txen_cycles++;
    if (ph == 0) begin
      sh = {txd, sh[7:2]};
      nd++;
      if (nd == 4) begin got.push_back(sh); nd = 0; end
    end
    ph = (ph + 1) % 2;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    @(negedge clk);
    for (int i = 0; i < 64; i++) begin
      logic [7:0] b;
      b = 8'($urandom);
      in_data = b; in_valid = 1;
      sent.push_back(b);
      while (!in_ready) @(negedge clk);
      @(negedge clk);
    end
    in_valid = 0;
    repeat (20) @(posedge clk);
    checks++;
    if (got.size() != 64) begin failures++; $display("FAIL got %0d bytes", got.size()); end
    for (int i = 0; i < 64 && i < got.size(); i++) begin
      checks++;
      if (got[i] != sent[i]) begin failures++; $display("FAIL byte %0d %h vs %h", i, got[i], sent[i]); end
    end
    checks++;
    if (txen_cycles != 64 * 8) begin failures++; $display("FAIL txen high %0d cycles, expected %0d", txen_cycles, 64*8); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
