// Self-checking test of packet_buffer: fills all 12000 bits with a
// pseudo-random pattern, then reads them back (one cycle read latency),
// also while writing elsewhere in the same cycle.
module tb_packet_buffer;
  localparam int DEPTH = 12000;
  logic clk = 0, wr_en = 0, wr_data = 0, rd_en = 0, rd_data;
  logic [13:0] wr_addr = 0, rd_addr = 0;
  int checks = 0, failures = 0;
  logic model [DEPTH];

  packet_buffer dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int i = 0; i < DEPTH; i++) begin
      model[i] = 1'($urandom);
      wr_en = 1; wr_addr = 14'(i); wr_data = model[i];
      @(negedge clk);
    end
    wr_en = 0;
    for (int i = 0; i < DEPTH; i++) begin
      int j;
      j = (i * 7919) % DEPTH;
      rd_en = 1; rd_addr = 14'(j);
      // write to a different address in the same cycle
      wr_en = 1; wr_addr = 14'((j + 1) % DEPTH); wr_data = ~model[(j + 1) % DEPTH];
      model[(j + 1) % DEPTH] = ~model[(j + 1) % DEPTH];
      @(negedge clk);
      rd_en = 0; wr_en = 0;
      checks++;
      if (rd_data != model[j]) begin failures++; if (failures < 10) $display("FAIL bit %0d", j); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
