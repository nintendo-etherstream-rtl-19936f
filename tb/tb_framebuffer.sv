// Self-checking test of framebuffer: writes a pattern derived from the
// pixel coordinates over the whole 176 x 144 picture and reads every pixel
// back with one cycle of latency; a read without rd_en keeps its data.
module tb_framebuffer;
  localparam int W = 176, H = 144;
  logic clk = 0, wr_en = 0, rd_en = 0;
  logic [14:0] wr_addr = 0, rd_addr = 0;
  logic [3:0] wr_data = 0, rd_data;
  int checks = 0, failures = 0;

  framebuffer dut (.*);
  always #5 clk = ~clk;

  function automatic logic [3:0] pat(int x, int y);
    return 4'((x * 3 + y * 5) ^ (x >> 2));
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        wr_en = 1; wr_addr = 15'(y * W + x); wr_data = pat(x, y);
        @(negedge clk);
      end
    wr_en = 0;
    for (int y = H - 1; y >= 0; y--)
      for (int x = 0; x < W; x++) begin
        rd_en = 1; rd_addr = 15'(y * W + x);
        @(negedge clk);
        rd_en = 0;
        checks++;
        if (rd_data != pat(x, y)) begin failures++; if (failures < 10) $display("FAIL pixel %0d,%0d", x, y); end
      end
    rd_addr = 0;
    @(negedge clk);
    checks++;
    if (rd_data != pat(W - 1, 0)) begin failures++; $display("FAIL read data not held"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
