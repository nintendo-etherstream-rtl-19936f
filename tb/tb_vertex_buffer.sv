// Self-checking test of vertex_buffer: random vertex records written to
// all 216 words and read back one cycle after rd_en.
module tb_vertex_buffer;
  import etherstream_pkg::*;
  logic clk = 0, wr_en = 0, rd_en = 0;
  logic [7:0] wr_addr = 0, rd_addr = 0;
  vertex_t wr_data, rd_data;
  vertex_t model [NUM_TRIS * 3];
  int checks = 0, failures = 0;

  vertex_buffer dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int i = 0; i < NUM_TRIS * 3; i++) begin
      model[i] = vertex_t'({$urandom, $urandom, $urandom});
      wr_en = 1; wr_addr = 8'(i); wr_data = model[i];
      @(negedge clk);
    end
    wr_en = 0;
    for (int i = NUM_TRIS * 3 - 1; i >= 0; i--) begin
      rd_en = 1; rd_addr = 8'(i);
      @(negedge clk);
      rd_en = 0;
      checks++;
      if (rd_data != model[i]) begin failures++; $display("FAIL word %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
