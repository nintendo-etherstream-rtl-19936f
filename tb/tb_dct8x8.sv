// Self-checking test of dct8x8: flat, ramp, checkerboard and random 8x8
// blocks against the DCT equation evaluated here in floating point
// (results must match to within 1), and the latency from start to done
// (4097 cycles: one term per clock for 64 x 64 terms).
module tb_dct8x8;
  logic clk = 0, rst = 1;
  logic load_we = 0, start = 0, busy, done;
  logic [5:0] load_addr = 0, rd_addr = 0;
  logic [7:0] load_data = 0;
  logic signed [11:0] rd_data;
  int checks = 0, failures = 0;

  dct8x8 dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int f [64];
    real pi;
    pi = 3.14159265358979;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 8; t++) begin
      int cycles;
      for (int i = 0; i < 64; i++) begin
        case (t)
          0: f[i] = 255;
          1: f[i] = 16;
          2: f[i] = (i % 8) * 32;
          3: f[i] = (((i % 8) + (i / 8)) % 2) ? 255 : 0;
          default: f[i] = $urandom_range(0, 255);
        endcase
        load_we = 1; load_addr = 6'(i); load_data = 8'(f[i]);
        @(negedge clk);
      end
      load_we = 0;
      start = 1;
      @(negedge clk);
      start = 0;
      cycles = 1;
      while (!done) begin @(negedge clk); cycles++; end
      checks++;
      if (cycles != 4097) begin failures++; $display("FAIL latency %0d cycles", cycles); end
      for (int v = 0; v < 8; v++)
        for (int u = 0; u < 8; u++) begin
          real s, cu, cv, e;
          s = 0;
          cu = (u == 0) ? 1.0 / $sqrt(2.0) : 1.0;
          cv = (v == 0) ? 1.0 / $sqrt(2.0) : 1.0;
          for (int y = 0; y < 8; y++)
            for (int x = 0; x < 8; x++)
              s += f[y * 8 + x] * $cos(pi * (2 * x + 1) * u / 16.0) * $cos(pi * (2 * y + 1) * v / 16.0);
          e = cu * cv / 4.0 * s;
          rd_addr = 6'(v * 8 + u);
          #1;
          checks++;
          if ((rd_data - e) > 1.0 || (e - rd_data) > 1.0) begin
            failures++;
            $display("FAIL block %0d F(%0d,%0d) = %0d, expected %f", t, u, v, rd_data, e);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
