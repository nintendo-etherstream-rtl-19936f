// Self-checking test of pixel_shader. The testbench holds the vertex
// buffer: a near square (z = 128) drawn first, a far square (z = 256)
// drawn second that it partly covers, a triangle partly off the screen
// (clipping), and degenerate triangles that cover nothing. The resulting
// picture, collected from the framebuffer writes, is compared pixel by
// pixel with a reference computed here (coverage by areas, nearest depth
// wins, background 0 elsewhere); pixels that lose the depth test must be
// counted.
module tb_pixel_shader;
  import etherstream_pkg::*;
  logic clk = 0, rst = 1, start = 0, busy, done;
  logic vb_rd_en;
  logic [7:0] vb_rd_addr;
  vertex_t vb_rd_data;
  logic fb_wr_en;
  logic [14:0] fb_wr_addr;
  logic [PIX_W-1:0] fb_wr_data;
  logic [31:0] drawn_pixels, hidden_pixels;
  int checks = 0, failures = 0;

  pixel_shader dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask

  vertex_t vmem [NUM_TRIS * 3];
  always @(posedge clk) if (vb_rd_en) vb_rd_data <= vmem[vb_rd_addr];
  logic [PIX_W-1:0] pic [SCREEN_W * SCREEN_H];
  always @(posedge clk) if (fb_wr_en) pic[fb_wr_addr] <= fb_wr_data;

  function automatic vertex_t mkv(int sx, int sy, int z, int color);
    vertex_t v;
    v.sx = V_W'(sx); v.sy = V_W'(sy);
    v.x = V_W'((sx - 88) * z / 256); v.y = V_W'((sy - 72) * z / 256); v.z = V_W'(z);
    v.color = PIX_W'(color);
    return v;
  endfunction

  int tsx [8][3], tsy [8][3], tz [8], tc [8];
  task automatic set_tri(int t, int ax, ay, bx, by, cx, cy, z, c);
    tsx[t] = '{ax, bx, cx}; tsy[t] = '{ay, by, cy}; tz[t] = z; tc[t] = c;
    vmem[t * 3 + 0] = mkv(ax, ay, z, c);
    vmem[t * 3 + 1] = mkv(bx, by, z, c);
    vmem[t * 3 + 2] = mkv(cx, cy, z, c);
  endtask

  function automatic longint a2(longint x0, y0, x1, y1, x2, y2);
    longint v;
    v = (x1 - x0) * (y2 - y0) - (y1 - y0) * (x2 - x0);
    return v < 0 ? -v : v;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int done_cyc;
    for (int i = 0; i < NUM_TRIS * 3; i++) vmem[i] = mkv(0, 0, 256, 7);
    set_tri(0, 70, 60, 130, 60, 130, 110, 128, 1);     // near square
    set_tri(1, 70, 60, 130, 110, 70, 110, 128, 1);
    set_tri(2, 40, 30, 100, 30, 100, 90, 256, 10);     // far square, side shade
    set_tri(3, 40, 30, 100, 90, 40, 90, 256, 10);
    set_tri(4, -20, 100, 30, 150, -20, 160, 256, 3);   // crosses the left and bottom edges
    for (int i = 0; i < SCREEN_W * SCREEN_H; i++) pic[i] = 4'hF;
    repeat (3) @(negedge clk);
    rst = 0;
    start = 1;
    @(negedge clk);
    start = 0;
    done_cyc = 0;
    while (!done) begin @(negedge clk); done_cyc++; end
    @(negedge clk);
    for (int y = 0; y < SCREEN_H; y++)
      for (int x = 0; x < SCREEN_W; x++) begin
        int best, col;
        best = 1 << 30; col = 0;
        for (int t = 0; t < 5; t++) begin
          longint whole, sum;
          whole = a2(tsx[t][0], tsy[t][0], tsx[t][1], tsy[t][1], tsx[t][2], tsy[t][2]);
          sum = a2(x, y, tsx[t][0], tsy[t][0], tsx[t][1], tsy[t][1]) +
                a2(x, y, tsx[t][1], tsy[t][1], tsx[t][2], tsy[t][2]) +
                a2(x, y, tsx[t][2], tsy[t][2], tsx[t][0], tsy[t][0]);
          if (whole != 0 && sum == whole && tz[t] < best) begin best = tz[t]; col = tc[t]; end
        end
        checks++;
        if (pic[y * SCREEN_W + x] != PIX_W'(col)) begin
          failures++;
          if (failures < 20) $display("FAIL pixel (%0d,%0d) = %0d, expected %0d", x, y, pic[y * SCREEN_W + x], col);
        end
      end
    check(hidden_pixels > 500, $sformatf("%0d pixels lost the depth test", hidden_pixels));
    check(drawn_pixels > 5000, $sformatf("%0d pixels drawn", drawn_pixels));
    $display("pixel shader: %0d cycles, %0d drawn, %0d hidden", done_cyc, drawn_pixels, hidden_pixels);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
