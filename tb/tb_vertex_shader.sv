// Self-checking test of vertex_shader: for random object positions every
// one of the 216 vertex-buffer writes is compared with a projection
// computed here (cube corner = object centre +- half-size, z = 256 +- half,
// screen = coordinate * 256 / z + screen centre, truncated), together with
// the object's colour and side-face flag; the writes must come one per
// clock and done must come with the last write, 216 cycles after start.
module tb_vertex_shader;
  import etherstream_pkg::*;
  logic clk = 0, rst = 1, start = 0, busy, done, vb_wr_en;
  pos_t box [NUM_PLAYERS];
  pos_t bullet [NUM_PLAYERS];
  logic [7:0] vb_wr_addr;
  vertex_t vb_wr_data;
  int checks = 0, failures = 0;

  vertex_shader dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask

  // corner signs of the cube's triangles, {z,y,x}
  localparam int CORN [12][3] = '{'{0,1,3}, '{0,3,2}, '{4,6,7}, '{4,7,5}, '{0,2,6}, '{0,6,4},
                                   '{1,5,7}, '{1,7,3}, '{0,4,5}, '{0,5,1}, '{2,3,7}, '{2,7,6}};

  vertex_t got [256];
  int writes = 0, first_w = -1, last_w = -1, cyc = 0;
  always @(negedge clk) begin
    cyc++;
    if (vb_wr_en) begin
      got[vb_wr_addr] = vb_wr_data;
      writes++;
      if (first_w < 0) first_w = cyc;
      last_w = cyc;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int run = 0; run < 3; run++) begin
      int start_cyc, done_cyc;
      for (int i = 0; i < 3; i++) begin
        box[i].x = 9'($urandom_range(0, 160)); box[i].y = 9'($urandom_range(0, 128));
        bullet[i].x = 9'($urandom_range(0, 175)); bullet[i].y = 9'($urandom_range(0, 143));
      end
      writes = 0; first_w = -1;
      start = 1;
      @(negedge clk);
      start = 0;
      start_cyc = cyc;
      // inputs may change after start
      box[0].x = 0;
      while (!done) @(negedge clk);
      done_cyc = cyc;
      @(negedge clk);
      check(done_cyc - start_cyc == 216, $sformatf("done after %0d cycles", done_cyc - start_cyc));
      check(writes == 216 && last_w - first_w == 215, "216 writes, one per clock");
      for (int o = 0; o < 6; o++)
        for (int t = 0; t < 12; t++)
          for (int v = 0; v < 3; v++) begin
            int cx, cy, h, sx, sy, sz, x, y, z, px, py, a;
            if (o == 0) cx = 0;
            if (o < 3) begin
              cx = int'(dut.box_q[o].x) + 8 - 88; cy = int'(dut.box_q[o].y) + 8 - 72; h = 8;
            end else begin
              cx = int'(dut.bullet_q[o - 3].x) - 88; cy = int'(dut.bullet_q[o - 3].y) - 72; h = 2;
            end
            sx = CORN[t][v] & 1; sy = (CORN[t][v] >> 1) & 1; sz = (CORN[t][v] >> 2) & 1;
            x = sx ? cx + h : cx - h;
            y = sy ? cy + h : cy - h;
            z = sz ? 256 + h : 256 - h;
            px = x * 256 / z + 88;   // integer division truncates towards zero
            py = y * 256 / z + 72;
            a = (o * 12 + t) * 3 + v;
            check(int'(got[a].sx) == px && int'(got[a].sy) == py &&
                  int'(got[a].x) == x && int'(got[a].y) == y && int'(got[a].z) == z &&
                  got[a].color == {t >= 2 ? 1'b1 : 1'b0, 3'(o + 1)},
                  $sformatf("object %0d triangle %0d corner %0d: (%0d,%0d) expected (%0d,%0d)",
                            o, t, v, got[a].sx, got[a].sy, px, py));
          end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
