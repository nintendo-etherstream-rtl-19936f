// Self-checking test of intriangle: random triangles on and around the
// screen, both windings, against an area test computed here (p is inside
// exactly when the three sub-triangle areas add up to the whole area).
module tb_intriangle;
  logic signed [11:0] px, py, ax, ay, bx, by, cx, cy;
  logic in_tri;
  int checks = 0, failures = 0, inside_cnt = 0;

  intriangle #(.W(12)) dut (.*);

  function automatic longint area2(longint x0, y0, x1, y1, x2, y2);
    longint v;
    v = (x1 - x0) * (y2 - y0) - (y1 - y0) * (x2 - x0);
    return (v < 0) ? -v : v;
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 20000; t++) begin
      longint whole, sum;
      bit exp_in;
      ax = 12'($urandom_range(0, 60)) - 12'sd10; ay = 12'($urandom_range(0, 60)) - 12'sd10;
      bx = 12'($urandom_range(0, 60)) - 12'sd10; by = 12'($urandom_range(0, 60)) - 12'sd10;
      cx = 12'($urandom_range(0, 60)) - 12'sd10; cy = 12'($urandom_range(0, 60)) - 12'sd10;
      px = 12'($urandom_range(0, 60)) - 12'sd10; py = 12'($urandom_range(0, 60)) - 12'sd10;
      if (t < 8) begin ax = 0; ay = 0; bx = 40; by = 0; cx = 0; cy = 40; px = 12'(t * 6); py = 12'(t * 6); end
      whole = area2(ax, ay, bx, by, cx, cy);
      sum = area2(px, py, ax, ay, bx, by) + area2(px, py, bx, by, cx, cy) + area2(px, py, cx, cy, ax, ay);
      exp_in = (whole != 0) && (sum == whole);
      #1;
      checks++;
      if (in_tri) inside_cnt++;
      if (in_tri != exp_in) begin failures++; if (failures < 10) $display("FAIL t=%0d got %0b", t, in_tri); end
    end
    checks++;
    if (inside_cnt < 100) begin failures++; $display("FAIL too few inside cases"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
