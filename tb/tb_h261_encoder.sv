// Self-checking test of h261_encoder. The testbench holds the framebuffer
// (one cycle read latency) with a picture whose macroblocks are each one
// random colour, so every block is flat: its coding must be exactly the
// 8-bit DC value (the block's mean, with 128 sent as 255) followed by the
// end-of-block code. The bitstream, taken with random stalls, is parsed
// here: picture header (PSC, TR, PTYPE QCIF), three GOB headers (GN 1, 3,
// 5, GQUANT 8), 33 macroblocks each (MBA 1, MTYPE intra) with six blocks.
// Also checked: one mb_end per macroblock, frame_end once, the timestamp
// taken from the 90 kHz counter, and at least 4097 cycles per macroblock.
// A second picture is textured (noise, stripes, checkers, single dots) so
// that the AC path is used. Its bitstream is decoded here with the H.261
// TCOEFF short codes, the escape and the zig-zag order, and every block's
// DC and 63 AC levels are compared with levels computed from a
// real-valued DCT of the same pixels (level = coefficient/16 truncated,
// DC = coefficient/8 rounded). The fixed-point DCT may differ by one unit,
// so a level may be off by one; at least 95% must match exactly. The
// temporal reference must count to 1.
module tb_h261_encoder;
  import etherstream_pkg::*;
  logic clk = 0, rst = 1, start = 0, busy;
  logic fb_rd_en;
  logic [14:0] fb_rd_addr;
  logic [PIX_W-1:0] fb_rd_data;
  logic bit_out, bit_valid, bit_ready = 0, mb_end, frame_end;
  logic [31:0] timestamp;
  int checks = 0, failures = 0;

  h261_encoder #(.QUANT(8), .TS_DIV(1111)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask

  logic [PIX_W-1:0] pic [SCREEN_W * SCREEN_H];
  always @(posedge clk) if (fb_rd_en) fb_rd_data <= pic[fb_rd_addr];

  logic bits [$];
  int mb_ends = 0, frame_ends = 0, cyc = 0;
  int mb_end_cyc [$];
  bit take = 0; logic take_v;
  always @(negedge clk) begin
    cyc++;
    if (take) bits.push_back(take_v);
    if (mb_end) begin mb_ends++; mb_end_cyc.push_back(cyc); end
    if (frame_end) frame_ends++;
    bit_ready = ($urandom_range(0, 3) != 0);
    #1;
    take = bit_valid && bit_ready;
    take_v = bit_out;
  end

  int pos = 0;
  function automatic int get(int n);
    int v = 0;
    for (int i = 0; i < n; i++) begin
      v = (v << 1) | int'(bits[pos]);
      pos++;
    end
    return v;
  endfunction

  function automatic int dc_of(int v);
    int d = v;
    if (d < 1) d = 1;
    if (d > 254) d = 254;
    return (d == 128) ? 255 : d;
  endfunction


  // H.261 TCOEFF short codes (without the sign bit) for the listed pairs.
  string vlc_code [$];
  int    vlc_run [$], vlc_lvl [$];
  task automatic add_vlc(string c, int r, int l);
    vlc_code.push_back(c); vlc_run.push_back(r); vlc_lvl.push_back(l);
  endtask
  initial begin
    add_vlc("11", 0, 1);       add_vlc("0100", 0, 2);     add_vlc("00101", 0, 3);
    add_vlc("0000110", 0, 4);  add_vlc("00100110", 0, 5); add_vlc("00100001", 0, 6);
    add_vlc("011", 1, 1);      add_vlc("000110", 1, 2);   add_vlc("00100101", 1, 3);
    add_vlc("0101", 2, 1);     add_vlc("0000100", 2, 2);
    add_vlc("00111", 3, 1);    add_vlc("00100100", 3, 2);
    add_vlc("00110", 4, 1);    add_vlc("000111", 5, 1);   add_vlc("000101", 6, 1);
    add_vlc("000100", 7, 1);   add_vlc("0000111", 8, 1);  add_vlc("0000101", 9, 1);
    add_vlc("00100111", 10, 1); add_vlc("00100011", 11, 1); add_vlc("00100010", 12, 1);
    add_vlc("00100000", 13, 1);
  end

  // zig-zag order of H.261, as index v*8+u
  int zz [64] = '{ 0,  1,  8, 16,  9,  2,  3, 10, 17, 24, 32, 25, 18, 11,  4,  5,
                  12, 19, 26, 33, 40, 48, 41, 34, 27, 20, 13,  6,  7, 14, 21, 28,
                  35, 42, 49, 56, 57, 50, 43, 36, 29, 22, 15, 23, 30, 37, 44, 51,
                  58, 59, 52, 45, 38, 31, 39, 46, 53, 60, 61, 54, 47, 55, 62, 63};

  function automatic bit peek_is(string c);
    if (pos + c.len() > bits.size()) return 0;
    for (int i = 0; i < c.len(); i++)
      if (bits[pos + i] != ((c[i] == "1") ? 1'b1 : 1'b0)) return 0;
    return 1;
  endfunction

  // Decodes one block's AC events into lv[1..63]; returns 0 on a bad code.
  function automatic bit decode_ac(ref int lv [64]);
    int k;
    k = 1;
    for (int i = 1; i < 64; i++) lv[i] = 0;
    forever begin
      int r, l;
      bit found;
      if (peek_is("10")) begin pos += 2; return 1; end
      found = 0;
      if (peek_is("000001")) begin
        pos += 6;
        r = get(6);
        l = get(8);
        if (l >= 128) l -= 256;
        found = 1;
      end else begin
        foreach (vlc_code[j]) if (!found && peek_is(vlc_code[j])) begin
          pos += vlc_code[j].len();
          r = vlc_run[j];
          l = (get(1) == 1) ? -vlc_lvl[j] : vlc_lvl[j];
          found = 1;
        end
      end
      if (!found || k + r > 63) return 0;
      k += r;
      lv[zz[k]] = l;
      k++;
    end
  endfunction

  // Reference levels from a real-valued DCT of one 8x8 block.
  function automatic void ref_levels(int px [64], ref int lv [64]);
    real pi, f, cu, cv;
    pi = 3.14159265358979;
    for (int v = 0; v < 8; v++)
      for (int u = 0; u < 8; u++) begin
        int q;
        f = 0.0;
        for (int y = 0; y < 8; y++)
          for (int x = 0; x < 8; x++)
            f += px[y * 8 + x] * $cos((2 * x + 1) * u * pi / 16.0) * $cos((2 * y + 1) * v * pi / 16.0);
        cu = (u == 0) ? 1.0 / $sqrt(2.0) : 1.0;
        cv = (v == 0) ? 1.0 / $sqrt(2.0) : 1.0;
        f = f * cu * cv / 4.0;
        if (u == 0 && v == 0) begin
          q = int'($floor(f / 8.0 + 0.5));
          lv[0] = dc_of(q);
        end else begin
          q = int'((f < 0 ? -f : f) / 16.0 - 0.5);   // truncation of the magnitude
          if ((f < 0 ? -f : f) < 16.0) q = 0;
          if (q > 127) q = 127;
          lv[v * 8 + u] = (f < 0) ? -q : q;
        end
      end
  endfunction

  int ac_events = 0, exact = 0, compared = 0, escapes = 0;
  task automatic run_picture(output int start_cyc);
    bits.delete(); pos = 0; mb_ends = 0; frame_ends = 0; mb_end_cyc.delete();
    start = 1;
    @(negedge clk);
    start = 0;
    start_cyc = cyc;
    while (frame_ends == 0) @(negedge clk);
    repeat (5) @(negedge clk);
  endtask

  // Decodes the textured picture's macroblocks and compares every level.
  task automatic parse_textured();
    for (int g = 0; g < 3; g++) begin
      check(get(16) == 1 && get(4) == 2 * g + 1 && get(5) == 8 && get(1) == 0, "GOB header");
      for (int m = 0; m < 33; m++) begin
        int my, mx;
        my = g * 3 + m / 11; mx = m % 11;
        check(get(1) == 1 && get(4) == 1, "macroblock header");
        for (int b = 0; b < 6; b++) begin
          int px [64], rl [64], dl [64];
          for (int y = 0; y < 8; y++)
            for (int x = 0; x < 8; x++) begin
              int sx, sy;
              ycbcr_t c;
              if (b < 4) begin
                sx = mx * 16 + (b % 2) * 8 + x; sy = my * 16 + (b / 2) * 8 + y;
              end else begin
                sx = mx * 16 + 2 * x; sy = my * 16 + 2 * y;
              end
              c = palette(pic[sy * SCREEN_W + sx]);
              px[y * 8 + x] = (b < 4) ? int'(c.y) : (b == 4) ? int'(c.cb) : int'(c.cr);
            end
          ref_levels(px, rl);
          dl[0] = get(8);
          checks++;
          if (!decode_ac(dl)) begin
            failures++;
            $display("FAIL undecodable block: GOB %0d MB %0d block %0d", g, m, b);
            return;
          end
          for (int k = 0; k < 64; k++) begin
            int d;
            d = dl[k] - rl[k];
            if (k == 0 && (dl[0] == 255 || rl[0] == 255))
              d = ((dl[0] == 255) ? 128 : dl[0]) - ((rl[0] == 255) ? 128 : rl[0]);
            compared++;
            if (d == 0) exact++;
            if (k > 0 && dl[k] != 0) ac_events++;
            if (k > 0 && (dl[k] > 20 || dl[k] < -20)) escapes++;
            if (d > 1 || d < -1) begin
              failures++;
              if (failures < 20)
                $display("FAIL GOB %0d MB %0d block %0d coefficient %0d: level %0d, expected %0d",
                         g, m, b, k, dl[k], rl[k]);
            end
            checks++;
          end
        end
      end
    end
  endtask

  initial begin
    repeat (6000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int col [9][11];
    int start_cyc;
    for (int my = 0; my < 9; my++)
      for (int mx = 0; mx < 11; mx++) col[my][mx] = $urandom_range(0, 15);
    for (int y = 0; y < SCREEN_H; y++)
      for (int x = 0; x < SCREEN_W; x++) pic[y * SCREEN_W + x] = 4'(col[y / 16][x / 16]);
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (5000) @(negedge clk);       // let the 90 kHz counter reach 4
    run_picture(start_cyc);
    check(timestamp == 32'd4, $sformatf("timestamp %0d, expected 4", timestamp));
    check(mb_ends == 99, $sformatf("%0d mb_end pulses", mb_ends));
    check(frame_ends == 1, "one frame_end");
    check(bits.size() == 32 + 3 * 26 + 99 * (5 + 6 * 10), $sformatf("%0d bits", bits.size()));
    check(mb_end_cyc[0] - start_cyc > 4097, "macroblock takes at least the DCT time");
    for (int i = 1; i < mb_end_cyc.size(); i++)
      if (mb_end_cyc[i] - mb_end_cyc[i - 1] < 4097) begin check(0, "macroblock interval too short"); break; end
    // parse
    check(get(20) == 16, "PSC");
    check(get(5) == 0, "TR");
    check(get(6) == 3, "PTYPE: QCIF, no split screen, HI_RES off");
    check(get(1) == 0, "PEI");
    for (int g = 0; g < 3; g++) begin
      check(get(16) == 1, "GBSC");
      check(get(4) == 2 * g + 1, $sformatf("GN of GOB %0d", g));
      check(get(5) == 8, "GQUANT");
      check(get(1) == 0, "GEI");
      for (int m = 0; m < 33; m++) begin
        int my, mx;
        ycbcr_t c;
        my = g * 3 + m / 11; mx = m % 11;
        c = palette(4'(col[my][mx]));
        check(get(1) == 1, "MBA 1");
        check(get(4) == 1, "MTYPE intra");
        for (int b = 0; b < 6; b++) begin
          int v;
          v = (b < 4) ? int'(c.y) : (b == 4) ? int'(c.cb) : int'(c.cr);
          check(get(8) == dc_of(v), $sformatf("DC of GOB %0d MB %0d block %0d", g, m, b));
          check(get(2) == 2, "EOB");
        end
      end
    end
    // ---- second picture: textured macroblocks --------------------------
    for (int y = 0; y < SCREEN_H; y++)
      for (int x = 0; x < SCREEN_W; x++) begin
        int m, a, b, v;
        m = (y / 16) * 11 + x / 16;
        a = col[y / 16][x / 16];
        b = (a + 5) % 16;
        case (m % 4)
          0:       v = $urandom_range(0, 15);
          1:       v = ((x / (1 + m % 3)) % 2 == 0) ? a : b;
          2:       v = (((x / 4) + (y / 4)) % 2 == 0) ? a : b;
          default: v = (x % 16 == 5 && y % 16 == 9) ? b : a;
        endcase
        pic[y * SCREEN_W + x] = 4'(v);
      end
    run_picture(start_cyc);
    check(mb_ends == 99 && frame_ends == 1, "textured picture: macroblock and picture ends");
    check(get(20) == 16, "PSC of the second picture");
    check(get(5) == 1, "TR counts pictures");
    check(get(6) == 3 && get(1) == 0, "PTYPE and PEI of the second picture");
    parse_textured();
    check(pos == bits.size(), "bitstream ends after the last block");
    check(exact * 100 >= compared * 95, $sformatf("%0d of %0d levels exact", exact, compared));
    check(ac_events > 1000 && escapes > 10, $sformatf("%0d AC events, %0d large levels", ac_events, escapes));
    $display("textured picture: %0d bits, %0d AC events, %0d of %0d levels exact", bits.size(), ac_events, exact, compared);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
