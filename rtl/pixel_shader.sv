// Pixel shader: rasterises the projected triangles into the framebuffer
// with a depth test, so the nearest surface wins at every pixel.
//
// A start pulse first clears the picture: every pixel gets the background
// index 0 and the largest depth. Then, for every triangle, the three
// vertices are fetched from the vertex buffer, the 3D plane normal
// n = (V1-V0) x (V2-V0) and the numerator O.n (O = V0, the vector from the
// camera to a vertex) are computed once (cross_product, dot_product), and
// only the pixels of the triangle's screen bounding box are visited, one per
// clock. For each pixel intriangle decides coverage by sign checks, the
// ray r = (x - W/2, y - H/2, D) from the camera through the pixel gives the
// denominator r.n, and the depth is (O.n)/(r.n) scaled by 256, i.e. the z
// of the hit point in 3D units. The depth buffer is read for the pixel in
// the same cycle and compared the next cycle; a nearer covered pixel
// updates depth and colour. A pipelined read-compare-write on a separate
// depth buffer is this design's way of ordering overlapping polygons.
// done pulses when the last triangle is finished. Counters report how many
// pixels were drawn and how many lost the depth test.
module pixel_shader
  import etherstream_pkg::*;
#(
  parameter int D = 256
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  output logic        busy,
  output logic        done,
  output logic        vb_rd_en,
  output logic [7:0]  vb_rd_addr,
  input  vertex_t     vb_rd_data,
  output logic        fb_wr_en,
  output logic [14:0] fb_wr_addr,
  output logic [PIX_W-1:0] fb_wr_data,
  output logic [31:0] drawn_pixels,
  output logic [31:0] hidden_pixels
);

  localparam int NPIX  = SCREEN_W * SCREEN_H;
  localparam int N_W   = 2 * (V_W + 1) + 1;     // normal component
  localparam int DOT_W = V_W + N_W + 2;
  localparam int DIV_W = DOT_W + 9;
  localparam logic [15:0] FAR = 16'hFFFF;

  typedef enum logic [2:0] {IDLE, CLEAR, FETCH, SETUP, RASTER, DRAIN} ps_state_t;
  ps_state_t state;

  logic [14:0] clr_addr;
  logic [6:0]  tri_n;
  logic [1:0]  fetch_n;
  vertex_t     v [3];
  logic signed [V_W-1:0] x, y, xmin, xmax, ymax;

  // ---- per-triangle set-up: normal and numerator ------------------------
  logic signed [V_W:0]    e1 [3], e2 [3];
  logic signed [N_W-1:0]  n_c [3], n_q [3];
  logic signed [V_W-1:0]  o_vec [3];
  logic signed [DOT_W-1:0] num_c, num_q;
  always_comb begin
    e1[0] = (V_W+1)'(v[1].x) - (V_W+1)'(v[0].x);
    e1[1] = (V_W+1)'(v[1].y) - (V_W+1)'(v[0].y);
    e1[2] = (V_W+1)'(v[1].z) - (V_W+1)'(v[0].z);
    e2[0] = (V_W+1)'(v[2].x) - (V_W+1)'(v[0].x);
    e2[1] = (V_W+1)'(v[2].y) - (V_W+1)'(v[0].y);
    e2[2] = (V_W+1)'(v[2].z) - (V_W+1)'(v[0].z);
    o_vec[0] = v[0].x;
    o_vec[1] = v[0].y;
    o_vec[2] = v[0].z;
  end
  cross_product #(.IN_W(V_W + 1), .OUT_W(N_W)) u_cross (.a(e1), .b(e2), .c(n_c));
  dot_product #(.A_W(V_W), .B_W(N_W), .OUT_W(DOT_W)) u_num (.a(o_vec), .b(n_q), .d(num_c));

  // Screen bounding box, clipped to the picture.
  function automatic logic signed [V_W-1:0] min3(logic signed [V_W-1:0] a, b, c);
    logic signed [V_W-1:0] m = (a < b) ? a : b;
    return (m < c) ? m : c;
  endfunction
  function automatic logic signed [V_W-1:0] max3(logic signed [V_W-1:0] a, b, c);
    logic signed [V_W-1:0] m = (a > b) ? a : b;
    return (m > c) ? m : c;
  endfunction
  logic signed [V_W-1:0] bx0, bx1, by0, by1;
  always_comb begin
    bx0 = min3(v[0].sx, v[1].sx, v[2].sx);
    bx1 = max3(v[0].sx, v[1].sx, v[2].sx);
    by0 = min3(v[0].sy, v[1].sy, v[2].sy);
    by1 = max3(v[0].sy, v[1].sy, v[2].sy);
    if (bx0 < 0) bx0 = '0;
    if (by0 < 0) by0 = '0;
    if (bx1 > V_W'(SCREEN_W - 1)) bx1 = V_W'(SCREEN_W - 1);
    if (by1 > V_W'(SCREEN_H - 1)) by1 = V_W'(SCREEN_H - 1);
  end

  // ---- stage 0: coverage, denominator, depth-buffer read ----------------
  logic                  covered;
  logic signed [V_W-1:0] ray [3];
  logic signed [DOT_W-1:0] den_c;
  intriangle #(.W(V_W)) u_intri (
    .px(x), .py(y),
    .ax(v[0].sx), .ay(v[0].sy), .bx(v[1].sx), .by(v[1].sy), .cx(v[2].sx), .cy(v[2].sy),
    .in_tri(covered)
  );
  always_comb begin
    ray[0] = x - V_W'(SCREEN_W / 2);
    ray[1] = y - V_W'(SCREEN_H / 2);
    ray[2] = V_W'(D);
  end
  dot_product #(.A_W(V_W), .B_W(N_W), .OUT_W(DOT_W)) u_den (.a(ray), .b(n_q), .d(den_c));

  wire [14:0] pix_addr = 15'(y) * 15'(SCREEN_W) + 15'(x);
  wire        s0_valid = (state == RASTER);

  // ---- stage 1: depth, compare, write -----------------------------------
  logic                    s1_valid, s1_cov;
  logic [14:0]             s1_addr;
  logic signed [DOT_W-1:0] s1_den;
  logic [PIX_W-1:0]        s1_color;
  logic [15:0]             zb_rd;
  logic signed [DIV_W-1:0] depth;
  logic [15:0]             depth16;
  logic                    nearer, draw;
  always_comb begin
    depth   = (s1_den == '0) ? '0 : (DIV_W'(num_q) <<< 8) / DIV_W'(s1_den);
    depth16 = (depth > DIV_W'(FAR - 1)) ? FAR - 16'd1 : 16'(depth);
    nearer  = (depth > 0) && (depth16 < zb_rd);
    draw    = s1_valid && s1_cov && (s1_den != '0) && nearer;
  end

  logic        zb_we;
  logic [14:0] zb_waddr;
  logic [15:0] zb_wdata;
  always_comb begin
    if (state == CLEAR) begin
      zb_we = 1'b1; zb_waddr = clr_addr; zb_wdata = FAR;
    end else begin
      zb_we = draw; zb_waddr = s1_addr; zb_wdata = depth16;
    end
    fb_wr_en   = zb_we;
    fb_wr_addr = zb_waddr;
    fb_wr_data = (state == CLEAR) ? '0 : s1_color;
  end

  framebuffer #(.WIDTH(SCREEN_W), .HEIGHT(SCREEN_H), .PIX_W(16)) u_zbuf (
    .clk, .wr_en(zb_we), .wr_addr(zb_waddr), .wr_data(zb_wdata),
    .rd_en(s0_valid), .rd_addr(pix_addr), .rd_data(zb_rd)
  );

  assign vb_rd_en   = (state == FETCH) && (fetch_n < 2'd3);
  assign vb_rd_addr = 8'(tri_n) * 8'd3 + 8'(fetch_n);
  assign busy       = (state != IDLE);

  always_ff @(posedge clk) begin
    done <= 1'b0;
    if (rst) begin
      state         <= IDLE;
      clr_addr      <= '0;
      tri_n         <= '0;
      fetch_n       <= '0;
      x <= '0; y <= '0; xmin <= '0; xmax <= '0; ymax <= '0;
      s1_valid      <= 1'b0;
      s1_cov        <= 1'b0;
      s1_addr       <= '0;
      s1_den        <= '0;
      s1_color      <= '0;
      num_q         <= '0;
      drawn_pixels  <= '0;
      hidden_pixels <= '0;
      for (int i = 0; i < 3; i++) begin
        v[i]   <= '0;
        n_q[i] <= '0;
      end
    end else begin
      s1_valid <= s0_valid;
      s1_cov   <= covered;
      s1_addr  <= pix_addr;
      s1_den   <= den_c;
      s1_color <= v[0].color;
      if (draw) drawn_pixels <= drawn_pixels + 32'd1;
      if (s1_valid && s1_cov && s1_den != '0 && !nearer) hidden_pixels <= hidden_pixels + 32'd1;

      case (state)
        IDLE: if (start) begin
          clr_addr      <= '0;
          drawn_pixels  <= '0;
          hidden_pixels <= '0;
          state         <= CLEAR;
        end
        CLEAR: begin
          if (clr_addr == 15'(NPIX - 1)) begin
            tri_n   <= '0;
            fetch_n <= '0;
            state   <= FETCH;
          end
          clr_addr <= clr_addr + 15'd1;
        end
        FETCH: begin
          if (fetch_n != 2'd0) v[fetch_n - 2'd1] <= vb_rd_data;
          if (fetch_n == 2'd3) state <= SETUP;
          fetch_n <= fetch_n + 2'd1;
        end
        SETUP: begin
          n_q  <= n_c;
          xmin <= bx0; xmax <= bx1; ymax <= by1;
          x    <= bx0; y    <= by0;
          state <= (bx0 > bx1 || by0 > by1) ? DRAIN : RASTER;
        end
        RASTER: begin
          num_q <= num_c;
          if (x == xmax) begin
            x <= xmin;
            if (y == ymax) state <= DRAIN;
            else           y <= y + 1'b1;
          end else begin
            x <= x + 1'b1;
          end
        end
        default: begin // DRAIN: let the last pixel through stage 1
          fetch_n <= '0;
          if (tri_n == 7'(NUM_TRIS - 1)) begin
            state <= IDLE;
            done  <= 1'b1;
          end else begin
            tri_n <= tri_n + 7'd1;
            state <= FETCH;
          end
        end
      endcase
    end
  end

endmodule
