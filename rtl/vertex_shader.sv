// Vertex shader: places a cube on every game object and projects its
// corners onto the screen.
//
// The game plane becomes the 3D plane z = Z0 (the default value of the
// third axis), centred on the camera axis; the camera sits at the origin
// looking along +z, and the screen is at distance D. For every object
// (three player squares of half-size PLAYER_HALF, three bullets of
// half-size BULLET_HALF), every mesh triangle and every corner, one vertex
// per clock is formed and projected by scaling with D/z:
//   sx = x*D/z + W/2,  sy = y*D/z + H/2.
// Each result, with its 3D position and colour index, is written to the
// vertex buffer at (object*12 + triangle)*3 + corner. A start pulse
// samples the object positions; done pulses together with the last of the
// 216 writes, 216 cycles after start (2.16 us at 100 MHz). Sizes, Z0 and D
// are this design's choice; the division is done combinationally in one
// cycle.
module vertex_shader
  import etherstream_pkg::*;
#(
  parameter int Z0          = 256,
  parameter int D           = 256,
  parameter int PLAYER_HALF = BOX_SIZE / 2,
  parameter int BULLET_HALF = 2
) (
  input  logic      clk,
  input  logic      rst,
  input  logic      start,
  input  pos_t      box    [NUM_PLAYERS],
  input  pos_t      bullet [NUM_PLAYERS],
  output logic      busy,
  output logic      done,
  output logic      vb_wr_en,
  output logic [7:0] vb_wr_addr,
  output vertex_t   vb_wr_data
);

  localparam int NUM_VERTS = NUM_TRIS * 3;

  pos_t       box_q    [NUM_PLAYERS];
  pos_t       bullet_q [NUM_PLAYERS];
  logic [7:0] idx;

  // Decompose the vertex index.
  logic [2:0] obj;
  logic [3:0] tri_n;
  logic [1:0] corner;
  always_comb begin
    obj    = 3'(idx / 8'(TRIS_PER_OBJ * 3));
    tri_n  = 4'((idx % 8'(TRIS_PER_OBJ * 3)) / 8'd3);
    corner = 2'(idx % 8'd3);
  end

  mesh_tri_t mt;
  mesh_rom u_mesh (.tri_idx(tri_n), .tri_out(mt));

  logic signed [V_W-1:0] cx, cy, half, x, y, z;
  logic [2:0]            sgn;
  logic signed [2*V_W-1:0] px, py;
  always_comb begin
    if (obj < 3'(NUM_PLAYERS)) begin
      cx   = V_W'(box_q[obj[1:0]].x) + V_W'(PLAYER_HALF) - V_W'(SCREEN_W / 2);
      cy   = V_W'(box_q[obj[1:0]].y) + V_W'(PLAYER_HALF) - V_W'(SCREEN_H / 2);
      half = V_W'(PLAYER_HALF);
    end else begin
      cx   = V_W'(bullet_q[2'(obj - 3'(NUM_PLAYERS))].x) - V_W'(SCREEN_W / 2);
      cy   = V_W'(bullet_q[2'(obj - 3'(NUM_PLAYERS))].y) - V_W'(SCREEN_H / 2);
      half = V_W'(BULLET_HALF);
    end
    sgn = mt.corner[corner];
    x = sgn[0] ? cx + half : cx - half;
    y = sgn[1] ? cy + half : cy - half;
    z = sgn[2] ? V_W'(Z0) + half : V_W'(Z0) - half;
    px = (2*V_W)'(x) * (2*V_W)'(D) / (2*V_W)'(z);
    py = (2*V_W)'(y) * (2*V_W)'(D) / (2*V_W)'(z);
  end

  always_ff @(posedge clk) begin
    done     <= 1'b0;
    vb_wr_en <= 1'b0;
    if (rst) begin
      busy       <= 1'b0;
      idx        <= '0;
      vb_wr_addr <= '0;
      vb_wr_data <= '0;
      for (int i = 0; i < NUM_PLAYERS; i++) begin
        box_q[i]    <= '0;
        bullet_q[i] <= '0;
      end
    end else if (!busy) begin
      if (start) begin
        busy     <= 1'b1;
        idx      <= '0;
        box_q    <= box;
        bullet_q <= bullet;
      end
    end else begin
      vb_wr_en         <= 1'b1;
      vb_wr_addr       <= idx;
      vb_wr_data.sx    <= V_W'(px) + V_W'(SCREEN_W / 2);
      vb_wr_data.sy    <= V_W'(py) + V_W'(SCREEN_H / 2);
      vb_wr_data.x     <= x;
      vb_wr_data.y     <= y;
      vb_wr_data.z     <= z;
      vb_wr_data.color <= {mt.side, 3'(obj + 3'd1)};
      if (idx == 8'(NUM_VERTS - 1)) begin
        busy <= 1'b0;
        done <= 1'b1;
      end else begin
        idx <= idx + 8'd1;
      end
    end
  end

endmodule
