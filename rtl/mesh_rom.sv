// Polygon mesh ROM: the twelve triangles of an axis-aligned cube of
// half-size 1, two per face. Each entry gives the three corners as axis
// signs and flags the side faces (all but the one facing the camera), which
// are drawn darker. The table is generated at elaboration; scaling and
// placing the cube is the vertex shader's job. Read is combinational.
module mesh_rom
  import etherstream_pkg::*;
(
  input  logic [3:0] tri_idx,
  output mesh_tri_t  tri_out
);

  // Corner numbers {z, y, x} of the two triangles of each face.
  localparam int CORNERS [TRIS_PER_OBJ][3] = '{
      '{0, 1, 3}, '{0, 3, 2},   // front  (z = -1, towards the camera)
      '{4, 6, 7}, '{4, 7, 5},   // back   (z = +1)
      '{0, 2, 6}, '{0, 6, 4},   // left   (x = -1)
      '{1, 5, 7}, '{1, 7, 3},   // right  (x = +1)
      '{0, 4, 5}, '{0, 5, 1},   // top    (y = -1)
      '{2, 3, 7}, '{2, 7, 6}    // bottom (y = +1)
  };

  always_comb begin
    tri_out = '0;
    if (tri_idx < 4'(TRIS_PER_OBJ)) begin
      for (int v = 0; v < 3; v++) tri_out.corner[v] = 3'(CORNERS[tri_idx][v]);
      tri_out.side = (tri_idx >= 4'd2);
    end
  end

endmodule
