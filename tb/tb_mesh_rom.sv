// Self-checking test of mesh_rom: every triangle has three distinct
// corners lying on one face of the cube, each of the six faces is covered
// by exactly two triangles that together use its four corners, and only
// the face towards the camera (z = -1) is not marked as a side face.
module tb_mesh_rom;
  import etherstream_pkg::*;
  logic [3:0] tri_idx;
  mesh_tri_t tri_out;
  int checks = 0, failures = 0;
  int face_tris [6];
  int face_corners [6];

  mesh_rom dut (.*);

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int f = 0; f < 6; f++) begin face_tris[f] = 0; face_corners[f] = 0; end
    for (int t = 0; t < TRIS_PER_OBJ; t++) begin
      logic [2:0] c0, c1, c2;
      int face;
      tri_idx = 4'(t);
      #1;
      c0 = tri_out.corner[0]; c1 = tri_out.corner[1]; c2 = tri_out.corner[2];
      check(c0 != c1 && c1 != c2 && c0 != c2, $sformatf("triangle %0d corners distinct", t));
      face = -1;
      for (int ax = 0; ax < 3; ax++)
        if (c0[ax] == c1[ax] && c1[ax] == c2[ax]) face = ax * 2 + int'(c0[ax]);
      check(face >= 0, $sformatf("triangle %0d lies on a face", t));
      if (face >= 0) begin
        face_tris[face]++;
        face_corners[face] |= (1 << c0) | (1 << c1) | (1 << c2);
        check(tri_out.side == (face != 4), $sformatf("triangle %0d side flag", t));
      end
    end
    for (int f = 0; f < 6; f++) begin
      int n;
      n = $countones(face_corners[f]);
      check(face_tris[f] == 2 && n == 4, $sformatf("face %0d covered", f));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
