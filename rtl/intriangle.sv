// intriangle: is screen point p inside the triangle (a, b, c)?
//
// Instead of computing barycentric coordinates it only looks at signs: for
// each edge the 2D cross product of the edge vector with the vector to p
// tells on which side of the edge p lies. p is inside (edges included) when
// no two of the three results have opposite signs, so both windings work.
// A triangle with zero area contains nothing. Combinational; the products
// are of screen-bounded coordinates, so they stay narrow.
module intriangle #(
  parameter int W = 12
) (
  input  logic signed [W-1:0] px, py,
  input  logic signed [W-1:0] ax, ay,
  input  logic signed [W-1:0] bx, by,
  input  logic signed [W-1:0] cx, cy,
  output logic                in_tri
);

  localparam int EW = 2 * W + 3;
  logic signed [EW-1:0] e0, e1, e2, area;

  function automatic logic signed [EW-1:0] edge_fn(
      logic signed [W-1:0] x0, y0, x1, y1, x2, y2);
    return EW'(EW'(x1 - x0) * EW'(y2 - y0)) - EW'(EW'(y1 - y0) * EW'(x2 - x0));
  endfunction

  always_comb begin
    e0   = edge_fn(ax, ay, bx, by, px, py);
    e1   = edge_fn(bx, by, cx, cy, px, py);
    e2   = edge_fn(cx, cy, ax, ay, px, py);
    area = edge_fn(ax, ay, bx, by, cx, cy);
    in_tri = (area != '0) &&
             (((e0 >= 0) && (e1 >= 0) && (e2 >= 0)) ||
              ((e0 <= 0) && (e1 <= 0) && (e2 <= 0)));
  end

endmodule
