// Cross product of two signed 3-vectors, combinational:
// c = a x b = (ay*bz - az*by, az*bx - ax*bz, ax*by - ay*bx).
// The pixel shader uses it once per triangle for the plane normal.
module cross_product #(
  parameter int IN_W  = 13,
  parameter int OUT_W = 2 * IN_W + 1
) (
  input  logic signed [IN_W-1:0]  a [3],
  input  logic signed [IN_W-1:0]  b [3],
  output logic signed [OUT_W-1:0] c [3]
);

  always_comb begin
    c[0] = OUT_W'(a[1] * b[2]) - OUT_W'(a[2] * b[1]);
    c[1] = OUT_W'(a[2] * b[0]) - OUT_W'(a[0] * b[2]);
    c[2] = OUT_W'(a[0] * b[1]) - OUT_W'(a[1] * b[0]);
  end

endmodule
