// Dot product of two signed 3-vectors of different widths, combinational:
// d = a0*b0 + a1*b1 + a2*b2. Used for both terms of the depth ratio
// (O.n)/(r.n) in the pixel shader.
module dot_product #(
  parameter int A_W   = 12,
  parameter int B_W   = 27,
  parameter int OUT_W = A_W + B_W + 2
) (
  input  logic signed [A_W-1:0]   a [3],
  input  logic signed [B_W-1:0]   b [3],
  output logic signed [OUT_W-1:0] d
);

  always_comb begin
    d = OUT_W'(OUT_W'(a[0]) * OUT_W'(b[0])) + OUT_W'(OUT_W'(a[1]) * OUT_W'(b[1]))
      + OUT_W'(OUT_W'(a[2]) * OUT_W'(b[2]));
  end

endmodule
