// DCT: the 8x8 forward discrete cosine transform of H.261, computed
// directly from its defining double sum.
//
//   F(u,v) = C(u)C(v)/4 * sum_x sum_y f(x,y) cos((2x+1)u*pi/16) cos((2y+1)v*pi/16)
//
// with C(0) = 1/sqrt(2) and C(a) = 1 otherwise. For every one of the 64
// outputs the 64 input terms are multiplied by two basis factors
// b(x,u) = C(u)/2 * cos(...) and summed, one term per clock: 4096 cycles per
// block (plus one). The basis factors are fixed-point (13 fractional bits)
// and come from a 9-entry cosine table folded by symmetry; the sum is kept
// exact and rounded to an integer once per output. Computing in fixed point
// (instead of double-precision floating point) is this design's choice.
// Interface: write the 64 pixels (index y*8+x) through load_*, pulse
// start, wait for done (one cycle); coefficients are then read
// combinationally at rd_addr (index v*8+u).
module dct8x8 #(
  parameter int PIX_W  = 8,
  parameter int COEF_W = 12
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     load_we,
  input  logic [5:0]               load_addr,
  input  logic [PIX_W-1:0]         load_data,
  input  logic                     start,
  output logic                     busy,
  output logic                     done,
  input  logic [5:0]               rd_addr,
  output logic signed [COEF_W-1:0] rd_data
);

  localparam int FRAC = 13;

  // cos(k*pi/16) * 4096 for k = 0..8; with FRAC = 13 this is cos/2.
  localparam int COS_Q [9] = '{4096, 4017, 3784, 3406, 2896, 2276, 1567, 799, 0};

  function automatic int basis(int x, int u);
    int k = ((2 * x + 1) * u) % 32;
    int c;
    if (u == 0) return 2896;            // 1/(2*sqrt(2)) * 8192
    if (k <= 8)       c =  COS_Q[k];
    else if (k <= 16) c = -COS_Q[16 - k];
    else if (k <= 24) c = -COS_Q[k - 16];
    else              c =  COS_Q[32 - k];
    return c;
  endfunction

  typedef logic signed [FRAC+1:0] basis_t;
  typedef basis_t basis_table_t [64];

  function automatic basis_table_t make_basis();
    basis_table_t t;
    for (int x = 0; x < 8; x++)
      for (int u = 0; u < 8; u++)
        t[x * 8 + u] = basis_t'(basis(x, u));
    return t;
  endfunction

  localparam basis_table_t BASIS = make_basis();

  logic [PIX_W-1:0]         pix  [64];
  logic signed [COEF_W-1:0] coef [64];
  logic [5:0]               k;        // output index v*8+u
  logic [5:0]               n;        // input index y*8+x
  logic signed [47:0]       acc;

  logic signed [47:0] term, total;
  always_comb begin
    // b(x,u) * b(y,v) * f(x,y)
    term  = 48'(BASIS[{n[2:0], k[2:0]}]) * 48'(BASIS[{n[5:3], k[5:3]}])
          * $signed({1'b0, 47'(pix[n])});
    total = acc + term;
  end

  always_ff @(posedge clk) begin
    if (load_we) pix[load_addr] <= load_data;
  end

  always_ff @(posedge clk) begin
    done <= 1'b0;
    if (rst) begin
      busy <= 1'b0;
      k    <= '0;
      n    <= '0;
      acc  <= '0;
    end else if (!busy) begin
      if (start) begin
        busy <= 1'b1;
        k    <= '0;
        n    <= '0;
        acc  <= '0;
      end
    end else begin
      n <= n + 6'd1;
      if (n == 6'd63) begin
        // round to nearest, 2*FRAC fractional bits
        coef[k] <= COEF_W'((total + (48'sd1 <<< (2 * FRAC - 1))) >>> (2 * FRAC));
        acc     <= '0;
        k       <= k + 6'd1;
        if (k == 6'd63) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end else begin
        acc <= total;
      end
    end
  end

  assign rd_data = coef[rd_addr];

endmodule
