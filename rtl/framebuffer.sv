// Framebuffer: one QCIF picture (176 x 144) of colour indices in block RAM.
// The pixel shader writes it, the H.261 encoder reads it. One synchronous
// write port and one synchronous read port; read data appears the cycle
// after rd_en. Address = y * WIDTH + x.
module framebuffer #(
  parameter int WIDTH  = 176,
  parameter int HEIGHT = 144,
  parameter int PIX_W  = 4,
  parameter int AW     = $clog2(WIDTH * HEIGHT)
) (
  input  logic             clk,
  input  logic             wr_en,
  input  logic [AW-1:0]    wr_addr,
  input  logic [PIX_W-1:0] wr_data,
  input  logic             rd_en,
  input  logic [AW-1:0]    rd_addr,
  output logic [PIX_W-1:0] rd_data
);

  logic [PIX_W-1:0] mem [WIDTH * HEIGHT];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
