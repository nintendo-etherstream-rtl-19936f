// Vertex buffer: block RAM between the vertex shader (writer) and the pixel
// shader (reader), one projected vertex per word. Synchronous write and
// read ports; read data appears the cycle after rd_en.
module vertex_buffer
  import etherstream_pkg::*;
#(
  parameter int DEPTH = NUM_TRIS * 3
) (
  input  logic       clk,
  input  logic       wr_en,
  input  logic [7:0] wr_addr,
  input  vertex_t    wr_data,
  input  logic       rd_en,
  input  logic [7:0] rd_addr,
  output vertex_t    rd_data
);

  vertex_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
