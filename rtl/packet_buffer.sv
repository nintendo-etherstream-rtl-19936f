// Packet buffer: a one-bit-wide block RAM that holds a whole packet's
// payload (12000 bits) before it is sent, so that the length fields of the
// headers are known before the first header byte leaves.
// One synchronous write port and one synchronous read port (read data is
// registered and appears the cycle after rd_en).
module packet_buffer #(
  parameter int DEPTH = 12000,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic          wr_data,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output logic          rd_data
);

  logic mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
