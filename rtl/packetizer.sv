// Packetizer: cuts the encoder's bitstream into RTP payloads on macroblock
// boundaries.
//
// In FILL it takes one bit per cycle from the encoder into the packet
// buffer (12000 bits). At each macroblock end (mb_end) it checks the
// buffered size; above THRESHOLD bits (2048), or at the end of the picture,
// it holds the encoder's output (bit_ready low), waits until the RTP
// transmitter is idle, pulses prepare_for_data with the size, the RTP marker (set for the
// last packet of a picture) and the picture's timestamp, and then streams
// the buffered bits to the transmitter on the data_* handshake. When the
// last bit has been taken it empties the buffer and lets the encoder run
// again. A single buffer is used, so the encoder's output waits while a
// packet drains.
module packetizer #(
  parameter int THRESHOLD = 2048,
  parameter int DEPTH     = 12000,
  parameter int SIZE_W    = 14
) (
  input  logic              clk,
  input  logic              rst,
  // from the encoder
  input  logic              bit_in,
  input  logic              bit_valid,
  output logic              bit_ready,
  input  logic              mb_end,
  input  logic              frame_end,
  input  logic [31:0]       timestamp_in,
  // to the RTP transmitter
  input  logic              tx_busy,
  output logic              prepare_for_data,
  output logic [SIZE_W-1:0] payload_bits,
  output logic              marker,
  output logic [31:0]       timestamp,
  output logic              data_out,
  output logic              data_valid,
  input  logic              ready_for_data,
  output logic [15:0]       packets_sent
);

  typedef enum logic [1:0] {FILL, WAIT_TX, STREAM} pk_state_t;
  pk_state_t state;

  logic [SIZE_W-1:0] wr_ptr, rd_ptr;
  logic              rd_en, rd_bit;

  assign bit_ready = (state == FILL);
  assign rd_en     = (state == STREAM) && (rd_ptr < payload_bits) && (!data_valid || ready_for_data);
  assign data_out  = rd_bit;

  packet_buffer #(.DEPTH(DEPTH), .AW(SIZE_W)) u_buffer (
    .clk,
    .wr_en(bit_valid && bit_ready), .wr_addr(wr_ptr), .wr_data(bit_in),
    .rd_en, .rd_addr(rd_ptr), .rd_data(rd_bit)
  );

  always_ff @(posedge clk) begin
    prepare_for_data <= 1'b0;
    if (rst) begin
      state        <= FILL;
      wr_ptr       <= '0;
      rd_ptr       <= '0;
      data_valid   <= 1'b0;
      payload_bits <= '0;
      marker       <= 1'b0;
      timestamp    <= '0;
      packets_sent <= '0;
    end else begin
      case (state)
        FILL: begin
          if (bit_valid) wr_ptr <= wr_ptr + 1'b1;
          if (mb_end && (frame_end || wr_ptr > SIZE_W'(THRESHOLD))) begin
            payload_bits <= wr_ptr;
            marker       <= frame_end;
            timestamp    <= timestamp_in;
            state        <= WAIT_TX;
          end
        end
        WAIT_TX: if (!tx_busy) begin
          prepare_for_data <= 1'b1;
          rd_ptr           <= '0;
          data_valid       <= 1'b0;
          state            <= STREAM;
        end
        default: begin // STREAM
          if (rd_en) begin
            rd_ptr     <= rd_ptr + 1'b1;
            data_valid <= 1'b1;
          end else if (ready_for_data) begin
            data_valid <= 1'b0;
          end
          if (rd_ptr == payload_bits && (!data_valid || ready_for_data)) begin
            data_valid   <= 1'b0;
            wr_ptr       <= '0;
            packets_sent <= packets_sent + 16'd1;
            state        <= FILL;
          end
        end
      endcase
    end
  end

  // The buffer must never overflow: a packet is cut well before DEPTH.
  always_ff @(posedge clk)
    if (!rst) assert (!(bit_valid && bit_ready) || wr_ptr < SIZE_W'(DEPTH))
      else $error("packetizer: packet buffer overflow");

endmodule
