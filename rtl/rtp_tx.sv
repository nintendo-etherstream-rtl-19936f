// BitwiseRTPModule: wraps a bit-serial payload in RTP, UDP and IPv4 headers
// and emits the packet a byte at a time.
//
// IDLE waits for prepare_for_data, which stores the payload size (in bits),
// the marker and the timestamp. The 40 header bytes (IPv4 20, UDP 8, RTP 12)
// are formed combinationally from those, the running RTP sequence number and
// fixed addresses, ports and SSRC; SEND_HEADER sends them most significant
// byte first, stepping a bit counter by 8. SEND_PAYLOAD packs the incoming
// bits into bytes, first bit into the byte's most significant position, and
// sends each full byte; a partial last byte is padded with zeros. Lengths
// are the header sizes plus the payload size; both checksums are left zero.
// The sequence number is seeded from a free-running LFSR on the first packet
// after reset and incremented after every packet.
// Handshakes: bits move when data_valid && ready_for_data; bytes move when
// out_valid && out_ready, and out_last marks the packet's final byte.
// This design lets payload bits flow in while the header is still being sent
// (a byte is buffered ahead), so the byte stream can keep pace with the MAC.
module rtp_tx #(
  parameter logic [31:0] SRC_IP   = 32'hC0A8_0102,  // 192.168.1.2
  parameter logic [31:0] DST_IP   = 32'hC0A8_0101,  // 192.168.1.1
  parameter logic [15:0] SRC_PORT = 16'd5004,
  parameter logic [15:0] DST_PORT = 16'd5004,
  parameter logic [31:0] SSRC     = 32'h4E45_5453,
  parameter logic [6:0]  PAYLOAD_TYPE = 7'd31,      // H.261 static payload type
  parameter int          SIZE_W   = 14              // bits of the payload size
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              prepare_for_data,
  input  logic [SIZE_W-1:0] payload_bits,
  input  logic              marker,
  input  logic [31:0]       timestamp,
  input  logic              data_in,
  input  logic              data_valid,
  output logic              ready_for_data,
  output logic [7:0]        out_data,
  output logic              out_valid,
  output logic              out_last,
  input  logic              out_ready,
  output logic [15:0]       rtp_sequence,
  output logic              busy
);

  localparam int HDR_BITS = (20 + 8 + 12) * 8;

  typedef enum logic [1:0] {IDLE, SEND_HEADER, SEND_PAYLOAD} tx_state_t;
  tx_state_t state;

  logic [SIZE_W-1:0] size_q, bits_in;
  logic              marker_q;
  logic [31:0]       ts_q;
  logic [8:0]        bit_counter;          // header position, steps by 8
  logic [SIZE_W-4:0] bytes_out;            // payload bytes sent
  logic [15:0]       lfsr;
  logic              seeded;

  // Header, put together combinationally.
  logic [SIZE_W-4:0] payload_bytes;
  logic [15:0]       udp_len, ip_len;
  logic [HDR_BITS-1:0] header;
  always_comb begin
    payload_bytes = (SIZE_W-3)'((size_q + SIZE_W'(7)) >> 3);
    udp_len = 16'(8 + 12) + 16'(payload_bytes);
    ip_len  = 16'd20 + udp_len;
    header = {
      8'h45, 8'h00, ip_len, 16'h0000, 16'h4000, 8'd64, 8'd17, 16'h0000, SRC_IP, DST_IP, // IPv4
      SRC_PORT, DST_PORT, udp_len, 16'h0000,                                           // UDP
      8'h80, marker_q, PAYLOAD_TYPE, rtp_sequence, ts_q, SSRC                           // RTP
    };
  end

  // Payload byte assembly: an accumulator and one output byte ahead of it.
  logic [7:0] acc;
  logic [3:0] acc_n;          // bits in the accumulator
  logic       acc_full;
  logic [7:0] pay_byte;
  logic       pay_full;

  wire out_take  = out_valid && out_ready;
  wire pay_free  = !pay_full || (state == SEND_PAYLOAD && out_take);
  wire all_in    = (bits_in == size_q);
  assign acc_full       = (acc_n == 4'd8) || (all_in && acc_n != 4'd0);
  assign ready_for_data = (state != IDLE) && !all_in && (!acc_full || pay_free);
  wire bit_take  = data_valid && ready_for_data;
  wire move      = acc_full && pay_free;
  assign busy    = (state != IDLE);

  always_comb begin
    out_valid = 1'b0;
    out_data  = '0;
    out_last  = 1'b0;
    if (state == SEND_HEADER) begin
      out_valid = 1'b1;
      out_data  = header[HDR_BITS - 1 - int'(bit_counter) -: 8];
    end else if (state == SEND_PAYLOAD) begin
      out_valid = pay_full;
      out_data  = pay_byte;
      out_last  = (bytes_out == payload_bytes - 1'b1);
    end
  end

  always_ff @(posedge clk) begin
    lfsr <= (lfsr == 16'h0) ? 16'hACE1 : {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};
    if (rst) begin
      state        <= IDLE;
      seeded       <= 1'b0;
      rtp_sequence <= '0;
      size_q       <= '0;
      bits_in      <= '0;
      marker_q     <= 1'b0;
      ts_q         <= '0;
      bit_counter  <= '0;
      bytes_out    <= '0;
      acc          <= '0;
      acc_n        <= '0;
      pay_byte     <= '0;
      pay_full     <= 1'b0;
    end else begin
      case (state)
        IDLE: if (prepare_for_data) begin
          size_q      <= payload_bits;
          marker_q    <= marker;
          ts_q        <= timestamp;
          bits_in     <= '0;
          bit_counter <= '0;
          bytes_out   <= '0;
          acc_n       <= '0;
          pay_full    <= 1'b0;
          if (!seeded) begin
            rtp_sequence <= lfsr;
            seeded       <= 1'b1;
          end
          state <= SEND_HEADER;
        end
        SEND_HEADER: if (out_ready) begin
          if (bit_counter == 9'(HDR_BITS - 8)) state <= SEND_PAYLOAD;
          else                                 bit_counter <= bit_counter + 9'd8;
        end
        default: begin // SEND_PAYLOAD
          if (out_take) begin
            bytes_out <= bytes_out + 1'b1;
            if (out_last) begin
              state        <= IDLE;
              rtp_sequence <= rtp_sequence + 16'd1;
            end
          end
        end
      endcase

      if (state != IDLE) begin
        if (move) begin
          pay_byte <= acc << (4'd8 - acc_n);
          pay_full <= 1'b1;
        end else if (state == SEND_PAYLOAD && out_take) begin
          pay_full <= 1'b0;
        end
        if (bit_take) begin
          bits_in <= bits_in + 1'b1;
          acc     <= {(move ? 7'd0 : acc[6:0]), data_in};
          acc_n   <= move ? 4'd1 : acc_n + 4'd1;
        end else if (move) begin
          acc_n <= '0;
        end
      end
    end
  end

endmodule
