// ReceiveUDPModule: decodes the controller commands from a received IPv4/UDP
// packet that arrives one byte per valid cycle.
//
// An FSM walks RECEIVE_IP_HEADER (20 bytes, stored in a buffer), then
// RECEIVE_UDP_HEADER (8 bytes, stored), then RECEIVE_PAYLOAD: one byte per
// player in player order, laid out as {0, move[2:0], 0, shoot[2:0]}. The
// header bytes are placed in their buffer with a bit counter that steps by
// 8. After the last player's byte all commands are presented together with
// a one-cycle valid_out and the FSM returns to RECEIVE_IP_HEADER. The
// outputs hold their values until the next packet. The decoder relies on
// byte counting only: headers are stored, not checked, and the IPv4 header
// is taken to have no options (20 bytes), which is this design's choice.
module receive_udp
  import etherstream_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [7:0]  data_in,
  input  logic        valid_in,
  output dir_t        move_dir  [NUM_PLAYERS],
  output dir_t        shoot_dir [NUM_PLAYERS],
  output logic        valid_out,
  output logic [159:0] ip_header,
  output logic [63:0]  udp_header
);

  typedef enum logic [1:0] {
    RECEIVE_IP_HEADER,
    RECEIVE_UDP_HEADER,
    RECEIVE_PAYLOAD
  } rx_state_t;

  rx_state_t  state;
  logic [7:0] bit_counter;                 // position in the current header
  logic [1:0] player;                      // player the next payload byte is for
  dir_t       move_buf  [NUM_PLAYERS];
  dir_t       shoot_buf [NUM_PLAYERS];

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= RECEIVE_IP_HEADER;
      bit_counter <= '0;
      player      <= '0;
      valid_out   <= 1'b0;
      ip_header   <= '0;
      udp_header  <= '0;
      for (int i = 0; i < NUM_PLAYERS; i++) begin
        move_dir[i]  <= DIR_NEUTRAL;
        shoot_dir[i] <= DIR_NEUTRAL;
        move_buf[i]  <= DIR_NEUTRAL;
        shoot_buf[i] <= DIR_NEUTRAL;
      end
    end else begin
      valid_out <= 1'b0;
      if (valid_in) begin
        case (state)
          RECEIVE_IP_HEADER: begin
            // first byte received is the most significant one
            ip_header[159 - bit_counter -: 8] <= data_in;
            if (bit_counter == 8'd152) begin
              bit_counter <= '0;
              state       <= RECEIVE_UDP_HEADER;
            end else begin
              bit_counter <= bit_counter + 8'd8;
            end
          end
          RECEIVE_UDP_HEADER: begin
            udp_header[63 - bit_counter[5:0] -: 8] <= data_in;
            if (bit_counter == 8'd56) begin
              bit_counter <= '0;
              player      <= '0;
              state       <= RECEIVE_PAYLOAD;
            end else begin
              bit_counter <= bit_counter + 8'd8;
            end
          end
          default: begin // RECEIVE_PAYLOAD
            if (player == 2'(NUM_PLAYERS - 1)) begin
              for (int i = 0; i < NUM_PLAYERS - 1; i++) begin
                move_dir[i]  <= move_buf[i];
                shoot_dir[i] <= shoot_buf[i];
              end
              move_dir[NUM_PLAYERS-1]  <= to_dir(data_in[6:4]);
              shoot_dir[NUM_PLAYERS-1] <= to_dir(data_in[2:0]);
              valid_out <= 1'b1;
              player    <= '0;
              state     <= RECEIVE_IP_HEADER;
            end else begin
              move_buf[player]  <= to_dir(data_in[6:4]);
              shoot_buf[player] <= to_dir(data_in[2:0]);
              player <= player + 2'd1;
            end
          end
        endcase
      end
    end
  end

endmodule
