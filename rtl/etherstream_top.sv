// Etherstream: a three-player game computed on the FPGA, rendered as 3D
// cubes and streamed as H.261 video over RTP/UDP/IPv4/Ethernet.
//
// Data flow: controller packets (IPv4 bytes, as delivered by a receive MAC)
// -> receive_udp -> shape_party (game state, advanced every GAME_DIV
// clocks) -> vertex_shader -> vertex_buffer -> pixel_shader -> framebuffer
// -> h261_encoder -> packetizer -> rtp_tx -> mac_transmit ->
// byte_transmitter -> RMII transmit pins of the PHY. The smi block polls
// the PHY's status over MDIO and lights led_autoneg once auto-negotiation
// has completed.
// A small sequencer renders and streams pictures back to back: it starts
// the vertex shader (which samples the game state), then the pixel shader,
// then the encoder, and waits for the encoder and the last packet to finish
// before the next picture. The receive MAC, the PHY and the MDIO tri-state
// pad are outside this module; their signals are ports.
module etherstream_top
  import etherstream_pkg::*;
#(
  parameter int GAME_DIV    = 1_666_667,   // game clock: 60 Hz from 100 MHz
  parameter int POLL_CYCLES = 100_000      // PHY status poll period
) (
  input  logic        clk,
  input  logic        rst,
  // received IPv4 packets carrying controller commands, one byte per cycle
  input  logic [7:0]  rx_data,
  input  logic        rx_valid,
  // RMII transmit
  output logic [1:0]  rmii_txd,
  output logic        rmii_txen,
  // PHY management
  output logic        mdc,
  output logic        mdio_o,
  output logic        mdio_oe,
  input  logic        mdio_i,
  output logic        led_autoneg,
  // status
  output pos_t        box    [NUM_PLAYERS],
  output pos_t        bullet [NUM_PLAYERS],
  output logic [1:0]  dead,
  output logic [15:0] frames_sent,
  output logic [15:0] packets_sent
);

  // ---- controller input and game logic ---------------------------------
  dir_t move_dir  [NUM_PLAYERS];
  dir_t shoot_dir [NUM_PLAYERS];
  dir_t bullet_dir[NUM_PLAYERS];
  logic cmd_valid;

  receive_udp u_rx (
    .clk, .rst, .data_in(rx_data), .valid_in(rx_valid),
    .move_dir, .shoot_dir, .valid_out(cmd_valid), .ip_header(), .udp_header()
  );

  logic [$clog2(GAME_DIV)-1:0] game_cnt;
  logic                        game_tick;
  always_ff @(posedge clk) begin
    if (rst || game_cnt == $bits(game_cnt)'(GAME_DIV - 1)) game_cnt <= '0;
    else                                                    game_cnt <= game_cnt + 1'b1;
  end
  assign game_tick = (game_cnt == $bits(game_cnt)'(GAME_DIV - 1));

  shape_party u_game (
    .clk, .rst, .tick(game_tick), .move_dir, .shoot_dir,
    .box, .bullet, .bullet_dir, .dead
  );

  // ---- graphics engine --------------------------------------------------
  logic       vs_start, vs_busy, vs_done;
  logic       vb_we, vb_re;
  logic [7:0] vb_waddr, vb_raddr;
  vertex_t    vb_wdata, vb_rdata;
  logic       ps_start, ps_busy, ps_done;
  logic        fb_we, fb_re;
  logic [14:0] fb_waddr, fb_raddr;
  logic [PIX_W-1:0] fb_wdata, fb_rdata;

  vertex_shader u_vs (
    .clk, .rst, .start(vs_start), .box, .bullet, .busy(vs_busy), .done(vs_done),
    .vb_wr_en(vb_we), .vb_wr_addr(vb_waddr), .vb_wr_data(vb_wdata)
  );

  vertex_buffer u_vb (
    .clk, .wr_en(vb_we), .wr_addr(vb_waddr), .wr_data(vb_wdata),
    .rd_en(vb_re), .rd_addr(vb_raddr), .rd_data(vb_rdata)
  );

  pixel_shader u_ps (
    .clk, .rst, .start(ps_start), .busy(ps_busy), .done(ps_done),
    .vb_rd_en(vb_re), .vb_rd_addr(vb_raddr), .vb_rd_data(vb_rdata),
    .fb_wr_en(fb_we), .fb_wr_addr(fb_waddr), .fb_wr_data(fb_wdata),
    .drawn_pixels(), .hidden_pixels()
  );

  framebuffer #(.WIDTH(SCREEN_W), .HEIGHT(SCREEN_H), .PIX_W(PIX_W)) u_fb (
    .clk, .wr_en(fb_we), .wr_addr(fb_waddr), .wr_data(fb_wdata),
    .rd_en(fb_re), .rd_addr(fb_raddr), .rd_data(fb_rdata)
  );

  // ---- video encoding and packetizing -----------------------------------
  logic        enc_start, enc_busy;
  logic        enc_bit, enc_bit_valid, enc_bit_ready, mb_end, frame_end;
  logic [31:0] enc_ts;

  h261_encoder u_enc (
    .clk, .rst, .start(enc_start), .busy(enc_busy),
    .fb_rd_en(fb_re), .fb_rd_addr(fb_raddr), .fb_rd_data(fb_rdata),
    .bit_out(enc_bit), .bit_valid(enc_bit_valid), .bit_ready(enc_bit_ready),
    .mb_end, .frame_end, .timestamp(enc_ts)
  );

  logic        prep, marker, pay_bit, pay_valid, pay_ready, rtp_busy;
  logic [13:0] pay_bits;
  logic [31:0] pk_ts;

  packetizer u_pk (
    .clk, .rst,
    .bit_in(enc_bit), .bit_valid(enc_bit_valid), .bit_ready(enc_bit_ready),
    .mb_end, .frame_end, .timestamp_in(enc_ts),
    .tx_busy(rtp_busy), .prepare_for_data(prep), .payload_bits(pay_bits),
    .marker, .timestamp(pk_ts), .data_out(pay_bit), .data_valid(pay_valid),
    .ready_for_data(pay_ready), .packets_sent
  );

  // ---- network transmit -------------------------------------------------
  logic [7:0] ip_byte, eth_byte;
  logic       ip_valid, ip_last, ip_ready, eth_valid, eth_ready;

  rtp_tx u_rtp (
    .clk, .rst, .prepare_for_data(prep), .payload_bits(pay_bits), .marker,
    .timestamp(pk_ts), .data_in(pay_bit), .data_valid(pay_valid),
    .ready_for_data(pay_ready), .out_data(ip_byte), .out_valid(ip_valid),
    .out_last(ip_last), .out_ready(ip_ready), .rtp_sequence(), .busy(rtp_busy)
  );

  mac_transmit u_mac (
    .clk, .rst, .in_data(ip_byte), .in_valid(ip_valid), .in_last(ip_last),
    .in_ready(ip_ready), .tx_data(eth_byte), .tx_valid(eth_valid),
    .tx_ready(eth_ready), .busy()
  );

  byte_transmitter u_bt (
    .clk, .rst, .in_data(eth_byte), .in_valid(eth_valid), .in_ready(eth_ready),
    .txd(rmii_txd), .txen(rmii_txen)
  );

  smi #(.POLL_CYCLES(POLL_CYCLES)) u_smi (
    .clk, .rst, .req(1'b0), .we(1'b0), .regad(5'd0), .wdata(16'd0),
    .busy(), .done(), .rdata(), .autoneg_done(led_autoneg),
    .mdc, .mdio_o, .mdio_oe, .mdio_i
  );

  // ---- picture sequencer ------------------------------------------------
  typedef enum logic [2:0] {S_VERTEX, S_VERTEX_WAIT, S_PIXEL_WAIT, S_ENCODE_WAIT, S_DRAIN} seq_t;
  seq_t seq;

  always_ff @(posedge clk) begin
    vs_start  <= 1'b0;
    ps_start  <= 1'b0;
    enc_start <= 1'b0;
    if (rst) begin
      seq         <= S_VERTEX;
      frames_sent <= '0;
    end else begin
      case (seq)
        S_VERTEX: begin
          vs_start <= 1'b1;
          seq      <= S_VERTEX_WAIT;
        end
        S_VERTEX_WAIT: if (vs_done) begin
          ps_start <= 1'b1;
          seq      <= S_PIXEL_WAIT;
        end
        S_PIXEL_WAIT: if (ps_done) begin
          enc_start <= 1'b1;
          seq       <= S_ENCODE_WAIT;
        end
        S_ENCODE_WAIT: if (frame_end) seq <= S_DRAIN;
        default: begin // S_DRAIN: the picture's last packet leaves
          if (enc_bit_ready && !rtp_busy && !enc_busy) begin
            frames_sent <= frames_sent + 16'd1;
            seq         <= S_VERTEX;
          end
        end
      endcase
    end
  end

  // cmd_valid marks a fresh controller packet; the game reads the held values.
  logic unused_ok;
  assign unused_ok = cmd_valid | vs_busy | ps_busy | (|bullet_dir[0]);

endmodule
