// End-to-end test of etherstream_top with a short game tick and PHY poll
// period (GAME_DIV = 1000, POLL_CYCLES = 3000); everything else is at its
// default size.
//
// The testbench sends controller packets (IPv4/UDP, one byte per cycle):
// player 1 shoots right at player 2, who stands on the same row, and player
// 3 walks down into the screen edge. It models the PHY's management
// interface and receives and checks every transmitted Ethernet frame
// (rmii_monitor). It runs until two pictures have been sent and counts
// each mechanism of the design, failing any that never happened: command
// packets decoded, game ticks, a hit (dead = 2 for one cycle, squares
// back at their start), a square held at the screen edge, pixels rejected
// by the depth test, the encoder paused by the packetizer, MAC back
// pressure from the RMII serialiser, packets above the size threshold,
// the marked last packet of each picture, and the auto-negotiation LED.
// It also checks the rendered picture rate against 30 pictures per second.
module tb_etherstream_top;
  import etherstream_pkg::*;
  logic clk = 0, rst = 1;
  logic [7:0] rx_data = 0;
  logic rx_valid = 0;
  logic [1:0] rmii_txd;
  logic rmii_txen, mdc, mdio_o, mdio_oe, mdio_i, led_autoneg;
  pos_t box [NUM_PLAYERS];
  pos_t bullet [NUM_PLAYERS];
  logic [1:0] dead;
  logic [15:0] frames_sent, packets_sent;
  int status_reads;
  int checks = 0, failures = 0;

  etherstream_top #(.GAME_DIV(1000), .POLL_CYCLES(3000)) dut (.*);
  rmii_monitor mon (.clk, .txd(rmii_txd), .txen(rmii_txen));
  phy_mdio_model phy (.mdc, .mdio_o, .mdio_oe, .mdio_i, .status_reads);
  always #5 clk = ~clk;

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask

  // mechanism counters
  int n_cmd = 0, n_tick = 0, n_dead = 0, n_dead_wrong = 0, n_edge = 0;
  int n_hidden = 0, n_drawn = 0, n_enc_pause = 0, n_mac_wait = 0, n_big = 0, n_led = 0, cyc = 0;
  logic dead_q = 0;
  always @(negedge clk) if (!rst) begin
    cyc++;
    if (dut.cmd_valid) n_cmd++;
    if (dut.game_tick) n_tick++;
    if (dead != 2'd0) begin
      n_dead++;
      if (dead != 2'd2 || dead_q) n_dead_wrong++;
    end
    dead_q = (dead != 2'd0);
    if (box[2].y == COORD_W'(SCREEN_H - BOX_SIZE)) n_edge++;
    if (dut.enc_busy && !dut.enc_bit_ready) n_enc_pause++;
    if (dut.ps_done) begin n_hidden += dut.u_ps.hidden_pixels; n_drawn += dut.u_ps.drawn_pixels; end
    if (dut.eth_valid && !dut.eth_ready) n_mac_wait++;
    if (dut.prep && dut.pay_bits > 14'd2048) n_big++;
    if (led_autoneg) n_led++;
  end

  task automatic send_commands(logic [2:0] mv [3], logic [2:0] sh [3]);
    logic [7:0] pkt [$];
    pkt = '{8'h45, 8'h00, 8'h00, 8'd31, 8'h00, 8'h00, 8'h40, 8'h00, 8'd64, 8'd17,
            8'h00, 8'h00, 8'd192, 8'd168, 8'd1, 8'd1, 8'd192, 8'd168, 8'd1, 8'd2,
            8'h13, 8'h8C, 8'h13, 8'h8C, 8'h00, 8'd11, 8'h00, 8'h00};
    for (int p = 0; p < 3; p++) pkt.push_back({1'b0, mv[p], 1'b0, sh[p]});
    foreach (pkt[i]) begin
      rx_data = pkt[i]; rx_valid = 1;
      @(negedge clk);
      if ((i % 7) == 3) begin rx_valid = 0; @(negedge clk); end   // gaps between bytes
    end
    rx_valid = 0;
  endtask

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + mon.checks, failures + mon.failures);
    $finish;
  end

  initial begin
    logic [2:0] mv [3], sh [3];
    int t_first, t_second;
    repeat (4) @(negedge clk);
    rst = 0;
    mv = '{3'd0, 3'd0, 3'd2};      // player 3 walks down
    sh = '{3'd4, 3'd0, 3'd0};      // player 1 shoots right
    send_commands(mv, sh);
    @(negedge clk);
    check(dut.move_dir[2] == DIR_DOWN && dut.shoot_dir[0] == DIR_RIGHT, "commands decoded");
    while (frames_sent < 16'd1) @(negedge clk);
    t_first = cyc;
    // second picture: player 3 walks left instead
    mv = '{3'd0, 3'd0, 3'd3};
    send_commands(mv, sh);
    while (frames_sent < 16'd2) @(negedge clk);
    t_second = cyc - t_first;
    repeat (400) @(negedge clk);
    $display("picture cycles %0d, %0d; packets %0d, frames seen %0d, markers %0d, payload bytes %0d",
             t_first, t_second, packets_sent, mon.frames, mon.markers, mon.payload_bytes);
    $display("mechanisms: cmd %0d tick %0d dead %0d edge %0d enc_pause %0d mac_wait %0d big %0d led %0d drawn %0d hidden %0d min_gap %0d",
             n_cmd, n_tick, n_dead, n_edge, n_enc_pause, n_mac_wait, n_big, n_led,
             n_drawn, n_hidden, mon.min_gap);
    check(mon.frames == int'(packets_sent) && mon.frames > 2, "every packet arrives as a frame");
    check(mon.markers == 2, $sformatf("%0d marked packets for 2 pictures", mon.markers));
    check(t_second < 3_333_333, "a picture takes less than 1/30 s");
    check(mon.min_gap >= 96, $sformatf("inter-frame gap %0d cycles", mon.min_gap));
    check(n_cmd == 2, $sformatf("%0d command packets decoded", n_cmd));
    check(n_tick > 0, "game ticks");
    check(n_dead > 0, "a player was hit");
    check(n_dead_wrong == 0, "dead names player 2 for one cycle");
    check(n_edge > 0, "a square held at the screen edge");
    check(n_hidden > 0 && n_drawn > 0, "depth test rejected pixels");
    check(n_enc_pause > 0, "encoder paused while a packet drains");
    check(n_mac_wait > 0, "MAC waited on the RMII serialiser");
    check(n_big > 0, "a packet cut above the threshold");
    check(n_led > 0 && led_autoneg, "auto-negotiation LED lit");
    check(status_reads >= 2, "PHY status polled");
    $display("TB_RESULT checks=%0d failures=%0d", checks + mon.checks, failures + mon.failures);
    $finish;
  end
endmodule
