// Full-size run of etherstream_top with every parameter at its default
// (60 Hz game tick from GAME_DIV = 1,666,667, PHY polled every 100,000
// clocks). The testbench sends one controller packet, models the PHY's
// management interface and receives every transmitted Ethernet frame with
// rmii_monitor, which checks preamble, FCS, IPv4/UDP/RTP headers, sequence
// numbers and the picture start code. It runs until the first complete
// picture has been rendered, encoded and sent, then checks that it left as
// packets ending in exactly one marked packet, that the commands were
// decoded, that the auto-negotiation LED came on, and that the picture took
// less than 1/30 s (3,333,333 clocks at 100 MHz). The first game tick comes
// only after this picture, so the game state is the start position.
module tb_etherstream_full;
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
  int cyc = 0;

  etherstream_top dut (.*);
  rmii_monitor mon (.clk, .txd(rmii_txd), .txen(rmii_txen));
  phy_mdio_model phy (.mdc, .mdio_o, .mdio_oe, .mdio_i, .status_reads);
  always #5 clk = ~clk;
  always @(negedge clk) cyc++;

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + mon.checks, failures + mon.failures);
    $finish;
  end

  initial begin
    logic [7:0] pkt [$];
    int t0;
    repeat (4) @(negedge clk);
    rst = 0;
    t0 = cyc;
    pkt = '{8'h45, 8'h00, 8'h00, 8'd31, 8'h00, 8'h00, 8'h40, 8'h00, 8'd64, 8'd17,
            8'h00, 8'h00, 8'd192, 8'd168, 8'd1, 8'd1, 8'd192, 8'd168, 8'd1, 8'd2,
            8'h13, 8'h8C, 8'h13, 8'h8C, 8'h00, 8'd11, 8'h00, 8'h00,
            8'h12, 8'h03, 8'h40};        // moves up/none/right, shoots 2/3/0
    foreach (pkt[i]) begin rx_data = pkt[i]; rx_valid = 1; @(negedge clk); end
    rx_valid = 0;
    @(negedge clk);
    check(dut.move_dir[0] == DIR_UP && dut.move_dir[2] == DIR_RIGHT &&
          dut.shoot_dir[0] == DIR_DOWN && dut.shoot_dir[1] == DIR_LEFT, "commands decoded");
    while (frames_sent < 16'd1) @(negedge clk);
    repeat (200) @(negedge clk);
    $display("picture cycles %0d; packets %0d, frames seen %0d, markers %0d, payload bytes %0d, led %0d",
             cyc - t0, packets_sent, mon.frames, mon.markers, mon.payload_bytes, led_autoneg);
    check(cyc - t0 < 3_333_333, "a picture takes less than 1/30 s");
    check(mon.frames == int'(packets_sent) && mon.frames >= 2, "every packet arrives as a frame");
    check(mon.markers == 1, "one marked packet ends the picture");
    check(led_autoneg, "auto-negotiation LED lit");
    $display("TB_RESULT checks=%0d failures=%0d", checks + mon.checks, failures + mon.failures);
    $finish;
  end
endmodule
