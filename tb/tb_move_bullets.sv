// Self-checking test of move_bullets: a NEUTRAL bullet sits on its owner's
// centre, a flying one advances 4 pixels per game tick and stops on the
// screen edge. Reference positions are computed here.
module tb_move_bullets;
  import etherstream_pkg::*;
  logic clk = 0, rst = 1, tick = 0;
  dir_t parsed [NUM_PLAYERS];
  pos_t box [NUM_PLAYERS];
  pos_t bullet [NUM_PLAYERS];
  int checks = 0, failures = 0;
  int ex [NUM_PLAYERS], ey [NUM_PLAYERS];

  move_bullets #(.MOVE_AMT(4)) dut (.*);
  always #5 clk = ~clk;

  task automatic check_all(string what);
    for (int i = 0; i < NUM_PLAYERS; i++) begin
      checks++;
      if (bullet[i].x != ex[i] || bullet[i].y != ey[i]) begin
        failures++;
        $display("FAIL %s: bullet %0d at (%0d,%0d), expected (%0d,%0d)", what, i, bullet[i].x, bullet[i].y, ex[i], ey[i]);
      end
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    box[0] = '{x: 9'd20, y: 9'd30};
    box[1] = '{x: 9'd100, y: 9'd60};
    box[2] = '{x: 9'd50, y: 9'd120};
    for (int i = 0; i < NUM_PLAYERS; i++) parsed[i] = DIR_NEUTRAL;
    repeat (2) @(posedge clk);
    rst <= 0;
    tick = 1;
    @(posedge clk); #1;
    for (int i = 0; i < NUM_PLAYERS; i++) begin ex[i] = box[i].x + 8; ey[i] = box[i].y + 8; end
    check_all("neutral");
    parsed[0] = DIR_RIGHT; parsed[1] = DIR_UP; parsed[2] = DIR_LEFT;
    for (int n = 0; n < 60; n++) begin
      tick = (n % 3 != 2);
      @(posedge clk); #1;
      if (tick) begin
        ex[0] = (ex[0] + 4 > 175) ? 175 : ex[0] + 4;
        ey[1] = (ey[1] - 4 < 0) ? 0 : ey[1] - 4;
        ex[2] = (ex[2] - 4 < 0) ? 0 : ex[2] - 4;
      end
      check_all("flying");
    end
    parsed[0] = DIR_DOWN; parsed[1] = DIR_NEUTRAL;
    tick = 1;
    for (int n = 0; n < 40; n++) begin
      @(posedge clk); #1;
      ey[0] = (ey[0] + 4 > 143) ? 143 : ey[0] + 4;
      ex[1] = box[1].x + 8; ey[1] = box[1].y + 8;
      ex[2] = (ex[2] - 4 < 0) ? 0 : ex[2] - 4;
      check_all("down / recalled");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
