// Self-checking test of bullet_master: the per-bullet FSM takes a shooting
// direction only in NEUTRAL, holds it while the bullet flies, returns to
// NEUTRAL at the screen edge; a bullet crossing an enemy square gives a
// one-cycle 'dead' pulse with that player's number at the expected game
// tick, never for its own shooter, and recalls all bullets.
module tb_bullet_master;
  import etherstream_pkg::*;
  logic clk = 0, rst = 1, tick = 0;
  dir_t shoot_dir [NUM_PLAYERS];
  pos_t box [NUM_PLAYERS];
  pos_t bullet [NUM_PLAYERS];
  dir_t parsed [NUM_PLAYERS];
  logic [1:0] dead;
  int checks = 0, failures = 0;
  int ticks, dead_tick, dead_cycles;
  logic [1:0] dead_seen;

  bullet_master #(.MOVE_AMT(4)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask

  // count dead pulses
  always @(posedge clk) if (!rst && dead != 0) begin
    dead_cycles++;
    dead_seen = dead;
    if (dead_tick < 0) dead_tick = ticks;
  end

  task automatic run_ticks(int n);
    repeat (n) begin
      tick = 1; @(posedge clk); #1; ticks++;
      tick = 0; @(posedge clk); #1;
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    dead_tick = -1; dead_cycles = 0; ticks = 0; dead_seen = 0;
    box[0] = '{x: 9'd16,  y: 9'd64};   // shooter, centre (24,72)
    box[1] = '{x: 9'd120, y: 9'd64};   // target in the same rows
    box[2] = '{x: 9'd80,  y: 9'd120};
    for (int i = 0; i < NUM_PLAYERS; i++) shoot_dir[i] = DIR_NEUTRAL;
    repeat (2) @(posedge clk);
    rst <= 0;
    run_ticks(1);
    check(parsed[0] == DIR_NEUTRAL && bullet[0].x == 24 && bullet[0].y == 72, "bullet parked on owner");
    // player 2 shoots up: nobody above it, bullet must reach the top and come back
    shoot_dir[2] = DIR_UP;
    run_ticks(1);
    check(parsed[2] == DIR_UP, "FSM takes the shooting direction");
    shoot_dir[2] = DIR_LEFT;      // ignored while flying
    run_ticks(5);
    check(parsed[2] == DIR_UP, "direction held while flying");
    shoot_dir[2] = DIR_NEUTRAL;
    // centre y = 128: reaches 0 after 32 moves; FSM returns on the following tick
    run_ticks(40);
    check(parsed[2] == DIR_NEUTRAL, "FSM back to NEUTRAL after the edge");
    check(dead_cycles == 0, "no hit yet");
    // player 1 shoots right towards nobody, passing no enemy; player 0 shoots at player 1
    ticks = 0;
    shoot_dir[0] = DIR_RIGHT;
    run_ticks(1);
    shoot_dir[0] = DIR_NEUTRAL;
    // bullet x = 24 + 4k after k further ticks; enters x >= 120 at k = 24
    run_ticks(30);
    check(dead_seen == 2'd2, "player 2 (index 1) reported dead");
    check(dead_tick == 25, $sformatf("hit at tick %0d, expected 25", dead_tick));
    check(dead_cycles == 1, $sformatf("dead lasted %0d cycles, expected 1", dead_cycles));
    check(parsed[0] == DIR_NEUTRAL && parsed[1] == DIR_NEUTRAL && parsed[2] == DIR_NEUTRAL, "bullets recalled after a hit");
    // own bullet never kills its shooter: shoot left from a square at the left edge
    dead_cycles = 0;
    box[0] = '{x: 9'd0, y: 9'd0};
    shoot_dir[0] = DIR_LEFT;
    run_ticks(10);
    check(dead_cycles == 0, "no self hit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
