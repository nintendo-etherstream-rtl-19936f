// Self-checking test of shape_party: players move with the game tick,
// player 1 shoots player 2, 'dead' reports player 2 and every square goes
// back to its start position, as the whole game logic should. Then all
// three players walk at random for 200 ticks without shooting; after every
// tick each square is compared with a position model here (2 pixels per
// tick, held inside the 176 x 144 field), and no hit may occur.
module tb_shape_party;
  import etherstream_pkg::*;
  logic clk = 0, rst = 1, tick = 0;
  dir_t move_dir [NUM_PLAYERS];
  dir_t shoot_dir [NUM_PLAYERS];
  pos_t box [NUM_PLAYERS];
  pos_t bullet [NUM_PLAYERS];
  dir_t bullet_dir [NUM_PLAYERS];
  logic [1:0] dead;
  int checks = 0, failures = 0, hits = 0;
  logic [1:0] last_dead = 0;

  shape_party dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (dead != 0) begin hits++; last_dead = dead; end

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask
  task automatic run_ticks(int n);
    repeat (n) begin
      tick = 1; @(posedge clk); #1;
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
    for (int i = 0; i < NUM_PLAYERS; i++) begin move_dir[i] = DIR_NEUTRAL; shoot_dir[i] = DIR_NEUTRAL; end
    repeat (2) @(posedge clk);
    rst <= 0;
    // player 1 (start 16,16) moves right 10 ticks -> x = 36
    move_dir[0] = DIR_RIGHT;
    run_ticks(10);
    move_dir[0] = DIR_NEUTRAL;
    check(box[0].x == 36 && box[0].y == 16, $sformatf("player 1 at (%0d,%0d), expected (36,16)", box[0].x, box[0].y));
    check(box[1].x == 144 && box[1].y == 16, "player 2 unmoved");
    // player 1 shoots right along y = 24 at player 2 (x 144..159, y 16..31)
    shoot_dir[0] = DIR_RIGHT;
    run_ticks(1);
    shoot_dir[0] = DIR_NEUTRAL;
    check(bullet_dir[0] == DIR_RIGHT, "bullet of player 1 flying");
    run_ticks(40);
    check(hits == 1 && last_dead == 2'd2, $sformatf("hits=%0d dead=%0d, expected one hit on player 2", hits, last_dead));
    check(box[0].x == 16 && box[0].y == 16, "player 1 back at start");
    check(box[2].x == 80 && box[2].y == 112, "player 3 at start");
    begin
      int mx [3], my [3];
      for (int p = 0; p < 3; p++) begin mx[p] = box[p].x; my[p] = box[p].y; end
      for (int t = 0; t < 200; t++) begin
        for (int p = 0; p < 3; p++) begin
          move_dir[p] = dir_t'($urandom_range(0, 4));
          case (move_dir[p])
            DIR_UP:    my[p] = (my[p] < 2) ? 0 : my[p] - 2;
            DIR_DOWN:  my[p] = (my[p] + 2 > SCREEN_H - BOX_SIZE) ? SCREEN_H - BOX_SIZE : my[p] + 2;
            DIR_LEFT:  mx[p] = (mx[p] < 2) ? 0 : mx[p] - 2;
            DIR_RIGHT: mx[p] = (mx[p] + 2 > SCREEN_W - BOX_SIZE) ? SCREEN_W - BOX_SIZE : mx[p] + 2;
            default: ;
          endcase
        end
        run_ticks(1);
        for (int p = 0; p < 3; p++)
          check(int'(box[p].x) == mx[p] && int'(box[p].y) == my[p],
                $sformatf("tick %0d: player %0d at (%0d,%0d), expected (%0d,%0d)", t, p + 1, box[p].x, box[p].y, mx[p], my[p]));
      end
      check(hits == 1, "no hit while nobody shoots");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
