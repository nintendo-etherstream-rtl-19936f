// Self-checking test of move_boxes: start positions, one step per game
// tick in each direction, no motion without a tick, clamping at the screen
// borders and the return to the start positions on 'dead'. A reference
// model in the testbench tracks every square.
module tb_move_boxes;
  import etherstream_pkg::*;
  logic clk = 0, rst = 1, tick = 0;
  dir_t move_dir [NUM_PLAYERS];
  logic [1:0] dead = 0;
  pos_t box [NUM_PLAYERS];
  int checks = 0, failures = 0;
  int ex [NUM_PLAYERS], ey [NUM_PLAYERS];
  localparam int SX [3] = '{16, 144, 80};
  localparam int SY [3] = '{16, 16, 112};

  move_boxes #(.MOVE_AMT(2)) dut (.*);
  always #5 clk = ~clk;

  task automatic check_all(string what);
    for (int i = 0; i < NUM_PLAYERS; i++) begin
      checks++;
      if (box[i].x != ex[i] || box[i].y != ey[i]) begin
        failures++;
        $display("FAIL %s: player %0d at (%0d,%0d), expected (%0d,%0d)", what, i, box[i].x, box[i].y, ex[i], ey[i]);
      end
    end
  endtask

  task automatic model_step();
    for (int i = 0; i < NUM_PLAYERS; i++)
      case (move_dir[i])
        DIR_UP:    ey[i] = (ey[i] - 2 < 0) ? 0 : ey[i] - 2;
        DIR_DOWN:  ey[i] = (ey[i] + 2 > 128) ? 128 : ey[i] + 2;
        DIR_LEFT:  ex[i] = (ex[i] - 2 < 0) ? 0 : ex[i] - 2;
        DIR_RIGHT: ex[i] = (ex[i] + 2 > 160) ? 160 : ex[i] + 2;
        default: ;
      endcase
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NUM_PLAYERS; i++) begin move_dir[i] = DIR_NEUTRAL; ex[i] = SX[i]; ey[i] = SY[i]; end
    repeat (2) @(posedge clk);
    rst <= 0;
    @(posedge clk); #1;
    check_all("start");
    // random moves, ticks on every other cycle
    for (int n = 0; n < 400; n++) begin
      for (int i = 0; i < NUM_PLAYERS; i++) move_dir[i] = dir_t'($urandom_range(0, 4));
      if (n > 200) begin move_dir[0] = DIR_RIGHT; move_dir[1] = DIR_UP; move_dir[2] = DIR_LEFT; end
      tick = n[0];
      @(posedge clk); #1;
      if (tick) model_step();
      check_all(tick ? "tick" : "no tick");
    end
    checks++;
    if (box[0].x != 160 || box[1].y != 0 || box[2].x != 0) begin
      failures++; $display("FAIL border clamp not reached");
    end
    tick = 0;
    dead = 2'd3;
    @(posedge clk); #1;
    dead = 0;
    for (int i = 0; i < NUM_PLAYERS; i++) begin ex[i] = SX[i]; ey[i] = SY[i]; end
    check_all("reset on dead");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
