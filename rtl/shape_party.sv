// Shape Party: the game logic, uniting Move Boxes and Bullet Master.
//
// It carries the players' moving directions to Move Boxes, their shooting
// directions and square positions to Bullet Master, and the 'dead' signal
// back from Bullet Master to Move Boxes, so that a hit restarts the game.
// Everything in here is wiring; the state lives in the sub-modules, which
// advance on the game tick (a one-cycle enable from the game clock divider).
// Outputs: every player square, every bullet with its flight state, and
// dead, for the graphics engine.
module shape_party
  import etherstream_pkg::*;
#(
  parameter int BOX_MOVE_AMT    = 2,
  parameter int BULLET_MOVE_AMT = 4
) (
  input  logic clk,
  input  logic rst,
  input  logic tick,
  input  dir_t move_dir  [NUM_PLAYERS],
  input  dir_t shoot_dir [NUM_PLAYERS],
  output pos_t box       [NUM_PLAYERS],
  output pos_t bullet    [NUM_PLAYERS],
  output dir_t bullet_dir[NUM_PLAYERS],
  output logic [1:0] dead
);

  move_boxes #(.MOVE_AMT(BOX_MOVE_AMT)) u_move_boxes (
    .clk, .rst, .tick, .move_dir, .dead, .box
  );

  bullet_master #(.MOVE_AMT(BULLET_MOVE_AMT)) u_bullet_master (
    .clk, .rst, .tick, .shoot_dir, .box, .bullet, .parsed(bullet_dir), .dead
  );

endmodule
