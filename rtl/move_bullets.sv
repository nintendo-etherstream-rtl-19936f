// Move Bullets: keeps the position (centre point) of each player's bullet.
//
// Each bullet follows the parsed direction given by Bullet Master. While it
// is NEUTRAL the bullet sits on the centre of its owner's square; in any
// other direction it advances MOVE_AMT pixels per game tick in a straight
// line, stopping on the screen edge (Bullet Master then sends it back to
// NEUTRAL). Registered outputs, updated on game ticks only.
// MOVE_AMT and the stop-at-the-edge rule are this design's choice.
module move_bullets
  import etherstream_pkg::*;
#(
  parameter int MOVE_AMT = 4
) (
  input  logic clk,
  input  logic rst,
  input  logic tick,
  input  dir_t parsed [NUM_PLAYERS],
  input  pos_t box    [NUM_PLAYERS],
  output pos_t bullet [NUM_PLAYERS]
);

  localparam int MAX_X = SCREEN_W - 1;
  localparam int MAX_Y = SCREEN_H - 1;
  localparam int HALF  = BOX_SIZE / 2;

  function automatic pos_t advance(pos_t p, dir_t d, pos_t owner);
    pos_t n = p;
    case (d)
      DIR_UP:    n.y = (p.y < COORD_W'(MOVE_AMT)) ? '0 : p.y - COORD_W'(MOVE_AMT);
      DIR_DOWN:  n.y = (p.y + COORD_W'(MOVE_AMT) > COORD_W'(MAX_Y)) ? COORD_W'(MAX_Y)
                                                                  : p.y + COORD_W'(MOVE_AMT);
      DIR_LEFT:  n.x = (p.x < COORD_W'(MOVE_AMT)) ? '0 : p.x - COORD_W'(MOVE_AMT);
      DIR_RIGHT: n.x = (p.x + COORD_W'(MOVE_AMT) > COORD_W'(MAX_X)) ? COORD_W'(MAX_X)
                                                                  : p.x + COORD_W'(MOVE_AMT);
      default: begin
        n.x = owner.x + COORD_W'(HALF);
        n.y = owner.y + COORD_W'(HALF);
      end
    endcase
    return n;
  endfunction

  always_ff @(posedge clk) begin
    for (int i = 0; i < NUM_PLAYERS; i++) begin
      if (rst) begin
        bullet[i].x <= box[i].x + COORD_W'(HALF);
        bullet[i].y <= box[i].y + COORD_W'(HALF);
      end else if (tick) begin
        bullet[i] <= advance(bullet[i], parsed[i], box[i]);
      end
    end
  end

endmodule
