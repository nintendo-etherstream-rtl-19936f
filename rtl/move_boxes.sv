// Move Boxes: keeps the top-left corner of each player's square.
//
// On every game tick each player moves MOVE_AMT pixels in its moving
// direction (one axis at a time), clamped so the square never leaves the
// screen. Whenever 'dead' is non-zero (a player was hit) all players jump
// back to their start positions at the next clock edge, tick or not.
// Interface: move_dir per player (from the controller decoder), game tick
// enable, dead (0 = nobody, else the hit player's number 1..3); box outputs
// are registered. Start positions and MOVE_AMT are this design's choice.
module move_boxes
  import etherstream_pkg::*;
#(
  parameter int MOVE_AMT = 2
) (
  input  logic clk,
  input  logic rst,
  input  logic tick,
  input  dir_t move_dir [NUM_PLAYERS],
  input  logic [1:0] dead,
  output pos_t box [NUM_PLAYERS]
);

  localparam int MAX_X = SCREEN_W - BOX_SIZE;
  localparam int MAX_Y = SCREEN_H - BOX_SIZE;

  function automatic pos_t start_pos(int i);
    pos_t p;
    case (i)
      0:       begin p.x = COORD_W'(16);  p.y = COORD_W'(16);  end
      1:       begin p.x = COORD_W'(144); p.y = COORD_W'(16);  end
      default: begin p.x = COORD_W'(80);  p.y = COORD_W'(112); end
    endcase
    return p;
  endfunction

  function automatic pos_t step(pos_t p, dir_t d);
    pos_t n = p;
    case (d)
      DIR_UP:    n.y = (p.y < COORD_W'(MOVE_AMT)) ? '0 : p.y - COORD_W'(MOVE_AMT);
      DIR_DOWN:  n.y = (p.y + COORD_W'(MOVE_AMT) > COORD_W'(MAX_Y)) ? COORD_W'(MAX_Y)
                                                                  : p.y + COORD_W'(MOVE_AMT);
      DIR_LEFT:  n.x = (p.x < COORD_W'(MOVE_AMT)) ? '0 : p.x - COORD_W'(MOVE_AMT);
      DIR_RIGHT: n.x = (p.x + COORD_W'(MOVE_AMT) > COORD_W'(MAX_X)) ? COORD_W'(MAX_X)
                                                                  : p.x + COORD_W'(MOVE_AMT);
      default: ;
    endcase
    return n;
  endfunction

  always_ff @(posedge clk) begin
    for (int i = 0; i < NUM_PLAYERS; i++) begin
      if (rst || dead != 2'd0) box[i] <= start_pos(i);
      else if (tick)           box[i] <= step(box[i], move_dir[i]);
    end
  end

endmodule
