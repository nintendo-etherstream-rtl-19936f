// Bullet Master: one five-state FSM per bullet plus hit detection.
//
// Each FSM (NEUTRAL, UP, DOWN, LEFT, RIGHT) holds the parsed direction of
// one player's bullet. In NEUTRAL the player has no bullet in flight and the
// FSM takes the player's shooting direction on the next game tick; in a
// flying state it stays until the bullet touches the screen edge it flies
// towards, then returns to NEUTRAL. Move Bullets, instantiated here, moves
// the bullets. Every clock cycle each flying bullet is compared with the
// two other players' squares; on an overlap 'dead' carries the hit
// player's number (1..3) for exactly one cycle, and all bullets are then
// recalled (the game restarts). When two players are hit at once the lower
// number is reported (this design's choice).
module bullet_master
  import etherstream_pkg::*;
#(
  parameter int MOVE_AMT = 4
) (
  input  logic clk,
  input  logic rst,
  input  logic tick,
  input  dir_t shoot_dir [NUM_PLAYERS],
  input  pos_t box       [NUM_PLAYERS],
  output pos_t bullet    [NUM_PLAYERS],
  output dir_t parsed    [NUM_PLAYERS],
  output logic [1:0] dead
);

  move_bullets #(.MOVE_AMT(MOVE_AMT)) u_move_bullets (
    .clk, .rst, .tick, .parsed, .box, .bullet
  );

  function automatic logic at_edge(pos_t p, dir_t d);
    case (d)
      DIR_UP:    return p.y == '0;
      DIR_DOWN:  return p.y == COORD_W'(SCREEN_H - 1);
      DIR_LEFT:  return p.x == '0;
      DIR_RIGHT: return p.x == COORD_W'(SCREEN_W - 1);
      default:   return 1'b0;
    endcase
  endfunction

  function automatic logic overlaps(pos_t b, pos_t sq);
    return (b.x >= sq.x) && (b.x < sq.x + COORD_W'(BOX_SIZE)) &&
           (b.y >= sq.y) && (b.y < sq.y + COORD_W'(BOX_SIZE));
  endfunction

  // Hit detection: player p is hit by any other player's flying bullet.
  logic [1:0] hit_num;
  always_comb begin
    hit_num = 2'd0;
    for (int p = NUM_PLAYERS - 1; p >= 0; p--)
      for (int b = 0; b < NUM_PLAYERS; b++)
        if (b != p && parsed[b] != DIR_NEUTRAL && overlaps(bullet[b], box[p]))
          hit_num = 2'(p + 1);
  end

  always_ff @(posedge clk) begin
    if (rst) dead <= 2'd0;
    else     dead <= (dead == 2'd0) ? hit_num : 2'd0;
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < NUM_PLAYERS; i++) begin
      if (rst || dead != 2'd0) begin
        parsed[i] <= DIR_NEUTRAL;
      end else if (tick) begin
        if (parsed[i] == DIR_NEUTRAL)              parsed[i] <= shoot_dir[i];
        else if (at_edge(bullet[i], parsed[i]))    parsed[i] <= DIR_NEUTRAL;
      end
    end
  end

endmodule
