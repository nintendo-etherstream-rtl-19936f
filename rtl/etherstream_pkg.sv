// Shared types and constants of the Etherstream game-to-video system.
//
// The game runs on a 2D plane the size of a QCIF picture (176 x 144), so a
// game coordinate is also a screen pixel before the 3D projection. Each
// controller sends two 3-bit direction codes per player (move and shoot);
// the code values themselves are this design's choice.
package etherstream_pkg;

  localparam int NUM_PLAYERS = 3;       // the game is fixed at three players
  localparam int SCREEN_W    = 176;     // QCIF luma width
  localparam int SCREEN_H    = 144;     // QCIF luma height
  localparam int COORD_W     = 9;       // bits of one game/screen coordinate
  localparam int BOX_SIZE    = 16;      // side of a player square, in pixels

  // Direction code carried in each 3-bit field of a controller byte.
  typedef enum logic [2:0] {
    DIR_NEUTRAL = 3'd0,
    DIR_UP      = 3'd1,
    DIR_DOWN    = 3'd2,
    DIR_LEFT    = 3'd3,
    DIR_RIGHT   = 3'd4
  } dir_t;

  // A point on the game plane; y grows downwards as on the screen.
  typedef struct packed {
    logic [COORD_W-1:0] x;
    logic [COORD_W-1:0] y;
  } pos_t;

  // Map any received 3-bit code to a direction; unused codes mean neutral.
  function automatic dir_t to_dir(logic [2:0] code);
    case (code)
      3'd1: return DIR_UP;
      3'd2: return DIR_DOWN;
      3'd3: return DIR_LEFT;
      3'd4: return DIR_RIGHT;
      default: return DIR_NEUTRAL;
    endcase
  endfunction

  // Colour indices written by the renderer: 0 is the background, 1..3 the
  // players, 4..6 their bullets; bit 3 marks a side face (drawn darker).
  localparam int PIX_W = 4;

  typedef struct packed {
    logic [7:0] y;
    logic [7:0] cb;
    logic [7:0] cr;
  } ycbcr_t;

  // Palette used by the video encoder to turn an index into YCbCr.
  function automatic ycbcr_t palette(logic [PIX_W-1:0] idx);
    ycbcr_t c;
    case (idx[2:0])
      3'd1:    c = '{y: 8'd82,  cb: 8'd90,  cr: 8'd240};  // red player
      3'd2:    c = '{y: 8'd145, cb: 8'd54,  cr: 8'd34};   // green player
      3'd3:    c = '{y: 8'd41,  cb: 8'd240, cr: 8'd110};  // blue player
      3'd4:    c = '{y: 8'd210, cb: 8'd16,  cr: 8'd146};  // bullets: yellow,
      3'd5:    c = '{y: 8'd170, cb: 8'd166, cr: 8'd16};   // cyan,
      3'd6:    c = '{y: 8'd107, cb: 8'd202, cr: 8'd222};  // magenta
      default: c = '{y: 8'd16,  cb: 8'd128, cr: 8'd128};  // black background
    endcase
    if (idx[3]) c.y = c.y >> 1;
    return c;
  endfunction

  // ---- graphics engine ---------------------------------------------------
  localparam int NUM_OBJECTS   = 2 * NUM_PLAYERS;  // three squares, three bullets
  localparam int TRIS_PER_OBJ  = 12;               // a cube
  localparam int NUM_TRIS      = NUM_OBJECTS * TRIS_PER_OBJ;
  localparam int V_W           = 12;               // bits of a 3D or screen coordinate

  // One projected vertex: screen position, 3D position and colour index.
  typedef struct packed {
    logic signed [V_W-1:0] sx;
    logic signed [V_W-1:0] sy;
    logic signed [V_W-1:0] x;
    logic signed [V_W-1:0] y;
    logic signed [V_W-1:0] z;
    logic [PIX_W-1:0]      color;
  } vertex_t;

  // One mesh triangle of a unit cube: the sign (1 = +1, 0 = -1) of each
  // axis for its three corners, and whether it is a side (darker) face.
  typedef struct packed {
    logic [2:0][2:0] corner;    // corner[i] = {z, y, x}
    logic            side;
  } mesh_tri_t;

endpackage
