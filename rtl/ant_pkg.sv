// Shared types and constants of the ant-brain maze walker.
//
// The maze is a 128 x 128 grid of cells, one 8-bit word per cell, addressed
// as {Y, X} with 7 bits each.  Each word flags the walls around the cell
// (one bit per side), an empty cell and the exit cell.  The ant's heading is
// a one-hot 4-bit code, and the controller has four states with the 2-bit
// encoding S0=00, S1=01, S2=10, S3=11.  All of these codes follow the
// lecture design; only the names of the constants are this package's own.
package ant_pkg;

  // Width of one maze coordinate: 128 cells per side.
  localparam int unsigned COORD_W = 7;

  // Maze word: bit positions of the flags.
  localparam int unsigned BIT_NO_WALL = 0;  // 0000_0001
  localparam int unsigned BIT_NORTH   = 1;  // 0000_0010
  localparam int unsigned BIT_WEST    = 2;  // 0000_0100
  localparam int unsigned BIT_SOUTH   = 3;  // 0000_1000
  localparam int unsigned BIT_EAST    = 4;  // 0001_0000
  localparam int unsigned BIT_EXIT    = 5;  // 0010_0000

  // One-hot heading, as held by the heading shift register.
  typedef logic [3:0] heading_t;
  localparam heading_t HEAD_N = 4'b0001;
  localparam heading_t HEAD_W = 4'b0010;
  localparam heading_t HEAD_S = 4'b0100;
  localparam heading_t HEAD_E = 4'b1000;

  // Controller states, in the lecture's state assignment.
  typedef enum logic [1:0] {
    S0_LOST       = 2'b00,  // no wall touched: go forward
    S1_RIGHT_WALL = 2'b01,  // right antenna touching: go forward
    S2_WALL_BREAK = 2'b10,  // wall on the right ended: turn right
    S3_LEFT_WALL  = 2'b11   // left antenna (or wall in front): turn left
  } state_t;

  // Moore outputs of the controller.
  typedef struct packed {
    logic fwd;         // F : one step forward
    logic turn_left;   // TL: turn left 90 degrees
    logic turn_right;  // TR: turn right 90 degrees
  } action_t;

endpackage
