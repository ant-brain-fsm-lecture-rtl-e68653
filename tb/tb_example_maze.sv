// Walk through the lecture's example maze at the design's default size.
//
// The example maze is redrawn on the 128 x 128 grid (origin at the
// south-west corner, Y growing northwards) from its picture: an outer wall
// with a six-cell exit gap in the north wall, a wall hanging from the north
// wall beside the gap with a horizontal arm to the east, a second short wall
// hanging from the north wall further east, an L-shaped wall running west
// from the first one with two legs down, the lower of which joins a long
// horizontal wall, and a horizontal wall jutting out of the east wall.  All
// walls are joined to the outer wall (no islands) and corridors are at least
// four cells wide.  Cell coordinates were read off the picture by scaling
// it, so the layout is close to, not identical with, the original.
//
// The ant starts where the picture places it, in the open west part of the
// maze facing north, so it starts lost.  As in the end-to-end test, a
// reference ant written from the state-transition table and maze geometry
// is stepped alongside the design (two clock cycles per step) and position,
// heading, state and done are compared after every step; the walk must end
// on an exit cell, and every mechanism counted there must occur.
module tb_example_maze;
  import ant_pkg::*;

  localparam int N = 128;

  logic        clk = 0, rst_n = 0;
  logic        start;
  logic [6:0]  start_x, start_y;
  heading_t    start_heading;
  logic [14:0] sram_addr;
  logic        sram_cs_n, sram_oe_n, sram_we_n;
  logic [7:0]  sram_rdata;
  logic [6:0]  pos_x, pos_y;
  heading_t    heading;
  state_t      state;
  action_t     action;
  logic        act_phase, ant_l, ant_r, running, done;

  ant_brain_top dut (.*);

  // SRAM pins: the testbench owns them while loading the maze.
  logic        loading = 1;
  logic [14:0] ld_addr;
  logic        ld_we_n = 1;
  logic [7:0]  ld_data;

  w24257a_model u_sram (
    .a    (loading ? ld_addr : sram_addr),
    .cs_n (loading ? 1'b0    : sram_cs_n),
    .oe_n (loading ? 1'b1    : sram_oe_n),
    .we_n (loading ? ld_we_n : sram_we_n),
    .din  (ld_data),
    .dout (sram_rdata)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // ---------------------------------------------------------------- maze
  function automatic bit solid(input int x, input int y);
    if (x < 0 || x >= N || y < 0 || y >= N) return 1;
    if (x <= 6 || x >= 122 || y <= 11) return 1;              // W, E, S walls
    if (y >= 116 && !(x >= 73 && x <= 78)) return 1;          // N wall, exit gap
    if (x >= 66 && x <= 72 && y >= 77) return 1;              // wall beside the gap
    if (x >= 72 && x <= 104 && y >= 90 && y <= 103) return 1; // its arm to the east
    if (x >= 109 && x <= 116 && y >= 90) return 1;            // short wall, north-east
    if (x >= 21 && x <= 72 && y >= 77 && y <= 90) return 1;   // L-shape, top bar
    if (x >= 21 && x <= 28 && y >= 52 && y <= 90) return 1;   // L-shape, west leg
    if (x >= 46 && x <= 53 && y >= 26 && y <= 90) return 1;   // L-shape, middle leg
    if (x >= 12 && x <= 116 && y >= 26 && y <= 38) return 1;  // long lower wall
    if (x >= 59 && y >= 52 && y <= 64) return 1;              // wall from the east
    return 0;
  endfunction

  function automatic bit is_exit(input int x, input int y);
    return !solid(x, y) && y >= 116;   // the gap in the north wall
  endfunction

  // neighbour of (x,y) in direction d: N=0, W=1, S=2, E=3
  function automatic int nx(input int x, input int d);
    return d == 1 ? x - 1 : d == 3 ? x + 1 : x;
  endfunction
  function automatic int ny(input int y, input int d);
    return d == 0 ? y + 1 : d == 2 ? y - 1 : y;
  endfunction

  function automatic logic [7:0] maze_word(input int x, input int y);
    logic [7:0] w = '0;
    if (solid(x, y)) return 8'h1e;  // never visited
    w[1] = solid(x, y + 1);
    w[2] = solid(x - 1, y);
    w[3] = solid(x, y - 1);
    w[4] = solid(x + 1, y);
    w[0] = (w[4:1] == 0);
    w[5] = is_exit(x, y);
    return w;
  endfunction

  // ------------------------------------------------------ reference ant
  int r_x, r_y, r_dir;      // dir: N=0, W=1, S=2, E=3
  logic [1:0] r_state;
  bit r_done;
  localparam heading_t CODE [4] = '{HEAD_N, HEAD_W, HEAD_S, HEAD_E};

  // mechanism counters
  int cnt_state [4];
  int cnt_lost_fwd, cnt_front, cnt_left_only, cnt_break, cnt_tl, cnt_tr;
  int cnt_xinc, cnt_xdec, cnt_yinc, cnt_ydec, cnt_exit;

  function automatic logic [1:0] table_next(input logic [1:0] s, input logic l, input logic r);
    case (s)
      2'b00: return l ? 2'b11 : (r ? 2'b01 : 2'b00);
      2'b01: return l ? 2'b11 : (r ? 2'b01 : 2'b10);
      2'b10: return 2'b00;
      default: return l ? 2'b11 : 2'b01;
    endcase
  endfunction

  task automatic ref_step();
    logic l, r;
    if (r_done) return;
    if (is_exit(r_x, r_y)) begin
      r_done = 1; r_state = 2'b00; cnt_exit++;
      return;
    end
    // geometric antennae: wall ahead, or on the side of the antenna
    r = solid(nx(r_x, r_dir), ny(r_y, r_dir)) ||
        solid(nx(r_x, (r_dir + 3) % 4), ny(r_y, (r_dir + 3) % 4));
    l = solid(nx(r_x, r_dir), ny(r_y, r_dir)) ||
        solid(nx(r_x, (r_dir + 1) % 4), ny(r_y, (r_dir + 1) % 4));
    if (l && r) cnt_front++;
    if (l && !r) cnt_left_only++;
    if (r_state == 2'b01 && !l && !r) cnt_break++;
    r_state = table_next(r_state, l, r);
    cnt_state[r_state]++;
    case (r_state)
      2'b00, 2'b01: begin
        if (r_state == 2'b00) cnt_lost_fwd++;
        case (r_dir)
          0: cnt_yinc++;
          1: cnt_xdec++;
          2: cnt_ydec++;
          default: cnt_xinc++;
        endcase
        r_x = nx(r_x, r_dir);
        r_y = ny(r_y, r_dir);
      end
      2'b10: begin r_dir = (r_dir + 3) % 4; cnt_tr++; end
      default: begin r_dir = (r_dir + 1) % 4; cnt_tl++; end
    endcase
  endtask

  task automatic compare(input int step);
    checks++;
    if (int'(pos_x) != r_x || int'(pos_y) != r_y || heading !== CODE[r_dir] ||
        state !== r_state || done !== r_done) begin
      failures++;
      if (failures < 10)
        $display("FAIL step %0d: pos=(%0d,%0d) head=%b state=%0d done=%b, expected (%0d,%0d) %b %0d %b",
                 step, pos_x, pos_y, heading, state, done, r_x, r_y, CODE[r_dir], r_state, r_done);
    end
  endtask

  task automatic walk(input int sx, input int sy, input int sdir, output int steps);
    start_x = 7'(sx); start_y = 7'(sy); start_heading = CODE[sdir];
    r_x = sx; r_y = sy; r_dir = sdir; r_state = 2'b00; r_done = 0;
    start = 1;
    @(posedge clk);
    #1 start = 0;
    compare(0);
    steps = 0;
    while (!r_done && steps < 5000) begin
      ref_step();
      repeat (2) @(posedge clk);   // sense cycle, act cycle
      #1;
      steps++;
      compare(steps);
    end
    // the exit must have been found, at the reference's exit cell
    checks++;
    if (!done || !is_exit(int'(pos_x), int'(pos_y))) begin
      failures++;
      $display("FAIL walk from (%0d,%0d) did not end on the exit: pos=(%0d,%0d) done=%b",
               sx, sy, pos_x, pos_y, done);
    end
    // once done the ant stays put
    repeat (6) @(posedge clk);
    #1 compare(steps);
    $display("walk from (%0d,%0d) heading %b: exit at (%0d,%0d) after %0d steps",
             sx, sy, CODE[sdir], pos_x, pos_y, steps);
  endtask

  initial begin
    int steps;
    start = 0; start_x = 0; start_y = 0; start_heading = HEAD_N;
    ld_addr = '0; ld_data = '0;
    // load the maze: word {Y, X}
    for (int y = 0; y < N; y++)
      for (int x = 0; x < N; x++) begin
        ld_addr = {1'b0, 7'(y), 7'(x)};
        ld_data = maze_word(x, y);
        #1 ld_we_n = 0;
        #1 ld_we_n = 1;
      end
    #1 loading = 0;
    // with output enable high the SRAM model must not drive its data pins
    for (int i = 0; i < 64; i++) begin
      int x, y;
      x = $urandom % N; y = $urandom % N;
      ld_addr = {1'b0, 7'(y), 7'(x)};
      loading = 1;
      #1;
      checks++;
      if (sram_rdata !== 8'h00) failures++;
      loading = 0;
      #1;
    end
    @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    #1;
    checks++;
    if (running || done || sram_cs_n || sram_oe_n || !sram_we_n || sram_addr[14]) begin
      failures++;
      $display("FAIL idle after reset: running=%b done=%b", running, done);
    end
    walk(14, 74, 0, steps);  // the picture's start: open area, facing north
    // the left antenna alone: start against the west wall facing north
    walk(7, 60, 0, steps);
    // every mechanism must have happened
    begin
      int counts [15];
      string names [15];
      counts = '{cnt_state[0], cnt_state[1], cnt_state[2], cnt_state[3], cnt_lost_fwd,
                 cnt_front, cnt_left_only, cnt_break, cnt_tl, cnt_tr,
                 cnt_xinc, cnt_xdec, cnt_yinc, cnt_ydec, cnt_exit};
      names = '{"S0", "S1", "S2", "S3", "forward while lost", "wall in front",
                "left antenna only", "break in wall", "turn left", "turn right",
                "X increment", "X decrement", "Y increment", "Y decrement", "exit"};
      for (int i = 0; i < 15; i++) begin
        $display("  %-20s %0d", names[i], counts[i]);
        checks++;
        if (counts[i] == 0) begin
          failures++;
          $display("FAIL mechanism never happened: %s", names[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
