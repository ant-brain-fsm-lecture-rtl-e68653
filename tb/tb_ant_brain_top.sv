// End-to-end test of the ant brain at its default size: 7-bit coordinates,
// a full 128 x 128 maze in a 32K x 8 SRAM model.
//
// The maze is generated here from a list of solid rectangles: an outer wall
// 4 cells thick with a 6-cell gap in the north wall (the exit cells), one
// slab rising from the south wall and one hanging from the north wall, in
// the spirit of the lecture's example maze.  Each free cell's word flags a
// wall on every side whose neighbour is solid (bit 0 when there is none) and
// the exit bit in the gap.  The words are written into the SRAM model
// through its write pins before the walk.
//
// A reference ant, written from the state-transition table and from maze
// geometry (not from the wall flags), is stepped alongside the design; one
// step is two clock cycles, and position, heading, state and done are
// compared after every step.  Two walks are made: one from inside the maze
// facing west (starts lost), one from against the west wall facing north
// (only the left antenna touches).  Both must reach the exit.  The test
// also counts the mechanisms of the design and fails if one never
// happened: each of the four states, forward steps while lost, left and
// right turns, a wall in front, only the left antenna, a break in the wall,
// increments and decrements of X and Y, and the exit.
module tb_ant_brain_top;
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
    if (x <= 3 || x >= N - 4 || y <= 3) return 1;          // W, E, S walls
    if (y >= N - 4 && !(x >= 60 && x <= 65)) return 1;     // N wall, gap 60..65
    if (x >= 40 && x <= 47 && y <= 60) return 1;           // slab from the south
    if (x >= 90 && x <= 95 && y >= 70) return 1;           // slab from the north
    return 0;
  endfunction

  function automatic bit is_exit(input int x, input int y);
    return !solid(x, y) && y >= N - 4;
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
    walk(20, 60, 1, steps);  // facing west in the open: starts lost
    walk(4, 20, 0, steps);   // along the west wall facing north: left antenna only
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
