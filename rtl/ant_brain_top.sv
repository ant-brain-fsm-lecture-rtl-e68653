// Ant brain: a maze walker that finds the exit of a 128 x 128 maze by
// keeping the wall on its right.
//
// Control and datapath are split as in the lecture design.  The controller
// (ant_fsm) sees only the two antenna bits and the exit flag and issues one
// of three actions: forward, turn left, turn right.  The datapath holds the
// ant's position in two 7-bit up/down counters (X, Y) and its heading in a
// one-hot shift register; {Y, X} addresses the maze memory, an external
// asynchronous 32K x 8 SRAM of which the lower 16K words hold the maze (A14
// is driven low).  The antennae decoder turns the addressed maze word and
// the heading into L and R.  A forward step moves along the heading: east
// increments X, west decrements X, north increments Y, south decrements Y.
//
// Timing (this design's own choice, the lecture does not fix it): one ant
// step takes two clock cycles.  In the sense cycle the controller loads its
// next state from the antennae of the cell the ant stands in; in the act
// cycle the counters and the heading register carry out the action of that
// new state.  The antennae are therefore always read after the previous move
// is complete, and the ant never acts on a cell it has left.  The SRAM read
// must settle within one clock period.
//
// Startup (own choice; the lecture leaves it open): a one-cycle `start`
// loads the start cell and heading, puts the controller in S0 (lost) and
// clears `done`; the ant then walks until it stands on the exit cell, where
// the controller raises `done` and stops issuing actions.  The SRAM is only
// read: chip select and output enable are held low, write enable high.
module ant_brain_top
  import ant_pkg::*;
#(
  parameter int unsigned XY_W    = COORD_W, // bits per coordinate: 128 x 128 maze
  parameter int unsigned SRAM_AW = 15   // SRAM address pins A0..A14
) (
  input  logic               clk,
  input  logic               rst_n,
  // start a walk
  input  logic               start,
  input  logic [XY_W-1:0]    start_x,
  input  logic [XY_W-1:0]    start_y,
  input  heading_t           start_heading,
  // maze SRAM (asynchronous, active-low controls)
  output logic [SRAM_AW-1:0] sram_addr,
  output logic               sram_cs_n,
  output logic               sram_oe_n,
  output logic               sram_we_n,
  input  logic [7:0]         sram_rdata,
  // status
  output logic [XY_W-1:0]    pos_x,
  output logic [XY_W-1:0]    pos_y,
  output heading_t           heading,
  output state_t             state,
  output action_t            action,     // controller's current action
  output logic               act_phase,  // 1 in the cycle the action is applied
  output logic               ant_l,
  output logic               ant_r,
  output logic               running,
  output logic               done
);

  logic    at_exit;
  logic    fsm_en;
  action_t apply;   // action gated to the act cycle

  // Two-phase step sequencer and run flag.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running   <= 1'b0;
      act_phase <= 1'b0;
    end else if (start) begin
      running   <= 1'b1;
      act_phase <= 1'b0;
    end else if (running) begin
      act_phase <= ~act_phase;
    end
  end

  assign fsm_en = running & ~act_phase;

  always_comb begin
    apply            = '0;
    if (running && act_phase) apply = action;
  end

  // Maze memory address {Y, X}, upper address pins low.
  always_comb begin
    sram_addr = '0;
    sram_addr[2*XY_W-1:0] = {pos_y, pos_x};
  end
  assign sram_cs_n = 1'b0;
  assign sram_oe_n = 1'b0;
  assign sram_we_n = 1'b1;

  antennae_logic u_antennae (
    .maze_data (sram_rdata),
    .heading   (heading),
    .ant_l     (ant_l),
    .ant_r     (ant_r),
    .at_exit   (at_exit)
  );

  ant_fsm u_fsm (
    .clk     (clk),
    .rst_n   (rst_n),
    .en      (fsm_en),
    .restart (start),
    .ant_l   (ant_l),
    .ant_r   (ant_r),
    .at_exit (at_exit),
    .state   (state),
    .act     (action),
    .done    (done)
  );

  updown_counter #(.WIDTH(XY_W)) u_x (
    .clk         (clk),
    .rst_n       (rst_n),
    .preload     (start),
    .preload_val (start_x),
    .inc         (apply.fwd & heading[3]),   // east
    .dec         (apply.fwd & heading[1]),   // west
    .q           (pos_x)
  );

  updown_counter #(.WIDTH(XY_W)) u_y (
    .clk         (clk),
    .rst_n       (rst_n),
    .preload     (start),
    .preload_val (start_y),
    .inc         (apply.fwd & heading[0]),   // north
    .dec         (apply.fwd & heading[2]),   // south
    .q           (pos_y)
  );

  heading_reg u_heading (
    .clk         (clk),
    .rst_n       (rst_n),
    .preload     (start),
    .preload_val (start_heading),
    .turn_right  (apply.turn_right),
    .turn_left   (apply.turn_left),
    .heading     (heading)
  );

  // The controller never asks for two actions at once.
  a_one_action: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({action.fwd, action.turn_left, action.turn_right}));

endmodule
