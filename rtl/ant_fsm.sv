// Ant-brain controller: a four-state Moore machine that keeps the maze wall
// on the ant's right.
//
// Inputs are the two antenna bits L and R (1 = touching a wall) and the exit
// flag of the current cell.  The state register holds two bits, X (msb) and
// Y (lsb), with S0=00 lost, S1=01 right antenna touching, S2=10 break in
// the wall, S3=11 left antenna touching.  Next state and outputs are the
// minimized sum-of-products equations of the lecture design:
//   X+ = L.Y + L.X' + X'.Y.R'      Y+ = X.Y + X'.R + X'.L
//   F  = X'                         TL = X.Y        TR = X.Y'
// The outputs depend on the state only (Moore), so a decision taken on the
// sensors of one cycle is acted on in the next.
//
// Exit: when the exit flag is seen the machine goes to its reset state S0 and
// sets a done flag that holds all three outputs low, so the ant stops.  The
// done flag, the synchronous `restart` input (back to S0, done cleared) and
// the `en` input (the state register only loads when it is high) are this
// design's own additions; the lecture leaves startup and exit open.
// Timing: next state loads on the rising clock edge when en=1; outputs are
// registered-state decodes, valid throughout the cycle.  Reset is
// asynchronous, active low, to S0.
module ant_fsm
  import ant_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    en,        // load the state register this cycle
  input  logic    restart,   // synchronous return to S0, clears done
  input  logic    ant_l,     // L antenna
  input  logic    ant_r,     // R antenna
  input  logic    at_exit,   // current cell is the exit
  output state_t  state,
  output action_t act,
  output logic    done
);

  logic   sx, sy;     // state bits X (msb) and Y (lsb)
  logic   nx, ny;     // next-state bits
  state_t state_q;

  assign sx = state_q[1];
  assign sy = state_q[0];

  // Next-state equations (lecture "Step 4" minimization).
  always_comb begin
    nx = (ant_l & sy) | (ant_l & ~sx) | (~sx & sy & ~ant_r);
    ny = (sx & sy) | (~sx & ant_r) | (~sx & ant_l);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S0_LOST;
      done    <= 1'b0;
    end else if (restart) begin
      state_q <= S0_LOST;
      done    <= 1'b0;
    end else if (en && !done) begin
      if (at_exit) begin
        state_q <= S0_LOST;
        done    <= 1'b1;
      end else begin
        state_q <= state_t'({nx, ny});
      end
    end
  end

  // Moore outputs, silenced once the exit has been found.
  always_comb begin
    act.fwd        = ~sx & ~done;
    act.turn_left  = sx & sy & ~done;
    act.turn_right = sx & ~sy & ~done;
  end

  assign state = state_q;

endmodule
