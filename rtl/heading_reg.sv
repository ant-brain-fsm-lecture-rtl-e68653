// Heading register: the direction the ant faces, as a 4-bit one-hot shift
// register with N=0001, W=0010, S=0100, E=1000 (lecture encoding).
//
// Turning right rotates the code right (N -> E -> S -> W -> N); turning left
// rotates it left (N -> W -> S -> E -> N); the preload value must be one-hot.
// Both requests at once leave it unchanged.  The synchronous preload, which sets the starting heading, and
// the reset value (north) are this design's own choices.  One turn per rising
// clock edge; asynchronous active-low reset.
module heading_reg
  import ant_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     preload,
  input  heading_t preload_val,
  input  logic     turn_right,
  input  logic     turn_left,
  output heading_t heading
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      heading <= HEAD_N;
    end else if (preload) begin
      heading <= preload_val;
    end else if (turn_right && !turn_left) begin
      heading <= {heading[0], heading[3:1]};
    end else if (turn_left && !turn_right) begin
      heading <= {heading[2:0], heading[3]};
    end
  end

  // The one-hot code must survive every rotation.
  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot(heading));

endmodule
