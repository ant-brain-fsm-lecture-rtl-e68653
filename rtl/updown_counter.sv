// Position counter: one of the two maze coordinates (X or Y) of the ant.
//
// A WIDTH-bit register with synchronous preload, increment and decrement, as
// the lecture design asks for its X and Y registers ("with preload,
// increment, decrement"; 7 bits for a 128-cell side).  Preload has priority;
// increment and decrement together cancel.  The count wraps modulo 2**WIDTH
// at the edges of the grid (own choice: the maze's outer wall keeps the ant
// away from the edges).  One step per rising clock edge; asynchronous
// active-low reset to zero.
module updown_counter #(
  parameter int unsigned WIDTH = 7
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             preload,
  input  logic [WIDTH-1:0] preload_val,
  input  logic             inc,
  input  logic             dec,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q <= '0;
    end else if (preload) begin
      q <= preload_val;
    end else if (inc && !dec) begin
      q <= q + 1'b1;
    end else if (dec && !inc) begin
      q <= q - 1'b1;
    end
  end

endmodule
