// Self-checking test of the heading register.
//
// Random turn-left / turn-right / preload requests for 2000 cycles.  The
// reference keeps a compass index (N=0, W=1, S=2, E=3, anticlockwise):
// a left turn adds 1, a right turn subtracts 1 (mod 4), and the expected
// one-hot code is N=0001, W=0010, S=0100, E=1000.
module tb_heading_reg;
  import ant_pkg::*;

  logic     clk = 0, rst_n = 0;
  logic     preload, turn_right, turn_left;
  heading_t preload_val, heading;
  int       checks = 0, failures = 0;
  int       dir = 0;
  int       lefts = 0, rights = 0;
  localparam heading_t CODE [4] = '{HEAD_N, HEAD_W, HEAD_S, HEAD_E};

  heading_reg dut (.*);

  always #5 clk = ~clk;

  initial begin
    preload = 0; turn_right = 0; turn_left = 0; preload_val = HEAD_N;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    checks++;
    if (heading !== HEAD_N) begin failures++; $display("FAIL reset heading %b", heading); end
    for (int i = 0; i < 2000; i++) begin
      int pdir;
      pdir        = $urandom % 4;
      preload     = ($urandom % 40) == 0;
      preload_val = CODE[pdir];
      turn_right  = $urandom;
      turn_left   = $urandom;
      @(posedge clk);
      if (preload) dir = pdir;
      else if (turn_left && !turn_right) begin dir = (dir + 1) % 4; lefts++; end
      else if (turn_right && !turn_left) begin dir = (dir + 3) % 4; rights++; end
      #1;
      checks++;
      if (heading !== CODE[dir]) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d: heading=%b expected %b", i, heading, CODE[dir]);
      end
    end
    $display("turns: %0d left, %0d right", lefts, rights);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
