// Self-checking test of the antennae decoder.
//
// Runs every combination of heading (4 one-hot codes), the four wall flags
// and the exit flag (128 cases) and compares L, R and the exit output with a
// geometric reference: directions are numbered N=0, W=1, S=2, E=3 going
// anticlockwise, the right-hand side of heading h is (h+3) mod 4 and the
// left-hand side (h+1) mod 4; an antenna touches when the wall ahead or the
// wall on its side is present.
module tb_antennae_logic;
  import ant_pkg::*;

  logic [7:0] maze_data;
  heading_t   heading;
  logic       ant_l, ant_r, at_exit;
  int         checks = 0, failures = 0;

  antennae_logic dut (.*);

  // wall flag of direction d (N=0, W=1, S=2, E=3) in a maze word
  function automatic logic wall(input logic [7:0] w, input int d);
    case (d)
      0: return w[1];
      1: return w[2];
      2: return w[3];
      default: return w[4];
    endcase
  endfunction

  initial begin
    for (int h = 0; h < 4; h++) begin
      for (int walls = 0; walls < 16; walls++) begin
        for (int ex = 0; ex < 2; ex++) begin
          logic exp_l, exp_r;
          heading   = heading_t'(4'b0001 << h);
          maze_data = {2'b00, ex[0], walls[3:0], (walls == 0)};
          #1;
          exp_r = wall(maze_data, h) | wall(maze_data, (h + 3) % 4);
          exp_l = wall(maze_data, h) | wall(maze_data, (h + 1) % 4);
          checks++;
          if (ant_r !== exp_r || ant_l !== exp_l || at_exit !== ex[0]) begin
            failures++;
            $display("FAIL heading=%b data=%b: L=%b R=%b exit=%b, expected L=%b R=%b exit=%b",
                     heading, maze_data, ant_l, ant_r, at_exit, exp_l, exp_r, ex[0]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
