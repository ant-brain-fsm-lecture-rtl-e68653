// Antennae decoder: turns the maze word of the ant's cell and the ant's
// heading into the two antenna bits.
//
// The right antenna touches a wall that lies ahead of the ant or on its
// right; the left antenna one that lies ahead or on its left.  With the
// one-hot heading N, W, S, E and the wall flags NW, WW, SW, EW of the cell:
//   R = NW(N+W) + WW(W+S) + SW(S+E) + EW(E+N)
//   L = NW(N+E) + WW(W+N) + SW(S+W) + EW(E+S)
// which is four 2-input ORs, eight 2-input ANDs and two 4-input ORs, as in
// the lecture design.  Both antennae set means a wall in front.  The exit
// flag of the word is passed on as `at_exit`.  Purely combinational.
module antennae_logic
  import ant_pkg::*;
(
  input  logic [7:0] maze_data,  // word of the current cell
  input  heading_t   heading,    // one-hot N/W/S/E
  output logic       ant_l,
  output logic       ant_r,
  output logic       at_exit
);

  logic wn, ww, ws, we;  // walls of the cell
  logic hn, hw, hs, he;  // heading

  always_comb begin
    wn = maze_data[BIT_NORTH];
    ww = maze_data[BIT_WEST];
    ws = maze_data[BIT_SOUTH];
    we = maze_data[BIT_EAST];
    hn = heading[0];
    hw = heading[1];
    hs = heading[2];
    he = heading[3];
    ant_r   = (wn & (hn | hw)) | (ww & (hw | hs)) | (ws & (hs | he)) | (we & (he | hn));
    ant_l   = (wn & (hn | he)) | (ww & (hw | hn)) | (ws & (hs | hw)) | (we & (he | hs));
    at_exit = maze_data[BIT_EXIT];
  end

endmodule
