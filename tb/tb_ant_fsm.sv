// Self-checking test of the ant-brain controller.
//
// Drives random antenna bits, exit flags, enables and restarts for 4000
// cycles and checks state, outputs and done against a reference written
// from the state-transition table (not from the minimized equations):
//   S0: L'R'->S0, L'R->S1, L->S3      output F
//   S1: L'R'->S2, L'R->S1, L->S3      output F
//   S2: any  ->S0                     output TR
//   S3: L'  ->S1, L  ->S3             output TL
// An exit flag sends the reference to S0 with done set and all outputs low.
// Also counts that every table row was exercised.
module tb_ant_fsm;
  import ant_pkg::*;

  logic    clk = 0, rst_n = 0;
  logic    en, restart, ant_l, ant_r, at_exit;
  state_t  state;
  action_t act;
  logic    done;
  int      checks = 0, failures = 0, cycles = 0;
  int      row_hits [4][4];

  ant_fsm dut (.*);

  always #5 clk = ~clk;

  logic [1:0] ref_state;
  logic       ref_done;

  function automatic logic [1:0] table_next(input logic [1:0] s, input logic l, input logic r);
    case (s)
      2'b00: return l ? 2'b11 : (r ? 2'b01 : 2'b00);
      2'b01: return l ? 2'b11 : (r ? 2'b01 : 2'b10);
      2'b10: return 2'b00;
      default: return l ? 2'b11 : 2'b01;
    endcase
  endfunction

  task automatic check_outputs();
    logic ef, etl, etr;
    ef  = !ref_done && (ref_state == 2'b00 || ref_state == 2'b01);
    etr = !ref_done && (ref_state == 2'b10);
    etl = !ref_done && (ref_state == 2'b11);
    checks++;
    if (state !== ref_state || done !== ref_done || act.fwd !== ef ||
        act.turn_left !== etl || act.turn_right !== etr) begin
      failures++;
      if (failures < 10)
        $display("FAIL cycle %0d: state=%b done=%b F=%b TL=%b TR=%b, expected %b %b %b %b %b",
                 cycles, state, done, act.fwd, act.turn_left, act.turn_right,
                 ref_state, ref_done, ef, etl, etr);
    end
  endtask

  initial begin
    en = 0; restart = 0; ant_l = 0; ant_r = 0; at_exit = 0;
    ref_state = 2'b00; ref_done = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1 check_outputs();
    for (int i = 0; i < 4000; i++) begin
      en      = ($urandom % 8) != 0;
      restart = ($urandom % 64) == 0;
      at_exit = ($urandom % 40) == 0;
      ant_l   = $urandom;
      ant_r   = $urandom;
      @(posedge clk);
      cycles++;
      // reference update with the values sampled at this edge
      if (restart) begin
        ref_state = 2'b00; ref_done = 0;
      end else if (en && !ref_done) begin
        if (at_exit) begin
          ref_state = 2'b00; ref_done = 1;
        end else begin
          row_hits[ref_state][{ant_l, ant_r}]++;
          ref_state = table_next(ref_state, ant_l, ant_r);
        end
      end
      #1 check_outputs();
    end
    // every row of the state-transition table must have been taken
    for (int s = 0; s < 4; s++)
      for (int lr = 0; lr < 4; lr++) begin
        checks++;
        if (row_hits[s][lr] == 0) begin
          failures++;
          $display("FAIL table row state=%0d LR=%0d never exercised", s, lr);
        end
      end
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
