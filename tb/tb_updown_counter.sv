// Self-checking test of the position counter at its default 7-bit width.
//
// Random preload / increment / decrement requests for 3000 cycles, checked
// every cycle against an integer model taken modulo 128.  Counts wrap-arounds
// in both directions and fails if either never happened.
module tb_updown_counter;
  localparam int W = 7;

  logic         clk = 0, rst_n = 0;
  logic         preload, inc, dec;
  logic [W-1:0] preload_val, q;
  int           checks = 0, failures = 0;
  int           model = 0, wraps_up = 0, wraps_down = 0;

  updown_counter dut (.*);

  always #5 clk = ~clk;

  initial begin
    preload = 0; inc = 0; dec = 0; preload_val = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    checks++;
    if (q !== 0) begin failures++; $display("FAIL reset value %0d", q); end
    for (int i = 0; i < 3000; i++) begin
      preload     = ($urandom % 50) == 0;
      preload_val = W'($urandom);
      inc         = ($urandom % 3) != 0 && (i % 400) < 250;
      dec         = ($urandom % 3) != 0 && (i % 400) >= 200;
      @(posedge clk);
      if (preload) model = int'(preload_val);
      else if (inc && !dec) begin
        if (model == 127) wraps_up++;
        model = (model + 1) % 128;
      end else if (dec && !inc) begin
        if (model == 0) wraps_down++;
        model = (model + 127) % 128;
      end
      #1;
      checks++;
      if (int'(q) != model) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d: q=%0d expected %0d", i, q, model);
      end
    end
    checks++;
    if (wraps_up == 0 || wraps_down == 0) begin
      failures++;
      $display("FAIL wrap not exercised: up=%0d down=%0d", wraps_up, wraps_down);
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
