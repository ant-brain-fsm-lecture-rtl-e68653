// Behavioural model of a 32K x 8 asynchronous static RAM (W24257A-class
// part) for simulation only; it is not synthesizable logic.
//
// Pins follow the part: address A0..A14, active-low chip select, output
// enable and write enable.  The bidirectional I/O1..I/O8 bus is split into
// `din` and `dout` here.  Function follows the part's truth table:
//   CS_n=1            not selected, dout = 0
//   CS_n=0 OE_n=1 WE_n=1  output disabled, dout = 0
//   CS_n=0 OE_n=0 WE_n=1  read: dout = mem[a] (zero delay)
//   CS_n=0 WE_n=0         write: din is stored at the rising edge of WE_n
// There is no high-impedance state (the simulator is two-state), and
// access times (10-20 ns on the part) are not modelled.
module w24257a_model (
  input  logic [14:0] a,
  input  logic        cs_n,
  input  logic        oe_n,
  input  logic        we_n,
  input  logic [7:0]  din,
  output logic [7:0]  dout
);

  logic [7:0] mem [32768];

  always @(posedge we_n) begin
    if (!cs_n) mem[a] <= din;
  end

  always_comb begin
    if (!cs_n && !oe_n && we_n) dout = mem[a];
    else                        dout = 8'h00;
  end

endmodule
