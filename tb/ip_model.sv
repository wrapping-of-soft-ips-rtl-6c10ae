// ip_model: behavioural stand-in for the black-box soft IP inside the FIFO wrapper.
//
// It has the only pins the wrapper relies on: a clock, a synchronous reset, a data input
// and a data output. Internally it is a pipeline of LAT registers clocked by the IP clock;
// the first stage computes f(x) = x * 3 + 0x5A (modulo 2^DOUT_W) from the input, and later
// stages copy. With the input held stable, data_out equals f(data_in) after LAT clock
// pulses, and only then. A testbench uses it to see that the wrapper gives the IP exactly
// the clock pulses it needs and keeps the operand steady meanwhile.
module ip_model #(
  parameter int unsigned DIN_W  = 8,
  parameter int unsigned DOUT_W = 8,
  parameter int unsigned LAT    = 1
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [DIN_W-1:0]  data_in,
  output logic [DOUT_W-1:0] data_out
);

  logic [DOUT_W-1:0] stage [LAT];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < int'(LAT); i++) stage[i] <= '0;
    end else begin
      stage[0] <= DOUT_W'(data_in) * DOUT_W'(3) + DOUT_W'(8'h5A);
      for (int i = 1; i < int'(LAT); i++) stage[i] <= stage[i-1];
    end
  end

  assign data_out = stage[LAT-1];

endmodule
