// fifo_wrapper: FIFO wrapper that adapts a black-box soft IP to a synchronous FIFO
// protocol (top of the design).
//
// Idea: a third-party IP with no flow control of its own is made usable in a
// producer/consumer system by surrounding it with an input FIFO, an output FIFO, control
// logic and a clock generator. Producers push words and watch Full; consumers pop results
// and watch Empty. Bursts from the producer are absorbed by the input FIFO; a slow
// consumer is absorbed by the output FIFO, and when that fills the IP is simply not
// clocked. The IP itself is not modified.
//
// Structure:
//   u_in_fifo  (fifo_buffer) : data_in/push/full outside; its head drives ip_data_in
//   u_ctrl     (wrapper_ctrl): pops the input FIFO, pushes the output FIFO, requests
//                              IP clock pulses
//   u_clk_gen  (clk_gen)     : ip_clk = clk gated by the controller's request
//   u_out_fifo (fifo_buffer) : written from ip_data_out; data_out/pop/empty outside
// The IP is not part of this module: its pins are the ip_* ports, to be connected to the
// IP instance (ip_clk, ip_rst and ip_data_in to the IP's inputs, ip_data_out from its
// output). The wrapper clock and reset are shared with the IP (one clock and one reset
// for all parts).
//
// Interface: see fifo_buffer for the push/full and pop/empty rules; data_out is the
// oldest result and is valid while empty is low (first-word fall-through). rst is
// synchronous and active high; during reset the IP receives clock pulses.
//
// Timing: each word costs IP_CYCLES + 2 clk cycles; a word pushed into an empty wrapper
// lowers empty right after the (IP_CYCLES + 2)-th rising edge following the edge that
// pushed it (IDLE, IP_CYCLES x RUN, XFER).
//
// Follows the source design: the block diagram (input FIFO, IP, clk_gen, control logic,
// output FIFO; Data_in/Push/Full and Data_out/Pop/Empty; a single CLK), the FIFO size of
// 4, and 8-bit data for the 8-bit IPs it was evaluated with (set DIN_W/DOUT_W to 32 for a
// 32-bit IP). Own choices: the one-word-at-a-time pacing through a gated clock, the
// separate input and output widths, IP_CYCLES, and the reset behaviour.
module fifo_wrapper #(
  parameter int unsigned DEPTH     = 4,
  parameter int unsigned DIN_W     = 8,
  parameter int unsigned DOUT_W    = 8,
  parameter int unsigned IP_CYCLES = 1
) (
  input  logic              clk,
  input  logic              rst,
  // producer side
  input  logic [DIN_W-1:0]  data_in,
  input  logic              push,
  output logic              full,
  // consumer side
  output logic [DOUT_W-1:0] data_out,
  input  logic              pop,
  output logic              empty,
  // pins of the wrapped IP
  output logic              ip_clk,
  output logic              ip_rst,
  output logic [DIN_W-1:0]  ip_data_in,
  input  logic [DOUT_W-1:0] ip_data_out
);

  logic in_empty, in_pop;
  logic out_full, out_push;
  logic ip_clk_en;

  fifo_buffer #(.DEPTH(DEPTH), .WIDTH(DIN_W)) u_in_fifo (
    .clk     (clk),
    .rst     (rst),
    .push    (push),
    .wr_data (data_in),
    .full    (full),
    .pop     (in_pop),
    .rd_data (ip_data_in),
    .empty   (in_empty),
    .count   ()
  );

  wrapper_ctrl #(.IP_CYCLES(IP_CYCLES)) u_ctrl (
    .clk       (clk),
    .rst       (rst),
    .in_empty  (in_empty),
    .in_pop    (in_pop),
    .out_full  (out_full),
    .out_push  (out_push),
    .ip_clk_en (ip_clk_en),
    .state     ()
  );

  clk_gen u_clk_gen (
    .clk  (clk),
    .en   (ip_clk_en),
    .gclk (ip_clk)
  );

  fifo_buffer #(.DEPTH(DEPTH), .WIDTH(DOUT_W)) u_out_fifo (
    .clk     (clk),
    .rst     (rst),
    .push    (out_push),
    .wr_data (ip_data_out),
    .full    (out_full),
    .pop     (pop),
    .rd_data (data_out),
    .empty   (empty),
    .count   ()
  );

  assign ip_rst = rst;

endmodule
