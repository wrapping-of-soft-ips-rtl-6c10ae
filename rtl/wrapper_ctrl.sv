// wrapper_ctrl: control logic of the FIFO wrapper.
//
// It moves one word at a time from the input FIFO, through the black-box IP, into the
// output FIFO. The IP has no handshake of its own; the controller paces it by granting
// it clock pulses through clk_gen.
//
// How it works (three states, see wrapper_pkg::ctrl_state_t):
//   IDLE: waits until the input FIFO holds a word (in_empty low) and the output FIFO has
//         room (out_full low). The word is already on the IP data input, because the
//         input FIFO shows its head without a pop. Checking out_full before starting
//         guarantees the result can always be stored, so the IP is stalled, not overrun,
//         while the consumer is slow.
//   RUN:  ip_clk_en is high for IP_CYCLES cycles, which gives the IP IP_CYCLES clock
//         pulses with its operand held stable.
//   XFER: out_push stores the IP output in the output FIFO and in_pop removes the word
//         just processed from the input FIFO, in the same cycle. Then back to IDLE.
// During reset ip_clk_en is held high so that an IP with a synchronous reset sees clock
// edges while its reset is asserted.
//
// Timing: a word costs IP_CYCLES + 2 clk cycles (IDLE, IP_CYCLES x RUN, XFER). From the
// edge that writes a word into an empty input FIFO to the edge that pushes its result
// into the output FIFO takes IP_CYCLES + 2 edges.
//
// What follows the source design: control logic (an FSM) that handles the data flow
// between the input FIFO, the IP and the output FIFO, connected to Pop/Empty of the input
// FIFO, Push/Full of the output FIFO, and to clk_gen. The states, the per-word pacing,
// and IP_CYCLES (the number of IP clock cycles the IP needs per word, which the source
// does not give) are this design's own choices.
module wrapper_ctrl
  import wrapper_pkg::*;
#(
  parameter int unsigned IP_CYCLES = 1
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        in_empty,
  output logic        in_pop,
  input  logic        out_full,
  output logic        out_push,
  output logic        ip_clk_en,
  output ctrl_state_t state
);

  localparam int unsigned CNTW = (IP_CYCLES > 1) ? $clog2(IP_CYCLES) : 1;

  ctrl_state_t       state_n;
  logic [CNTW-1:0]   cnt;

  always_comb begin
    state_n = state;
    unique case (state)
      CTRL_IDLE: if (!in_empty && !out_full) state_n = CTRL_RUN;
      CTRL_RUN:  if (cnt == CNTW'(IP_CYCLES - 1)) state_n = CTRL_XFER;
      CTRL_XFER: state_n = CTRL_IDLE;
      default:   state_n = CTRL_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= CTRL_IDLE;
      cnt   <= '0;
    end else begin
      state <= state_n;
      cnt   <= (state == CTRL_RUN) ? cnt + CNTW'(1) : '0;
    end
  end

  assign ip_clk_en = rst || (state == CTRL_RUN);
  assign in_pop    = (state == CTRL_XFER);
  assign out_push  = (state == CTRL_XFER);

  // A word is only started with room for its result, so these never fire.
  a_no_pop_empty:  assert property (@(posedge clk) disable iff (rst) in_pop |-> !in_empty);
  a_no_push_full:  assert property (@(posedge clk) disable iff (rst) out_push |-> !out_full);

endmodule
