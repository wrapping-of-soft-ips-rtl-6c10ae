// fifo_buffer: synchronous first-in first-out buffer, used twice in the FIFO wrapper
// (input FIFO in front of the IP, output FIFO behind it).
//
// How it works: DEPTH words are kept in a register array addressed by a write pointer
// and a read pointer that wrap at DEPTH (DEPTH need not be a power of two). A separate
// occupancy counter gives full and empty. The read side is first-word fall-through:
// rd_data always shows the oldest stored word, and pop only removes it. This lets the
// wrapped IP read its operand straight from the FIFO head, as the data path of the
// wrapper drawing shows.
//
// Interface: push writes wr_data when the buffer is not full; a push while full is
// ignored (the word is lost, the producer must watch full). pop removes the oldest word
// when the buffer is not empty; a pop while empty is ignored. push and pop may be
// given in the same cycle. rd_data is meaningless while empty is high.
//
// Timing: all updates on the rising clk edge; full, empty, count and rd_data change
// right after the edge that pushes or pops. Synchronous active-high reset empties the
// buffer (the storage itself is not cleared).
//
// The default size of 4 words is the FIFO size the source design was evaluated with;
// the pointer/counter organisation and the overflow behaviour are this design's choice.
module fifo_buffer #(
  parameter int unsigned DEPTH = 4,
  parameter int unsigned WIDTH = 8,
  localparam int unsigned CW = $clog2(DEPTH + 1),
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             push,
  input  logic [WIDTH-1:0] wr_data,
  output logic             full,
  input  logic             pop,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty,
  output logic [CW-1:0]    count
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;
  logic             do_push, do_pop;

  assign full    = (count == CW'(DEPTH));
  assign empty   = (count == '0);
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign rd_data = mem[rd_ptr];

  function automatic logic [AW-1:0] next_ptr(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + AW'(1);
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) wr_ptr <= next_ptr(wr_ptr);
      if (do_pop)  rd_ptr <= next_ptr(rd_ptr);
      case ({do_push, do_pop})
        2'b10:   count <= count + CW'(1);
        2'b01:   count <= count - CW'(1);
        default: count <= count;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= wr_data;
  end

  // The occupancy can never leave 0..DEPTH.
  a_count_range: assert property (@(posedge clk) disable iff (rst) count <= CW'(DEPTH));

endmodule
