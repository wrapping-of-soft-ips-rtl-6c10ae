// tb_fifo_buffer: self-checking test of fifo_buffer at its default size (4 words x 8 bits).
// A queue is the reference model. Random push/pop traffic, weighted in phases so that the
// buffer fills and drains repeatedly, checks rd_data, full, empty and count every cycle,
// including pushes while full and pops while empty (both must be ignored).
module tb_fifo_buffer;
  localparam int unsigned DEPTH = 4;
  localparam int unsigned WIDTH = 8;

  logic clk = 0, rst = 1;
  logic push = 0, pop = 0;
  logic [WIDTH-1:0] wr_data = '0, rd_data;
  logic full, empty;
  logic [$clog2(DEPTH+1)-1:0] count;

  int checks = 0, failures = 0;
  int n_full_push = 0, n_empty_pop = 0, n_both = 0;
  logic [WIDTH-1:0] model [$];

  fifo_buffer #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pp, pq;
    bit do_push, do_pop;
    repeat (2) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    for (int cyc = 0; cyc < 4000; cyc++) begin
      // phase: fill-heavy, drain-heavy or balanced
      case ((cyc / 50) % 3)
        0: begin pp = 80; pq = 30; end
        1: begin pp = 30; pq = 80; end
        default: begin pp = 50; pq = 50; end
      endcase
      // check outputs against the model before the edge
      check(count == model.size(), "count");
      check(empty == (model.size() == 0), "empty");
      check(full == (model.size() == DEPTH), "full");
      if (model.size() > 0) check(rd_data == model[0], "rd_data");
      push    <= ($urandom_range(99) < pp);
      pop     <= ($urandom_range(99) < pq);
      wr_data <= WIDTH'($urandom);
      #1;
      if (push && full) n_full_push++;
      if (pop && empty) n_empty_pop++;
      if (push && pop && !full && !empty) n_both++;
      @(posedge clk);
      // update model with what the DUT saw at this edge
      do_push = push && (model.size() < DEPTH);
      do_pop  = pop && (model.size() > 0);
      if (do_pop) void'(model.pop_front());
      if (do_push) model.push_back(wr_data);
      #1;
    end
    // reset empties the buffer
    rst <= 1; @(posedge clk); #1 rst <= 0; push <= 0; pop <= 0;
    check(empty && count == 0, "reset empties");
    check(n_full_push > 0, "push while full exercised");
    check(n_empty_pop > 0, "pop while empty exercised");
    check(n_both > 0, "simultaneous push/pop exercised");
    $display("pushes while full=%0d pops while empty=%0d simultaneous=%0d", n_full_push, n_empty_pop, n_both);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
