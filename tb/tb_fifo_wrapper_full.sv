// tb_fifo_wrapper_full: end-to-end test of fifo_wrapper exactly as delivered, every
// parameter at its default (4-word FIFOs, 8-bit data, one IP clock per word).
// The wrapper holds the behavioural IP (ip_model) and is driven by wrapper_env: reset,
// single-word latency, a burst that fills both FIFOs and stalls the IP, random traffic,
// and a check of every result's value and order and of the IP clock pulse count.
module tb_fifo_wrapper_full;
  logic clk = 0;
  always #5 clk = ~clk;

  logic       rst, push, full, pop, empty, ip_clk, ip_rst;
  logic [7:0] din, dout, ip_din, ip_dout;
  int         checks, failures;
  logic       done;

  fifo_wrapper dut (
    .clk(clk), .rst(rst), .data_in(din), .push(push), .full(full),
    .data_out(dout), .pop(pop), .empty(empty),
    .ip_clk(ip_clk), .ip_rst(ip_rst), .ip_data_in(ip_din), .ip_data_out(ip_dout)
  );

  wrapper_env env (
    .clk(clk), .rst(rst), .data_in(din), .push(push), .full(full),
    .data_out(dout), .pop(pop), .empty(empty),
    .ip_clk(ip_clk), .ip_rst(ip_rst), .ip_data_in(ip_din), .ip_data_out(ip_dout),
    .in_empty(dut.in_empty), .out_full(dut.out_full),
    .checks(checks), .failures(failures), .done(done)
  );

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
