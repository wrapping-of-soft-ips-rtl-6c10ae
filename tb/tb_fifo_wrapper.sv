// tb_fifo_wrapper: end-to-end test of the FIFO wrapper.
// Two wrappers run side by side, each with a behavioural IP and a producer/consumer
// environment (wrapper_env):
//   dut0 - fifo_wrapper at its default parameters (4-word FIFOs, 8-bit data, one IP
//          clock per word), the configuration of the 8-bit IPs;
//   dut1 - 32-bit data, as for a 32-bit IP, and an IP that needs 3 clocks per word.
// The run passes when both environments report no failure.
module tb_fifo_wrapper;
  logic clk = 0;
  always #5 clk = ~clk;

  // default configuration
  logic        rst0, push0, full0, pop0, empty0, ip_clk0, ip_rst0;
  logic [7:0]  din0, dout0, ip_din0, ip_dout0;
  int          checks0, failures0;
  logic        done0;

  fifo_wrapper dut0 (
    .clk(clk), .rst(rst0), .data_in(din0), .push(push0), .full(full0),
    .data_out(dout0), .pop(pop0), .empty(empty0),
    .ip_clk(ip_clk0), .ip_rst(ip_rst0), .ip_data_in(ip_din0), .ip_data_out(ip_dout0)
  );

  wrapper_env #(.DEPTH(4), .DIN_W(8), .DOUT_W(8), .IP_CYCLES(1)) env0 (
    .clk(clk), .rst(rst0), .data_in(din0), .push(push0), .full(full0),
    .data_out(dout0), .pop(pop0), .empty(empty0),
    .ip_clk(ip_clk0), .ip_rst(ip_rst0), .ip_data_in(ip_din0), .ip_data_out(ip_dout0),
    .in_empty(dut0.in_empty), .out_full(dut0.out_full),
    .checks(checks0), .failures(failures0), .done(done0)
  );

  // 32-bit configuration, IP needing 3 clocks per word
  logic        rst1, push1, full1, pop1, empty1, ip_clk1, ip_rst1;
  logic [31:0] din1, dout1, ip_din1, ip_dout1;
  int          checks1, failures1;
  logic        done1;

  fifo_wrapper #(.DEPTH(4), .DIN_W(32), .DOUT_W(32), .IP_CYCLES(3)) dut1 (
    .clk(clk), .rst(rst1), .data_in(din1), .push(push1), .full(full1),
    .data_out(dout1), .pop(pop1), .empty(empty1),
    .ip_clk(ip_clk1), .ip_rst(ip_rst1), .ip_data_in(ip_din1), .ip_data_out(ip_dout1)
  );

  wrapper_env #(.DEPTH(4), .DIN_W(32), .DOUT_W(32), .IP_CYCLES(3)) env1 (
    .clk(clk), .rst(rst1), .data_in(din1), .push(push1), .full(full1),
    .data_out(dout1), .pop(pop1), .empty(empty1),
    .ip_clk(ip_clk1), .ip_rst(ip_rst1), .ip_data_in(ip_din1), .ip_data_out(ip_dout1),
    .in_empty(dut1.in_empty), .out_full(dut1.out_full),
    .checks(checks1), .failures(failures1), .done(done1)
  );

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks0 + checks1, failures0 + failures1 + 1);
    $finish;
  end

  initial begin
    wait (done0 && done1);
    $display("TB_RESULT checks=%0d failures=%0d", checks0 + checks1, failures0 + failures1);
    $finish;
  end
endmodule
