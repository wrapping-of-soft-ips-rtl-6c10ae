// wrapper_env: test environment for one fifo_wrapper instance.
//
// It plays producer and consumer on the wrapper's FIFO ports, holds the behavioural IP
// (ip_model, LAT = IP_CYCLES register stages) on the wrapper's ip_* pins, and keeps a
// queue of expected results, f(x) = x * 3 + 0x5A modulo 2^DOUT_W, for every word the
// wrapper accepted. Inputs are driven on falling clk edges, so that nothing races the
// rising edge or the IP clock derived from it.
//
// Sequence: reset (the IP must see clock pulses and come out of reset at 0); one word
// into the empty wrapper, whose result must appear IP_CYCLES + 2 rising edges after the
// edge that took it; a burst of 3 x DEPTH x (IP_CYCLES + 2) back-to-back pushes with the consumer stopped,
// which must fill both FIFOs (2 x DEPTH words kept, the rest refused with full high) and
// stall the IP; a drain; random traffic; a final drain. At the end the number of IP clock
// pulses after reset must be IP_CYCLES per word and the expected-result queue empty.
// Mechanisms counted (each must occur): input FIFO full, push refused, IP stalled by a
// full output FIFO, controller waiting on an empty input FIFO, output FIFO empty when
// the consumer wants a word.
module wrapper_env #(
  parameter int unsigned DEPTH     = 4,
  parameter int unsigned DIN_W     = 8,
  parameter int unsigned DOUT_W    = 8,
  parameter int unsigned IP_CYCLES = 1,
  parameter int unsigned NRAND     = 3000
) (
  input  logic              clk,
  output logic              rst,
  output logic [DIN_W-1:0]  data_in,
  output logic              push,
  input  logic              full,
  input  logic [DOUT_W-1:0] data_out,
  output logic              pop,
  input  logic              empty,
  input  logic              ip_clk,
  input  logic              ip_rst,
  input  logic [DIN_W-1:0]  ip_data_in,
  output logic [DOUT_W-1:0] ip_data_out,
  input  logic              in_empty,    // probe: input FIFO empty
  input  logic              out_full,    // probe: output FIFO full
  output int                checks,
  output int                failures,
  output logic              done
);

  ip_model #(.DIN_W(DIN_W), .DOUT_W(DOUT_W), .LAT(IP_CYCLES)) u_ip (
    .clk      (ip_clk),
    .rst      (ip_rst),
    .data_in  (ip_data_in),
    .data_out (ip_data_out)
  );

  logic [DOUT_W-1:0] expq [$];
  int accepted = 0, received = 0, pulses = 0, reset_pulses = 0;
  int n_full = 0, n_refused = 0, n_out_stall = 0, n_in_wait = 0, n_out_empty = 0;

  initial begin
    checks = 0; failures = 0; done = 0;
    rst = 1; push = 0; pop = 0; data_in = '0;
  end

  function automatic logic [DOUT_W-1:0] f(logic [DIN_W-1:0] x);
    return DOUT_W'(x) * DOUT_W'(3) + DOUT_W'(8'h5A);
  endfunction

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL [%0d-bit] %s at %0t", DIN_W, what, $time);
    end
  endfunction

  always @(posedge ip_clk) begin
    if (rst) reset_pulses++;
    else pulses++;
  end

  // One falling-edge step: decide push/pop for the coming rising edge and update the model.
  task automatic step(bit want_push, bit want_pop);
    @(negedge clk);
    // mechanism counters, on the state before the coming edge
    if (full) n_full++;
    if (!in_empty && out_full) n_out_stall++;
    if (in_empty && !out_full) n_in_wait++;
    if (want_pop && empty) n_out_empty++;
    if (want_push && full) n_refused++;
    data_in = DIN_W'({$urandom, $urandom});
    push = want_push;
    pop  = want_pop;
    if (want_push && !full) begin
      expq.push_back(f(data_in));
      accepted++;
    end
    if (want_pop && !empty) begin
      check(expq.size() > 0, "result without a word");
      if (expq.size() > 0) check(data_out == expq.pop_front(), "data_out value and order");
      received++;
    end
  endtask

  task automatic drain();
    int guard = 0;
    while ((accepted != received) && guard < 2000) begin
      step(0, 1);
      guard++;
    end
    step(0, 0);
    check(accepted == received, "drained");
  endtask

  initial begin
    int lat, p0, pp, pq;
    repeat (3) @(negedge clk);
    check(reset_pulses > 0, "IP clocked during reset");
    rst = 0;
    @(negedge clk);
    check(ip_data_out == '0, "IP reset through wrapper reset");
    check(empty && !full, "wrapper empty after reset");

    // latency of one word through an empty wrapper
    step(1, 0);
    lat = 0;
    do begin
      step(0, 0);
      lat++;
    end while (empty && lat < 100);
    check(lat == int'(IP_CYCLES) + 3, "single-word latency = IP_CYCLES + 2 edges after the push edge");
    $display("[%0d-bit, IP_CYCLES=%0d] result seen %0d edges after the push edge", DIN_W, IP_CYCLES, lat - 1);
    drain();

    // burst with the consumer stopped: both FIFOs fill, the IP stalls
    for (int i = 0; i < 3 * int'(DEPTH) * int'(IP_CYCLES + 2); i++) step(1, 0);
    repeat (4 * int'(IP_CYCLES) + 10) step(0, 0);
    $display("[%0d-bit] after burst: stored=%0d full=%0b out_full=%0b", DIN_W, accepted - received, full, out_full);
    check(full && out_full, "both FIFOs full after burst");
    check(accepted - received == 2 * int'(DEPTH), "burst keeps 2 x DEPTH words");
    p0 = pulses;
    repeat (10) step(0, 0);
    check(pulses == p0, "no IP clock while output FIFO full");
    drain();

    // random traffic with changing producer and consumer rates
    for (int i = 0; i < int'(NRAND); i++) begin
      pp = ((i / 200) % 2 == 0) ? 70 : 25;
      pq = ((i / 300) % 2 == 0) ? 20 : 75;
      step($urandom_range(99) < pp, $urandom_range(99) < pq);
    end
    drain();

    check(pulses == accepted * int'(IP_CYCLES), "IP_CYCLES IP clock pulses per word");
    check(expq.size() == 0, "no result missing");
    check(n_full > 0, "input FIFO full occurred");
    check(n_refused > 0, "push refused while full occurred");
    check(n_out_stall > 0, "IP stall on full output FIFO occurred");
    check(n_in_wait > 0, "wait on empty input FIFO occurred");
    check(n_out_empty > 0, "consumer found output FIFO empty");
    $display("[%0d-bit] words=%0d ip pulses=%0d full=%0d refused=%0d out-stall=%0d in-wait=%0d out-empty=%0d",
             DIN_W, accepted, pulses, n_full, n_refused, n_out_stall, n_in_wait, n_out_empty);
    done = 1;
  end

endmodule
