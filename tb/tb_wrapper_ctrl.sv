// tb_wrapper_ctrl: self-checking test of wrapper_ctrl, for IP_CYCLES = 1 (default) and 3.
// Each controller sits in a small environment: two occupancy counters stand in for the
// input and output FIFOs, a random producer fills the first and a random consumer drains
// the second. A reference model written as a phase counter (0 = waiting, 1..IP_CYCLES =
// IP clocked, IP_CYCLES+1 = transfer) predicts ip_clk_en, in_pop and out_push every cycle.
// Also checked: ip_clk_en is high during reset, a word is never started without room for
// its result, and with a steady supply one word is transferred every IP_CYCLES + 2 cycles.
module tb_wrapper_ctrl;
  import wrapper_pkg::*;
  localparam int NCFG = 2;
  localparam int CYC [NCFG] = '{1, 3};
  localparam int DEPTH = 4;

  logic clk = 0, rst = 1;
  int checks = 0, failures = 0;
  bit steady = 0;                    // producer always ready, consumer always popping
  int n_stall_out [NCFG], n_wait_in [NCFG], n_words [NCFG], gap_ok [NCFG];

  always #5 clk = ~clk;

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endfunction

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    logic in_empty, in_pop, out_full, out_push, ip_clk_en;
    ctrl_state_t state;
    int in_cnt = 0, out_cnt = 0, phase = 0, last_push = -1, cyc = 0;

    assign in_empty = (in_cnt == 0);
    assign out_full = (out_cnt == DEPTH);

    wrapper_ctrl #(.IP_CYCLES(CYC[g])) dut (.*);

    always @(posedge clk) begin
      bit prod, cons;
      int nphase;
      cyc++;
      if (rst) begin
        check(ip_clk_en == 1'b1, "clock enabled in reset");
        phase <= 0; in_cnt <= 0; out_cnt <= 0;
      end else begin
        // compare with the model before this edge
        check(ip_clk_en == (phase >= 1 && phase <= CYC[g]), "ip_clk_en");
        check(in_pop == (phase == CYC[g] + 1), "in_pop");
        check(out_push == (phase == CYC[g] + 1), "out_push");
        if (phase == 0 && !in_empty && out_full) n_stall_out[g]++;
        if (phase == 0 && in_empty) n_wait_in[g]++;
        // model next phase
        if (phase == 0) nphase = (in_cnt > 0 && out_cnt < DEPTH) ? 1 : 0;
        else if (phase == CYC[g] + 1) nphase = 0;
        else nphase = phase + 1;
        phase <= nphase;
        if (!steady) last_push = -1;
        if (out_push) begin
          n_words[g]++;
          if (steady && last_push >= 0) begin
            check(cyc - last_push == CYC[g] + 2, "steady-state word rate");
            gap_ok[g]++;
          end
          last_push = cyc;
        end
        // environment: producer and consumer
        prod = steady ? 1'b1 : ($urandom_range(99) < 35);
        cons = steady ? 1'b1 : ($urandom_range(99) < 25);
        in_cnt  <= in_cnt + int'(prod && in_cnt < DEPTH) - int'(in_pop);
        out_cnt <= out_cnt + int'(out_push) - int'(cons && out_cnt > 0);
      end
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (3000) @(posedge clk);
    steady <= 1;
    repeat (300) @(posedge clk);
    for (int g = 0; g < NCFG; g++) begin
      check(n_stall_out[g] > 0, "stall on full output FIFO seen");
      check(n_wait_in[g] > 0, "wait on empty input FIFO seen");
      check(gap_ok[g] > 10, "steady-state rate measured");
      $display("IP_CYCLES=%0d words=%0d output stalls=%0d input waits=%0d",
               CYC[g], n_words[g], n_stall_out[g], n_wait_in[g]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
