// tb_workload_streams: long random streams through the complete generator,
// scaled down from the multi-megabit statistical runs the generator is
// evaluated with, plus the repeatability experiment.
//
// Two generators with identical settings and identically filled pools but
// different noise seeds run side by side. The test checks:
//  - both start from the same state, yet their first words differ (the
//    sequence cannot be repeated, because noise feeds the loop);
//  - RC mode delivers BITS_RC bits, sensor mode BITS_SENSOR bits for each
//    of the four lowest code bits, none of them stuck or grossly biased
//    (ones between 45 % and 55 %).
// For each stream it also prints the frequency (monobit) and runs
// statistics of NIST SP 800-22 with their limits at significance 0.01,
// |S|/sqrt(n) < 2.5758 and |V - 2n p(1-p)| / (2 sqrt(2n) p(1-p)) < 1.8214.
// Those describe the behavioural noise and ADC models as much as the logic,
// so they are reported, not counted as checks.
module tb_workload_streams;
  import trng_pkg::*;

  localparam int BITS_RC     = 131072;
  localparam int BITS_SENSOR = 8192;

  logic clk = 0, rst_n = 0;
  logic host_start, sensor_mode;
  logic [31:0] host_rn_bits;
  logic [1:0] bit_sel;
  logic host_wr_en;
  addr_t host_wr_addr;
  trn_t host_wr_data;
  logic busy_a, done_a, tv_a, busy_b, done_b, tv_b;
  trn_t td_a, td_b;

  always #5 clk = ~clk;

  trng_system #(.SEED(1)) gen_a (
    .clk, .rst_n, .host_start, .host_rn_bits, .sensor_mode, .bit_sel,
    .busy(busy_a), .done(done_a), .trn_valid(tv_a), .trn_data(td_a),
    .host_wr_en, .host_wr_addr, .host_wr_data, .host_wr_ready(),
    .vpower(), .adc_start(), .adc_done(), .adc_data(),
    .raw_valid(1'b0), .raw_data('0), .func_sel(LOP_XOR), .logic_valid(), .logic_data(),
    .ac_cmd_valid(1'b0), .ac_cmd_ready(), .ac_cmd(AC_NOP), .ac_q_in('0), .ac_updn('0),
    .ac_reply(), .ac_reply_rn(), .ac_q(), .ac_slot()
  );
  trng_system #(.SEED(2)) gen_b (
    .clk, .rst_n, .host_start, .host_rn_bits, .sensor_mode, .bit_sel,
    .busy(busy_b), .done(done_b), .trn_valid(tv_b), .trn_data(td_b),
    .host_wr_en, .host_wr_addr, .host_wr_data, .host_wr_ready(),
    .vpower(), .adc_start(), .adc_done(), .adc_data(),
    .raw_valid(1'b0), .raw_data('0), .func_sel(LOP_XOR), .logic_valid(), .logic_data(),
    .ac_cmd_valid(1'b0), .ac_cmd_ready(), .ac_cmd(AC_NOP), .ac_q_in('0), .ac_updn('0),
    .ac_reply(), .ac_reply_rn(), .ac_q(), .ac_slot()
  );

  int checks = 0, failures = 0;

  initial begin
    repeat (12000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Running statistics of the stream from generator A.
  longint n_bits, n_ones, n_runs;
  bit     prev_bit, have_prev;
  int     n_diff, n_cmp;
  bit     compare_b;

  always @(negedge clk) begin
    if (tv_a) begin
      for (int i = 15; i >= 0; i--) begin
        n_bits++;
        if (td_a[i]) n_ones++;
        if (!have_prev || td_a[i] != prev_bit) n_runs++;
        prev_bit  = td_a[i];
        have_prev = 1;
      end
    end
    if (compare_b && tv_a) begin
      n_cmp++;
      if (!tv_b || td_b != td_a) n_diff++;
    end
  end

  task automatic clear_stats();
    n_bits = 0; n_ones = 0; n_runs = 0; have_prev = 0;
  endtask

  task automatic judge(input string name, input int expect_bits);
    real s_obs, p, runs_stat;
    s_obs = real'(2 * n_ones - n_bits);
    if (s_obs < 0.0) s_obs = -s_obs;
    s_obs = s_obs / $sqrt(real'(n_bits));
    p = real'(n_ones) / real'(n_bits);
    runs_stat = real'(n_runs) - 2.0 * real'(n_bits) * p * (1.0 - p);
    if (runs_stat < 0.0) runs_stat = -runs_stat;
    runs_stat = runs_stat / (2.0 * $sqrt(2.0 * real'(n_bits)) * p * (1.0 - p));
    $display("%s: %0d bits, ones %0d, frequency statistic %f (%s 2.5758), runs %0d, runs statistic %f (%s 1.8214)",
             name, n_bits, n_ones, s_obs, s_obs < 2.5758 ? "within" : "OUTSIDE",
             n_runs, runs_stat, runs_stat < 1.8214 ? "within" : "OUTSIDE");
    checks++;
    if (n_bits != longint'(expect_bits)) begin
      failures++; $display("FAIL: %s delivered %0d bits, asked for %0d", name, n_bits, expect_bits);
    end
    checks++;
    if (p < 0.45 || p > 0.55) begin failures++; $display("FAIL: %s stream is biased", name); end
  endtask

  task automatic gen_bits(input int bits, input bit sens, input logic [1:0] bsel);
    @(negedge clk);
    while (busy_a || busy_b) @(negedge clk);
    sensor_mode = sens; bit_sel = bsel; host_rn_bits = 32'(bits); host_start = 1;
    @(negedge clk);
    host_start = 0;
    while (!done_a) @(negedge clk);
    while (busy_a || busy_b) @(negedge clk);
  endtask

  initial begin
    host_start = 0; host_rn_bits = 0; sensor_mode = 0; bit_sel = 0;
    host_wr_en = 0; host_wr_addr = 0; host_wr_data = 0;
    compare_b = 0; n_diff = 0; n_cmp = 0;
    clear_stats();
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int a = 0; a < 256; a++) begin
      host_wr_en = 1; host_wr_addr = 8'(a); host_wr_data = 16'($urandom);
      @(negedge clk);
    end
    host_wr_en = 0;
    // Repeatability: same state, different noise.
    compare_b = 1;
    gen_bits(256, 0, 0);
    compare_b = 0;
    $display("identical start: %0d of %0d words differ between the two generators", n_diff, n_cmp);
    checks++;
    if (n_cmp != 16 || n_diff == 0) begin failures++; $display("FAIL: streams did not diverge"); end
    // RC mode stream.
    clear_stats();
    gen_bits(BITS_RC, 0, 0);
    judge("RC mode", BITS_RC);
    // Sensor mode, one stream per bit position.
    for (int b = 0; b < 4; b++) begin
      clear_stats();
      gen_bits(BITS_SENSOR, 1, 2'(b));
      judge($sformatf("sensor mode, bit %0d", b), BITS_SENSOR);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
