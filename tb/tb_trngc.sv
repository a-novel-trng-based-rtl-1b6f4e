// tb_trngc: end-to-end check of the generator controller against a
// reference model of the algorithm.
//
// The testbench plays the word pool (256 x 16, one-cycle reads) and the ADC
// (random conversion latency, random codes). For every run it predicts,
// independently of the controller, the initial delay t0 = TRN0 & 63, each
// random interval tr = mem[D^k[7:0]] & 63, the supply pin after each
// threshold comparison, the rotate amount SBS from the LSBs of
// mem[D+0..2], every 16-bit word, its write address and the done pulse.
// It checks the exact cycle count from start to the first conversion
// (8 + t0 + tr) and between conversions (9 + tr within a word, 12 + tr
// across words; 5 + tr and 8 + tr in sensor mode). It counts how often the
// circuit was switched to discharge and to charge, and requires both.
module tb_trngc;
  import trng_pkg::*;

  logic clk = 0, rst_n = 0;
  logic start, sensor_mode, busy, done, trn_valid, vpower, adc_start, adc_done;
  logic [31:0] rn_bits;
  logic [1:0] bit_sel;
  trn_t trn_data;
  logic [11:0] adc_data;
  logic mem_rd_en, mem_wr_en, mem_ptr_we;
  addr_t mem_rd_addr, mem_wr_addr, mem_ptr, mem_ptr_d;
  trn_t mem_rd_data, mem_wr_data;

  trn_t mem [256];
  int checks = 0, failures = 0;
  int ncyc = 0;
  int n_dis = 0, n_chg = 0, n_words = 0, n_sensor_words = 0;

  always #5 clk = ~clk;
  always @(negedge clk) ncyc++;

  trngc dut (.*);

  // Word pool and pointer.
  always_ff @(posedge clk) begin
    if (mem_rd_en) mem_rd_data <= mem[mem_rd_addr];
    if (mem_wr_en) mem[mem_wr_addr] <= mem_wr_data;
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) mem_ptr <= '0;
    else if (mem_ptr_we) mem_ptr <= mem_ptr_d;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s (cycle %0d)", what, ncyc);
    end
  endtask

  // Reference model state.
  logic [11:0] ref_dk;
  logic        ref_vp;
  addr_t       ref_ptr;

  function automatic logic [11:0] rotr(input logic [11:0] d, input int s);
    logic [11:0] r;
    for (int i = 0; i < 12; i++) r[i] = d[(i + s) % 12];
    return r;
  endfunction

  // Wait for adc_start; return the number of cycles since `from`.
  task automatic wait_adc_start(input int from, output int gap);
    int lim;
    lim = 0;
    while (!adc_start && lim < 1000) begin @(negedge clk); lim++; end
    gap = ncyc - from;
  endtask

  task automatic run(input int bits, input bit sens, input logic [1:0] bsel);
    int words, samples, t0, tr, gap, expect_gap, lat, mark;
    logic [15:0] rn, acc;
    int lt, ht;
    logic [11:0] code;
    int sbs;
    words   = (bits <= 16) ? 1 : (bits + 15) / 16;
    samples = sens ? 16 : 4;
    // Step 1.
    @(negedge clk);
    rn_bits = 32'(bits); sensor_mode = sens; bit_sel = bsel; start = 1;
    mark = ncyc;
    t0 = int'(mem[ref_ptr - 8'd1] & 16'd63);
    ref_dk = '0;
    ref_vp = 1'b1;
    @(negedge clk);
    start = 0;
    for (int w = 0; w < words; w++) begin
      // Step 2: thresholds from the most recent stored number.
      rn = mem[ref_ptr - 8'd1];
      lt = 256 + 4 * int'(rn[7:0]);
      ht = 4095 - 256 - 4 * int'(rn[15:8]);
      begin
        if (int'(ref_dk) > ht && ref_vp) begin ref_vp = 0; n_dis++; end
        else if (int'(ref_dk) < lt && !ref_vp) begin ref_vp = 1; n_chg++; end
        else if (int'(ref_dk) > ht) ref_vp = 0;
        else if (int'(ref_dk) < lt) ref_vp = 1;
      end
      acc = '0;
      for (int s = 0; s < samples; s++) begin
        // Step 3: random interval from mem[D^k[7:0]].
        tr = int'(mem[ref_dk[7:0]] & 16'd63);
        if (w == 0 && s == 0) expect_gap = 8 + t0 + tr;
        else if (s == 0)      expect_gap = (sens ? 8 : 12) + tr;
        else                  expect_gap = (sens ? 5 : 9) + tr;
        wait_adc_start(mark, gap);
        check(adc_start, "adc_start seen");
        check(gap == expect_gap, $sformatf("sample gap %0d expected %0d (w%0d s%0d)", gap, expect_gap, w, s));
        check(vpower == ref_vp, "vpower after threshold comparison");
        check(busy, "busy during run");
        // Step 4: convert.
        lat = 1 + int'($urandom % 25);
        code = 12'($urandom);
        repeat (lat) @(negedge clk);
        adc_done = 1; adc_data = code;
        mark = ncyc;
        @(negedge clk);
        adc_done = 0; adc_data = 12'($urandom);
        if (sens) acc = {acc[14:0], code[bsel]};
        else begin
          sbs = 4 * int'(mem[code[7:0]][0]) + 2 * int'(mem[8'(code[7:0] + 8'd1)][0])
              + int'(mem[8'(code[7:0] + 8'd2)][0]);
          acc = {acc[11:0], rotr(code, sbs)[3:0]};
        end
        ref_dk = code;
      end
      // Step 5: the word is written at ptr.
      while (!trn_valid && ncyc - mark < 50) @(negedge clk);
      check(trn_valid, "word delivered");
      check(ncyc - mark == (sens ? 2 : 6), $sformatf("write %0d cycles after last sample", ncyc - mark));
      check(trn_data == acc, $sformatf("word %h expected %h", trn_data, acc));
      check(mem_wr_en && mem_wr_addr == ref_ptr && mem_wr_data == acc, "write port");
      check(done == (w == words - 1), "done on the last word only");
      n_words++;
      if (sens) n_sensor_words++;
      ref_ptr = ref_ptr + 8'd1;
      @(negedge clk);
      check(mem_ptr == ref_ptr, "pointer advanced");
    end
    @(negedge clk);
    check(!busy, "idle after run");
  endtask

  initial begin
    start = 0; rn_bits = 0; sensor_mode = 0; bit_sel = 0; adc_done = 0; adc_data = 0;
    for (int a = 0; a < 256; a++) mem[a] = 16'($urandom);
    ref_ptr = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    check(!busy && !vpower, "reset state");
    run(64, 0, 0);
    run(0, 0, 0);
    run(17, 0, 0);
    for (int i = 0; i < 12; i++) run(16 * (1 + int'($urandom % 6)), 0, 0);
    for (int b = 0; b < 4; b++) run(32, 1, 2'(b));
    run(48, 0, 0);
    check(n_dis > 0, $sformatf("switches to discharge: %0d", n_dis));
    check(n_chg > 0, $sformatf("switches to charge: %0d", n_chg));
    check(n_sensor_words > 0, "sensor mode words");
    $display("words %0d (sensor %0d), discharge switches %0d, charge switches %0d",
             n_words, n_sensor_words, n_dis, n_chg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
