// tb_trng_system: end-to-end test of the whole generator at its default
// sizes (12-bit ADC, 60 MHz clock, 3 MHz conversions, masks of 63, RC of
// 2 us), with the RC circuit and ADC models in the loop.
//
// A host fills the pool of stored numbers, then asks for 4096 bits in RC
// mode and for 32 bits in each sensor mode. A monitor follows every run
// from the outside: from the pool contents it mirrors and the ADC codes it
// sees, it predicts each delay (t0, tr), each supply-pin decision, each
// rotate amount and each 16-bit word, and checks them and their cycle
// timing. It also checks the generation rate against the 1.68 Mbps the
// generator is rated for at 60 MHz, that the words are not constant, the
// cipher front end with every operation, and the anticollision unit:
// Query with Q = 0 (immediate reply), Query and QueryRep countdown to a
// reply, QueryAdjust up and down, with the one-word runs it starts itself.
// Every mechanism (charge switch, discharge switch, sensor mode, host
// preload, automatic run for the tag, stall of the tag, both reply paths,
// each logical operation) must have happened at least once.
module tb_trng_system;
  import trng_pkg::*;

  logic clk = 0, rst_n = 0;
  logic host_start, sensor_mode, busy, done, trn_valid, host_wr_en, host_wr_ready;
  logic [31:0] host_rn_bits;
  logic [1:0] bit_sel;
  trn_t trn_data, host_wr_data, raw_data, logic_data, ac_reply_rn;
  addr_t host_wr_addr;
  logic vpower, adc_start, adc_done, raw_valid, logic_valid;
  logic [11:0] adc_data;
  lop_e func_sel;
  logic ac_cmd_valid, ac_cmd_ready, ac_reply;
  ac_cmd_e ac_cmd;
  logic [3:0] ac_q_in, ac_q;
  logic [2:0] ac_updn;
  logic [14:0] ac_slot;

  trng_system dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, ncyc = 0;
  always @(negedge clk) ncyc++;

  // Mechanism counters.
  int n_chg = 0, n_dis = 0, n_sensor_words = 0, n_rc_words = 0, n_preload = 0;
  int n_auto_runs = 0, n_stall = 0, n_reply_query = 0, n_reply_rep = 0;
  int n_adj_up = 0, n_adj_down = 0, n_ops[4] = '{0, 0, 0, 0};
  int n_runs = 0;

  trn_t mem [256];
  addr_t ref_ptr = '0;
  trn_t last_word = '0;
  bit host_run = 0;

  initial begin
    repeat (3000000) @(posedge clk);
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

  function automatic logic [11:0] rotr(input logic [11:0] d, input int s);
    logic [11:0] r;
    for (int i = 0; i < 12; i++) r[i] = d[(i + s) % 12];
    return r;
  endfunction

  // ---------------------------------------------------------------- monitor
  initial begin : monitor
    int mark, t0, tr, expect_gap, samples, lt, ht, sbs, lim;
    bit sens, vp, last;
    logic [1:0] bsel;
    logic [11:0] dk, code;
    trn_t acc, rn;
    forever begin
      @(negedge clk);
      if (!busy) continue;
      // First cycle of a run: the start was taken one cycle earlier.
      n_runs++;
      if (!host_run) n_auto_runs++;
      mark = ncyc - 1;
      sens = sensor_mode;
      bsel = bit_sel;
      samples = sens ? 16 : 4;
      t0 = int'(mem[ref_ptr - 8'd1] & 16'd63);
      dk = '0;
      vp = 1'b1;
      last = 0;
      for (int w = 0; !last; w++) begin
        rn = mem[ref_ptr - 8'd1];
        lt = 256 + 4 * int'(rn[7:0]);
        ht = 4095 - 256 - 4 * int'(rn[15:8]);
        begin : thresholds
          if (int'(dk) > ht) begin if (vp) n_dis++; vp = 0; end
          else if (int'(dk) < lt) begin if (!vp) n_chg++; vp = 1; end
        end
        acc = '0;
        for (int s = 0; s < samples; s++) begin
          tr = int'(mem[dk[7:0]] & 16'd63);
          if (w == 0 && s == 0) expect_gap = 8 + t0 + tr;
          else if (s == 0)      expect_gap = (sens ? 8 : 12) + tr;
          else                  expect_gap = (sens ? 5 : 9) + tr;
          lim = 0;
          while (!adc_start && lim < 1000) begin @(negedge clk); lim++; end
          check(ncyc - mark == expect_gap,
                $sformatf("conversion start after %0d cycles, expected %0d", ncyc - mark, expect_gap));
          check(vpower == vp, "supply pin follows the thresholds");
          mark = ncyc;
          @(negedge clk);
          while (!adc_done && ncyc - mark < 100) @(negedge clk);
          check(ncyc - mark == 20, $sformatf("conversion took %0d cycles", ncyc - mark));
          code = adc_data;
          mark = ncyc;
          if (sens) acc = {acc[14:0], code[bsel]};
          else begin
            sbs = 4 * int'(mem[code[7:0]][0]) + 2 * int'(mem[8'(code[7:0] + 8'd1)][0])
                + int'(mem[8'(code[7:0] + 8'd2)][0]);
            acc = {acc[11:0], rotr(code, sbs)[3:0]};
          end
          dk = code;
        end
        while (!trn_valid && ncyc - mark < 50) @(negedge clk);
        check(trn_valid && ncyc - mark == (sens ? 2 : 6), "word delivered on time");
        check(trn_data == acc, $sformatf("word %h expected %h", trn_data, acc));
        mem[ref_ptr] = acc;
        ref_ptr = ref_ptr + 8'd1;
        last_word = acc;
        if (sens) n_sensor_words++; else n_rc_words++;
        last = done;
        if (!done) @(negedge clk);
      end
      @(negedge clk);
      check(!busy, "idle after the last word");
    end
  end

  // ----------------------------------------------------------------- driver
  task automatic host_gen(input int bits, input bit sens, input logic [1:0] bsel, output int cycles);
    int t;
    @(negedge clk);
    while (busy) @(negedge clk);
    host_run = 1;
    sensor_mode = sens; bit_sel = bsel; host_rn_bits = 32'(bits); host_start = 1;
    t = ncyc;
    @(negedge clk);
    host_start = 0;
    while (!done) @(negedge clk);
    cycles = ncyc - t;
    @(negedge clk);
    @(negedge clk);
    host_run = 0;
  endtask

  task automatic lop(input lop_e f);
    trn_t raw, expect_data;
    raw = 16'($urandom);
    case (f)
      LOP_XOR:  expect_data = raw ^ last_word;
      LOP_XNOR: expect_data = ~(raw ^ last_word);
      LOP_AND:  expect_data = raw & last_word;
      default:  expect_data = raw | last_word;
    endcase
    raw_valid = 1; raw_data = raw; func_sel = f;
    @(negedge clk);
    raw_valid = 0;
    check(logic_valid && logic_data == expect_data, $sformatf("logic op %s", f.name()));
    n_ops[int'(f)]++;
  endtask

  // Issue one tag command and, for Query/QueryAdjust, wait for its word.
  task automatic ac(input ac_cmd_e c, input logic [3:0] qv, input logic [2:0] ud, output bit replied);
    int lim;
    replied = 0;
    while (!ac_cmd_ready) @(negedge clk);
    ac_cmd_valid = 1; ac_cmd = c; ac_q_in = qv; ac_updn = ud;
    @(negedge clk);
    ac_cmd_valid = 0;
    if (ac_reply) replied = 1;
    lim = 0;
    while (!ac_cmd_ready && lim < 5000) begin
      n_stall++;
      @(negedge clk);
      lim++;
      if (ac_reply) replied = 1;
    end
    if (c != AC_QUERYREP) begin
      check(ac_cmd_ready, "tag got its word");
      check(ac_slot == 15'(last_word & ((16'd1 << ac_q) - 16'd1)), "slot = low Q bits of the word");
      check(replied == (ac_slot == 0), "reply exactly on a zero slot");
      if (replied) check(ac_reply_rn == last_word, "reply carries the word");
    end
  endtask

  initial begin : driver
    int cycles, wrap;
    bit replied;
    real mbps;
    logic [14:0] slot_before;
    host_start = 0; host_rn_bits = 0; sensor_mode = 0; bit_sel = 0;
    host_wr_en = 0; host_wr_addr = 0; host_wr_data = 0;
    raw_valid = 0; raw_data = 0; func_sel = LOP_XOR;
    ac_cmd_valid = 0; ac_cmd = AC_NOP; ac_q_in = 0; ac_updn = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // Before any number: XOR with a zero key passes data unchanged.
    lop(LOP_XOR);
    // Fill the pool.
    for (int a = 0; a < 256; a++) begin
      check(host_wr_ready, "pool writable when idle");
      host_wr_en = 1; host_wr_addr = 8'(a); host_wr_data = 16'($urandom);
      mem[a] = host_wr_data;
      n_preload++;
      @(negedge clk);
    end
    host_wr_en = 0;
    // RC mode, 4096 bits.
    host_gen(4096, 0, 0, cycles);
    mbps = 4096.0 * 60.0 / real'(cycles);
    $display("4096 bits in %0d cycles: %f Mbit/s at 60 MHz", cycles, mbps);
    check(mbps >= 1.68, $sformatf("rate %f Mbit/s below 1.68", mbps));
    check(mem[8'd255] != mem[8'd254] || mem[8'd254] != mem[8'd253], "words vary");
    // Sensor mode, each bit position.
    for (int b = 0; b < 4; b++) host_gen(32, 1, 2'(b), cycles);
    // Cipher front end with the last word as key.
    for (int k = 0; k < 8; k++) lop(lop_e'(k % 4));
    // Anticollision.
    ac(AC_QUERY, 4'd0, 3'b000, replied);
    check(replied, "Q = 0 replies at once");
    if (replied) n_reply_query++;
    for (int r = 0; r < 6; r++) begin
      ac(AC_QUERY, 4'd3, 3'b000, replied);
      if (replied) n_reply_query++;
      wrap = 0;
      while (!replied && wrap < 10) begin
        slot_before = ac_slot;
        ac(AC_QUERYREP, 4'd0, 3'b000, replied);
        check(ac_slot == slot_before - 15'd1, "QueryRep counts down");
        check(replied == (ac_slot == 0), "reply when the slot reaches zero");
        if (replied) n_reply_rep++;
        wrap++;
      end
    end
    ac(AC_QUERYADJUST, 4'd0, UPDN_INC, replied);
    check(ac_q == 4'd4, "QueryAdjust up");
    n_adj_up++;
    ac(AC_QUERYADJUST, 4'd0, UPDN_DEC, replied);
    ac(AC_QUERYADJUST, 4'd0, UPDN_DEC, replied);
    check(ac_q == 4'd2, "QueryAdjust down");
    n_adj_down++;
    repeat (5) @(negedge clk);
    check(n_chg > 0, "charge switch happened");
    check(n_dis > 0, "discharge switch happened");
    check(n_sensor_words > 0, "sensor mode words");
    check(n_preload == 256, "host preload");
    check(n_auto_runs > 0, "runs started for the tag");
    check(n_stall > 0, "tag stalled waiting for a word");
    check(n_reply_query > 0 && n_reply_rep > 0, "both reply paths");
    check(n_ops[0] > 0 && n_ops[1] > 0 && n_ops[2] > 0 && n_ops[3] > 0, "every logical operation");
    $display("runs %0d (tag %0d), RC words %0d, sensor words %0d, charge %0d, discharge %0d",
             n_runs, n_auto_runs, n_rc_words, n_sensor_words, n_chg, n_dis);
    $display("tag: stall cycles %0d, replies on Query %0d, on QueryRep %0d",
             n_stall, n_reply_query, n_reply_rep);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
