// tb_trn_memory: random reads and writes against a reference array; checks
// the one-cycle read latency, read-before-write on the same address, and the
// pointer register with its reset value.
module tb_trn_memory;
  logic clk = 0, rst_n = 0;
  logic rd_en, wr_en, ptr_we;
  logic [7:0] rd_addr, wr_addr, ptr_d, ptr;
  logic [15:0] rd_data, wr_data;
  logic [15:0] ref_mem [256];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  trn_memory dut (.clk, .rst_n, .rd_en, .rd_addr, .rd_data, .wr_en, .wr_addr, .wr_data,
                  .ptr_we, .ptr_d, .ptr);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] exp_rd;
    logic [7:0]  exp_ptr;
    logic        pend;
    rd_en = 0; wr_en = 0; ptr_we = 0; rd_addr = 0; wr_addr = 0; wr_data = 0; ptr_d = 0;
    @(negedge clk);
    rst_n = 1;
    checks++;
    if (ptr !== 8'd0) begin failures++; $display("FAIL: ptr reset %h", ptr); end
    // Fill every word.
    for (int a = 0; a < 256; a++) begin
      wr_en = 1; wr_addr = 8'(a); wr_data = 16'($urandom); ref_mem[a] = wr_data;
      @(negedge clk);
    end
    wr_en = 0;
    exp_ptr = 0;
    pend = 0;
    exp_rd = '0;
    for (int i = 0; i < 4000; i++) begin
      rd_en   = 1'($urandom);
      rd_addr = 8'($urandom);
      wr_en   = 1'($urandom);
      wr_addr = ($urandom % 4 == 0) ? rd_addr : 8'($urandom);
      wr_data = 16'($urandom);
      ptr_we  = 1'($urandom);
      ptr_d   = 8'($urandom);
      @(posedge clk);
      if (rd_en) begin exp_rd = ref_mem[rd_addr]; pend = 1; end
      if (wr_en) ref_mem[wr_addr] = wr_data;
      if (ptr_we) exp_ptr = ptr_d;
      @(negedge clk);
      if (pend) begin
        checks++;
        if (rd_data !== exp_rd) begin
          failures++; $display("FAIL: read %h expected %h", rd_data, exp_rd);
        end
        pend = 0;
      end
      checks++;
      if (ptr !== exp_ptr) begin failures++; $display("FAIL: ptr %h expected %h", ptr, exp_ptr); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
