// tb_anticollision_q: random command sequences against a reference model of
// the Q slot counter: Query and QueryAdjust (all UpDn codes, Q limits) wait
// for a fresh number and load its low Q bits; QueryRep counts down and
// wraps from zero to 7FFFh; a reply is due exactly when the counter becomes
// zero. Commands during the wait must be refused. Counts replies on load and
// on countdown, stalls, and Q at both limits, and requires each.
module tb_anticollision_q;
  import trng_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cmd_valid, cmd_ready, rn_req, rn_valid, reply;
  ac_cmd_e cmd;
  logic [3:0] q_in, q;
  logic [2:0] updn;
  trn_t rn_data, reply_rn;
  logic [14:0] slot;
  int checks = 0, failures = 0;
  int n_reply_load = 0, n_reply_rep = 0, n_stall = 0, n_qmax = 0, n_qmin = 0, n_wrap = 0;

  always #5 clk = ~clk;

  anticollision_q dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    int rq;
    logic [14:0] rslot;
    logic [15:0] rn;
    logic exp_reply, need_rn;
    cmd_valid = 0; cmd = AC_NOP; q_in = 0; updn = 0; rn_valid = 0; rn_data = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    rq = 4; rslot = 15'h7FFF;
    check(q == 4 && slot == 15'h7FFF && cmd_ready, "reset state");
    for (int i = 0; i < 4000; i++) begin
      int r;
      r = int'($urandom % 10);
      need_rn = 0; exp_reply = 0;
      cmd_valid = 1;
      q_in = 4'($urandom);
      if (r < 2) begin
        cmd = AC_QUERY; rq = (r == 0) ? int'(q_in) : int'($urandom % 4);
        q_in = 4'(rq); need_rn = 1;
      end else if (r < 4) begin
        cmd = AC_QUERYADJUST;
        case ($urandom % 4)
          0: updn = UPDN_INC; 1: updn = UPDN_DEC; 2: updn = UPDN_SAME; default: updn = 3'b101;
        endcase
        if (updn == UPDN_INC) begin if (rq < 15) rq++; need_rn = 1; end
        else if (updn == UPDN_DEC) begin if (rq > 0) rq--; need_rn = 1; end
        else if (updn == UPDN_SAME) need_rn = 1;
      end else begin
        cmd = AC_QUERYREP;
        if (rslot == 0) begin rslot = 15'h7FFF; n_wrap++; end
        else begin rslot = rslot - 1; exp_reply = (rslot == 0); end
      end
      @(negedge clk);
      cmd_valid = 0;
      if (need_rn) begin
        int w;
        check(rn_req && !cmd_ready, "waiting for a number");
        // A command offered while waiting is not taken.
        w = 1 + int'($urandom % 4);
        for (int k = 0; k < w; k++) begin
          cmd_valid = 1; cmd = AC_QUERYREP;
          @(negedge clk);
          n_stall++;
          check(!cmd_ready && slot == dut.slot, "stalled");
        end
        cmd_valid = 0;
        rn = ($urandom % 3 == 0) ? 16'($urandom) & 16'hFFF0 : 16'($urandom);
        rn_valid = 1; rn_data = rn;
        @(negedge clk);
        rn_valid = 0;
        rslot = 15'(rn & ((16'd1 << rq) - 16'd1));
        exp_reply = (rslot == 0);
        if (exp_reply) n_reply_load++;
        check(reply_rn == rn, "reply number");
      end else if (exp_reply) n_reply_rep++;
      check(q == 4'(rq), $sformatf("Q %0d expected %0d", q, rq));
      check(slot == rslot, $sformatf("slot %h expected %h", slot, rslot));
      check(reply == exp_reply, "reply pulse");
      check(cmd_ready && !rn_req, "ready again");
      if (rq == 15) n_qmax++;
      if (rq == 0) n_qmin++;
    end
    check(n_reply_load > 0 && n_reply_rep > 0 && n_stall > 0 && n_qmax > 0 && n_qmin > 0 && n_wrap > 0,
          $sformatf("mechanisms: load-reply %0d rep-reply %0d stall %0d qmax %0d qmin %0d wrap %0d",
                    n_reply_load, n_reply_rep, n_stall, n_qmax, n_qmin, n_wrap));
    $display("load-reply %0d rep-reply %0d stall %0d qmax %0d qmin %0d wrap %0d",
             n_reply_load, n_reply_rep, n_stall, n_qmax, n_qmin, n_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
