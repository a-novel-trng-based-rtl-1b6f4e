// anticollision_q: slot counter of an RFID tag for the Q-based
// anticollision algorithm, fed by the true random number generator.
//
// Query sets Q from `q_in`; QueryAdjust changes Q by the UpDn field (110:
// Q+1, 011: Q-1, 000: unchanged; limits 0 and 15; other codes ignore the
// command). Both then raise `rn_req` and wait for the next generated word
// on `rn_valid`; the slot counter is loaded with the low Q bits of that
// word. QueryRep decrements a non-zero slot counter; on a zero counter it
// wraps to 7FFFh, as a tag that was not acknowledged returns to
// arbitration. Whenever the counter becomes zero the tag pulses `reply`
// with the 16-bit number on `reply_rn`. While waiting for a word the unit
// drops `cmd_ready` and commands are not taken (a stall).
// Taking Q bits of a 16-bit TRN and replying on a zero slot follow the
// described use of the generator; the command handshake and the waiting
// for a fresh word are this design's choices. The UpDn codes, Q limits and
// the wrap to 7FFFh follow the air interface standard.
module anticollision_q
  import trng_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cmd_valid,
  output logic        cmd_ready,
  input  ac_cmd_e     cmd,
  input  logic [3:0]  q_in,
  input  logic [2:0]  updn,
  output logic        rn_req,
  input  logic        rn_valid,
  input  trn_t        rn_data,
  output logic        reply,
  output trn_t        reply_rn,
  output logic [3:0]  q,
  output logic [14:0] slot
);

  logic        waiting;
  logic [15:0] qmask;
  logic [14:0] loaded;

  assign cmd_ready = !waiting;
  assign rn_req    = waiting;
  assign qmask     = (16'd1 << q) - 16'd1;
  assign loaded    = 15'(rn_data & qmask);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      waiting  <= 1'b0;
      q        <= 4'd4;
      slot     <= 15'h7FFF;
      reply    <= 1'b0;
      reply_rn <= '0;
    end else begin
      reply <= 1'b0;
      if (waiting) begin
        if (rn_valid) begin
          waiting  <= 1'b0;
          slot     <= loaded;
          reply_rn <= rn_data;
          reply    <= (loaded == '0);
        end
      end else if (cmd_valid) begin
        unique case (cmd)
          AC_QUERY: begin
            q       <= q_in;
            waiting <= 1'b1;
          end
          AC_QUERYADJUST: begin
            if (updn == UPDN_INC) begin
              if (q != 4'd15) q <= q + 1'b1;
              waiting <= 1'b1;
            end else if (updn == UPDN_DEC) begin
              if (q != 4'd0) q <= q - 1'b1;
              waiting <= 1'b1;
            end else if (updn == UPDN_SAME) begin
              waiting <= 1'b1;
            end
          end
          AC_QUERYREP: begin
            if (slot == '0) slot <= 15'h7FFF;
            else begin
              slot  <= slot - 1'b1;
              reply <= (slot == 15'd1);
            end
          end
          default: ;
        endcase
      end
    end
  end

endmodule
