// trngc: controller of the ADC-based true random number generator.
//
// One run produces ceil(rn_bits/16) words of 16 bits (at least one):
//  1. On `start` the RC supply `vpower` is set high and the last stored
//     number TRN0 = mem[ptr-1] is read; the controller waits
//     t0 = TRN0 & CONST1 cycles.
//  2. For each word it reads RN = mem[ptr-1], derives the thresholds D_HT
//     and D_LT from it and compares them with the last ADC code D^k (0 at
//     the start): above D_HT it discharges (vpower = 0), below D_LT it
//     charges (vpower = 1), otherwise vpower is kept.
//  3. It reads TRN_DADC = mem[D^k[7:0]] and waits tr = TRN_DADC & CONST2.
//  4. It starts the ADC and waits for the code D^(k+1). It reads the three
//     stored numbers at D^(k+1)[7:0], +1, +2 and takes their LSBs as the
//     3-bit rotate amount SBS (first read = MSB), rotates D^(k+1) right by
//     SBS and shifts the low 4 bits into the word.
//  5. After RN_M samples the word is written to mem[ptr], ptr advances by
//     one, and the word is presented on trn_valid/trn_data for one cycle.
//  6. If fewer than rn_bits bits have been made it goes back to step 2,
//     otherwise it pulses `done` with the last word and returns to idle.
// Steps 1-6, the masks and the 4-of-12 bit extraction follow the described
// generator. The three SBS addresses, the bit order of SBS and the
// threshold formula (threshold_gen) are this design's choices, as is
// sensor mode: with `sensor_mode` high one bit, D^(k+1)[bit_sel], is kept
// per sample, TRN_W samples make a word and no SBS reads are made; delays
// and the charge/discharge control work as in RC mode.
//
// Memory reads have one cycle of latency. Timing in RC mode, counted from
// the cycle in which adc_done is high to the cycle in which adc_start is
// high: 9 + tr cycles within a word and 12 + tr across a word boundary; in
// sensor mode 5 + tr and 8 + tr. From `start` to the first adc_start:
// 8 + t0 + tr. start, rn_bits, sensor_mode and bit_sel are sampled in the
// idle state only.
module trngc
  import trng_pkg::*;
#(
  parameter int unsigned ADC_BITS = 12,
  parameter int unsigned RN_M     = 4,
  parameter int unsigned CONST1   = 63,
  parameter int unsigned CONST2   = 63
) (
  input  logic                clk,
  input  logic                rst_n,
  // run control
  input  logic                start,
  input  logic [31:0]         rn_bits,
  input  logic                sensor_mode,
  input  logic [1:0]          bit_sel,
  output logic                busy,
  output logic                done,
  output logic                trn_valid,
  output trn_t                trn_data,
  // entropy source and ADC
  output logic                vpower,
  output logic                adc_start,
  input  logic                adc_done,
  input  logic [ADC_BITS-1:0] adc_data,
  // word pool
  output logic                mem_rd_en,
  output addr_t               mem_rd_addr,
  input  trn_t                mem_rd_data,
  output logic                mem_wr_en,
  output addr_t               mem_wr_addr,
  output trn_t                mem_wr_data,
  input  addr_t               mem_ptr,
  output logic                mem_ptr_we,
  output addr_t               mem_ptr_d
);

  localparam int unsigned BITS_RC = TRN_W / RN_M;

  typedef enum logic [3:0] {
    S_IDLE, S_T0_LD, S_T0_WAIT, S_MAP_RD, S_MAP_CMP, S_TR_RD, S_TR_LD,
    S_TR_WAIT, S_ADC_GO, S_ADC_WAIT, S_SBS, S_EXTRACT, S_WRITE
  } state_e;

  state_e              state;
  logic [31:0]         rn_goal, rn_sum;
  logic                mode_sensor;
  logic [1:0]          sel;
  logic [ADC_BITS-1:0] d_k, d_new;
  logic [SBS_W-1:0]    sbs;
  logic [1:0]          sbs_idx;
  logic [4:0]          sample_cnt;
  trn_t                acc;

  logic                ld0, ldr, exp0, expr;
  logic [ADC_BITS-1:0] d_ht, d_lt;
  logic [BITS_RC-1:0]  nib;
  logic                one_bit;
  logic [4:0]          last_sample;
  logic                last_word;

  delay_counter #(.TRN_W(TRN_W), .CONST(CONST1)) u_t0 (
    .clk, .rst_n, .load(ld0), .trn(mem_rd_data), .expired(exp0)
  );
  delay_counter #(.TRN_W(TRN_W), .CONST(CONST2)) u_tr (
    .clk, .rst_n, .load(ldr), .trn(mem_rd_data), .expired(expr)
  );
  threshold_gen #(.ADC_BITS(ADC_BITS)) u_thr (
    .rn(mem_rd_data), .d_ht, .d_lt
  );
  cyclic_extract #(.ADC_BITS(ADC_BITS), .OUT_BITS(BITS_RC), .SBS_W(SBS_W)) u_ext (
    .d(d_new), .sbs, .bit_sel(sel), .bits(nib), .bit1(one_bit)
  );

  assign ld0         = (state == S_T0_LD);
  assign ldr         = (state == S_TR_LD);
  assign last_sample = mode_sensor ? 5'(TRN_W - 1) : 5'(RN_M - 1);
  assign last_word   = (rn_sum + 32'(TRN_W)) >= rn_goal;

  // Memory port: one read per state that needs one.
  always_comb begin
    mem_rd_en   = 1'b0;
    mem_rd_addr = '0;
    unique case (state)
      S_IDLE:    begin mem_rd_en = start; mem_rd_addr = mem_ptr - 1'b1; end
      S_MAP_RD:  begin mem_rd_en = 1'b1;  mem_rd_addr = mem_ptr - 1'b1; end
      S_TR_RD:   begin mem_rd_en = 1'b1;  mem_rd_addr = d_k[ADDR_W-1:0]; end
      S_SBS:     begin
                   mem_rd_en   = (sbs_idx != 2'd3);
                   mem_rd_addr = d_new[ADDR_W-1:0] + ADDR_W'(sbs_idx);
                 end
      default: ;
    endcase
  end

  assign mem_wr_en   = (state == S_WRITE);
  assign mem_wr_addr = mem_ptr;
  assign mem_wr_data = acc;
  assign mem_ptr_we  = (state == S_WRITE);
  assign mem_ptr_d   = mem_ptr + 1'b1;

  assign busy      = (state != S_IDLE);
  assign adc_start = (state == S_ADC_GO);
  assign trn_valid = (state == S_WRITE);
  assign trn_data  = acc;
  assign done      = (state == S_WRITE) && last_word;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      rn_goal     <= '0;
      rn_sum      <= '0;
      mode_sensor <= 1'b0;
      sel         <= '0;
      d_k         <= '0;
      d_new       <= '0;
      sbs         <= '0;
      sbs_idx     <= '0;
      sample_cnt  <= '0;
      acc         <= '0;
      vpower      <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          rn_goal     <= rn_bits;
          rn_sum      <= '0;
          mode_sensor <= sensor_mode;
          sel         <= bit_sel;
          d_k         <= '0;
          sample_cnt  <= '0;
          vpower      <= 1'b1;
          state       <= S_T0_LD;
        end
        S_T0_LD:   state <= S_T0_WAIT;
        S_T0_WAIT: if (exp0) state <= S_MAP_RD;
        S_MAP_RD:  state <= S_MAP_CMP;
        S_MAP_CMP: begin
          if (d_k > d_ht)      vpower <= 1'b0;
          else if (d_k < d_lt) vpower <= 1'b1;
          state <= S_TR_RD;
        end
        S_TR_RD:   state <= S_TR_LD;
        S_TR_LD:   state <= S_TR_WAIT;
        S_TR_WAIT: if (expr) state <= S_ADC_GO;
        S_ADC_GO:  state <= S_ADC_WAIT;
        S_ADC_WAIT: if (adc_done) begin
          d_new   <= adc_data;
          sbs_idx <= '0;
          state   <= mode_sensor ? S_EXTRACT : S_SBS;
        end
        S_SBS: begin
          // Data of the read issued at sbs_idx-1 arrives now.
          if (sbs_idx != 2'd0) sbs[SBS_W - 32'(sbs_idx)] <= mem_rd_data[0];
          sbs_idx <= sbs_idx + 1'b1;
          if (sbs_idx == 2'd3) state <= S_EXTRACT;
        end
        S_EXTRACT: begin
          if (mode_sensor) acc <= {acc[TRN_W-2:0], one_bit};
          else             acc <= {acc[TRN_W-BITS_RC-1:0], nib};
          d_k <= d_new;
          if (sample_cnt == last_sample) begin
            sample_cnt <= '0;
            state      <= S_WRITE;
          end else begin
            sample_cnt <= sample_cnt + 1'b1;
            state      <= S_TR_RD;
          end
        end
        S_WRITE: begin
          rn_sum <= rn_sum + 32'(TRN_W);
          state  <= last_word ? S_IDLE : S_MAP_RD;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The ADC may only report a conversion the controller is waiting for.
  a_adc_done_expected: assert property (
    @(posedge clk) disable iff (!rst_n) adc_done |-> state == S_ADC_WAIT
  ) else $error("trngc: adc_done outside a conversion");

  // A run's word count must fit: RN_M samples of TRN_W/RN_M bits each.
  initial assert (TRN_W % RN_M == 0 && RN_M <= 16)
    else $error("trngc: RN_M must divide TRN_W");

endmodule
