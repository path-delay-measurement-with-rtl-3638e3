// test_ctrl: test controller running one corrected path delay measurement.
//
// Sequence after `start`:
//  1. Start the temperature/voltage sensor measurement (tvs_start); it runs
//     in parallel with the delay measurement.
//  2. Delay sweep. DLYC = 0 first: the launch-to-capture interval equals
//     the system clock period and the BIST signature of that run is
//     kept as the reference. DLYC is then raised by one per session, which
//     shortens the interval by one buffer delay, and the same BIST session
//     is repeated as long as its signature equals the reference. The sweep
//     ends at the first failing session or after DLYC = 255 passed.
//  3. The measured delay is the shortest interval that still passed:
//        D_meas = T_CLK - DLYC_pass * RES
//     (RES = delay of one buffer of the clock generator).
//  4. Once the sensor counts are in, tv_req asks for the temperature and
//     voltage they stand for; tv_valid returns them (conversion of the
//     counts is outside this block).
//  5. D_meas, T and V go through the correction unit; in init_mode the
//     measured delay also becomes the new reference D0 (d0_load).
//  6. The record is written to the test memory (REC_WORDS words at
//     rec_ptr*16): word 0 = {status, DLYC of first fail, DLYC_pass},
//     1 = D_meas, 2 = D_corr, 3 = D_aging (delays sign-extended Q.8 ps),
//     4 = {T (Q.4 C), V (mV)}, 5..10 = sensor counts, two per word.
// The sweep rule and the reference-signature scheme are this design's
// reading of the method; record layout and handshakes are its own.
// Timing: done pulses one cycle after the last record word is written.
module test_ctrl
  import tdm_pkg::*;
#(
  parameter int N_RO    = 12,
  parameter int CNT_W   = 16,
  parameter int MEM_AW  = 8
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // control
  input  logic                       start,
  input  logic                       init_mode,
  input  delay_t                     tclk_ps,
  input  delay_t                     res_ps,
  output logic                       busy,
  output logic                       done,
  // variable test clock generator and logic BIST
  output dlyc_t                      dlyc,
  output logic                       bist_start,
  input  logic                       bist_done,
  input  logic [31:0]                bist_sig,
  // temperature and voltage sensors
  output logic                       tvs_start,
  input  logic                       tvs_done,
  input  logic [N_RO-1:0][CNT_W-1:0] tvs_counts,
  output logic                       tv_req,
  input  logic                       tv_valid,
  input  temp_t                      tv_temp,
  input  volt_t                      tv_volt,
  // correction unit
  output logic                       corr_valid,
  output delay_t                     corr_meas,
  output temp_t                      corr_temp,
  output volt_t                      corr_volt,
  input  logic                       corr_done,
  input  delay_t                     corr_d,
  input  delay_t                     corr_aging,
  output logic                       d0_load,
  // test memory write port
  output logic                       mem_we,
  output logic [MEM_AW-1:0]          mem_waddr,
  output logic [31:0]                mem_wdata,
  // last results
  output delay_t                     res_meas,
  output delay_t                     res_corr,
  output delay_t                     res_aging,
  output dlyc_t                      res_dlyc_pass,
  output logic                       res_all_pass,
  output logic [15:0]                meas_count
);
  timeunit 1ps; timeprecision 10fs;

  localparam int REC_WORDS = 5 + (N_RO + 1) / 2;
  localparam int REC_SPAN  = 16;
  localparam int RPW       = MEM_AW - $clog2(REC_SPAN);

  typedef enum logic [3:0] {
    C_IDLE, C_BIST_GO, C_BIST_WAIT, C_EVAL, C_CALC, C_TVS_WAIT, C_TV_REQ,
    C_CORR_GO, C_CORR_WAIT, C_STORE, C_DONE
  } cstate_t;
  cstate_t state;

  logic [31:0]   ref_sig;
  dlyc_t         dlyc_pass;
  dlyc_t         dlyc_fail;
  logic          any_fail;
  logic          tvs_seen;
  logic          mode_init;
  temp_t         t_q;
  volt_t         v_q;
  logic [3:0]    word_idx;
  logic [RPW-1:0] rec_ptr;
  logic          sig_ok;
  logic signed [DELAY_W+DLYC_W:0] step_total;

  assign sig_ok     = (bist_sig == ref_sig) || (dlyc == '0);
  assign step_total = $signed({1'b0, dlyc_pass}) * res_ps;
  assign busy       = (state != C_IDLE);
  assign tv_req     = (state == C_TV_REQ);
  assign corr_valid = (state == C_CORR_GO);
  assign corr_meas  = res_meas;
  assign corr_temp  = t_q;
  assign corr_volt  = v_q;
  assign bist_start = (state == C_BIST_GO);

  // record word mux
  always_comb begin
    mem_wdata = '0;
    unique case (word_idx)
      4'd0: mem_wdata = {14'd0, mode_init, any_fail, dlyc_fail, dlyc_pass};
      4'd1: mem_wdata = 32'(res_meas);
      4'd2: mem_wdata = 32'(res_corr);
      4'd3: mem_wdata = 32'(res_aging);
      4'd4: mem_wdata = {16'(t_q), 16'(v_q)};
      default: begin
        for (int i = 0; i < N_RO; i++)
          if (5 + i / 2 == int'(word_idx))
            mem_wdata[16 * (i % 2) +: 16] = 16'(tvs_counts[i]);
      end
    endcase
  end
  assign mem_we    = (state == C_STORE);
  assign mem_waddr = {rec_ptr, word_idx};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= C_IDLE;
      dlyc          <= '0;
      ref_sig       <= '0;
      dlyc_pass     <= '0;
      dlyc_fail     <= '0;
      any_fail      <= 1'b0;
      tvs_seen      <= 1'b0;
      mode_init     <= 1'b0;
      t_q           <= '0;
      v_q           <= '0;
      word_idx      <= '0;
      rec_ptr       <= '0;
      tvs_start     <= 1'b0;
      d0_load       <= 1'b0;
      done          <= 1'b0;
      res_meas      <= '0;
      res_corr      <= '0;
      res_aging     <= '0;
      res_dlyc_pass <= '0;
      res_all_pass  <= 1'b0;
      meas_count    <= '0;
    end else begin
      tvs_start <= 1'b0;
      d0_load   <= 1'b0;
      done      <= 1'b0;
      if (tvs_done) tvs_seen <= 1'b1;
      unique case (state)
        C_IDLE: if (start) begin
          dlyc      <= '0;
          dlyc_pass <= '0;
          dlyc_fail <= '0;
          any_fail  <= 1'b0;
          tvs_seen  <= 1'b0;
          mode_init <= init_mode;
          tvs_start <= 1'b1;
          state     <= C_BIST_GO;
        end
        C_BIST_GO:   state <= C_BIST_WAIT;
        C_BIST_WAIT: if (bist_done) state <= C_EVAL;
        C_EVAL: begin
          if (dlyc == '0) ref_sig <= bist_sig;
          if (sig_ok) begin
            dlyc_pass <= dlyc;
            if (dlyc == '1) state <= C_CALC;
            else begin
              dlyc  <= dlyc + 1'b1;
              state <= C_BIST_GO;
            end
          end else begin
            any_fail  <= 1'b1;
            dlyc_fail <= dlyc;
            state     <= C_CALC;
          end
        end
        C_CALC: begin
          res_meas      <= delay_t'((DELAY_W+DLYC_W+1)'(tclk_ps) - step_total);
          res_dlyc_pass <= dlyc_pass;
          res_all_pass  <= !any_fail;
          dlyc          <= '0;       // back to the relaxed interval
          state         <= C_TVS_WAIT;
        end
        C_TVS_WAIT: if (tvs_seen || tvs_done) state <= C_TV_REQ;
        C_TV_REQ: if (tv_valid) begin
          t_q   <= tv_temp;
          v_q   <= tv_volt;
          state <= C_CORR_GO;
        end
        C_CORR_GO:   state <= C_CORR_WAIT;
        C_CORR_WAIT: if (corr_done) begin
          res_corr  <= corr_d;
          res_aging <= corr_aging;
          if (mode_init) d0_load <= 1'b1;
          word_idx  <= '0;
          state     <= C_STORE;
        end
        C_STORE: begin
          word_idx <= word_idx + 1'b1;
          if (word_idx == 4'(REC_WORDS - 1)) state <= C_DONE;
        end
        C_DONE: begin
          rec_ptr    <= rec_ptr + 1'b1;
          meas_count <= meas_count + 1'b1;
          done       <= 1'b1;
          state      <= C_IDLE;
        end
        default: state <= C_IDLE;
      endcase
    end
  end

  initial assert (REC_WORDS <= REC_SPAN && MEM_AW > 4)
    else $error("test_ctrl: record does not fit");
endmodule
