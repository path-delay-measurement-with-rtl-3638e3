// tvs_ctrl: controller of the ring oscillators of the temperature and
// voltage sensors (TVS).
//
// The chip carries four TVS units of three ring oscillators each (N_RO = 12
// oscillators). On `start` the controller clears one counter per
// oscillator, enables all oscillators (ro_en) for WIN system-clock cycles,
// then stops them, waits SETTLE cycles for the last oscillator edges to
// die out and copies the counts into `counts`, which hold until the next
// start. Each counter runs on its own oscillator as clock; it is read only
// after its oscillator has stopped, so no synchronizer is needed. The
// counts are the raw sensor output: their conversion to temperature and
// voltage is a separate calibration step. Window length and counter width
// are this design's choices.
// Timing: start to done = WIN + SETTLE + 2 cycles.
module tvs_ctrl #(
  parameter int N_RO   = 12,
  parameter int CNT_W  = 16,
  parameter int WIN    = 1024,
  parameter int SETTLE = 4
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  input  logic [N_RO-1:0]            ro_clk,
  output logic                       ro_en,
  output logic                       busy,
  output logic                       done,
  output logic [N_RO-1:0][CNT_W-1:0] counts
);
  timeunit 1ps; timeprecision 10fs;

  typedef enum logic [2:0] {T_IDLE, T_CLEAR, T_RUN, T_SETTLE, T_LATCH} tstate_t;
  tstate_t state;

  localparam int TW = $clog2(WIN + SETTLE + 1);
  logic [TW-1:0] timer;
  logic          cnt_clr;
  logic [CNT_W-1:0] ro_cnt [N_RO];

  // One counter per oscillator, clocked by the oscillator itself.
  for (genvar i = 0; i < N_RO; i++) begin : g_cnt
    ro_counter #(.CNT_W(CNT_W)) u_cnt (.ro_clk(ro_clk[i]), .clr(cnt_clr), .count(ro_cnt[i]));
  end

  assign busy = (state != T_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= T_IDLE;
      timer   <= '0;
      cnt_clr <= 1'b1;
      ro_en   <= 1'b0;
      done    <= 1'b0;
      counts  <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        T_IDLE: begin
          cnt_clr <= 1'b0;
          if (start) begin
            cnt_clr <= 1'b1;
            state   <= T_CLEAR;
          end
        end
        T_CLEAR: begin
          cnt_clr <= 1'b0;
          ro_en   <= 1'b1;
          timer   <= '0;
          state   <= T_RUN;
        end
        T_RUN: begin
          timer <= timer + 1'b1;
          if (timer == TW'(WIN - 1)) begin
            ro_en <= 1'b0;
            timer <= '0;
            state <= T_SETTLE;
          end
        end
        T_SETTLE: begin
          timer <= timer + 1'b1;
          if (timer == TW'(SETTLE - 1)) state <= T_LATCH;
        end
        T_LATCH: begin
          for (int i = 0; i < N_RO; i++) counts[i] <= ro_cnt[i];
          done   <= 1'b1;
          state  <= T_IDLE;
        end
        default: state <= T_IDLE;
      endcase
    end
  end

  initial assert (WIN >= 1 && SETTLE >= 1) else $error("tvs_ctrl: bad timing");
endmodule
