// tv_correct: temperature and voltage correction of a measured path delay.
//
// With dT = T - T0 and dV = V - V0 (the deviation from the conditions of
// the initial, well-controlled measurement) it computes
//   D_corr  = D_meas - (a1*dT + a2*dT^2) - (b1*dV + b2*dV^2)
//   D_aging = D_corr - D0
// i.e. the delay that would have been measured at (T0, V0), and the delay
// growth since the initial measurement. With cfg.poly_en = 0 the squared
// terms are dropped (linear correction, D_corr = D_meas - a1*dT - b1*dV).
// The quadratic correction and its linear special case follow the method;
// the fixed-point formats (see tdm_pkg) and the three-stage pipeline are
// this design's choices. Products are formed exactly, summed at 2^-28 ps
// resolution and rounded to nearest at the output; the outputs saturate to
// the delay range.
// Interface: in_valid with d_meas, temp, volt; cfg static during use.
// Timing: fully pipelined, one result per cycle, out_valid 3 cycles after
// in_valid.
module tv_correct
  import tdm_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  corr_cfg_t cfg,
  input  logic      in_valid,
  input  delay_t    d_meas,
  input  temp_t     temp,
  input  volt_t     volt,
  output logic      out_valid,
  output delay_t    d_corr,
  output delay_t    d_aging
);
  timeunit 1ps; timeprecision 10fs;

  localparam int LATENCY = 3;
  localparam int ACC_FRAC = 28;            // internal resolution 2^-28 ps
  localparam int ACC_W    = 72;

  // stage 1: deviations and their squares
  logic               v1;
  delay_t             d1;
  logic signed [12:0] dt1;                  // Q8.4 C
  logic signed [13:0] dv1;                  // mV
  logic signed [25:0] dt2_1;                // Q.8 C^2
  logic signed [27:0] dv2_1;                // mV^2

  logic signed [12:0] dt_c;
  logic signed [13:0] dv_c;
  assign dt_c = 13'(temp) - 13'(cfg.t0);
  assign dv_c = $signed({2'b00, volt}) - $signed({2'b00, cfg.v0});

  // stage 2: the four products, aligned to 2^-28 ps
  logic                    v2;
  delay_t                  d2;
  logic signed [ACC_W-1:0] p_a1, p_a2, p_b1, p_b2;

  // stage 3: sum, round, saturate
  logic signed [ACC_W-1:0] acc_c;
  logic signed [ACC_W-1:0] corr_r;
  logic signed [ACC_W-1:0] aging_r;

  function automatic delay_t sat(input logic signed [ACC_W-1:0] x);
    if (x > ACC_W'(signed'({1'b0, {(DELAY_W-1){1'b1}}})))
      return {1'b0, {(DELAY_W-1){1'b1}}};
    else if (x < -ACC_W'(signed'({1'b0, {(DELAY_W-1){1'b1}}})) - 1)
      return {1'b1, {(DELAY_W-1){1'b0}}};
    else
      return delay_t'(x);
  endfunction

  always_comb begin
    acc_c = (ACC_W'(d2) <<< (ACC_FRAC - DELAY_FRAC)) - p_a1 - p_b1;
    if (cfg.poly_en) acc_c = acc_c - p_a2 - p_b2;
    // round to nearest at 2^-8 ps
    corr_r  = (acc_c + (ACC_W'(1) <<< (ACC_FRAC - DELAY_FRAC - 1))) >>> (ACC_FRAC - DELAY_FRAC);
    aging_r = corr_r - ACC_W'(cfg.d0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; v2 <= 1'b0; out_valid <= 1'b0;
      d1 <= '0; dt1 <= '0; dv1 <= '0; dt2_1 <= '0; dv2_1 <= '0;
      d2 <= '0; p_a1 <= '0; p_a2 <= '0; p_b1 <= '0; p_b2 <= '0;
      d_corr <= '0; d_aging <= '0;
    end else begin
      v1    <= in_valid;
      d1    <= d_meas;
      dt1   <= dt_c;
      dv1   <= dv_c;
      dt2_1 <= 26'(dt_c) * 26'(dt_c);
      dv2_1 <= 28'(dv_c) * 28'(dv_c);

      v2   <= v1;
      d2   <= d1;
      // a*dT   : Q.20 * Q.4 = Q.24 -> shift 4
      p_a1 <= (ACC_W'(cfg.a1) * ACC_W'(dt1)) <<< (ACC_FRAC - COEF_FRAC - TEMP_FRAC);
      // a*dT^2 : Q.20 * Q.8 = Q.28
      p_a2 <= (ACC_W'(cfg.a2) * ACC_W'(dt2_1)) <<< (ACC_FRAC - COEF_FRAC - 2 * TEMP_FRAC);
      // b*dV, b*dV^2 : Q.20 -> shift 8
      p_b1 <= (ACC_W'(cfg.b1) * ACC_W'(dv1)) <<< (ACC_FRAC - COEF_FRAC);
      p_b2 <= (ACC_W'(cfg.b2) * ACC_W'(dv2_1)) <<< (ACC_FRAC - COEF_FRAC);

      out_valid <= v2;
      d_corr    <= sat(corr_r);
      d_aging   <= sat(aging_r);
    end
  end

  initial assert (LATENCY == 3);
endmodule
