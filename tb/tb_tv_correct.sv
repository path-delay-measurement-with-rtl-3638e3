// tb_tv_correct: self-checking test of the correction unit.
// Reference: the correction formula evaluated in double precision from the
// real-valued inputs, quantized only at the end; results must agree within
// 2/256 ps. Vectors: the sensitivities of the method's test chip at the
// corners of 30..80 C and 1.05..1.35 V, in quadratic and linear mode, then
// the published corner results, then 500 random vectors with random coefficients, issued back to back. Checks
// the 3-cycle latency and one result per cycle.
module tb_tv_correct;
  timeunit 1ps; timeprecision 10fs;
  import tdm_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  corr_cfg_t cfg;
  logic in_valid = 1'b0, out_valid;
  delay_t d_meas = '0, d_corr, d_aging;
  temp_t temp = '0;
  volt_t volt = '0;
  int checks = 0, failures = 0;

  tv_correct dut (.clk, .rst_n, .cfg, .in_valid, .d_meas, .temp, .volt,
                  .out_valid, .d_corr, .d_aging);

  always #5000 clk = ~clk;

  typedef struct { real corr; real aging; int t_issue; } exp_t;
  exp_t q [$];
  real got_list [$];
  int cyc = 0;
  always @(posedge clk) cyc++;

  function automatic int srnd(input int lo, input int hi);
    int r;
    r = int'($urandom_range(0, hi - lo));
    return lo + r;
  endfunction

  function automatic coef_t to_coef(input real x);
    return coef_t'(longint'(x * 1048576.0));
  endfunction

  function automatic real cval(input coef_t c);
    return real'(c) / 1048576.0;
  endfunction

  task automatic issue(input real dm_ps, input real t_c, input int v_mv);
    exp_t e;
    real dt, dv, dm_q;
    d_meas = delay_t'(longint'(dm_ps * 256.0));
    temp   = temp_t'(int'(t_c * 16.0));
    volt   = volt_t'(v_mv);
    dm_q = real'(d_meas) / 256.0;
    dt = real'(temp) / 16.0 - real'(cfg.t0) / 16.0;
    dv = real'(volt) - real'(cfg.v0);
    e.corr = dm_q - cval(cfg.a1) * dt - cval(cfg.b1) * dv;
    if (cfg.poly_en) e.corr = e.corr - cval(cfg.a2) * dt * dt - cval(cfg.b2) * dv * dv;
    e.aging = e.corr - real'(cfg.d0) / 256.0;
    e.t_issue = cyc;
    q.push_back(e);
    in_valid = 1'b1;
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  always @(negedge clk) if (rst_n && out_valid) begin
    exp_t e;
    real got_c, got_a;
    if (q.size() == 0) begin failures++; $display("FAIL unexpected output"); end
    else begin
      e = q.pop_front();
      got_c = real'(d_corr) / 256.0;
      got_a = real'(d_aging) / 256.0;
      got_list.push_back(got_c);
      checks++;
      if (got_c > e.corr + 2.0 / 256 || got_c < e.corr - 2.0 / 256) begin
        failures++;
        $display("FAIL corr %0.4f expected %0.4f", got_c, e.corr);
      end
      checks++;
      if (got_a > e.aging + 2.0 / 256 || got_a < e.aging - 2.0 / 256) begin
        failures++;
        $display("FAIL aging %0.4f expected %0.4f", got_a, e.aging);
      end
      checks++;
      if (cyc - e.t_issue != 3) begin failures++; $display("FAIL latency %0d", cyc - e.t_issue); end
    end
  end

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg.t0 = temp_t'(60 * 16); cfg.v0 = volt_t'(1200);
    cfg.d0 = delay_t'(longint'(6149.10 * 256.0));
    cfg.a1 = to_coef(6.768); cfg.a2 = to_coef(0.012);
    cfg.b1 = to_coef(-7.327); cfg.b2 = to_coef(0.01831);
    cfg.poly_en = 1'b1;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    issue(6149.10, 60.0, 1200);   // initial point: no correction
    issue(7678.14, 80.0, 1050);
    issue(5259.53, 30.0, 1350);
    issue(6500.00, 40.0, 1290);
    repeat (5) @(negedge clk);
    cfg.poly_en = 1'b0;           // linear correction
    cfg.a1 = to_coef(6.595); cfg.b1 = to_coef(-7.326);
    issue(7678.14, 80.0, 1050);
    issue(5259.53, 30.0, 1350);
    repeat (5) @(negedge clk);
    // published corner results: quadratic 7678.14 ps at (80 C, 1.05 V)
    // -> 6027.01 ps; linear 5259.53 ps at (30 C, 1.35 V) -> 6557.60 ps
    checks++;
    if (got_list[1] > 6028.0 || got_list[1] < 6026.0) begin
      failures++; $display("FAIL quadratic corner %0.2f", got_list[1]);
    end
    checks++;
    if (got_list[5] > 6559.6 || got_list[5] < 6555.6) begin
      failures++; $display("FAIL linear corner %0.2f", got_list[5]);
    end
    for (int r = 0; r < 10; r++) begin
      cfg.poly_en = r[0];
      cfg.a1 = to_coef(srnd(-10000, 10000) / 1000.0);
      cfg.a2 = to_coef(srnd(-1000, 1000) / 10000.0);
      cfg.b1 = to_coef(srnd(-10000, 10000) / 1000.0);
      cfg.b2 = to_coef(srnd(-1000, 1000) / 50000.0);
      cfg.t0 = temp_t'($urandom_range(0, 100 * 16));
      cfg.v0 = volt_t'($urandom_range(1000, 1400));
      cfg.d0 = delay_t'($urandom_range(0, 10000 * 256));
      for (int i = 0; i < 50; i++)
        issue($urandom_range(3000, 9000) + $urandom_range(0, 255) / 256.0,
              $urandom_range(0, 1000) / 10.0, $urandom_range(1000, 1400));
      repeat (5) @(negedge clk);
    end
    checks++; if (q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
