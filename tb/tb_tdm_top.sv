// tb_tdm_top: end-to-end test of the measurement architecture at its
// default sizes (8 chains x 32 flip-flops, 64 patterns, 4 x 3 oscillators,
// 10 ns system clock).
//
// The circuit under test is cut_scan_model, whose critical path delay
// follows D(T, V) = D0 + a1 dT + a2 dT^2 + b1 dV + b2 dV^2 + aging with the
// sensitivities of the method's 65 nm test chip (a1 = 6.768 ps/C,
// a2 = 0.012 ps/C^2, b1 = -7.327 ps/mV, b2 = 0.01831 ps/mV^2, D0 = 6149.10
// ps at 60 C, 1.20 V). The testbench answers the sensor request with the
// set temperature and voltage, as an evaluation with a climate chamber and
// a tester would. Measurements: initial measurement at (60 C, 1.20 V) in
// init mode, quadratic-corrected measurements at the corners of 30..80 C
// and 1.05..1.35 V, one with 150 ps of aging, one with linear correction,
// and one with a longer clock period where every DLYC passes.
// Per measurement it checks: the DLYC sweep ends where the real
// launch-to-capture interval (clock generator stage delays) first drops
// below the path delay; D_meas = T_CLK - DLYC_pass * 23.60 ps; D_meas is
// within 50 ps of the true delay; the corrected delay is within 50 ps of D0
// (quadratic) and the aging estimate within 50 ps of the injected aging;
// the record read from the test memory over the bus matches the result
// registers; sensor counts fall as temperature rises. Every mechanism
// (passing and failing sessions, all-pass sweep, init/field mode, linear
// and quadratic correction, sensor handshake, record read-back) is counted
// and must occur.
module tb_tdm_top;
  timeunit 1ps; timeprecision 10fs;
  import tdm_pkg::*;

  localparam int NCH = 8, L = 32;
  localparam real A1 = 6.768, A2 = 0.012, B1 = -7.327, B2 = 0.01831, D0 = 6149.10;

  logic clk = 1'b0, rst_n = 1'b0;
  logic bus_we = 1'b0, bus_re = 1'b0;
  logic [9:0] bus_addr = '0;
  logic [31:0] bus_wdata = '0, bus_rdata;
  logic cut_tclk_l, cut_tclk_c, cut_scan_en, cut_launch_en, cut_capture_en;
  logic [NCH-1:0] cut_scan_in, cut_scan_out;
  logic [11:0][15:0] tvs_counts;
  logic tv_req, tv_valid = 1'b0;
  temp_t tv_temp = '0;
  volt_t tv_volt = '0;
  logic signed [31:0] env_temp_mc = 60000, env_volt_mv = 1200;
  int crit_ps_x100, n_late;

  tdm_top dut (.*);

  cut_scan_model #(.NCH(NCH), .CHAIN_LEN(L)) u_cut (
    .tclk_l(cut_tclk_l), .tclk_c(cut_tclk_c), .scan_en(cut_scan_en),
    .launch_en(cut_launch_en), .capture_en(cut_capture_en),
    .scan_in(cut_scan_in), .scan_out(cut_scan_out), .crit_ps_x100, .n_late);

  realtime half_period = 5000.0;
  always #(half_period) clk = ~clk;

  int checks = 0, failures = 0;
  // mechanism counters
  int m_pass_sessions = 0, m_fail_stop = 0, m_all_pass = 0, m_init = 0;
  int m_field = 0, m_poly = 0, m_linear = 0, m_tv_handshake = 0, m_readback = 0;
  int m_late = 0;
  real aging_ps = 0.0, t_set = 60.0, v_set = 1200.0, tclk_set = 10000.0;
  logic [15:0] cnt_prev;

  real stage_tab [8] = '{20.93, 46.65, 92.40, 187.43, 378.43, 758.70, 1532.25, 2999.02};
  function automatic real interval_ps(input int code);
    real d = tclk_set;
    for (int k = 0; k < 8; k++) if (code[k]) d -= stage_tab[k];
    return d;
  endfunction

  function automatic real true_delay();
    real dt = t_set - 60.0, dv = v_set - 1200.0;
    return D0 + A1 * dt + A2 * dt * dt + B1 * dv + B2 * dv * dv + aging_ps;
  endfunction

  // sensor-count to temperature/voltage conversion stand-in
  always @(posedge clk) if (tv_req && !tv_valid) begin
    m_tv_handshake++;
    #1 tv_valid = 1'b1;
    tv_temp = temp_t'(int'(t_set * 16.0));
    tv_volt = volt_t'(int'(v_set));
    @(posedge clk); #1 tv_valid = 1'b0;
  end

  task automatic wr(input logic [9:0] a, input logic [31:0] d);
    @(negedge clk); bus_we = 1'b1; bus_addr = a; bus_wdata = d;
    @(negedge clk); bus_we = 1'b0;
  endtask
  task automatic rd(input logic [9:0] a, output logic [31:0] d);
    @(negedge clk); bus_re = 1'b1; bus_addr = a;
    @(negedge clk); bus_re = 1'b0; d = bus_rdata;
  endtask

  function automatic real q8(input logic [31:0] w);
    return real'($signed(w)) / 256.0;
  endfunction

  task automatic check_near(input string what, input real got, input real exp_v, input real tol);
    checks++;
    if (got > exp_v + tol || got < exp_v - tol) begin
      failures++;
      $display("FAIL %s: %0.2f expected %0.2f +- %0.2f", what, got, exp_v, tol);
    end
  endtask

  // one measurement; returns D_meas, D_corr, D_aging in ps
  task automatic measure(input real t_c, input real v_mv, input real age, input bit init,
                         input bit poly, input int rec, output real dm, output real dc,
                         output real da);
    logic [31:0] w, status, dp;
    real d_true;
    int exp_pass, n_late0;
    t_set = t_c; v_set = v_mv; aging_ps = age;
    env_temp_mc = int'(t_c * 1000.0); env_volt_mv = int'(v_mv);
    d_true = true_delay();
    crit_ps_x100 = int'(d_true * 100.0);
    n_late0 = n_late;
    // expected sweep end from the real intervals
    exp_pass = 255;
    for (int n = 1; n < 256; n++) if (interval_ps(n) < d_true) begin exp_pass = n - 1; break; end
    wr(10'h000, {29'd0, poly, init, 1'b1});
    do begin
      repeat (1000) @(posedge clk);
      rd(10'h001, status);
    end while (!status[1]);
    if (n_late > n_late0) m_late++;
    rd(10'h013, dp);
    checks++;
    if (int'(dp) != exp_pass) begin failures++; $display("FAIL DLYC_pass %0d expected %0d", dp, exp_pass); end
    m_pass_sessions += int'(dp);
    if (status[3]) m_all_pass++; else m_fail_stop++;
    if (init) m_init++; else m_field++;
    if (poly) m_poly++; else m_linear++;
    rd(10'h010, w); dm = q8(w);
    check_near("D_meas formula", dm, tclk_set - real'(exp_pass) * 6042.0 / 256.0, 0.01);
    if (!status[3]) check_near("D_meas vs true", dm, d_true, 50.0);
    rd(10'h011, w); dc = q8(w);
    rd(10'h012, w); da = q8(w);
    // record in the test memory
    rd(10'h200 + 10'(rec * 16 + 1), w);
    checks++; if (q8(w) != dm) failures++;
    rd(10'h200 + 10'(rec * 16 + 2), w);
    checks++; if (q8(w) != dc) failures++;
    rd(10'h200 + 10'(rec * 16 + 4), w);
    checks++; if (w !== {16'(temp_t'(int'(t_c * 16.0))), 16'(int'(v_mv))}) failures++;
    rd(10'h200 + 10'(rec * 16 + 0), w);
    checks++; if (w[7:0] !== dp[7:0] || w[17] !== init) failures++;
    m_readback++;
    $display("T=%0.0f C V=%0.0f mV aging=%0.0f: true %0.2f  DLYC_pass %0d  D_meas %0.2f  D_corr %0.2f  D_aging %0.2f",
             t_c, v_mv, age, d_true, dp, dm, dc, da);
  endtask

  real dm, dc, da, d0_meas;
  logic [31:0] w;

  initial begin
    #(64'd200_000_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // initial measurement under controlled conditions: D0 is taken over
    measure(60.0, 1200.0, 0.0, 1'b1, 1'b1, 0, dm, dc, da);
    d0_meas = dm;
    rd(10'h006, w);
    checks++; if (q8(w) != dm) begin failures++; $display("FAIL D0 not loaded"); end
    check_near("initial D_meas", dm, D0, 50.0);
    cnt_prev = tvs_counts[0];
    // field measurements, quadratic correction
    measure(80.0, 1050.0, 0.0, 1'b0, 1'b1, 1, dm, dc, da);
    check_near("corrected (80 C, 1.05 V)", dc, d0_meas, 50.0);
    check_near("aging (80 C, 1.05 V)", da, 0.0, 50.0);
    checks++; if (tvs_counts[0] >= cnt_prev) begin failures++; $display("FAIL RO count did not fall with temperature"); end
    measure(30.0, 1350.0, 0.0, 1'b0, 1'b1, 2, dm, dc, da);
    check_near("corrected (30 C, 1.35 V)", dc, d0_meas, 50.0);
    measure(40.0, 1290.0, 0.0, 1'b0, 1'b1, 3, dm, dc, da);
    check_near("corrected (40 C, 1.29 V)", dc, d0_meas, 50.0);
    // aged circuit
    measure(45.0, 1300.0, 150.0, 1'b0, 1'b1, 4, dm, dc, da);
    check_near("aging estimate", da, 150.0, 50.0);
    // linear correction leaves the quadratic voltage term (b2 * dV^2)
    measure(30.0, 1350.0, 0.0, 1'b0, 1'b0, 5, dm, dc, da);
    check_near("linear residual", dc - d0_meas, A2 * 900.0 + B2 * 22500.0, 50.0);
    // longer clock period: every DLYC passes, D_meas is only an upper bound
    tclk_set = 12000.0;
    half_period = 6000.0;
    wr(10'h002, 32'(12000 * 256));
    measure(30.0, 1350.0, 0.0, 1'b0, 1'b1, 6, dm, dc, da);
    checks++; if (dm < true_delay()) failures++;
    // every mechanism must have happened
    checks++; if (m_pass_sessions == 0) begin failures++; $display("FAIL no passing session"); end
    checks++; if (m_fail_stop == 0) begin failures++; $display("FAIL no failing session"); end
    checks++; if (m_all_pass == 0) begin failures++; $display("FAIL no all-pass sweep"); end
    checks++; if (m_init == 0 || m_field == 0) begin failures++; $display("FAIL mode not exercised"); end
    checks++; if (m_poly == 0 || m_linear == 0) begin failures++; $display("FAIL correction mode not exercised"); end
    checks++; if (m_tv_handshake == 0) begin failures++; $display("FAIL no sensor handshake"); end
    checks++; if (m_readback == 0) begin failures++; $display("FAIL no record read-back"); end
    checks++; if (m_late == 0) begin failures++; $display("FAIL no late capture"); end
    $display("mechanisms: pass-sessions=%0d fail-stops=%0d all-pass=%0d init=%0d field=%0d poly=%0d linear=%0d tv-handshakes=%0d readbacks=%0d late-capture-runs=%0d",
             m_pass_sessions, m_fail_stop, m_all_pass, m_init, m_field, m_poly, m_linear,
             m_tv_handshake, m_readback, m_late);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
