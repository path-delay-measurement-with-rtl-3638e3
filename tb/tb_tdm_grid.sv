// tb_tdm_grid: the correction comparison over the operating range.
//
// Measures a circuit under test (cut_scan_model) over a grid of 30..80 C in
// 10 C steps and 1.05..1.35 V in 30 mV steps (66 points), once with the
// linear and once with the quadratic correction, after an initial
// measurement at 60 C / 1.20 V. The critical path delay follows the
// quadratic model with the published test-chip sensitivities
// (a1 = 6.768 ps/C, a2 = 0.012 ps/C^2, b1 = -7.327 ps/mV,
// b2 = 0.01831 ps/mV^2, 6149.10 ps at 60 C / 1.20 V); the linear run uses
// the published linear fit (a1 = 6.595 ps/C, b1 = -7.326 ps/mV).
// It reports the spread (max - min) of the raw, the linearly corrected and
// the quadratically corrected delays and checks that the raw spread is over
// 2 ns, the quadratic spread under 100 ps and below the linear one, and
// that every point's quadratic-corrected delay is within 80 ps of D0.
// The remaining error is not the correction's: the measured delay converts
// DLYC with the average buffer delay, while the 128-buffer stage is about
// 20 ps shorter than 128 average buffers, so delays measured on either side
// of code 128 (near 7.0 ns at a 10 ns clock) carry different offsets.
// The BIST runs 8 patterns per session (instead of 64) to keep the
// 133 measurements short; everything else is at its default size.
module tb_tdm_grid;
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

  tdm_top #(.NPAT(8)) dut (.*);

  cut_scan_model #(.NCH(NCH), .CHAIN_LEN(L)) u_cut (
    .tclk_l(cut_tclk_l), .tclk_c(cut_tclk_c), .scan_en(cut_scan_en),
    .launch_en(cut_launch_en), .capture_en(cut_capture_en),
    .scan_in(cut_scan_in), .scan_out(cut_scan_out), .crit_ps_x100, .n_late);

  always #5000 clk = ~clk;

  int checks = 0, failures = 0;
  real t_set = 60.0, v_set = 1200.0;

  always @(posedge clk) if (tv_req && !tv_valid) begin
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

  task automatic measure(input real t_c, input real v_mv, input bit init, input bit poly,
                         output real dm, output real dc);
    logic [31:0] w, status;
    real dt, dv;
    t_set = t_c; v_set = v_mv;
    env_temp_mc = int'(t_c * 1000.0); env_volt_mv = int'(v_mv);
    dt = t_c - 60.0; dv = v_mv - 1200.0;
    crit_ps_x100 = int'((D0 + A1 * dt + A2 * dt * dt + B1 * dv + B2 * dv * dv) * 100.0);
    wr(10'h000, {29'd0, poly, init, 1'b1});
    do begin
      repeat (500) @(posedge clk);
      rd(10'h001, status);
    end while (!status[1]);
    rd(10'h010, w); dm = q8(w);
    rd(10'h011, w); dc = q8(w);
  endtask

  real dm, dc, d0_meas;
  real raw_min = 1.0e9, raw_max = -1.0e9;
  real lin_min = 1.0e9, lin_max = -1.0e9, quad_min = 1.0e9, quad_max = -1.0e9;
  int worst_quad_t, worst_quad_v;
  real worst_quad;

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
    measure(60.0, 1200.0, 1'b1, 1'b1, dm, dc);
    d0_meas = dm;
    worst_quad = 0.0;
    // linear correction with the published linear fit
    wr(10'h007, 32'(int'(6.595 * 1048576.0)));
    wr(10'h009, 32'(int'(-7.326 * 1048576.0)));
    for (int t = 30; t <= 80; t += 10)
      for (int v = 1050; v <= 1350; v += 30) begin
        measure(real'(t), real'(v), 1'b0, 1'b0, dm, dc);
        raw_min = (dm < raw_min) ? dm : raw_min; raw_max = (dm > raw_max) ? dm : raw_max;
        lin_min = (dc < lin_min) ? dc : lin_min; lin_max = (dc > lin_max) ? dc : lin_max;
      end
    // quadratic correction with the published quadratic fit
    wr(10'h007, 32'(int'(A1 * 1048576.0)));
    wr(10'h009, 32'(int'(B1 * 1048576.0)));
    for (int t = 30; t <= 80; t += 10)
      for (int v = 1050; v <= 1350; v += 30) begin
        measure(real'(t), real'(v), 1'b0, 1'b1, dm, dc);
        quad_min = (dc < quad_min) ? dc : quad_min; quad_max = (dc > quad_max) ? dc : quad_max;
        checks++;
        if (dc - d0_meas > 80.0 || dc - d0_meas < -80.0) begin
          failures++;
          $display("FAIL (%0d C, %0d mV) corrected %0.2f vs D0 %0.2f", t, v, dc, d0_meas);
        end
        if ((dc - d0_meas) * (dc - d0_meas) > worst_quad * worst_quad) begin
          worst_quad = dc - d0_meas; worst_quad_t = t; worst_quad_v = v;
        end
      end
    $display("D0 = %0.2f ps", d0_meas);
    $display("spread before correction: %0.2f ps (%0.2f .. %0.2f)", raw_max - raw_min, raw_min, raw_max);
    $display("spread, linear correction: %0.2f ps (%0.2f .. %0.2f)", lin_max - lin_min, lin_min, lin_max);
    $display("spread, quadratic correction: %0.2f ps (%0.2f .. %0.2f), worst %0.2f at (%0d C, %0d mV)",
             quad_max - quad_min, quad_min, quad_max, worst_quad, worst_quad_t, worst_quad_v);
    checks++; if (raw_max - raw_min < 2000.0) failures++;
    checks++; if (quad_max - quad_min > 100.0) failures++;
    checks++; if (!(quad_max - quad_min < lin_max - lin_min)) failures++;
    checks++; if (!(lin_max - lin_min < raw_max - raw_min)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
