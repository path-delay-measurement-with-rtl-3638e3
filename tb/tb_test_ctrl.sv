// tb_test_ctrl: self-checking test of the test controller with behavioural
// stand-ins for its neighbours: a BIST whose signature equals the reference
// while DLYC <= a chosen threshold, a sensor controller with a chosen
// latency and known counts, a host answering tv_req, a correction unit
// returning D_meas - 1000 ps, and a memory capturing record writes.
// Checks per measurement: one BIST session per DLYC from 0 up to the first
// failing code (or 255), DLYC raised by one per session, the measured delay
// T_CLK - DLYC_pass * RES computed exactly, the record words, D0 loading in
// init mode only, and the sensor wait both when the sensors finish before
// and after the sweep.
module tb_test_ctrl;
  timeunit 1ps; timeprecision 10fs;
  import tdm_pkg::*;

  localparam int N_RO = 12;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, init_mode = 1'b0, busy, done;
  delay_t tclk_ps = delay_t'(10000 * 256), res_ps = delay_t'(6042);
  dlyc_t dlyc;
  logic bist_start, bist_done = 1'b0;
  logic [31:0] bist_sig = '0;
  logic tvs_start, tvs_done = 1'b0;
  logic [N_RO-1:0][15:0] tvs_counts;
  logic tv_req, tv_valid = 1'b0;
  temp_t tv_temp = '0;
  volt_t tv_volt = '0;
  logic corr_valid, corr_done = 1'b0, d0_load;
  delay_t corr_meas, corr_d = '0, corr_aging = '0;
  temp_t corr_temp;
  volt_t corr_volt;
  logic mem_we;
  logic [7:0] mem_waddr;
  logic [31:0] mem_wdata;
  delay_t res_meas, res_corr, res_aging;
  dlyc_t res_dlyc_pass;
  logic res_all_pass;
  logic [15:0] meas_count;

  test_ctrl dut (.*);

  int checks = 0, failures = 0;
  int thresh, tvs_lat, sessions, n_d0, bad_step;
  int last_dlyc;
  logic [31:0] mem [256];
  localparam logic [31:0] REF = 32'hC0DE_1234;

  always #5000 clk = ~clk;

  for (genvar i = 0; i < N_RO; i++) begin : g_cnt
    assign tvs_counts[i] = 16'(1000 + 37 * i);
  end

  // BIST stand-in
  always @(posedge clk) if (bist_start) begin
    sessions++;
    if (int'(dlyc) != last_dlyc + 1) bad_step++;
    last_dlyc = int'(dlyc);
    fork begin
      repeat (10) @(posedge clk);
      #1 bist_sig = (int'(dlyc) <= thresh) ? REF : (REF ^ 32'(dlyc));
      bist_done = 1'b1;
      @(posedge clk); #1 bist_done = 1'b0;
    end join_none
  end
  // sensor stand-in
  always @(posedge clk) if (tvs_start) fork begin
    repeat (tvs_lat) @(posedge clk);
    #1 tvs_done = 1'b1;
    @(posedge clk); #1 tvs_done = 1'b0;
  end join_none
  // host answering the temperature/voltage request
  always @(posedge clk) if (tv_req && !tv_valid) fork begin
    repeat (3) @(posedge clk);
    #1 tv_valid = 1'b1; tv_temp = temp_t'(80 * 16); tv_volt = volt_t'(1050);
    @(posedge clk); #1 tv_valid = 1'b0;
  end join_none
  // correction stand-in
  always @(posedge clk) if (corr_valid) fork begin
    delay_t m;
    m = corr_meas;
    repeat (3) @(posedge clk);
    #1 corr_done = 1'b1; corr_d = m - delay_t'(1000 * 256); corr_aging = delay_t'(-7);
    @(posedge clk); #1 corr_done = 1'b0;
  end join_none
  always @(posedge clk) if (mem_we) mem[mem_waddr] <= mem_wdata;
  always @(posedge clk) if (d0_load) n_d0++;

  task automatic measure(input int th, input int lat, input bit init, input int rec);
    int exp_pass;
    longint exp_meas;
    thresh = th; tvs_lat = lat; sessions = 0; n_d0 = 0; bad_step = 0; last_dlyc = -1;
    @(negedge clk); start = 1'b1; init_mode = init;
    @(negedge clk); start = 1'b0;
    while (!done) @(posedge clk);
    @(negedge clk);
    exp_pass = (th > 255) ? 255 : th;
    exp_meas = 10000 * 256 - longint'(exp_pass) * 6042;
    checks++; if (sessions != ((th >= 255) ? 256 : th + 2)) begin failures++; $display("FAIL sessions %0d", sessions); end
    checks++; if (bad_step != 0) begin failures++; $display("FAIL DLYC steps"); end
    checks++; if (int'(res_dlyc_pass) != exp_pass) failures++;
    checks++; if (longint'(res_meas) != exp_meas) begin failures++; $display("FAIL meas %0d expected %0d", res_meas, exp_meas); end
    checks++; if (res_all_pass != (th >= 255)) failures++;
    checks++; if (longint'(res_corr) != exp_meas - 256000) failures++;
    checks++; if (res_aging != delay_t'(-7)) failures++;
    checks++; if (n_d0 != int'(init)) failures++;
    checks++; if (dlyc != '0) failures++;
    // record
    checks++; if (mem[rec*16+0] !== {14'd0, init, (th < 255), ((th < 255) ? 8'(th + 1) : 8'd0), 8'(exp_pass)}) begin
      failures++; $display("FAIL word0 %h", mem[rec*16]); end
    checks++; if (mem[rec*16+1] !== 32'(exp_meas)) failures++;
    checks++; if (mem[rec*16+2] !== 32'(exp_meas - 256000)) failures++;
    checks++; if (mem[rec*16+3] !== 32'hFFFF_FFF9) failures++;
    checks++; if (mem[rec*16+4] !== {16'(80 * 16), 16'd1050}) failures++;
    for (int i = 0; i < N_RO; i++) begin
      checks++;
      if (mem[rec*16 + 5 + i/2][16*(i%2) +: 16] !== 16'(1000 + 37 * i)) failures++;
    end
    checks++; if (int'(meas_count) != rec + 1) failures++;
  endtask

  initial begin
    #2_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    measure(163, 50, 1'b1, 0);     // sensors finish long before the sweep
    measure(5, 2000, 1'b0, 1);     // sweep finishes first, waits for sensors
    measure(0, 10, 1'b0, 2);       // fails right after the reference session
    measure(300, 10, 1'b0, 3);     // every code passes
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
