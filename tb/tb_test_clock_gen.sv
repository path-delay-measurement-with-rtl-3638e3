// tb_test_clock_gen: self-checking test of the variable test clock
// generator model. A 10 ns system clock runs; for several DLYC codes the
// test measures the interval from a TCLK_L rising edge to the next TCLK_C
// rising edge and compares it with 10000 ps minus the selected stage delays
// (stage values from the clock generator's SPICE table). With DLYC = 0 the
// two clocks coincide in phase (interval = one period).
module tb_test_clock_gen;
  timeunit 1ps; timeprecision 10fs;

  logic       clk = 1'b0;
  logic [7:0] dlyc = '0;
  logic       tclk_l, tclk_c;
  int checks = 0, failures = 0;
  realtime t_l, t_c;

  test_clock_gen dut (.clk, .dlyc, .tclk_l, .tclk_c);

  always #5000 clk = ~clk;

  real stage_tab [8] = '{20.93, 46.65, 92.40, 187.43, 378.43, 758.70, 1532.25, 2999.02};

  function automatic real expect_int(input logic [7:0] s);
    real d = 10000.0;
    for (int k = 0; k < 8; k++) if (s[k]) d -= stage_tab[k];
    return d;
  endfunction

  task automatic check(input logic [7:0] s);
    @(negedge clk); dlyc = s;
    repeat (2) @(posedge clk);
    @(posedge tclk_l); t_l = $realtime;
    @(posedge tclk_c); t_c = $realtime;
    checks++;
    if (t_c - t_l > expect_int(s) + 0.05 || t_c - t_l < expect_int(s) - 0.05) begin
      failures++;
      $display("FAIL dlyc=%08b interval=%0.2f expected %0.2f", s, t_c - t_l, expect_int(s));
    end
  endtask

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(8'd1);
    check(8'd2);
    check(8'd127);
    check(8'd128);
    check(8'd163);
    check(8'd255);
    for (int i = 0; i < 10; i++) check(8'($urandom_range(1, 255)));
    // capture clock lags the system clock by the 8 mux delays only
    @(posedge clk); t_l = $realtime;
    @(posedge tclk_c); t_c = $realtime;
    checks++;
    if (t_c - t_l > 80.05 || t_c - t_l < 79.95) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
