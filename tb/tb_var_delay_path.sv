// tb_var_delay_path: self-checking test of the variable delay path model.
// Drives a 10 ns clock through the path for a set of DLYC codes and measures
// the rising-edge delay with $realtime. Expected values are the stage delays
// of the clock generator's SPICE table (20.93, 46.65, ... 2999.02 ps) summed
// over the set bits, plus 8 mux delays of 10 ps; the 8-buffer-per-unit mode
// (USE_TABLE = 0) is checked against n * 23.60 ps. Tolerance 0.05 ps.
module tb_var_delay_path;
  timeunit 1ps; timeprecision 10fs;

  logic       clk = 1'b0;
  logic [7:0] sel_t, sel_u;
  logic       out_t, out_u;
  int checks = 0, failures = 0;
  realtime t_in, t_out_t, t_out_u;

  var_delay_path dut_t (.clk_in(clk), .sel(sel_t), .clk_out(out_t));
  var_delay_path #(.USE_TABLE(1'b0)) dut_u (.clk_in(clk), .sel(sel_u), .clk_out(out_u));

  real stage_tab [8] = '{20.93, 46.65, 92.40, 187.43, 378.43, 758.70, 1532.25, 2999.02};

  function automatic real expect_tab(input logic [7:0] s);
    real d = 80.0;
    for (int k = 0; k < 8; k++) if (s[k]) d += stage_tab[k];
    return d;
  endfunction

  task automatic check(input logic [7:0] s);
    sel_t = s; sel_u = s;
    #20000;                       // settle
    clk = 1'b1; t_in = $realtime;
    fork
      begin @(posedge out_t); t_out_t = $realtime; end
      begin @(posedge out_u); t_out_u = $realtime; end
    join
    #10000 clk = 1'b0;
    #10000;
    checks++;
    if (t_out_t - t_in > expect_tab(s) + 0.05 || t_out_t - t_in < expect_tab(s) - 0.05) begin
      failures++;
      $display("FAIL table dlyc=%08b delay=%0.2f expected %0.2f", s, t_out_t - t_in, expect_tab(s));
    end
    checks++;
    if (t_out_u - t_in > 80.0 + 23.60 * s + 0.05 || t_out_u - t_in < 80.0 + 23.60 * s - 0.05) begin
      failures++;
      $display("FAIL uniform dlyc=%0d delay=%0.2f", s, t_out_u - t_in);
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
    check(8'b0000_0000);
    check(8'b0000_0001);
    check(8'b0000_0011);
    check(8'b0111_1111);
    check(8'b1000_0000);
    check(8'b1111_1111);
    for (int i = 0; i < 10; i++) check(8'($urandom));
    // the 127 -> 128 step: longer code, shorter delay (separate layout)
    checks++;
    if (!(expect_tab(8'h80) < expect_tab(8'h7F))) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
