// tb_tvs_ro: self-checking test of the ring-oscillator model. For several
// (temperature, voltage) points the measured period must equal
// P0*(1 + KT*(T-60) + KV*(V-1200)) within 0.1 ps; the output must stay low
// while disabled.
module tb_tvs_ro;
  timeunit 1ps; timeprecision 10fs;

  localparam real P0 = 2000.0, KT = 0.0010, KV = -0.0008;
  logic en = 1'b0;
  logic signed [31:0] temp_mc = 60000, volt_mv = 1200;
  logic ro_out;
  int checks = 0, failures = 0;
  realtime t1, t2;

  tvs_ro #(.P0_PS(P0), .KT(KT), .KV(KV)) dut (.en, .env_temp_mc(temp_mc),
                                              .env_volt_mv(volt_mv), .ro_out);

  task automatic check(input int t_mc, input int v_mv);
    real expect_p;
    temp_mc = t_mc; volt_mv = v_mv;
    #10;
    en = 1'b1;
    @(posedge ro_out); @(posedge ro_out); t1 = $realtime;
    @(posedge ro_out); t2 = $realtime;
    en = 1'b0;
    expect_p = P0 * (1.0 + KT * (real'(t_mc) / 1000.0 - 60.0) + KV * (real'(v_mv) - 1200.0));
    checks++;
    if (t2 - t1 > expect_p + 0.1 || t2 - t1 < expect_p - 0.1) begin
      failures++;
      $display("FAIL T=%0d V=%0d period %0.2f expected %0.2f", t_mc, v_mv, t2 - t1, expect_p);
    end
    #5000;
    checks++; if (ro_out !== 1'b0) failures++;
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    checks++; if (ro_out !== 1'b0) failures++;
    check(60000, 1200);
    check(30000, 1350);
    check(80000, 1050);
    check(45500, 1170);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
