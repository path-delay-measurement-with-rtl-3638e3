// tvs_ro: behavioural model of one ring oscillator of a temperature and
// voltage sensor (an analog element, not synthesizable logic).
//
// While `en` is high the output toggles with the period
//   P = P0_PS * (1 + KT*(T - 60 C) + KV*(V - 1200 mV)),
// the first-order dependence of an inverter ring on temperature and supply.
// Each TVS unit holds three oscillators of different sensitivities, so that
// their counts can be solved for temperature and voltage. The linear law
// and the sensitivity values are this model's assumptions. While `en` is
// low the output rests at 0.
// Interface: en in; env_temp_mc (milli-degrees C) and env_volt_mv (mV) are
// the environment the model sees; ro_out out.
module tvs_ro #(
  parameter real P0_PS = 2000.0,
  parameter real KT    = 0.0010,
  parameter real KV    = -0.0008
) (
  input  logic               en,
  input  logic signed [31:0] env_temp_mc,
  input  logic signed [31:0] env_volt_mv,
  output logic               ro_out
);
  timeunit 1ps; timeprecision 10fs;

  real half_ps;
  always_comb
    half_ps = 0.5 * P0_PS * (1.0 + KT * (real'(env_temp_mc) / 1000.0 - 60.0)
                                 + KV * (real'(env_volt_mv) - 1200.0));

  initial ro_out = 1'b0;
  always begin
    if (!en) begin
      ro_out = 1'b0;
      wait (en);
    end else begin
      #(half_ps) ro_out = ~ro_out;
    end
  end
endmodule
