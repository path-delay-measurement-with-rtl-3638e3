// test_clock_gen: behavioural model of the variable test clock generator.
//
// The system clock CLK feeds two delay paths of identical structure. The
// controllable path, steered by DLYC, drives the launch clock TCLK_L; the
// uncontrollable path has all its selects tied to 0 and drives the capture
// clock TCLK_C. A launch edge in one CLK cycle and the capture edge in the
// next are therefore separated by
//     T_CLK - delay(DLYC),
// so raising DLYC shortens the test interval, i.e. makes the test clock
// faster, in steps of one buffer delay (about 23.6 ps).
// Interface: clk in, dlyc in (change only while no test is running),
// tclk_l / tclk_c out. Not synthesizable: the delays are modelled.
module test_clock_gen
  import tdm_pkg::*;
#(
  parameter real BUF_PS    = 23.60,
  parameter real MUX_PS    = 10.0,
  parameter bit  USE_TABLE = 1'b1
) (
  input  logic  clk,
  input  dlyc_t dlyc,
  output logic  tclk_l,
  output logic  tclk_c
);
  timeunit 1ps; timeprecision 10fs;

  var_delay_path #(.NSTAGE(DLYC_W), .BUF_PS(BUF_PS), .MUX_PS(MUX_PS),
                   .USE_TABLE(USE_TABLE)) u_ctrl_path (
    .clk_in(clk), .sel(dlyc), .clk_out(tclk_l));

  var_delay_path #(.NSTAGE(DLYC_W), .BUF_PS(BUF_PS), .MUX_PS(MUX_PS),
                   .USE_TABLE(USE_TABLE)) u_fixed_path (
    .clk_in(clk), .sel('0), .clk_out(tclk_c));
endmodule
