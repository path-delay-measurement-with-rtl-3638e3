// var_delay_path: behavioural model of the variable delay path of the test
// clock generator (an analog timing element, not synthesizable logic).
//
// The path is a cascade of NSTAGE stages. Stage k holds a chain of 2^k
// buffers and a 2:1 multiplexer: sel[k] = 1 sends the clock through the
// chain, sel[k] = 0 bypasses it, so the added delay is binary weighted in
// the code sel (DLYC). Each mux adds MUX_PS in either position.
// With USE_TABLE = 1 a stage's delay is the simulated value of that stage
// (tdm_pkg::stage_delay_ps), including the faster per-buffer delay of the
// separately laid-out 128-buffer stage; with USE_TABLE = 0 every buffer
// adds BUF_PS (23.60 ps, the average buffer delay at 60 C, 1.20 V).
// The mux delay is this model's choice; it is the same in both paths of the
// clock generator and cancels in the launch-to-capture interval.
// Interface: clk_in in, sel static while the clock runs, clk_out out.
// The model evaluates the path as a whole: the delay of the selected stages
// is summed once per select change and every clock edge is delayed by it.
// Timing: clk_out follows clk_in after NSTAGE*MUX_PS + sum of selected
// stage delays (transport of each edge).
module var_delay_path
  import tdm_pkg::*;
#(
  parameter int  NSTAGE    = 8,
  parameter real BUF_PS    = 23.60,
  parameter real MUX_PS    = 10.0,
  parameter bit  USE_TABLE = 1'b1
) (
  input  logic              clk_in,
  input  logic [NSTAGE-1:0] sel,
  output logic              clk_out
);
  timeunit 1ps; timeprecision 10fs;

  // Delay of the path for the present select code: every stage adds its
  // mux delay, and its buffer chain when selected.
  function automatic real chain_ps(input int k);
    return (USE_TABLE && k < 8) ? stage_delay_ps(k) : BUF_PS * real'(2 ** k);
  endfunction

  real path_ps;
  always_comb begin
    path_ps = 0.0;
    for (int k = 0; k < NSTAGE; k++)
      path_ps += MUX_PS + (sel[k] ? chain_ps(k) : 0.0);
  end

  // each clock edge travels the whole path (transport delay): the value
  // and the delay are taken when the edge enters
  initial clk_out = 1'b0;
  always @(clk_in) begin
    automatic logic v = clk_in;
    automatic real  d = path_ps;
    fork
      begin
        #(d) clk_out = v;
      end
    join_none
  end

endmodule
