// ro_counter: free-running event counter clocked by one ring oscillator of
// the temperature and voltage sensor, with an asynchronous clear from the
// system-clock domain. Used by tvs_ctrl, which reads the count only after
// the oscillator has been stopped. Wraps at 2^CNT_W.
module ro_counter #(
  parameter int CNT_W = 16
) (
  input  logic             ro_clk,
  input  logic             clr,
  output logic [CNT_W-1:0] count
);
  timeunit 1ps; timeprecision 10fs;

  always_ff @(posedge ro_clk or posedge clr) begin
    if (clr) count <= '0;
    else     count <= count + 1'b1;
  end
endmodule
