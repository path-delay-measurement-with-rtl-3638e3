// cut_scan_model: behavioural model of a scan-testable circuit under test
// with one timed critical path, for simulation of the measurement
// architecture.
//
// NCH scan chains of CHAIN_LEN flip-flops. Shift cycles (scan_en) and
// capture cycles (capture_en) are clocked by tclk_c, the launch cycle
// (launch_en) by tclk_l. The functional next state of bit (i, j) is
// bit (i, j) XOR bit (i+1, j+1). All paths are fast except the one into
// bit (0, 0), whose delay is crit_ps_x100 / 100 ps: when the capture edge
// comes less than that after the launch edge, bit (0, 0) captures the value
// its input had before the launched transition arrived. That wrong value
// differs from the right one only when bit (1, 1) was 1 after launch, i.e.
// when the pattern sensitizes the path. n_late counts such late captures.
module cut_scan_model #(
  parameter int NCH       = 8,
  parameter int CHAIN_LEN = 32
) (
  input  logic           tclk_l,
  input  logic           tclk_c,
  input  logic           scan_en,
  input  logic           launch_en,
  input  logic           capture_en,
  input  logic [NCH-1:0] scan_in,
  output logic [NCH-1:0] scan_out,
  input  int             crit_ps_x100,
  output int             n_late
);
  timeunit 1ps; timeprecision 10fs;

  localparam int L = CHAIN_LEN;
  logic [L-1:0] ch [NCH];
  realtime t_launch;

  function automatic void next_state(ref logic [L-1:0] c [NCH]);
    logic [L-1:0] n [NCH];
    for (int i = 0; i < NCH; i++)
      for (int j = 0; j < L; j++)
        n[i][j] = c[i][j] ^ c[(i + 1) % NCH][(j + 1) % L];
    c = n;
  endfunction

  initial begin
    n_late = 0;
    for (int i = 0; i < NCH; i++) ch[i] = '0;
  end

  always @(posedge tclk_l) if (launch_en) begin
    logic [L-1:0] t [NCH];
    t = ch;
    next_state(t);
    ch <= t;
    t_launch = $realtime;
  end

  always @(posedge tclk_c) begin
    if (scan_en) begin
      for (int i = 0; i < NCH; i++) ch[i] <= {ch[i][L-2:0], scan_in[i]};
    end else if (capture_en) begin
      logic [L-1:0] t [NCH];
      logic stale;
      stale = ch[0][0];                 // input of bit (0,0) before the transition
      t = ch;
      next_state(t);
      if (($realtime - t_launch) * 100.0 < real'(crit_ps_x100)) begin
        if (t[0][0] != stale) n_late++;
        t[0][0] = stale;
      end
      ch <= t;
    end
  end

  always_comb for (int i = 0; i < NCH; i++) scan_out[i] = ch[i][L-1];
endmodule
