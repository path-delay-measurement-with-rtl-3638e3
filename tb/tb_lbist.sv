// tb_lbist: self-checking test of one logic BIST session.
// A small scan circuit model (NCH chains of CHAIN_LEN flip-flops; a
// functional clock maps every bit to itself XOR a neighbour bit) is
// driven by the block. The expected signature is computed independently:
// a reference LFSR gives the patterns, the model function is applied twice
// (launch, capture) and the unloaded bits are compacted by a reference
// MISR. Also checked: session length NPAT*(CHAIN_LEN+2)+CHAIN_LEN+1 cycles,
// NPAT launch and capture cycles, identical signature on a repeated
// session, and a different signature when one captured bit is corrupted.
module tb_lbist;
  timeunit 1ps; timeprecision 10fs;

  localparam int NCH = 4, L = 8, NPAT = 5;
  localparam logic [31:0] SEED = 32'h1ACE_B00C;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic busy, done, scan_en, launch_en, capture_en;
  logic [31:0] signature;
  logic [NCH-1:0] scan_in, scan_out;
  int checks = 0, failures = 0;
  int n_launch, n_capture, cycles;
  bit inject = 1'b0;

  lbist #(.NCH(NCH), .CHAIN_LEN(L), .NPAT(NPAT)) dut (
    .clk, .rst_n, .start, .busy, .done, .signature, .scan_en, .scan_in,
    .scan_out, .launch_en, .capture_en);

  always #5000 clk = ~clk;

  // scan circuit model
  logic [L-1:0] ch [NCH];
  function automatic void apply_f(ref logic [L-1:0] c [NCH]);
    logic [L-1:0] n [NCH];
    for (int i = 0; i < NCH; i++)
      for (int j = 0; j < L; j++)
        n[i][j] = c[i][j] ^ c[(i + 1) % NCH][(j + 1) % L];
    c = n;
  endfunction
  always_ff @(posedge clk) begin
    if (scan_en) for (int i = 0; i < NCH; i++) ch[i] <= {ch[i][L-2:0], scan_in[i]};
    else if (launch_en || capture_en) begin
      logic [L-1:0] t [NCH];
      t = ch;
      apply_f(t);
      if (capture_en && inject && n_capture == 2) t[1][3] = ~t[1][3];
      ch <= t;
    end
  end
  always_comb for (int i = 0; i < NCH; i++) scan_out[i] = ch[i][L-1];

  always @(posedge clk) begin
    if (launch_en) n_launch++;
    if (capture_en) n_capture++;
  end

  // reference
  function automatic logic [31:0] expected_sig();
    logic [31:0] lfsr = SEED, misr = '0;
    logic [L-1:0] c [NCH];
    for (int p = 0; p <= NPAT; p++) begin
      for (int s = 0; s < L; s++) begin
        if (p > 0) begin
          logic [NCH-1:0] o;
          for (int i = 0; i < NCH; i++) o[i] = c[i][L-1];
          misr = {misr[30:0], 1'b0} ^ (misr[31] ? 32'h0040_0007 : 32'h0) ^ 32'(o);
        end
        for (int i = 0; i < NCH; i++) c[i] = {c[i][L-2:0], lfsr[i]};
        lfsr = {lfsr[30:0], lfsr[31] ^ lfsr[21] ^ lfsr[1] ^ lfsr[0]};
      end
      if (p < NPAT) begin apply_f(c); apply_f(c); end
    end
    return misr;
  endfunction

  task automatic run_session();
    n_launch = 0; n_capture = 0; cycles = 0;
    @(negedge clk); start = 1'b1;
    @(posedge clk); #1 start = 1'b0;
    while (!done) begin @(posedge clk); #1 cycles++; end
  endtask

  logic [31:0] sig1, exp_sig;

  initial begin
    #200_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NCH; i++) ch[i] = L'($urandom);
    exp_sig = expected_sig();
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    run_session();
    sig1 = signature;
    checks++; if (sig1 !== exp_sig) begin failures++; $display("FAIL sig %h expected %h", sig1, exp_sig); end
    checks++; if (cycles != NPAT * (L + 2) + L + 1) begin failures++; $display("FAIL cycles %0d", cycles); end
    checks++; if (n_launch != NPAT || n_capture != NPAT) failures++;
    @(negedge clk);
    checks++; if (busy) failures++;
    // same patterns again: same signature, whatever the chains held
    for (int i = 0; i < NCH; i++) ch[i] = L'($urandom);
    run_session();
    checks++; if (signature !== sig1) begin failures++; $display("FAIL repeat %h", signature); end
    // a wrong captured bit must show up
    inject = 1'b1;
    run_session();
    checks++; if (signature === sig1) begin failures++; $display("FAIL corruption not detected"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
