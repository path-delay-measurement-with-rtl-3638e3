// tb_lbist_misr: self-checking test of the LBIST signature register.
// The reference computes each next-state bit from the feedback tap list
// (x^32 + x^22 + x^2 + x + 1): bit i = old bit i-1, XOR old bit 31 where
// the polynomial has a term x^i, XOR input bit i. Random inputs and enables
// for 2000 cycles, a clear in the middle; also checks that a single flipped
// input bit changes the final signature.
module tb_lbist_misr;
  timeunit 1ps; timeprecision 10fs;

  localparam int NCH = 8;
  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, en = 1'b0;
  logic [NCH-1:0] din = '0;
  logic [31:0] signature, ref_sig;
  int checks = 0, failures = 0;
  int poly_terms [3] = '{22, 2, 1};

  lbist_misr #(.NCH(NCH)) dut (.clk, .rst_n, .clear, .en, .din, .signature);

  always #5000 clk = ~clk;

  function automatic logic [31:0] ref_next(input logic [31:0] s, input logic [NCH-1:0] d);
    logic [31:0] n;
    for (int i = 0; i < 32; i++) begin
      n[i] = (i == 0) ? s[31] : s[i-1];       // x^0 term of the polynomial
      foreach (poly_terms[t]) if (poly_terms[t] == i) n[i] ^= s[31];
      if (i < NCH) n[i] ^= d[i];
    end
    return n;
  endfunction

  logic [31:0] sig_a;
  logic [NCH-1:0] seq [64];

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_sig = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      en = ($urandom_range(0, 4) != 0);
      clear = (n == 700);
      din = NCH'($urandom);
      @(posedge clk);
      if (clear) ref_sig = '0;
      else if (en) ref_sig = ref_next(ref_sig, din);
      #1;
      checks++;
      if (signature !== ref_sig) begin
        failures++;
        if (failures < 5) $display("FAIL n=%0d got %h expected %h", n, signature, ref_sig);
      end
    end
    // one flipped bit in a 64-word stream must change the signature
    foreach (seq[i]) seq[i] = NCH'($urandom);
    for (int pass = 0; pass < 2; pass++) begin
      @(negedge clk); clear = 1'b1; en = 1'b0;
      @(negedge clk); clear = 1'b0; en = 1'b1;
      for (int i = 0; i < 64; i++) begin
        din = seq[i] ^ ((pass == 1 && i == 17) ? NCH'(1 << 3) : '0);
        @(negedge clk);
      end
      en = 1'b0;
      if (pass == 0) sig_a = signature;
    end
    checks++;
    if (signature == sig_a) begin failures++; $display("FAIL single-bit error not detected"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
