// tb_lbist_tpg: self-checking test of the LBIST pattern generator.
// A reference LFSR (x^32 + x^22 + x^2 + x + 1, computed bit by bit from the
// tap list) runs beside the block; after load and over 2000 random
// step/hold cycles the 32 chain inputs must equal the reference state.
module tb_lbist_tpg;
  timeunit 1ps; timeprecision 10fs;

  localparam logic [31:0] SEED = 32'h1ACE_B00C;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, step = 1'b0;
  logic [31:0] chain_in, ref_state;
  int checks = 0, failures = 0;
  int taps [4] = '{32, 22, 2, 1};

  lbist_tpg #(.NCH(32), .SEED(SEED)) dut (.clk, .rst_n, .load, .step, .chain_in);

  always #5000 clk = ~clk;

  function automatic logic [31:0] ref_next(input logic [31:0] s);
    logic fb = 1'b0;
    foreach (taps[i]) fb ^= s[taps[i] - 1];
    return {s[30:0], fb};
  endfunction

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_state = SEED;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    checks++; if (chain_in !== SEED) failures++;
    for (int n = 0; n < 2000; n++) begin
      step = ($urandom_range(0, 3) != 0);
      load = (n == 1000);
      @(posedge clk);
      if (load) ref_state = SEED;
      else if (step) ref_state = ref_next(ref_state);
      @(negedge clk);
      checks++;
      if (chain_in !== ref_state) begin
        failures++;
        if (failures < 5) $display("FAIL n=%0d got %h expected %h", n, chain_in, ref_state);
      end
      checks++; if (chain_in == 32'h0) failures++;   // never locks up
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
