// lbist_tpg: test pattern generator of the logic BIST (pseudo-random
// pattern generator).
//
// A 32-bit Fibonacci LFSR with the primitive polynomial
// x^32 + x^22 + x^2 + x + 1 (maximal length). `load` sets the state to SEED,
// so every BIST session applies exactly the same pattern sequence; `step`
// advances it by one. The NCH low state bits drive the NCH scan-chain inputs.
// The polynomial, width and seed are this design's choices.
// Timing: chain_in reflects the current state; a step takes one clock.
module lbist_tpg #(
  parameter int          NCH  = 8,
  parameter logic [31:0] SEED = 32'h1ACE_B00C
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           load,
  input  logic           step,
  output logic [NCH-1:0] chain_in
);
  timeunit 1ps; timeprecision 10fs;

  logic [31:0] state;
  logic        feedback;
  assign feedback = state[31] ^ state[21] ^ state[1] ^ state[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    state <= SEED;
    else if (load) state <= SEED;
    else if (step) state <= {state[30:0], feedback};
  end

  assign chain_in = state[NCH-1:0];

  initial assert (NCH >= 1 && NCH <= 32) else $error("lbist_tpg: NCH must be 1..32");
  initial assert (SEED != 32'h0) else $error("lbist_tpg: SEED must be non-zero");
endmodule
