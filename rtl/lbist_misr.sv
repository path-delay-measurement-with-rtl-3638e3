// lbist_misr: response analyser of the logic BIST, a 32-bit multiple-input
// signature register.
//
// Each enabled clock the register shifts left, folds its top bit back with
// the feedback polynomial x^32 + x^22 + x^2 + x + 1 (Galois form) and XORs
// the NCH scan-chain outputs into its low bits. `clear` zeroes it at the start
// of a session. Two sessions whose responses differ in any bit almost surely
// end with different signatures. Polynomial and width are this design's
// choices. Timing: one compaction per enabled clock; signature is the state.
module lbist_misr #(
  parameter int NCH = 8
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           clear,
  input  logic           en,
  input  logic [NCH-1:0] din,
  output logic [31:0]    signature
);
  timeunit 1ps; timeprecision 10fs;

  localparam logic [31:0] POLY = 32'h0040_0007;

  logic [31:0] din_ext;
  assign din_ext = 32'(din);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     signature <= '0;
    else if (clear) signature <= '0;
    else if (en)    signature <= {signature[30:0], 1'b0}
                                 ^ (signature[31] ? POLY : 32'h0) ^ din_ext;
  end

  initial assert (NCH >= 1 && NCH <= 32) else $error("lbist_misr: NCH must be 1..32");
endmodule
