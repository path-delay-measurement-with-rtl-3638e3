// lbist: one scan-based logic BIST session in launch-off-capture manner.
//
// On `start` the pattern generator is reseeded and the signature cleared, so
// every session applies the same NPAT pseudo-random patterns. Each pattern
// is shifted into the NCH scan chains of the circuit under test during
// CHAIN_LEN cycles with scan_en = 1, while the response of the previous
// pattern is shifted out into the MISR (not for the first pattern, whose
// chains hold no response yet). Then one cycle with launch_en = 1 lets the
// launch clock (TCLK_L) fire the launch transition, and one cycle with
// capture_en = 1 lets the capture clock (TCLK_C) capture the response.
// After the last capture a final CHAIN_LEN-cycle unload completes the
// signature and `done` pulses for one cycle; `signature` then holds until
// the next start. Which clock edge the circuit under test uses in which
// cycle is the business of its clock gating: this block only marks the
// cycles. The sequencing and sizes are this design's choices.
// Timing: start to done = NPAT*(CHAIN_LEN+2) + CHAIN_LEN + 1 cycles.
module lbist #(
  parameter int NCH       = 8,
  parameter int CHAIN_LEN = 32,
  parameter int NPAT      = 64
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  output logic           busy,
  output logic           done,
  output logic [31:0]    signature,
  // scan interface of the circuit under test
  output logic           scan_en,
  output logic [NCH-1:0] scan_in,
  input  logic [NCH-1:0] scan_out,
  output logic           launch_en,
  output logic           capture_en
);
  timeunit 1ps; timeprecision 10fs;

  typedef enum logic [2:0] {S_IDLE, S_INIT, S_SHIFT, S_LAUNCH, S_CAPTURE} state_t;
  state_t state;

  localparam int SW = $clog2(CHAIN_LEN + 1);
  localparam int PW = $clog2(NPAT + 1);

  logic [SW-1:0] shift_cnt;
  logic [PW-1:0] pat_cnt;     // patterns loaded so far
  logic          first;       // chains hold no response yet
  logic          tpg_load, tpg_step, misr_clear, misr_en;

  lbist_tpg #(.NCH(NCH)) u_tpg (
    .clk, .rst_n, .load(tpg_load), .step(tpg_step),
    .chain_in(scan_in));

  lbist_misr #(.NCH(NCH)) u_misr (
    .clk, .rst_n, .clear(misr_clear), .en(misr_en),
    .din(scan_out), .signature(signature));

  assign scan_en    = (state == S_SHIFT);
  assign launch_en  = (state == S_LAUNCH);
  assign capture_en = (state == S_CAPTURE);
  assign busy       = (state != S_IDLE);
  assign tpg_load   = (state == S_INIT);
  assign misr_clear = (state == S_INIT);
  assign tpg_step   = (state == S_SHIFT);
  assign misr_en    = (state == S_SHIFT) && !first;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      shift_cnt <= '0;
      pat_cnt   <= '0;
      first     <= 1'b1;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) state <= S_INIT;
        S_INIT: begin
          shift_cnt <= '0;
          pat_cnt   <= '0;
          first     <= 1'b1;
          state     <= S_SHIFT;
        end
        S_SHIFT: begin
          if (shift_cnt == SW'(CHAIN_LEN - 1)) begin
            shift_cnt <= '0;
            if (pat_cnt == PW'(NPAT)) begin
              state <= S_IDLE;        // final unload finished
              done  <= 1'b1;
            end else begin
              pat_cnt <= pat_cnt + 1'b1;
              state   <= S_LAUNCH;
            end
          end else begin
            shift_cnt <= shift_cnt + 1'b1;
          end
        end
        S_LAUNCH:  state <= S_CAPTURE;
        S_CAPTURE: begin
          first <= 1'b0;
          state <= S_SHIFT;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // launch is always followed by capture in the next cycle
  a_launch_capture: assert property (@(posedge clk) disable iff (!rst_n)
                                     launch_en |=> capture_en);

  initial assert (CHAIN_LEN >= 1 && NPAT >= 1) else $error("lbist: bad size");
endmodule
