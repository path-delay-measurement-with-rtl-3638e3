// tb_tvs_ctrl: self-checking test of the TVS controller. Twelve gated test
// oscillators with known periods stand in for the ring oscillators; the
// controller runs a WIN = 200-cycle window of a 10 ns clock. Each count
// must be within one of 200*10000/period, ro_en must be high for exactly
// WIN cycles and done must come WIN + SETTLE + 2 cycles after start.
module tb_tvs_ctrl;
  timeunit 1ps; timeprecision 10fs;

  localparam int N = 12, WIN = 200, SETTLE = 4;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [N-1:0] ro_clk;
  logic ro_en, busy, done;
  logic [N-1:0][15:0] counts;
  int checks = 0, failures = 0;
  int en_cycles, cycles;
  real period [N];

  tvs_ctrl #(.N_RO(N), .WIN(WIN), .SETTLE(SETTLE)) dut (
    .clk, .rst_n, .start, .ro_clk, .ro_en, .busy, .done, .counts);

  always #5000 clk = ~clk;

  for (genvar i = 0; i < N; i++) begin : g_osc
    initial ro_clk[i] = 1'b0;
    always begin
      if (!ro_en) begin ro_clk[i] = 1'b0; wait (ro_en); end
      else #(period[i] / 2.0) ro_clk[i] = ~ro_clk[i];
    end
  end

  always @(posedge clk) if (ro_en) en_cycles++;

  task automatic run_and_check(input int round);
    en_cycles = 0; cycles = 0;
    for (int i = 0; i < N; i++) period[i] = 1500.0 + 97.3 * i + 211.0 * round;
    @(negedge clk); start = 1'b1;
    @(posedge clk); #1 start = 1'b0;
    while (!done) begin @(posedge clk); #1 cycles++; end
    checks++; if (cycles != WIN + SETTLE + 2) begin failures++; $display("FAIL cycles %0d", cycles); end
    checks++; if (en_cycles != WIN) begin failures++; $display("FAIL enable %0d", en_cycles); end
    for (int i = 0; i < N; i++) begin
      int exp_c = int'($floor(real'(WIN) * 10000.0 / period[i]));
      checks++;
      if (int'(counts[i]) < exp_c - 1 || int'(counts[i]) > exp_c + 1) begin
        failures++;
        $display("FAIL ro %0d count %0d expected %0d", i, counts[i], exp_c);
      end
    end
  endtask

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run_and_check(0);
    run_and_check(1);   // counters restart from zero
    @(negedge clk);
    checks++; if (busy || ro_en) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
