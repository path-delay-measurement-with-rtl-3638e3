// tb_test_mem: self-checking test of the test memory. Writes every word,
// reads all back through the read port (one-cycle latency), then runs
// 2000 cycles of random simultaneous reads and writes against a reference
// array, including reads of the address being written (old data expected).
module tb_test_mem;
  timeunit 1ps; timeprecision 10fs;

  localparam int DEPTH = 256, W = 32;
  logic clk = 1'b0, we = 1'b0;
  logic [7:0] waddr = '0, raddr = '0;
  logic [W-1:0] wdata = '0, rdata;
  logic [W-1:0] ref_mem [DEPTH];
  logic [W-1:0] exp_q;
  int checks = 0, failures = 0;

  test_mem #(.DEPTH(DEPTH), .WIDTH(W)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  always #5000 clk = ~clk;

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1'b1; waddr = 8'(a); wdata = $urandom; ref_mem[a] = wdata;
    end
    @(negedge clk); we = 1'b0;
    for (int a = 0; a < DEPTH; a++) begin
      raddr = 8'(a);
      @(negedge clk);
      checks++; if (rdata !== ref_mem[a]) failures++;
    end
    for (int n = 0; n < 2000; n++) begin
      we = $urandom_range(0, 1);
      waddr = 8'($urandom);
      raddr = ($urandom_range(0, 3) == 0) ? waddr : 8'($urandom);
      wdata = $urandom;
      exp_q = ref_mem[raddr];
      @(posedge clk);
      if (we) ref_mem[waddr] = wdata;
      @(negedge clk);
      checks++;
      if (rdata !== exp_q) begin
        failures++;
        if (failures < 5) $display("FAIL n=%0d got %h expected %h", n, rdata, exp_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
