// tb_io_ctrl: self-checking test of the register interface. Checks the
// reset values (T0 = 60 C, V0 = 1200 mV, D0 = 6149.10 ps, the quadratic
// coefficients, 10 ns clock period, 23.60 ps resolution) in their fixed-point
// codes, write/read-back of every configuration register, the one-cycle
// start pulse, the sticky done flag, the result registers, D0 loading by the
// controller and reads of the test-memory window.
module tb_io_ctrl;
  timeunit 1ps; timeprecision 10fs;
  import tdm_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic bus_we = 1'b0, bus_re = 1'b0;
  logic [9:0] bus_addr = '0;
  logic [31:0] bus_wdata = '0, bus_rdata;
  logic start, init_mode;
  corr_cfg_t cfg;
  delay_t tclk_ps, res_ps;
  logic busy = 1'b0, done = 1'b0, tv_req = 1'b0, all_pass = 1'b0, d0_load = 1'b0;
  delay_t d0_value = '0, r_meas = '0, r_corr = '0, r_aging = '0;
  dlyc_t r_dlyc_pass = '0;
  logic [15:0] r_count = '0;
  logic [7:0] mem_raddr;
  logic [31:0] mem_rdata;
  int checks = 0, failures = 0, n_start = 0;

  io_ctrl dut (.*);

  always #5000 clk = ~clk;
  // memory stand-in: registered read returning a function of the address
  always_ff @(posedge clk) mem_rdata <= {24'hA5A5A5, mem_raddr} ^ 32'h0F0F_0000;
  always @(posedge clk) if (rst_n && start) n_start++;

  task automatic wr(input logic [9:0] a, input logic [31:0] d);
    @(negedge clk); bus_we = 1'b1; bus_addr = a; bus_wdata = d;
    @(negedge clk); bus_we = 1'b0;
  endtask
  task automatic rd_check(input logic [9:0] a, input logic [31:0] exp_d);
    @(negedge clk); bus_re = 1'b1; bus_addr = a;
    @(negedge clk); bus_re = 1'b0;
    checks++;
    if (bus_rdata !== exp_d) begin
      failures++;
      $display("FAIL read %h got %h expected %h", a, bus_rdata, exp_d);
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
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // reset values: round(x * 2^frac)
    rd_check(10'h004, 32'(temp_t'(960)));
    rd_check(10'h005, 32'd1200);
    rd_check(10'h006, 32'd1574170);           // 6149.10 * 256
    rd_check(10'h007, 32'd7096762);           // 6.768 * 2^20
    rd_check(10'h008, 32'd12583);             // 0.012 * 2^20
    rd_check(10'h009, 32'(-32'sd7682916));    // -7.327 * 2^20
    rd_check(10'h00A, 32'd19199);             // 0.01831 * 2^20
    rd_check(10'h002, 32'd2560000);           // 10000 ps
    rd_check(10'h003, 32'd6042);              // 23.60 ps
    rd_check(10'h000, 32'h4);                 // poly_en
    // write / read back
    for (int a = 2; a <= 10; a++) begin
      automatic logic [31:0] v = $urandom;
      automatic logic [31:0] e;
      wr(10'(a), v);
      case (a)
        4: e = 32'(temp_t'(v));
        5: e = 32'(volt_t'(v));
        2, 3, 6: e = 32'(delay_t'(v));
        default: e = v;
      endcase
      rd_check(10'(a), e);
    end
    // start pulse and modes
    wr(10'h000, 32'h3);
    @(negedge clk);
    checks++; if (n_start != 1) begin failures++; $display("FAIL start pulses %0d", n_start); end
    checks++; if (!init_mode || cfg.poly_en) begin failures++; $display("FAIL modes"); end
    rd_check(10'h000, 32'h2);
    // done is sticky until the next start
    @(negedge clk); done = 1'b1; busy = 1'b0; tv_req = 1'b1; all_pass = 1'b1;
    @(negedge clk); done = 1'b0;
    rd_check(10'h001, 32'hE);
    wr(10'h000, 32'h5);
    tv_req = 1'b0; all_pass = 1'b0; busy = 1'b1;
    rd_check(10'h001, 32'h1);
    // result registers
    r_meas = delay_t'(123456); r_corr = delay_t'(-5); r_aging = delay_t'(777);
    r_dlyc_pass = 8'd163; r_count = 16'd9;
    rd_check(10'h010, 32'd123456);
    rd_check(10'h011, 32'hFFFF_FFFB);
    rd_check(10'h012, 32'd777);
    rd_check(10'h013, 32'd163);
    rd_check(10'h014, 32'd9);
    // D0 from an init-mode measurement
    @(negedge clk); d0_value = delay_t'(1600000); d0_load = 1'b1;
    @(negedge clk); d0_load = 1'b0;
    rd_check(10'h006, 32'd1600000);
    // memory window
    for (int n = 0; n < 8; n++) begin
      automatic logic [7:0] m = 8'($urandom);
      rd_check({2'b10, m}, {24'hA5A5A5, m} ^ 32'h0F0F_0000);
    end
    rd_check(10'h0FF, 32'h0);                 // unmapped register
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
