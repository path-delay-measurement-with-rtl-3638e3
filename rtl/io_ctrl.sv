// io_ctrl: register interface of the measurement architecture (the debug
// I/O controller), through which a tester or host sets up a measurement and
// reads its results.
//
// A simple synchronous bus: bus_we writes bus_wdata to bus_addr; bus_re
// reads, and bus_rdata is valid in the following cycle. The test-memory
// read address is the low bus address bits, passed through without a
// register because the memory registers it itself. Word map (32 bit):
//   0x000 CTRL    W: bit0 start (pulse), bit1 init_mode, bit2 poly_en
//                 R: {poly_en, init_mode, 0}
//   0x001 STATUS  R: bit0 busy, bit1 done (sticky, cleared by start),
//                    bit2 tv_req, bit3 all DLYC passed
//   0x002 TCLK_PS system clock period, Q.8 ps
//   0x003 RES_PS  delay of one clock-generator buffer, Q.8 ps
//   0x004 T0      Q.4 C          0x005 V0  mV
//   0x006 D0      Q.8 ps (also loaded by an init-mode measurement)
//   0x007 A1 0x008 A2 0x009 B1 0x00A B2   Q.20 coefficients
//   0x010 D_MEAS 0x011 D_CORR 0x012 D_AGING (Q.8 ps)  0x013 DLYC_PASS
//   0x014 MEAS_COUNT
//   0x200 + n     test memory word n
// Reset values: T0 = 60 C, V0 = 1.20 V, D0 = 6149.10 ps and the quadratic
// coefficients of the method's test chip, clock period T_CLK_PS (this
// design's choice) and buffer delay 23.60 ps. The map, the bus and the
// reset clock period are this design's choices.
module io_ctrl
  import tdm_pkg::*;
#(
  parameter real T0_C     = 60.0,
  parameter int  V0_MV    = 1200,
  parameter real D0_PS    = 6149.10,
  parameter real A1       = 6.768,
  parameter real A2       = 0.012,
  parameter real B1       = -7.327,
  parameter real B2       = 0.01831,
  parameter real T_CLK_PS = 10000.0,
  parameter real RES_PS   = 23.60,
  parameter int  MEM_AW   = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  // host bus
  input  logic              bus_we,
  input  logic              bus_re,
  input  logic [9:0]        bus_addr,
  input  logic [31:0]       bus_wdata,
  output logic [31:0]       bus_rdata,
  // to the test controller and correction unit
  output logic              start,
  output logic              init_mode,
  output corr_cfg_t         cfg,
  output delay_t            tclk_ps,
  output delay_t            res_ps,
  // from the test controller
  input  logic              busy,
  input  logic              done,
  input  logic              tv_req,
  input  logic              all_pass,
  input  logic              d0_load,
  input  delay_t            d0_value,
  input  delay_t            r_meas,
  input  delay_t            r_corr,
  input  delay_t            r_aging,
  input  dlyc_t             r_dlyc_pass,
  input  logic [15:0]       r_count,
  // test memory read port
  output logic [MEM_AW-1:0] mem_raddr,
  input  logic [31:0]       mem_rdata
);
  timeunit 1ps; timeprecision 10fs;

  localparam temp_t  T0_RST  = temp_t'(int'(T0_C * 16.0));
  localparam delay_t D0_RST  = delay_t'(int'(D0_PS * 256.0));
  localparam coef_t  A1_RST  = coef_t'(int'(A1 * 1048576.0));
  localparam coef_t  A2_RST  = coef_t'(int'(A2 * 1048576.0));
  localparam coef_t  B1_RST  = coef_t'(int'(B1 * 1048576.0));
  localparam coef_t  B2_RST  = coef_t'(int'(B2 * 1048576.0));
  localparam delay_t TCK_RST = delay_t'(int'(T_CLK_PS * 256.0));
  localparam delay_t RES_RST = delay_t'(int'(RES_PS * 256.0));

  logic        done_flag;
  logic        rd_mem_q;
  logic [31:0] rd_reg_q;
  logic [31:0] rd_reg;

  assign mem_raddr = bus_addr[MEM_AW-1:0];
  assign bus_rdata = rd_mem_q ? mem_rdata : rd_reg_q;

  always_comb begin
    unique case (bus_addr)
      10'h000: rd_reg = {29'd0, cfg.poly_en, init_mode, 1'b0};
      10'h001: rd_reg = {28'd0, all_pass, tv_req, done_flag, busy};
      10'h002: rd_reg = 32'(tclk_ps);
      10'h003: rd_reg = 32'(res_ps);
      10'h004: rd_reg = 32'(cfg.t0);
      10'h005: rd_reg = 32'(cfg.v0);
      10'h006: rd_reg = 32'(cfg.d0);
      10'h007: rd_reg = cfg.a1;
      10'h008: rd_reg = cfg.a2;
      10'h009: rd_reg = cfg.b1;
      10'h00A: rd_reg = cfg.b2;
      10'h010: rd_reg = 32'(r_meas);
      10'h011: rd_reg = 32'(r_corr);
      10'h012: rd_reg = 32'(r_aging);
      10'h013: rd_reg = 32'(r_dlyc_pass);
      10'h014: rd_reg = 32'(r_count);
      default: rd_reg = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      start       <= 1'b0;
      init_mode   <= 1'b0;
      cfg.poly_en <= 1'b1;
      cfg.t0      <= T0_RST;
      cfg.v0      <= volt_t'(V0_MV);
      cfg.d0      <= D0_RST;
      cfg.a1      <= A1_RST;
      cfg.a2      <= A2_RST;
      cfg.b1      <= B1_RST;
      cfg.b2      <= B2_RST;
      tclk_ps     <= TCK_RST;
      res_ps      <= RES_RST;
      done_flag   <= 1'b0;
      rd_mem_q    <= 1'b0;
      rd_reg_q    <= '0;
    end else begin
      start <= 1'b0;
      if (done) done_flag <= 1'b1;
      if (d0_load) cfg.d0 <= d0_value;
      if (bus_we) begin
        unique case (bus_addr)
          10'h000: begin
            start       <= bus_wdata[0];
            init_mode   <= bus_wdata[1];
            cfg.poly_en <= bus_wdata[2];
            if (bus_wdata[0]) done_flag <= 1'b0;
          end
          10'h002: tclk_ps <= delay_t'(bus_wdata);
          10'h003: res_ps  <= delay_t'(bus_wdata);
          10'h004: cfg.t0  <= temp_t'(bus_wdata);
          10'h005: cfg.v0  <= volt_t'(bus_wdata);
          10'h006: cfg.d0  <= delay_t'(bus_wdata);
          10'h007: cfg.a1  <= bus_wdata;
          10'h008: cfg.a2  <= bus_wdata;
          10'h009: cfg.b1  <= bus_wdata;
          10'h00A: cfg.b2  <= bus_wdata;
          default: ;
        endcase
      end
      if (bus_re) begin
        rd_mem_q <= bus_addr[9];
        rd_reg_q <= rd_reg;
      end
    end
  end

  a_no_rw: assert property (@(posedge clk) disable iff (!rst_n) !(bus_we && bus_re))
    else $error("io_ctrl: read and write in the same cycle");
endmodule
