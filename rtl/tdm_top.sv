// tdm_top: on-chip path delay measurement with temperature and voltage
// correction (the test architecture placed beside the circuit under test).
//
// Blocks: the test controller (test_ctrl) sweeps the delay code DLYC of the
// variable test clock generator (test_clock_gen), whose launch clock TCLK_L
// and capture clock TCLK_C clock the scan flip-flops of the circuit under
// test during the logic BIST sessions (lbist: pattern generator, MISR and
// shift/launch/capture sequencing). In parallel the TVS controller
// (tvs_ctrl) counts the 3 ring oscillators of each of the 4 sensor units
// (tvs_ro). The measured delay, with the temperature and voltage obtained
// from the sensor counts, is corrected (tv_correct) and stored in the test
// memory (test_mem); a host sets up and reads everything through the
// register bus (io_ctrl).
// Outside this top: the circuit under test itself (its scan chains are the
// cut_* ports; it must use tclk_l for the launch and tclk_c for shift and
// capture cycles, as marked by the enables) and the calibration that turns
// sensor counts into temperature and voltage (tv_req / tv_valid handshake).
// env_temp_mc / env_volt_mv are the environment seen by the oscillator
// models. Sizes of the BIST and memory are this design's choices.
module tdm_top
  import tdm_pkg::*;
#(
  parameter int NCH        = 8,
  parameter int CHAIN_LEN  = 32,
  parameter int NPAT       = 64,
  parameter int N_TVS      = 4,
  parameter int RO_PER_TVS = 3,
  parameter int TVS_WIN    = 1024,
  parameter int CNT_W      = 16,
  parameter int MEM_DEPTH  = 256,
  localparam int N_RO      = N_TVS * RO_PER_TVS,
  localparam int MEM_AW    = $clog2(MEM_DEPTH)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // host register bus
  input  logic                       bus_we,
  input  logic                       bus_re,
  input  logic [9:0]                 bus_addr,
  input  logic [31:0]                bus_wdata,
  output logic [31:0]                bus_rdata,
  // scan access to the circuit under test
  output logic                       cut_tclk_l,
  output logic                       cut_tclk_c,
  output logic                       cut_scan_en,
  output logic                       cut_launch_en,
  output logic                       cut_capture_en,
  output logic [NCH-1:0]             cut_scan_in,
  input  logic [NCH-1:0]             cut_scan_out,
  // sensor counts out, temperature and voltage back
  output logic [N_RO-1:0][CNT_W-1:0] tvs_counts,
  output logic                       tv_req,
  input  logic                       tv_valid,
  input  temp_t                      tv_temp,
  input  volt_t                      tv_volt,
  // environment of the ring-oscillator models
  input  logic signed [31:0]         env_temp_mc,
  input  logic signed [31:0]         env_volt_mv
);
  timeunit 1ps; timeprecision 10fs;

  logic            start, init_mode, busy, done;
  corr_cfg_t       cfg;
  delay_t          tclk_ps, res_ps;
  dlyc_t           dlyc;
  logic            bist_start, bist_done, bist_busy;
  logic [31:0]     bist_sig;
  logic            tvs_start, tvs_done, tvs_busy, ro_en;
  logic [N_RO-1:0] ro_clk;
  logic            corr_in_valid, corr_out_valid, d0_load;
  delay_t          corr_meas, corr_d, corr_aging;
  temp_t           corr_temp;
  volt_t           corr_volt;
  logic            mem_we;
  logic [MEM_AW-1:0] mem_waddr, mem_raddr;
  logic [31:0]     mem_wdata, mem_rdata;
  delay_t          r_meas, r_corr, r_aging;
  dlyc_t           r_dlyc_pass;
  logic            r_all_pass;
  logic [15:0]     r_count;

  io_ctrl #(.MEM_AW(MEM_AW)) u_io (
    .clk, .rst_n, .bus_we, .bus_re, .bus_addr, .bus_wdata, .bus_rdata,
    .start, .init_mode, .cfg, .tclk_ps, .res_ps,
    .busy, .done, .tv_req, .all_pass(r_all_pass), .d0_load, .d0_value(r_meas),
    .r_meas, .r_corr, .r_aging, .r_dlyc_pass, .r_count,
    .mem_raddr, .mem_rdata);

  test_ctrl #(.N_RO(N_RO), .CNT_W(CNT_W), .MEM_AW(MEM_AW)) u_ctrl (
    .clk, .rst_n, .start, .init_mode, .tclk_ps, .res_ps, .busy, .done,
    .dlyc, .bist_start, .bist_done, .bist_sig,
    .tvs_start, .tvs_done, .tvs_counts, .tv_req, .tv_valid, .tv_temp, .tv_volt,
    .corr_valid(corr_in_valid), .corr_meas, .corr_temp, .corr_volt,
    .corr_done(corr_out_valid), .corr_d, .corr_aging, .d0_load,
    .mem_we, .mem_waddr, .mem_wdata,
    .res_meas(r_meas), .res_corr(r_corr), .res_aging(r_aging),
    .res_dlyc_pass(r_dlyc_pass), .res_all_pass(r_all_pass), .meas_count(r_count));

  test_clock_gen u_tclk (
    .clk, .dlyc, .tclk_l(cut_tclk_l), .tclk_c(cut_tclk_c));

  lbist #(.NCH(NCH), .CHAIN_LEN(CHAIN_LEN), .NPAT(NPAT)) u_lbist (
    .clk, .rst_n, .start(bist_start), .busy(bist_busy), .done(bist_done),
    .signature(bist_sig), .scan_en(cut_scan_en), .scan_in(cut_scan_in),
    .scan_out(cut_scan_out), .launch_en(cut_launch_en),
    .capture_en(cut_capture_en));

  tvs_ctrl #(.N_RO(N_RO), .CNT_W(CNT_W), .WIN(TVS_WIN)) u_tvs_ctrl (
    .clk, .rst_n, .start(tvs_start), .ro_clk, .ro_en, .busy(tvs_busy),
    .done(tvs_done), .counts(tvs_counts));

  // Four sensor units of three oscillators: one mostly temperature
  // sensitive, one mostly voltage sensitive, one sensitive to both.
  for (genvar u = 0; u < N_TVS; u++) begin : g_tvs
    tvs_ro #(.P0_PS(2000.0), .KT(0.0020), .KV(-0.0003)) u_ro_t (
      .en(ro_en), .env_temp_mc, .env_volt_mv, .ro_out(ro_clk[RO_PER_TVS*u]));
    tvs_ro #(.P0_PS(2200.0), .KT(0.0004), .KV(-0.0012)) u_ro_v (
      .en(ro_en), .env_temp_mc, .env_volt_mv, .ro_out(ro_clk[RO_PER_TVS*u+1]));
    tvs_ro #(.P0_PS(2400.0), .KT(0.0010), .KV(-0.0008)) u_ro_tv (
      .en(ro_en), .env_temp_mc, .env_volt_mv, .ro_out(ro_clk[RO_PER_TVS*u+2]));
  end

  tv_correct u_corr (
    .clk, .rst_n, .cfg, .in_valid(corr_in_valid), .d_meas(corr_meas),
    .temp(corr_temp), .volt(corr_volt), .out_valid(corr_out_valid),
    .d_corr(corr_d), .d_aging(corr_aging));

  test_mem #(.DEPTH(MEM_DEPTH), .WIDTH(32)) u_mem (
    .clk, .we(mem_we), .waddr(mem_waddr), .wdata(mem_wdata),
    .raddr(mem_raddr), .rdata(mem_rdata));

  initial assert (RO_PER_TVS == 3) else $error("tdm_top: each TVS unit has 3 oscillators");
endmodule
