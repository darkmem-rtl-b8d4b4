// darkmem_unit: one DARKMEM unit, the power-managed storage of one data
// structure (array) of the accelerator's private local memory.
//
// Inside: NBANKS dual-rail SRAM banks of BANK_DEPTH x WIDTH, a data
// controller that maps the logical address onto the banks, a scenario memory
// controller (SMC) that masks the banks a configuration never uses, and an
// operating mode controller (OMC) that switches the banks between active,
// deep-sleep and idle on request of the accelerator. Per bank the two power
// pins are the OR of the SMC mask bit and the OMC pin, so a masked bank is
// fully gated whatever the OMC does, and an unmasked bank follows the OMC.
// The cell supply comes from a voltage controller outside the unit: the
// unit asks for retention voltage on vc_low and is told on vdd_ok when the
// supply is at nominal (tie vdd_ok to 1 without a voltage controller).
//
// Interfaces:
//   data port  ce/we/addr/wdata, rdata one cycle after a read
//   power port pm_mode/pm_valid/pm_ready, see omc
//   config     cfg_start pulse with cfg_value at the start of an execution
// The structure (SRAM banks, data controller, SMC, OMC, OR gates, link to a
// voltage controller) follows the document. One OMC for all banks of the
// unit and the port protocol are this design's choices.
module darkmem_unit
  import darkmem_pkg::*;
#(
  parameter int unsigned WIDTH      = 32,
  parameter int unsigned BANK_DEPTH = 1024,
  parameter int unsigned NBANKS     = 2,
  parameter int unsigned CFG_W      = 16,
  parameter int unsigned NUM_SCEN   = 1,
  parameter logic [NUM_SCEN-1:0][CFG_W-1:0]  SCEN_CFG_MAX = {CFG_W'(1024)},
  parameter logic [NUM_SCEN-1:0][NBANKS-1:0] SCEN_MASK    = {NBANKS'(2'b10)},
  parameter int unsigned PG_LAT     = 10,
  parameter int unsigned VC_LAT     = 64,
  parameter bit          USE_VC     = 1'b1,
  parameter bit          DUAL_RAIL  = 1'b1,
  localparam int unsigned AW = $clog2(NBANKS * BANK_DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  // configuration
  input  logic              cfg_start,
  input  logic [CFG_W-1:0]  cfg_value,
  // data port (Data Ctrl)
  input  logic              ce,
  input  logic              we,
  input  logic [AW-1:0]     addr,
  input  logic [WIDTH-1:0]  wdata,
  output logic [WIDTH-1:0]  rdata,
  // power port (Power Ctrl)
  input  pmode_e            pm_mode,
  input  logic              pm_valid,
  output logic              pm_ready,
  // voltage controller link
  output logic              vc_low,
  input  logic              vdd_ok,
  // status
  output logic [NBANKS-1:0] bank_pgl,
  output logic [NBANKS-1:0] bank_pgm,
  output logic [NBANKS-1:0] mask,
  output logic [7:0]        scen,
  output pmode_e            cur_mode
);

  localparam int unsigned BAW = $clog2(BANK_DEPTH);

  logic [NBANKS-1:0]            b_ce;
  logic                         b_we;
  logic [BAW-1:0]               b_addr;
  logic [WIDTH-1:0]             b_wdata;
  logic [NBANKS-1:0][WIDTH-1:0] b_rdata;
  logic                         omc_pgl, omc_pgm, omc_busy;

  data_ctrl #(.WIDTH(WIDTH), .NBANKS(NBANKS), .BANK_DEPTH(BANK_DEPTH)) u_data_ctrl (
    .clk, .ce, .we, .addr, .wdata, .rdata,
    .bank_ce(b_ce), .bank_we(b_we), .bank_addr(b_addr),
    .bank_wdata(b_wdata), .bank_rdata(b_rdata)
  );

  smc #(.CFG_W(CFG_W), .NBANKS(NBANKS), .NUM_SCEN(NUM_SCEN),
        .SCEN_CFG_MAX(SCEN_CFG_MAX), .SCEN_MASK(SCEN_MASK)) u_smc (
    .clk, .rst_n, .cfg_start, .cfg_value, .mask, .scen
  );

  omc #(.PG_LAT(PG_LAT), .VC_LAT(VC_LAT), .USE_VC(USE_VC), .DUAL_RAIL(DUAL_RAIL)) u_omc (
    .clk, .rst_n, .req_mode(pm_mode), .req_valid(pm_valid), .req_ready(pm_ready),
    .pgl(omc_pgl), .pgm(omc_pgm), .vc_low, .cur_mode, .busy(omc_busy)
  );

  for (genvar i = 0; i < NBANKS; i++) begin : g_bank
    assign bank_pgl[i] = mask[i] | omc_pgl;
    assign bank_pgm[i] = mask[i] | omc_pgm;

    dual_rail_sram #(.WIDTH(WIDTH), .DEPTH(BANK_DEPTH)) u_sram (
      .clk, .ce(b_ce[i]), .we(b_we), .addr(b_addr), .wdata(b_wdata), .rdata(b_rdata[i]),
      .pgl(bank_pgl[i]), .pgm(bank_pgm[i]), .vdd_ok
    );
  end

  // The accelerator may touch the data only with the unit settled in active
  // mode; a configuration never addresses a bank its scenario masks off.
  a_access_active: assert property (@(posedge clk) disable iff (!rst_n)
      ce |-> (cur_mode == PM_ACTIVE && !omc_busy))
    else $error("darkmem_unit: access outside active mode");
  a_access_unmasked: assert property (@(posedge clk) disable iff (!rst_n)
      ce |-> !(|(b_ce & mask)))
    else $error("darkmem_unit: access to a bank masked off by the scenario");

endmodule
