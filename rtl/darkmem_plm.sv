// darkmem_plm: private local memory of a Debayer image accelerator built from
// DARKMEM units, the top of this design.
//
// Debayer reads a few rows of the raw image into an input array and writes
// each finished row into one of two output buffers used in ping-pong fashion
// (while the compute process fills one, the store process sends the other to
// DRAM). Each array is a DARKMEM unit:
//   A   input rows,    A_BANKS banks of 1,024 x 32 (20 by default: ten
//                      rows of 2,048 pixels)
//   B0  output row 0,  2 banks of 1,024 x 32
//   B1  output row 1,  2 banks of 1,024 x 32
// All three units see the same configuration register, the image width,
// sampled at cfg_start. Default scenario: width up to 2,048, everything
// used. Scenario s1: width <= 1,024, so only half of every array is needed
// and the upper half of the banks is gated for the whole execution.
// Each unit has a voltage controller for its cell supply (SHARE_VC = 0), or
// all units share one that keeps the highest requested voltage
// (SHARE_VC = 1). The three SRAM libraries the method was evaluated with map
// onto USE_VC and DUAL_RAIL: ULP = dual-rail SRAMs with voltage control
// (1, 1, the default), LP = dual-rail only (0, 1), STD = voltage control
// only (1, 0).
//
// The accelerator logic is outside: each unit's data port and power port
// (mode/valid/ready) are brought out as top-level ports.
// The three-unit organisation, the ping-pong output buffers, the 1,024 x 32
// banks with two of them per output row and the 1,024-pixel scenario follow
// the document's Debayer example. The size of the input array is this
// design's choice, made so that the three arrays together hold 96 KiB, close
// to the 0.095 MB local memory the document reports for its Debayer. The
// mask of A (upper half gated for 1,024-pixel rows) and the voltage values
// are this design's choices too.
module darkmem_plm
  import darkmem_pkg::*;
#(
  parameter int unsigned PG_LAT   = 10,
  parameter int unsigned VC_LAT   = 64,
  parameter bit          USE_VC   = 1'b1,
  parameter bit          DUAL_RAIL = 1'b1,
  parameter bit          SHARE_VC = 1'b0,
  parameter int unsigned A_BANKS  = 20,
  localparam int unsigned WIDTH = 32,
  localparam int unsigned BANK_DEPTH = 1024,
  localparam int unsigned CFG_W = 16,
  localparam int unsigned A_AW = $clog2(A_BANKS * BANK_DEPTH),
  localparam int unsigned B_AW = $clog2(2 * BANK_DEPTH)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // configuration register (image width in pixels), sampled on cfg_start
  input  logic                  cfg_start,
  input  logic [CFG_W-1:0]      cfg_width,
  // array A
  input  logic                  a_ce,
  input  logic                  a_we,
  input  logic [A_AW-1:0]       a_addr,
  input  logic [WIDTH-1:0]      a_wdata,
  output logic [WIDTH-1:0]      a_rdata,
  input  pmode_e                a_pm_mode,
  input  logic                  a_pm_valid,
  output logic                  a_pm_ready,
  // array B0
  input  logic                  b0_ce,
  input  logic                  b0_we,
  input  logic [B_AW-1:0]       b0_addr,
  input  logic [WIDTH-1:0]      b0_wdata,
  output logic [WIDTH-1:0]      b0_rdata,
  input  pmode_e                b0_pm_mode,
  input  logic                  b0_pm_valid,
  output logic                  b0_pm_ready,
  // array B1
  input  logic                  b1_ce,
  input  logic                  b1_we,
  input  logic [B_AW-1:0]       b1_addr,
  input  logic [WIDTH-1:0]      b1_wdata,
  output logic [WIDTH-1:0]      b1_rdata,
  input  pmode_e                b1_pm_mode,
  input  logic                  b1_pm_valid,
  output logic                  b1_pm_ready,
  // status: power pins of every bank, current scenario and mode per unit,
  // cell supply per unit in millivolts
  output logic [A_BANKS-1:0]    a_pgl,
  output logic [A_BANKS-1:0]    a_pgm,
  output logic [1:0]            b0_pgl,
  output logic [1:0]            b0_pgm,
  output logic [1:0]            b1_pgl,
  output logic [1:0]            b1_pgm,
  output logic [2:0][7:0]       scen,
  output pmode_e [2:0]          cur_mode,
  output logic [2:0][15:0]      vdd_mv
);

  // scenario s1: width <= 1024 uses the lower half of each array
  localparam logic [0:0][CFG_W-1:0]   S_MAX  = {CFG_W'(1024)};
  localparam logic [0:0][A_BANKS-1:0] A_MASK = {{(A_BANKS/2){1'b1}}, {(A_BANKS - A_BANKS/2){1'b0}}};
  localparam logic [0:0][1:0]         B_MASK = {2'b10};

  logic [2:0] vc_low, vdd_ok;
  logic [2:0][A_BANKS-1:0] mask_unused;

  darkmem_unit #(.WIDTH(WIDTH), .BANK_DEPTH(BANK_DEPTH), .NBANKS(A_BANKS), .CFG_W(CFG_W),
                 .NUM_SCEN(1), .SCEN_CFG_MAX(S_MAX), .SCEN_MASK(A_MASK),
                 .PG_LAT(PG_LAT), .VC_LAT(VC_LAT), .USE_VC(USE_VC), .DUAL_RAIL(DUAL_RAIL)) u_a (
    .clk, .rst_n, .cfg_start, .cfg_value(cfg_width),
    .ce(a_ce), .we(a_we), .addr(a_addr), .wdata(a_wdata), .rdata(a_rdata),
    .pm_mode(a_pm_mode), .pm_valid(a_pm_valid), .pm_ready(a_pm_ready),
    .vc_low(vc_low[0]), .vdd_ok(vdd_ok[0]),
    .bank_pgl(a_pgl), .bank_pgm(a_pgm), .mask(mask_unused[0]), .scen(scen[0]), .cur_mode(cur_mode[0])
  );

  darkmem_unit #(.WIDTH(WIDTH), .BANK_DEPTH(BANK_DEPTH), .NBANKS(2), .CFG_W(CFG_W),
                 .NUM_SCEN(1), .SCEN_CFG_MAX(S_MAX), .SCEN_MASK(B_MASK),
                 .PG_LAT(PG_LAT), .VC_LAT(VC_LAT), .USE_VC(USE_VC), .DUAL_RAIL(DUAL_RAIL)) u_b0 (
    .clk, .rst_n, .cfg_start, .cfg_value(cfg_width),
    .ce(b0_ce), .we(b0_we), .addr(b0_addr), .wdata(b0_wdata), .rdata(b0_rdata),
    .pm_mode(b0_pm_mode), .pm_valid(b0_pm_valid), .pm_ready(b0_pm_ready),
    .vc_low(vc_low[1]), .vdd_ok(vdd_ok[1]),
    .bank_pgl(b0_pgl), .bank_pgm(b0_pgm), .mask(mask_unused[1][1:0]), .scen(scen[1]), .cur_mode(cur_mode[1])
  );

  darkmem_unit #(.WIDTH(WIDTH), .BANK_DEPTH(BANK_DEPTH), .NBANKS(2), .CFG_W(CFG_W),
                 .NUM_SCEN(1), .SCEN_CFG_MAX(S_MAX), .SCEN_MASK(B_MASK),
                 .PG_LAT(PG_LAT), .VC_LAT(VC_LAT), .USE_VC(USE_VC), .DUAL_RAIL(DUAL_RAIL)) u_b1 (
    .clk, .rst_n, .cfg_start, .cfg_value(cfg_width),
    .ce(b1_ce), .we(b1_we), .addr(b1_addr), .wdata(b1_wdata), .rdata(b1_rdata),
    .pm_mode(b1_pm_mode), .pm_valid(b1_pm_valid), .pm_ready(b1_pm_ready),
    .vc_low(vc_low[2]), .vdd_ok(vdd_ok[2]),
    .bank_pgl(b1_pgl), .bank_pgm(b1_pgm), .mask(mask_unused[2][1:0]), .scen(scen[2]), .cur_mode(cur_mode[2])
  );

  assign mask_unused[1][A_BANKS-1:2] = '0;
  assign mask_unused[2][A_BANKS-1:2] = '0;

  if (!USE_VC) begin : g_no_vc
    assign vdd_ok = '1;
    assign vdd_mv = '0;
  end else if (SHARE_VC) begin : g_shared_vc
    logic        low_shared;
    logic [15:0] mv;
    logic        nom, ret;
    vc_merge #(.N(3)) u_merge (.low_req(vc_low), .low_out(low_shared));
    voltage_controller #(.VC_LAT(VC_LAT)) u_vc (
      .clk, .rst_n, .low_req(low_shared), .vdd_mv(mv), .at_nominal(nom), .at_retention(ret)
    );
    assign vdd_ok = {3{nom}};
    assign vdd_mv = {3{mv}};
  end else begin : g_vc_per_unit
    for (genvar u = 0; u < 3; u++) begin : g_vc
      logic unused_ret;
      voltage_controller #(.VC_LAT(VC_LAT)) u_vc (
        .clk, .rst_n, .low_req(vc_low[u]), .vdd_mv(vdd_mv[u]),
        .at_nominal(vdd_ok[u]), .at_retention(unused_ret)
      );
    end
  end

endmodule
