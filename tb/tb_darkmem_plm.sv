// tb_darkmem_plm: end-to-end run of darkmem_plm with one voltage controller
// shared by the three units (SHARE_VC=1) and shorter latencies (PG_LAT=4,
// VC_LAT=16), so that a unit asking for retention voltage while another
// needs nominal voltage is exercised. Three executions of a Debayer-like
// accelerator at widths 2,048, 1,024 and 2,000; see darkmem_plm_seq.svh.
module tb_darkmem_plm;
  import darkmem_pkg::*;
  localparam int PG = 4, VC = 16, A_BANKS = 20;
  localparam bit USE_VCT = 1'b1, DUAL = 1'b1;
  localparam bit SHARED = 1'b1;
  localparam int A_AW = 15, B_AW = 11;
  logic clk = 1'b0, rst_n, cfg_start;
  logic [15:0] cfg_width;
  logic a_ce, a_we, b0_ce, b0_we, b1_ce, b1_we;
  logic [A_AW-1:0] a_addr;
  logic [B_AW-1:0] b0_addr, b1_addr;
  logic [31:0] a_wdata, a_rdata, b0_wdata, b0_rdata, b1_wdata, b1_rdata;
  pmode_e a_pm_mode, b0_pm_mode, b1_pm_mode;
  logic a_pm_valid, a_pm_ready, b0_pm_valid, b0_pm_ready, b1_pm_valid, b1_pm_ready;
  logic [A_BANKS-1:0] a_pgl, a_pgm;
  logic [1:0] b0_pgl, b0_pgm, b1_pgl, b1_pgm;
  logic [2:0][7:0] scen;
  pmode_e [2:0] cur_mode;
  logic [2:0][15:0] vdd_mv;

  darkmem_plm #(.PG_LAT(PG), .VC_LAT(VC), .SHARE_VC(SHARED)) dut (.*);

`include "darkmem_plm_seq.svh"

  initial begin : watchdog
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    run_sequence();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
