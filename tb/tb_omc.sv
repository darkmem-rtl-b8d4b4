// tb_omc: self-checking test of the operating mode controller.
// Four instances: one with a voltage controller (PG_LAT=3, VC_LAT=7), one
// with dual-rail gating only (PG_LAT=2), one with single-rail SRAMs and a
// voltage controller (deep-sleep changes no pin), and one at the extremes of
// the latency ranges (PG_LAT=2, VC_LAT=2000). Every transition between the three
// modes is requested; for each the test checks the stall length (cycles
// from the request to ready, derived from the latencies: PG+1, or PG+VC+1
// when the cell supply must ramp), the PGL/PGM pins and the retention
// request once settled, and that a request for the current mode completes
// in the same cycle.
module tb_omc;
  import darkmem_pkg::*;
  localparam int PG = 3, VC = 7, PG2 = 2;
  logic clk = 1'b0, rst_n;
  pmode_e mode1, mode2, cur1, cur2;
  logic v1, v2, r1, r2, pgl1, pgm1, vcl1, pgl2, pgm2, vcl2, busy1, busy2;
  pmode_e mode3, cur3, mode4, cur4;
  logic v3, r3, pgl3, pgm3, vcl3, busy3, v4, r4, pgl4, pgm4, vcl4, busy4;
  localparam int VC4 = 2000, PG4 = 2;
  int checks = 0, failures = 0;

  omc #(.PG_LAT(PG), .VC_LAT(VC), .USE_VC(1'b1)) dut1 (
    .clk, .rst_n, .req_mode(mode1), .req_valid(v1), .req_ready(r1),
    .pgl(pgl1), .pgm(pgm1), .vc_low(vcl1), .cur_mode(cur1), .busy(busy1));
  omc #(.PG_LAT(PG2), .VC_LAT(VC), .USE_VC(1'b0)) dut2 (
    .clk, .rst_n, .req_mode(mode2), .req_valid(v2), .req_ready(r2),
    .pgl(pgl2), .pgm(pgm2), .vc_low(vcl2), .cur_mode(cur2), .busy(busy2));

  // single-rail SRAMs with voltage control
  omc #(.PG_LAT(PG), .VC_LAT(VC), .USE_VC(1'b1), .DUAL_RAIL(1'b0)) dut3 (
    .clk, .rst_n, .req_mode(mode3), .req_valid(v3), .req_ready(r3),
    .pgl(pgl3), .pgm(pgm3), .vc_low(vcl3), .cur_mode(cur3), .busy(busy3));
  // the extremes of the latency ranges: 2-cycle gating, 2,000-cycle supply
  omc #(.PG_LAT(PG4), .VC_LAT(VC4)) dut4 (
    .clk, .rst_n, .req_mode(mode4), .req_valid(v4), .req_ready(r4),
    .pgl(pgl4), .pgm(pgm4), .vc_low(vcl4), .cur_mode(cur4), .busy(busy4));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // expected pins {pgl,pgm} per mode, from the mode definitions
  function automatic int exp_pins(pmode_e m);
    case (m)
      PM_ACTIVE:     return 2'b00;
      PM_DEEP_SLEEP: return 2'b10;
      default:       return 2'b11;
    endcase
  endfunction

  task automatic req1(pmode_e m, int exp_cycles);
    int n = 0;
    @(negedge clk); mode1 = m; v1 = 1;
    #1;
    while (!r1 && n < 1000) begin @(negedge clk); #1; n++; end
    check($sformatf("vc stall to %s", m.name()), n, exp_cycles);
    check($sformatf("vc pins in %s", m.name()), {pgl1, pgm1}, exp_pins(m));
    check($sformatf("vc_low in %s", m.name()), vcl1, (m == PM_DEEP_SLEEP));
    check("vc cur_mode", cur1, m);
    @(negedge clk); v1 = 0;
  endtask

  task automatic req2(pmode_e m, int exp_cycles);
    int n = 0;
    @(negedge clk); mode2 = m; v2 = 1;
    #1;
    while (!r2 && n < 1000) begin @(negedge clk); #1; n++; end
    check($sformatf("pg stall to %s", m.name()), n, exp_cycles);
    check($sformatf("pg pins in %s", m.name()), {pgl2, pgm2}, exp_pins(m));
    check("pg vc_low stays 0", vcl2, 0);
    @(negedge clk); v2 = 0;
  endtask

  task automatic req3(pmode_e m, int exp_cycles, int exp_p);
    int n = 0;
    @(negedge clk); mode3 = m; v3 = 1;
    #1;
    while (!r3 && n < 1000) begin @(negedge clk); #1; n++; end
    check($sformatf("single-rail stall to %s", m.name()), n, exp_cycles);
    check($sformatf("single-rail pins in %s", m.name()), {pgl3, pgm3}, exp_p);
    check($sformatf("single-rail vc_low in %s", m.name()), vcl3, (m == PM_DEEP_SLEEP));
    @(negedge clk); v3 = 0;
  endtask

  task automatic req4(pmode_e m, int exp_cycles);
    int n = 0;
    @(negedge clk); mode4 = m; v4 = 1;
    #1;
    while (!r4 && n < 10000) begin @(negedge clk); #1; n++; end
    check($sformatf("extreme stall to %s", m.name()), n, exp_cycles);
    check($sformatf("extreme pins in %s", m.name()), {pgl4, pgm4}, exp_pins(m));
    @(negedge clk); v4 = 0;
  endtask

  initial begin
    rst_n = 0; v3 = 0; v4 = 0; mode3 = PM_ACTIVE; mode4 = PM_ACTIVE; v1 = 0; v2 = 0; mode1 = PM_ACTIVE; mode2 = PM_ACTIVE;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check("reset pins", {pgl1, pgm1}, 0);
    check("reset mode", cur1, PM_ACTIVE);
    // with voltage controller
    req1(PM_ACTIVE,     0);
    req1(PM_DEEP_SLEEP, PG + VC + 1);
    // while in deep-sleep the cells keep their supply request low
    req1(PM_DEEP_SLEEP, 0);
    req1(PM_ACTIVE,     VC + PG + 1);
    req1(PM_IDLE,       PG + 1);
    req1(PM_ACTIVE,     PG + 1);
    req1(PM_IDLE,       PG + 1);
    req1(PM_DEEP_SLEEP, PG + VC + 1);
    req1(PM_IDLE,       PG + 1);
    req1(PM_DEEP_SLEEP, PG + VC + 1);
    req1(PM_ACTIVE,     VC + PG + 1);
    // check the pins mid-way through a wake-up: supply first, periphery last
    @(negedge clk); mode1 = PM_DEEP_SLEEP; v1 = 1;
    while (!r1) @(negedge clk);
    @(negedge clk);
    v1 = 0;
    @(negedge clk); mode1 = PM_ACTIVE; v1 = 1;
    @(negedge clk); #1;
    check("wake: supply raised first", vcl1, 0);
    check("wake: periphery still gated", pgl1, 1);
    check("wake: busy", busy1, 1);
    while (!r1) @(negedge clk);
    @(negedge clk);
    v1 = 0;
    // gating only
    req2(PM_DEEP_SLEEP, PG2 + 1);
    req2(PM_ACTIVE,     PG2 + 1);
    req2(PM_IDLE,       PG2 + 1);
    req2(PM_DEEP_SLEEP, PG2 + 1);
    req2(PM_IDLE,       PG2 + 1);
    req2(PM_IDLE,       0);
    req2(PM_ACTIVE,     PG2 + 1);
    // single-rail: deep-sleep touches only the supply
    req3(PM_DEEP_SLEEP, VC + 1,      2'b00);
    req3(PM_ACTIVE,     VC + 1,      2'b00);
    req3(PM_IDLE,       PG + 1,      2'b11);
    req3(PM_DEEP_SLEEP, PG + VC + 1, 2'b00);
    req3(PM_IDLE,       PG + 1,      2'b11);
    req3(PM_ACTIVE,     PG + 1,      2'b00);
    // latency extremes
    req4(PM_DEEP_SLEEP, PG4 + VC4 + 1);
    req4(PM_ACTIVE,     VC4 + PG4 + 1);
    req4(PM_IDLE,       PG4 + 1);
    req4(PM_ACTIVE,     PG4 + 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
