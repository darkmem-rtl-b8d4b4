// tb_darkmem_unit: self-checking test of one DARKMEM unit (4 banks of
// 16 x 16, PG_LAT=2, VC_LAT=5) driven together with a voltage controller.
// It fills the array and reads it back, sends the unit to deep-sleep and
// back (data must survive, stall = PG+VC+1 cycles each way), to idle and
// back (data must be lost), then starts an execution in the small scenario
// (value <= 32) and checks that the two upper banks stay fully gated in
// every mode while the lower two follow the mode controller.
module tb_darkmem_unit;
  import darkmem_pkg::*;
  localparam int W = 16, BD = 16, NB = 4, PG = 2, VC = 5, AW = 6;
  logic clk = 1'b0, rst_n;
  logic cfg_start;
  logic [15:0] cfg_value;
  logic ce, we;
  logic [AW-1:0] addr;
  logic [W-1:0] wdata, rdata;
  pmode_e pm_mode, cur_mode;
  logic pm_valid, pm_ready, vc_low, vdd_ok, at_ret;
  logic [NB-1:0] bank_pgl, bank_pgm, mask;
  logic [7:0] scen;
  logic [15:0] vdd_mv;
  int checks = 0, failures = 0;

  darkmem_unit #(.WIDTH(W), .BANK_DEPTH(BD), .NBANKS(NB), .NUM_SCEN(1),
                 .SCEN_CFG_MAX({16'd32}), .SCEN_MASK({4'b1100}),
                 .PG_LAT(PG), .VC_LAT(VC), .USE_VC(1'b1)) dut (.*);
  voltage_controller #(.VC_LAT(VC)) u_vc (.clk, .rst_n, .low_req(vc_low), .vdd_mv,
                                          .at_nominal(vdd_ok), .at_retention(at_ret));

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
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  function automatic logic [W-1:0] pat(int i, int seed);
    return W'(i * 977 + seed * 131 + 5);
  endfunction

  task automatic fill(int n, int seed);
    for (int i = 0; i < n; i++) begin
      @(negedge clk); ce = 1; we = 1; addr = AW'(i); wdata = pat(i, seed);
    end
    @(negedge clk); ce = 0; we = 0;
  endtask

  task automatic readback(string what, int n, int seed, bit lost);
    for (int i = 0; i < n; i++) begin
      @(negedge clk); ce = 1; we = 0; addr = AW'(i);
      @(negedge clk); ce = 0;
      check(what, int'(rdata), lost ? 'hDDDD : int'(pat(i, seed)));
    end
  endtask

  // request a mode, return the number of stall cycles
  task automatic request(pmode_e m, output int n);
    n = 0;
    @(negedge clk); pm_mode = m; pm_valid = 1; #1;
    while (!pm_ready && n < 1000) begin @(negedge clk); #1; n++; end
    @(negedge clk); pm_valid = 0;
  endtask

  task automatic configure(int v);
    @(negedge clk); cfg_value = 16'(v); cfg_start = 1;
    @(negedge clk); cfg_start = 0;
  endtask

  initial begin
    int n;
    rst_n = 0; cfg_start = 0; cfg_value = '0; ce = 0; we = 0; addr = '0; wdata = '0;
    pm_mode = PM_ACTIVE; pm_valid = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    configure(64);
    check("default scenario", scen, 0);
    check("default pins", {bank_pgl, bank_pgm}, 0);
    fill(64, 1);
    readback("active", 64, 1, 0);
    request(PM_DEEP_SLEEP, n);
    check("deep-sleep stall", n, PG + VC + 1);
    check("deep-sleep pgl", bank_pgl, 4'b1111);
    check("deep-sleep pgm", bank_pgm, 4'b0000);
    check("supply at retention", at_ret, 1);
    request(PM_ACTIVE, n);
    check("wake stall", n, VC + PG + 1);
    check("supply nominal", vdd_ok, 1);
    readback("retained", 64, 1, 0);
    request(PM_IDLE, n);
    check("idle stall", n, PG + 1);
    check("idle pins", {bank_pgl, bank_pgm}, 8'hFF);
    request(PM_ACTIVE, n);
    check("idle wake stall", n, PG + 1);
    readback("lost in idle", 64, 1, 1);
    // small scenario
    configure(20);
    check("s1 scenario", scen, 1);
    check("s1 active pgl", bank_pgl, 4'b1100);
    check("s1 active pgm", bank_pgm, 4'b1100);
    fill(32, 2);
    readback("s1 active", 32, 2, 0);
    request(PM_DEEP_SLEEP, n);
    check("s1 deep-sleep pgl", bank_pgl, 4'b1111);
    check("s1 deep-sleep pgm", bank_pgm, 4'b1100);
    request(PM_ACTIVE, n);
    readback("s1 retained", 32, 2, 0);
    // back to the default scenario: the upper banks come back (empty)
    configure(33);
    check("default again", scen, 0);
    check("default again pins", {bank_pgl, bank_pgm}, 0);
    readback("lower banks kept", 32, 2, 0);
    fill(64, 3);
    readback("full again", 64, 3, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
