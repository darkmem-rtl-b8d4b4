// darkmem_plm_seq.svh: end-to-end stimulus and checks for darkmem_plm,
// shared by tb_darkmem_plm (shared voltage controller, shorter latencies)
// and tb_darkmem_plm_full (all parameters at their defaults). The including
// module declares the DUT signals, the constants PG, VC, SHARED, and
// instantiates the DUT before including this file, then calls run_sequence
// and prints the result; USE_VCT and DUAL give the
// SRAM library the DUT was built for (voltage control, dual-rail SRAMs).
//
// The testbench plays the accelerator logic of a Debayer-like accelerator.
// One execution with image width W and NROWS rows:
//   LOAD    wake A, write NROWS input rows into A, put A into deep-sleep
//           while "waiting for the compute process", then wake it
//   COMPUTE for each row r: output buffer B(r mod 2) is woken (its previous
//           contents were dropped in idle, which is checked), the row is
//           computed from A into it (out = 3*pixel + r), then B goes to
//           deep-sleep because the store process has not started yet
//   STORE   after a random interconnect delay, B is woken (data must have
//           survived deep-sleep), read out and checked, and put into idle
//   At the end A goes to idle.
// After the executions all three units enter deep-sleep together, the only
// time a shared supply may drop to retention voltage.
// Executions are run in the default scenario (width 2,048) and in scenario
// s1 (width 1,024); in s1 the masked upper banks of every unit must stay
// gated throughout. Every mechanism (stall on a mode change, deep-sleep,
// idle, wake-ups, data retention, data loss, scenario masking, supply at
// retention voltage, shared supply held up by another unit) is counted and
// a mechanism that never happens is a failure.

  int checks = 0, failures = 0;
  int n_stall_cycles = 0, n_deep = 0, n_idle = 0, n_wake_deep = 0, n_wake_idle = 0;
  int n_retained = 0, n_lost = 0, n_masked = 0, n_at_ret = 0, n_held_up = 0, n_exec = 0;

  localparam int NROWS = 4;

  always #5 clk = ~clk;

  // mechanism monitors
  always @(posedge clk) if (rst_n) begin
    if ((a_pm_valid && !a_pm_ready) || (b0_pm_valid && !b0_pm_ready) || (b1_pm_valid && !b1_pm_ready))
      n_stall_cycles++;
    for (int u = 0; u < 3; u++) if (vdd_mv[u] == 16'd400) n_at_ret++;
    // shared supply: a unit settled in deep-sleep while the supply is nominal
    if (SHARED && cur_mode[1] == PM_DEEP_SLEEP && vdd_mv[1] == 16'd1000 && !b0_pm_valid) n_held_up++;
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  function automatic logic [31:0] pixel(int r, int x, int e);
    return 32'(x * 7 + r * 1013 + e * 65537 + 11);
  endfunction

  task automatic mem_write(int u, int a, logic [31:0] d);
    @(negedge clk);
    case (u)
      0: begin a_ce = 1; a_we = 1; a_addr = A_AW'(a); a_wdata = d; end
      1: begin b0_ce = 1; b0_we = 1; b0_addr = B_AW'(a); b0_wdata = d; end
      default: begin b1_ce = 1; b1_we = 1; b1_addr = B_AW'(a); b1_wdata = d; end
    endcase
    @(negedge clk);
    a_ce = 0; b0_ce = 0; b1_ce = 0; a_we = 0; b0_we = 0; b1_we = 0;
  endtask

  task automatic mem_read(int u, int a, output logic [31:0] d);
    @(negedge clk);
    case (u)
      0: begin a_ce = 1; a_we = 0; a_addr = A_AW'(a); end
      1: begin b0_ce = 1; b0_we = 0; b0_addr = B_AW'(a); end
      default: begin b1_ce = 1; b1_we = 0; b1_addr = B_AW'(a); end
    endcase
    @(negedge clk);
    a_ce = 0; b0_ce = 0; b1_ce = 0;
    case (u)
      0: d = a_rdata;
      1: d = b0_rdata;
      default: d = b1_rdata;
    endcase
  endtask

  function automatic logic pm_rdy(int u);
    case (u)
      0: return a_pm_ready;
      1: return b0_pm_ready;
      default: return b1_pm_ready;
    endcase
  endfunction

  function automatic pmode_e mode_of(int u);
    return cur_mode[u];
  endfunction

  // expected pins {pgl,pgm} of a mode for the SRAM library in use
  function automatic int lib_pins(pmode_e m);
    case (m)
      PM_ACTIVE:     return 0;
      PM_DEEP_SLEEP: return DUAL ? 2 : 0;
      default:       return 3;
    endcase
  endfunction

  // stall of a mode change: gating wait if any pin changes, supply ramp if
  // the cells go to or come back from retention voltage, plus one cycle
  function automatic int exp_stall(pmode_e from, pmode_e m);
    if (from == m) return 0;
    return ((lib_pins(from) != lib_pins(m)) ? PG : 0)
         + ((USE_VCT && (m == PM_DEEP_SLEEP || (from == PM_DEEP_SLEEP && m == PM_ACTIVE))) ? VC : 0)
         + 1;
  endfunction

  // request a mode through the power port and wait for the handshake;
  // checks the stall length against the latency parameters
  task automatic set_mode(int u, pmode_e m);
    int n = 0, exp_n;
    pmode_e from = mode_of(u);
    @(negedge clk);
    case (u)
      0: begin a_pm_mode = m; a_pm_valid = 1; end
      1: begin b0_pm_mode = m; b0_pm_valid = 1; end
      default: begin b1_pm_mode = m; b1_pm_valid = 1; end
    endcase
    #1;
    while (!pm_rdy(u) && n < 100000) begin @(negedge clk); #1; n++; end
    @(negedge clk);
    a_pm_valid = 0; b0_pm_valid = 0; b1_pm_valid = 0;
    exp_n = exp_stall(from, m);
    check($sformatf("stall unit %0d %s->%s", u, from.name(), m.name()), 32'(n), 32'(exp_n));
    if (from != m) begin
      if (m == PM_DEEP_SLEEP) n_deep++;
      if (m == PM_IDLE) n_idle++;
      if (m == PM_ACTIVE && from == PM_DEEP_SLEEP) n_wake_deep++;
      if (m == PM_ACTIVE && from == PM_IDLE) n_wake_idle++;
    end
  endtask

  task automatic check_masks(bit is_small);
    logic [A_BANKS-1:0] amask = is_small ? {{(A_BANKS/2){1'b1}}, {(A_BANKS - A_BANKS/2){1'b0}}} : '0;
    check("A pgl covers mask", 32'(a_pgl & amask), 32'(amask));
    check("A pgm covers mask", 32'(a_pgm & amask), 32'(amask));
    check("B0 pgm bank1", 32'(b0_pgm[1]), 32'(is_small || cur_mode[1] == PM_IDLE));
    check("B1 pgm bank1", 32'(b1_pgm[1]), 32'(is_small || cur_mode[2] == PM_IDLE));
    if (is_small && ((a_pgm & amask) == amask) && b0_pgm[1] && b1_pgm[1]) n_masked++;
  endtask

  task automatic execution(int width, int e);
    logic [31:0] d;
    bit is_small = (width <= 1024);
    @(negedge clk); cfg_width = 16'(width); cfg_start = 1;
    @(negedge clk); cfg_start = 0;
    check("scenario A", 32'(scen[0]), 32'(is_small));
    check("scenario B0", 32'(scen[1]), 32'(is_small));
    check("scenario B1", 32'(scen[2]), 32'(is_small));
    check_masks(is_small);
    // LOAD
    set_mode(0, PM_ACTIVE);
    for (int r = 0; r < NROWS; r++)
      for (int x = 0; x < width; x++) mem_write(0, r * width + x, pixel(r, x, e));
    set_mode(0, PM_DEEP_SLEEP);
    check_masks(is_small);
    repeat ($urandom_range(5, 50)) @(negedge clk);
    set_mode(0, PM_ACTIVE);
    // COMPUTE and STORE, ping-pong over B0/B1
    for (int r = 0; r < NROWS; r++) begin
      int b = 1 + (r % 2);
      set_mode(b, PM_ACTIVE);
      if (e > 0 || r >= 2) begin
        // the buffer was idle since its last store: contents are gone
        mem_read(b, 0, d);
        check("contents dropped in idle", d, 32'hDDDD_DDDD);
        if (d == 32'hDDDD_DDDD) n_lost++;
      end
      for (int x = 0; x < width; x++) begin
        mem_read(0, r * width + x, d);
        check("input retained across deep-sleep", d, pixel(r, x, e));
        mem_write(b, x, 32'(d * 3 + 32'(r)));
      end
      n_retained++;
      set_mode(b, PM_DEEP_SLEEP);
      check_masks(is_small);
      // the interconnect is busy for a while before the store may start
      repeat ($urandom_range(1, 3 * VC)) @(negedge clk);
      set_mode(b, PM_ACTIVE);
      for (int x = 0; x < width; x++) begin
        mem_read(b, x, d);
        check("output row retained across deep-sleep", d, 32'(pixel(r, x, e) * 3 + 32'(r)));
      end
      n_retained++;
      set_mode(b, PM_IDLE);
      check_masks(is_small);
    end
    set_mode(0, PM_IDLE);
    n_exec++;
  endtask

  task automatic require(string what, int n);
    checks++;
    $display("mechanism %-34s happened %0d times", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end
  endtask

  // the whole sequence; the including testbench calls it, then reports
  task automatic run_sequence();
    rst_n = 0; cfg_start = 0; cfg_width = '0;
    a_ce = 0; a_we = 0; a_addr = '0; a_wdata = '0; a_pm_mode = PM_ACTIVE; a_pm_valid = 0;
    b0_ce = 0; b0_we = 0; b0_addr = '0; b0_wdata = '0; b0_pm_mode = PM_ACTIVE; b0_pm_valid = 0;
    b1_ce = 0; b1_we = 0; b1_addr = '0; b1_wdata = '0; b1_pm_mode = PM_ACTIVE; b1_pm_valid = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    execution(2048, 0);
    execution(1024, 1);
    execution(2000, 2);
    // the whole memory waits in deep-sleep (e.g. the accelerator is stalled
    // on DRAM): only now can a shared supply go down to retention voltage
    for (int u = 0; u < 3; u++) set_mode(u, PM_ACTIVE);
    for (int u = 0; u < 3; u++) set_mode(u, PM_DEEP_SLEEP);
    repeat (VC + 5) @(negedge clk);
    for (int u = 0; u < 3; u++) check("all at retention voltage", 32'(vdd_mv[u]), USE_VCT ? 32'd400 : 32'd0);
    for (int u = 0; u < 3; u++) set_mode(u, PM_ACTIVE);
    for (int u = 0; u < 3; u++) check("all back to nominal", 32'(vdd_mv[u]), USE_VCT ? 32'd1000 : 32'd0);
    require("stall cycles on mode change", n_stall_cycles);
    require("deep-sleep entries", n_deep);
    require("idle entries", n_idle);
    require("wake-ups from deep-sleep", n_wake_deep);
    require("wake-ups from idle", n_wake_idle);
    require("rows retained in deep-sleep", n_retained);
    require("contents lost in idle", n_lost);
    require("banks masked by scenario s1", n_masked);
    if (USE_VCT) require("cycles at retention voltage", n_at_ret);
    require("executions", n_exec);
    if (SHARED) require("shared supply held up", n_held_up);
  endtask
