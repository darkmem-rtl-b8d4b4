// tb_debayer_double_buffer: workload test of darkmem_plm (all parameters at
// their defaults) with the double-buffering pattern of a Debayer accelerator,
// the compute and store processes running concurrently.
//
//   compute  for each output row r: wait until buffer B(r mod 2) is free,
//            wake it, compute the row from the input rows in A into it
//            (out = 3*pixel + r), put it into deep-sleep, hand it to store
//   store    for each row: wait a random "bus busy" time, wake the buffer
//            (stalling if the supply is still ramping), read and check the
//            row, put the buffer into idle and give it back to compute
//
// The same workload is run twice after a reset: once without any power
// request (every bank stays active, the reference) and once with the
// requests above, in the default scenario (2,048-pixel rows). The test
// checks every output word, that store and compute overlap, and reports the
// cycle overhead of power management; with the default latencies (gating
// 10 cycles, supply 64 cycles) it must stay below 3.5 %. Then one run in
// scenario s1 (1,024-pixel rows) checks the data with half the banks gated.
module tb_debayer_double_buffer;
  import darkmem_pkg::*;
  localparam int NROWS = 10;
  logic clk = 1'b0, rst_n, cfg_start;
  logic [15:0] cfg_width;
  logic        ce [3], we [3];
  logic [14:0] addr [3];
  logic [31:0] wdata [3], rdata [3];
  pmode_e      pm_mode [3];
  logic        pm_valid [3], pm_ready [3];
  logic [19:0] a_pgl, a_pgm;
  logic [1:0]  b0_pgl, b0_pgm, b1_pgl, b1_pgm;
  logic [2:0][7:0] scen;
  pmode_e [2:0] cur_mode;
  logic [2:0][15:0] vdd_mv;
  int checks = 0, failures = 0;
  int overlap = 0;
  bit compute_busy, store_busy;

  darkmem_plm dut (
    .clk, .rst_n, .cfg_start, .cfg_width,
    .a_ce(ce[0]), .a_we(we[0]), .a_addr(addr[0]), .a_wdata(wdata[0]), .a_rdata(rdata[0]),
    .a_pm_mode(pm_mode[0]), .a_pm_valid(pm_valid[0]), .a_pm_ready(pm_ready[0]),
    .b0_ce(ce[1]), .b0_we(we[1]), .b0_addr(addr[1][10:0]), .b0_wdata(wdata[1]), .b0_rdata(rdata[1]),
    .b0_pm_mode(pm_mode[1]), .b0_pm_valid(pm_valid[1]), .b0_pm_ready(pm_ready[1]),
    .b1_ce(ce[2]), .b1_we(we[2]), .b1_addr(addr[2][10:0]), .b1_wdata(wdata[2]), .b1_rdata(rdata[2]),
    .b1_pm_mode(pm_mode[2]), .b1_pm_valid(pm_valid[2]), .b1_pm_ready(pm_ready[2]),
    .a_pgl, .a_pgm, .b0_pgl, .b0_pgm, .b1_pgl, .b1_pgm, .scen, .cur_mode, .vdd_mv
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (compute_busy && store_busy) overlap++;

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  function automatic logic [31:0] pixel(int r, int x);
    return 32'(x * 5 + r * 4099 + 3);
  endfunction

  // each task touches only the signals of its own unit u
  task automatic wr(int u, int a, logic [31:0] d);
    @(negedge clk); ce[u] = 1; we[u] = 1; addr[u] = 15'(a); wdata[u] = d;
    @(negedge clk); ce[u] = 0; we[u] = 0;
  endtask

  task automatic rd(int u, int a, output logic [31:0] d);
    @(negedge clk); ce[u] = 1; we[u] = 0; addr[u] = 15'(a);
    @(negedge clk); ce[u] = 0; d = rdata[u];
  endtask

  task automatic set_mode(int u, pmode_e m);
    @(negedge clk); pm_mode[u] = m; pm_valid[u] = 1; #1;
    while (!pm_ready[u]) begin @(negedge clk); #1; end
    @(negedge clk); pm_valid[u] = 0;
  endtask

  bit   buf_free [1:2];
  int   handoff [$];
  int   seed_delay [NROWS];

  task automatic run(int width, bit pm, output longint cycles);
    longint t0;
    rst_n = 0; cfg_start = 0;
    for (int u = 0; u < 3; u++) begin
      ce[u] = 0; we[u] = 0; addr[u] = '0; wdata[u] = '0; pm_mode[u] = PM_ACTIVE; pm_valid[u] = 0;
    end
    buf_free[1] = 1; buf_free[2] = 1; handoff.delete();
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk); cfg_width = 16'(width); cfg_start = 1;
    @(negedge clk); cfg_start = 0;
    // load the input rows (DMA into A)
    for (int r = 0; r < NROWS; r++)
      for (int x = 0; x < width; x++) wr(0, r * width + x, pixel(r, x));
    t0 = $time / 10;
    fork
      begin : compute
        for (int r = 0; r < NROWS; r++) begin
          int b = 1 + (r % 2);
          logic [31:0] d;
          wait (buf_free[b]);
          buf_free[b] = 0;
          compute_busy = 1;
          if (pm) set_mode(b, PM_ACTIVE);
          for (int x = 0; x < width; x++) begin
            rd(0, r * width + x, d);
            wr(b, x, d * 3 + 32'(r));
          end
          if (pm) set_mode(b, PM_DEEP_SLEEP);
          compute_busy = 0;
          handoff.push_back(r);
        end
        if (pm) set_mode(0, PM_IDLE);
      end
      begin : store
        for (int k = 0; k < NROWS; k++) begin
          int r, b;
          logic [31:0] d;
          wait (handoff.size() > 0);
          r = handoff.pop_front();
          b = 1 + (r % 2);
          repeat (seed_delay[r]) @(negedge clk);   // interconnect busy
          store_busy = 1;
          if (pm) set_mode(b, PM_ACTIVE);
          for (int x = 0; x < width; x++) begin
            rd(b, x, d);
            check("output word", d, pixel(r, x) * 3 + 32'(r));
          end
          if (pm) set_mode(b, PM_IDLE);
          store_busy = 0;
          buf_free[b] = 1;
        end
      end
    join
    cycles = $time / 10 - t0;
  endtask

  initial begin
    longint t_ref, t_pm, t_small;
    real ovh;
    compute_busy = 0; store_busy = 0;
    for (int r = 0; r < NROWS; r++) seed_delay[r] = $urandom_range(10, 400);
    run(2048, 1'b0, t_ref);
    run(2048, 1'b1, t_pm);
    ovh = 100.0 * real'(t_pm - t_ref) / real'(t_ref);
    $display("reference %0d cycles, with power management %0d cycles, overhead %.2f %%", t_ref, t_pm, ovh);
    checks++;
    if (ovh >= 3.5 || ovh < 0.0) begin failures++; $display("FAIL overhead %.2f %%", ovh); end
    checks++;
    if (overlap == 0) begin failures++; $display("FAIL store never overlapped compute"); end
    $display("store and compute overlapped for %0d cycles", overlap);
    run(1024, 1'b1, t_small);
    check("scenario s1 selected", 32'(scen[0]), 32'd1);
    $display("scenario s1 run: %0d cycles", t_small);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
