// tb_dual_rail_sram: self-checking test of the dual-rail SRAM model.
// Writes a pattern, reads it back (checking the one-cycle read latency),
// gates the periphery only (deep-sleep) and checks the data survive, then
// gates the cells (idle) and checks the data are gone. Stimulus is applied
// on the falling clock edge and results are sampled on the falling edge.
module tb_dual_rail_sram;
  localparam int W = 16, D = 64;
  logic clk = 1'b0;
  logic ce, we, pgl, pgm, vdd_ok;
  logic [$clog2(D)-1:0] addr;
  logic [W-1:0] wdata, rdata;
  int checks = 0, failures = 0;

  dual_rail_sram #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] pat(int i);
    return W'(i * 16'h3B1 + 16'h51);
  endfunction

  task automatic check(string what, logic [W-1:0] got, logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic write_all();
    for (int i = 0; i < D; i++) begin
      @(negedge clk); ce = 1; we = 1; addr = i[$clog2(D)-1:0]; wdata = pat(i);
    end
    @(negedge clk); ce = 0; we = 0;
  endtask

  task automatic read_check(string what, bit expect_pattern);
    for (int i = 0; i < D; i++) begin
      @(negedge clk); ce = 1; we = 0; addr = i[$clog2(D)-1:0];
      @(negedge clk); ce = 0;
      check(what, rdata, expect_pattern ? pat(i) : {(W/4){4'hD}});
    end
  endtask

  initial begin
    ce = 0; we = 0; pgl = 0; pgm = 0; vdd_ok = 1; addr = '0; wdata = '0;
    repeat (3) @(negedge clk);
    write_all();
    read_check("active readback", 1'b1);
    // read latency: data appears exactly one edge after the request
    @(negedge clk); ce = 1; addr = 6'd5;
    @(posedge clk); #1 check("latency 1", rdata, pat(5));
    @(negedge clk); ce = 0;
    // deep-sleep: periphery gated, supply at retention level
    @(negedge clk); pgl = 1; vdd_ok = 0;
    repeat (20) @(negedge clk);
    vdd_ok = 1; pgl = 0;
    @(negedge clk);
    read_check("retained after deep-sleep", 1'b1);
    // idle: cells gated too
    @(negedge clk); pgl = 1; pgm = 1;
    repeat (5) @(negedge clk);
    pgl = 0; pgm = 0;
    @(negedge clk);
    read_check("lost after idle", 1'b0);
    // write again after idle works
    write_all();
    read_check("rewrite after idle", 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
