// tb_smc: self-checking test of the scenario memory controller.
// Instance 1 is the document's example: two banks, scenario s1 for an image
// width up to 1,024 with mask 2'b10 (second bank gated). Instance 2 has two
// scenarios and four banks to check first-match ordering. The test checks
// the default scenario after reset and for large widths, the selection of
// each scenario, the boundary values, and that the mask holds between
// cfg_start pulses.
module tb_smc;
  logic clk = 1'b0, rst_n;
  logic cfg_start;
  logic [15:0] cfg_value;
  logic [1:0] mask1;
  logic [3:0] mask2;
  logic [7:0] scen1, scen2;
  int checks = 0, failures = 0;

  smc dut1 (.clk, .rst_n, .cfg_start, .cfg_value, .mask(mask1), .scen(scen1));
  smc #(.NBANKS(4), .NUM_SCEN(2),
        .SCEN_CFG_MAX({16'd1024, 16'd512}), .SCEN_MASK({4'b1100, 4'b1110})) dut2 (
    .clk, .rst_n, .cfg_start, .cfg_value, .mask(mask2), .scen(scen2));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
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

  task automatic configure(int v);
    @(negedge clk); cfg_value = 16'(v); cfg_start = 1;
    @(negedge clk); cfg_start = 0;
  endtask

  initial begin
    rst_n = 0; cfg_start = 0; cfg_value = 16'd0;
    repeat (2) @(negedge clk);
    check("reset mask1", mask1, 0); check("reset mask2", mask2, 0);
    check("reset scen1", scen1, 0);
    rst_n = 1;
    configure(2048);
    check("2048 mask1", mask1, 0); check("2048 scen1", scen1, 0);
    check("2048 mask2", mask2, 0); check("2048 scen2", scen2, 0);
    configure(1024);
    check("1024 mask1", mask1, 2); check("1024 scen1", scen1, 1);
    check("1024 mask2", mask2, 4'b1100); check("1024 scen2", scen2, 2);
    // the mask holds while the configuration register changes without start
    @(negedge clk); cfg_value = 16'd4000;
    repeat (3) @(negedge clk);
    check("hold mask1", mask1, 2); check("hold mask2", mask2, 4'b1100);
    configure(1025);
    check("1025 mask1", mask1, 0); check("1025 scen1", scen1, 0);
    configure(512);
    check("512 mask1", mask1, 2);
    check("512 mask2", mask2, 4'b1110); check("512 scen2", scen2, 1);
    configure(513);
    check("513 mask2", mask2, 4'b1100); check("513 scen2", scen2, 2);
    configure(1);
    check("1 mask1", mask1, 2); check("1 mask2", mask2, 4'b1110);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
