// tb_voltage_controller: self-checking test of the voltage controller model.
// Checks nominal voltage after reset, that the ramp down to retention and
// back up takes exactly VC_LAT cycles, the end voltages, that the voltage
// falls monotonically, and that a request reversed mid-ramp turns back.
module tb_voltage_controller;
  localparam int LAT = 20;
  logic clk = 1'b0, rst_n, low_req;
  logic [15:0] vdd_mv;
  logic at_nominal, at_retention;
  int checks = 0, failures = 0;

  voltage_controller #(.VC_LAT(LAT)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (3000) @(posedge clk);
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

  initial begin
    int n, prev;
    rst_n = 0; low_req = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check("reset vdd", vdd_mv, 1000);
    check("reset at_nominal", at_nominal, 1);
    @(negedge clk); low_req = 1;
    n = 0; prev = vdd_mv;
    while (!at_retention && n < 1000) begin
      @(negedge clk); n++;
      checks++;
      if (int'(vdd_mv) >= prev) begin failures++; $display("FAIL not falling"); end
      prev = vdd_mv;
    end
    check("ramp down cycles", n, LAT);
    check("retention vdd", vdd_mv, 400);
    check("not nominal at retention", at_nominal, 0);
    @(negedge clk); low_req = 0;
    n = 0;
    while (!at_nominal && n < 1000) begin @(negedge clk); n++; end
    check("ramp up cycles", n, LAT);
    check("nominal vdd", vdd_mv, 1000);
    // reverse half way
    @(negedge clk); low_req = 1;
    repeat (LAT/2 - 1) @(negedge clk);
    low_req = 0;
    n = 0;
    while (!at_nominal && n < 1000) begin @(negedge clk); n++; end
    check("partial ramp back", n, LAT/2 - 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
