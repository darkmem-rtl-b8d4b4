// tb_data_ctrl: self-checking test of the data controller with the
// document's example, a 2,048 x 32 array on four 512 x 32 banks. The banks
// are modelled here as plain arrays. The test checks that exactly the bank
// named by the two address MSBs is enabled, that the nine LSBs reach the
// bank, and that random writes read back through the controller one cycle
// after the read request.
module tb_data_ctrl;
  localparam int W = 32, NB = 4, BD = 512, AW = 11;
  logic clk = 1'b0;
  logic ce, we;
  logic [AW-1:0] addr;
  logic [W-1:0] wdata, rdata;
  logic [NB-1:0] bank_ce;
  logic bank_we;
  logic [8:0] bank_addr;
  logic [W-1:0] bank_wdata;
  logic [NB-1:0][W-1:0] bank_rdata;
  logic [W-1:0] bank_mem [NB][BD];
  logic [W-1:0] ref_mem [NB*BD];
  int checks = 0, failures = 0;

  data_ctrl #(.WIDTH(W), .NBANKS(NB), .BANK_DEPTH(BD)) dut (.*);

  always #5 clk = ~clk;

  for (genvar b = 0; b < NB; b++) begin : g_bank
    always_ff @(posedge clk) begin
      if (bank_ce[b]) begin
        if (bank_we) bank_mem[b][bank_addr] <= bank_wdata;
        else         bank_rdata[b] <= bank_mem[b][bank_addr];
      end
    end
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [W-1:0] got, logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    ce = 0; we = 0; addr = '0; wdata = '0;
    for (int b = 0; b < NB; b++)
      for (int i = 0; i < BD; i++) bank_mem[b][i] = '0;
    for (int i = 0; i < NB*BD; i++) ref_mem[i] = '0;
    repeat (2) @(negedge clk);
    // decoding of a few fixed addresses
    for (int k = 0; k < 8; k++) begin
      logic [AW-1:0] a;
      a = AW'(k * 300 + 7);
      @(negedge clk); ce = 1; we = 1; addr = a; wdata = 32'hC0DE_0000 + k;
      #1;
      check("bank_ce one-hot on MSBs", 32'(bank_ce), 32'(1 << a[10:9]));
      check("bank_addr = LSBs", 32'(bank_addr), 32'(a[8:0]));
      ref_mem[a] = wdata;
    end
    // random writes then random reads
    for (int k = 0; k < 1500; k++) begin
      @(negedge clk); ce = 1; we = 1; addr = AW'($urandom); wdata = $urandom;
      ref_mem[addr] = wdata;
    end
    for (int k = 0; k < 1500; k++) begin
      logic [AW-1:0] a;
      a = AW'($urandom);
      @(negedge clk); ce = 1; we = 0; addr = a;
      @(negedge clk); ce = 0;
      check("readback", rdata, ref_mem[a]);
    end
    // idle cycles enable no bank
    @(negedge clk); ce = 0; #1;
    check("no enable when idle", 32'(bank_ce), 32'd0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
