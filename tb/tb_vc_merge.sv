// tb_vc_merge: exhaustive check of the shared-voltage-controller request
// merge: retention is requested only when every unit asks for it.
module tb_vc_merge;
  logic [2:0] low_req;
  logic       low_out;
  logic [4:0] req5;
  logic       out5;
  int checks = 0, failures = 0;

  vc_merge dut (.low_req, .low_out);
  vc_merge #(.N(5)) dut5 (.low_req(req5), .low_out(out5));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      low_req = 3'(v); #1;
      checks++;
      if (low_out !== (v == 7)) begin
        failures++; $display("FAIL N=3 req=%b out=%b", low_req, low_out);
      end
    end
    for (int v = 0; v < 32; v++) begin
      req5 = 5'(v); #1;
      checks++;
      if (out5 !== (v == 31)) begin
        failures++; $display("FAIL N=5 req=%b out=%b", req5, out5);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
