// smc: scenario memory controller of one DARKMEM unit.
//
// When the accelerator is configured for a new execution (cfg_start pulse),
// the SMC looks at a configuration register (for Debayer: the image width)
// and decides which of the scenarios fixed at design time is running. Each
// scenario comes with a bank mask: a 1 forces that bank into power gating
// (periphery and cells) for the whole execution, because the smaller data
// set of that scenario never reaches it. The mask is ORed with the OMC's pin
// values in darkmem_unit. If no scenario matches, or after reset, the
// default scenario applies: the whole memory is used and the mask is 0.
//
// Scenario identification is a chain of comparators: scenario s (1-based)
// is taken when cfg_value <= SCEN_CFG_MAX[s-1]; the first match wins, so
// list scenarios from the smallest up. The document shows a small comparator
// circuit but not its exact form; the "<=" chain is this design's choice.
// Bit i of a mask belongs to bank i (the document writes the mask of its
// example as the string "01", first bank first; here that is 2'b10).
// Timing: mask and scen change on the clock edge that samples cfg_start and
// then hold until the next cfg_start.
module smc #(
  parameter int unsigned CFG_W    = 16,
  parameter int unsigned NBANKS   = 2,
  parameter int unsigned NUM_SCEN = 1,
  parameter logic [NUM_SCEN-1:0][CFG_W-1:0]  SCEN_CFG_MAX = {CFG_W'(1024)},
  parameter logic [NUM_SCEN-1:0][NBANKS-1:0] SCEN_MASK    = {NBANKS'(2'b10)}
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cfg_start,
  input  logic [CFG_W-1:0]  cfg_value,
  output logic [NBANKS-1:0] mask,
  output logic [7:0]        scen
);

  logic [NBANKS-1:0] mask_d;
  logic [7:0]        scen_d;

  always_comb begin
    mask_d = '0;
    scen_d = '0;
    for (int s = NUM_SCEN - 1; s >= 0; s--) begin
      if (cfg_value <= SCEN_CFG_MAX[s]) begin
        mask_d = SCEN_MASK[s];
        scen_d = 8'(s + 1);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mask <= '0;
      scen <= '0;
    end else if (cfg_start) begin
      mask <= mask_d;
      scen <= scen_d;
    end
  end

endmodule
