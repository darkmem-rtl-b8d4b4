// dual_rail_sram: BEHAVIOURAL MODEL of one dual-rail SRAM macro (not for synthesis
// as a memory; a real design uses the vendor's macro with the same pins).
//
// Single-port synchronous SRAM, DEPTH words of WIDTH bits, one-cycle read
// latency. Besides the usual ce/we/addr/wdata/rdata it has the two power pins
// of a dual-rail SRAM:
//   pgl = 1  periphery power gated: the bank cannot be accessed
//   pgm = 1  memory cells power gated: the contents are lost
// vdd_ok = 0 tells the model that the cell supply has been lowered to the
// data retention voltage, which keeps the data but forbids any access.
//
// Having the two pins and the three operating modes they make follows the
// document. The pin polarity, the read latency, and the way loss of data is
// shown (the cells are overwritten with POISON while pgm is high, so that a
// read after wake-up returns a recognisable wrong value in a two-state
// simulator) are choices of this model. An access to a gated or
// under-voltage bank is an error reported by an assertion; its read returns
// POISON.
module dual_rail_sram #(
  parameter int unsigned WIDTH  = 32,
  parameter int unsigned DEPTH  = 1024,
  parameter logic [WIDTH-1:0] POISON = {(WIDTH+3)/4{4'hD}}
) (
  input  logic                     clk,
  input  logic                     ce,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic [WIDTH-1:0]         wdata,
  output logic [WIDTH-1:0]         rdata,
  input  logic                     pgl,
  input  logic                     pgm,
  input  logic                     vdd_ok
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic             pgm_q;

  always_ff @(posedge clk) begin
    pgm_q <= pgm;
    if (pgm && !pgm_q) begin
      // cells just lost their supply
      for (int i = 0; i < DEPTH; i++) mem[i] <= POISON;
    end else if (ce && !pgl && !pgm && vdd_ok) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end else if (ce) begin
      rdata <= POISON;
    end
  end

  // An access is only legal with the bank fully powered.
  a_no_access_when_gated: assert property (@(posedge clk) ce |-> (!pgl && !pgm && vdd_ok))
    else $error("dual_rail_sram: access while power gated or at retention voltage");

endmodule
