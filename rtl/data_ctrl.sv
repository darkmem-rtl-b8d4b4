// data_ctrl: data controller of one DARKMEM unit.
//
// The accelerator sees one logical array of NBANKS*BANK_DEPTH words. The
// controller splits the logical address: its most significant bits select
// the physical bank, its least significant bits are the address inside that
// bank (as in the document: a 2,048 x 32 array on four 512 x 32 banks uses
// the two MSBs for the bank and the nine LSBs for the word). Only the
// selected bank gets its chip enable, so the others see no activity.
// The read data of the bank that was accessed is steered back one cycle
// after the access, using the bank index registered with the request, to
// match a one-cycle synchronous SRAM. BANK_DEPTH must be a power of two;
// NBANKS need not be (addresses beyond NBANKS*BANK_DEPTH enable no bank).
// Timing: ce/we/addr/wdata in cycle t, rdata valid in cycle t+1.
module data_ctrl #(
  parameter int unsigned WIDTH      = 32,
  parameter int unsigned NBANKS     = 4,
  parameter int unsigned BANK_DEPTH = 512,
  localparam int unsigned AW  = $clog2(NBANKS * BANK_DEPTH),
  localparam int unsigned BAW = $clog2(BANK_DEPTH),
  localparam int unsigned SW  = (NBANKS > 1) ? $clog2(NBANKS) : 1
) (
  input  logic                          clk,
  // accelerator side
  input  logic                          ce,
  input  logic                          we,
  input  logic [AW-1:0]                 addr,
  input  logic [WIDTH-1:0]              wdata,
  output logic [WIDTH-1:0]              rdata,
  // bank side
  output logic [NBANKS-1:0]             bank_ce,
  output logic                          bank_we,
  output logic [BAW-1:0]                bank_addr,
  output logic [WIDTH-1:0]              bank_wdata,
  input  logic [NBANKS-1:0][WIDTH-1:0]  bank_rdata
);

  logic [SW-1:0] sel, sel_q;

  always_comb begin
    if (NBANKS > 1) sel = SW'(addr >> BAW);
    else            sel = '0;
    bank_ce = '0;
    bank_ce[sel] = ce;
  end

  assign bank_we    = we;
  assign bank_addr  = addr[BAW-1:0];
  assign bank_wdata = wdata;

  always_ff @(posedge clk) begin
    if (ce && !we) sel_q <= sel;
  end

  assign rdata = bank_rdata[sel_q];

endmodule
