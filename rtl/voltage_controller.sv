// voltage_controller: BEHAVIOURAL MODEL of the voltage controller (VC) that
// supplies the memory cells of the SRAM banks of a DARKMEM unit. In silicon
// this is an analog part, a bias generator or an integrated voltage
// regulator; it is not synthesizable logic.
//
// With low_req = 1 the cell supply ramps from the nominal voltage down to
// the data retention voltage; with low_req = 0 it ramps back up. A full ramp
// takes VC_LAT clock cycles and is linear in this model. vdd_mv reports the
// present level, at_nominal says the supply is back at nominal and the banks
// may be accessed, at_retention says it has reached the retention level.
// The ramp time follows the range the document uses (64 to 2,000 cycles);
// the voltage values and the linear ramp are placeholders of this model.
module voltage_controller #(
  parameter int unsigned VC_LAT  = 64,
  parameter int unsigned VNOM_MV = 1000,
  parameter int unsigned VDRV_MV = 400
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        low_req,
  output logic [15:0] vdd_mv,
  output logic        at_nominal,
  output logic        at_retention
);

  localparam int unsigned LW = $clog2(VC_LAT + 1);

  // lvl = VC_LAT is nominal, lvl = 0 is retention
  logic [LW-1:0] lvl;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                            lvl <= LW'(VC_LAT);
    else if (low_req && lvl != '0)         lvl <= lvl - 1'b1;
    else if (!low_req && lvl != LW'(VC_LAT)) lvl <= lvl + 1'b1;
  end

  assign vdd_mv       = 16'(VDRV_MV + ((VNOM_MV - VDRV_MV) * 32'(lvl)) / VC_LAT);
  assign at_nominal   = (lvl == LW'(VC_LAT));
  assign at_retention = (lvl == '0);

endmodule
