// vc_merge: combines the supply requests of N DARKMEM units that share one
// voltage controller. A shared controller must keep the highest voltage any
// unit asks for, so with two levels (nominal, retention) it may go down to
// retention only when every unit asks for retention: an AND of the requests.
// Sharing and the highest-voltage rule follow the document; reducing it to
// an AND follows from having only two supply levels. Purely combinational.
module vc_merge #(
  parameter int unsigned N = 3
) (
  input  logic [N-1:0] low_req,
  output logic         low_out
);

  assign low_out = &low_req;

endmodule
