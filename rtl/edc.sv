// edc: error detection circuit (EDC).
//
// Compares the RQ code of the PE result (R_PE, Q_PE) with the code predicted
// by the test code generator (R_T, Q_T). Every bit pair is XORed and the
// differences are ORed into one flag: 0 means the tested PE is error-free,
// 1 means it is in error. Because a value and its (residue, quotient) pair
// determine each other, any wrong SAD is flagged. The XOR comparison and the
// 0/1 flag follow the document; the OR reduction is how the two comparisons
// are combined here.
//
// Interface: combinational, no clock.
module edc #(
  parameter int unsigned RQ_W = eddr_pkg::RQ_W
) (
  input  logic [RQ_W-1:0] rpe,
  input  logic [RQ_W-1:0] qpe,
  input  logic [RQ_W-1:0] rt,
  input  logic [RQ_W-1:0] qt,
  output logic            error
);
  logic [RQ_W-1:0] r_diff, q_diff;
  always_comb begin
    r_diff = rpe ^ rt;
    q_diff = qpe ^ qt;
    error  = (|r_diff) | (|q_diff);
  end
endmodule
