// drc: data recovery circuit (DRC).
//
// Rebuilds the SAD from the RQ code produced by the test code generator:
//   data = Q_T * m + R_T = (Q_T << K) - Q_T + R_T,  m = 2^K - 1.
// With the default K = 6 this is the document's "quotient multiplied by the
// constant 64, plus the remainder", with the subtraction of Q_T that makes the
// multiple 63 = m; a shift and two adders replace a multiplier. It works in
// parallel with error detection, so the recovered value is ready when the
// error flag is.
//
// Interface: combinational, no clock.
module drc #(
  parameter int unsigned K     = eddr_pkg::RQ_K,
  parameter int unsigned RQ_W  = eddr_pkg::RQ_W,
  parameter int unsigned SAD_W = eddr_pkg::SAD_W
) (
  input  logic [RQ_W-1:0]  rt,
  input  logic [RQ_W-1:0]  qt,
  output logic [SAD_W-1:0] data
);
  // Arithmetic modulo 2^SAD_W is exact because every valid code rebuilds a
  // value below 2^SAD_W.
  logic [SAD_W-1:0] q_shift;   // Q_T * 2^K
  logic [SAD_W-1:0] q_m;       // Q_T * m
  always_comb begin
    q_shift = SAD_W'(qt) << K;
    q_m     = q_shift - SAD_W'(qt);
    data    = q_m + SAD_W'(rt);
  end
endmodule
