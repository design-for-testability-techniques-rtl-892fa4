// rqcg: residue-and-quotient code generator (RQCG).
//
// Produces the RQ code of a binary value X for the modulus m = 2^K - 1:
//   R = X mod m  (0 <= R < m),   Q = floor(X / m).
// It uses only adders, no divider. X is split at bit K into a low part Y0
// and a high part Y1, so X = Y0 + Y1*2^K = (Y0 + Y1) + Y1*m. The sum
// S = Y0 + Y1 is split again into its low K bits Z0 and its carry Z1, which
// gives S = (Z0 + Z1) + Z1*m with Z0 + Z1 <= m. Hence
//   R = (Z0 + Z1 == m) ? 0 : Z0 + Z1
//   Q = Y1 + Z1 + (Z0 + Z1 == m).
// This two-fold scheme is the one the document derives; it is exact while
// the high part is no wider than K bits (X at most 2K bits wide), which holds
// for every instance in this design. For a wider X the block falls back to a
// constant division (a choice of this implementation, for other parameter
// sets only).
//
// With SIGNED_IN = 1 the input is two's complement. A constant multiple of m,
// OFF = m * ceil(2^(W-1) / m), is added first so the folded value is never
// negative; the residue is unchanged and OFF/m is taken off the quotient, so
// Q is the floor quotient (rounded towards minus infinity) in two's
// complement. The document leaves the sign handling open; the test code
// generator needs it because residue differences can be negative.
//
// Interface: x (W bits) in, r (RW bits) and q (QW bits) out. Purely
// combinational, no clock.
module rqcg #(
  parameter int unsigned W         = 12,  // input width
  parameter int unsigned K         = 6,   // modulus m = 2^K - 1
  parameter bit          SIGNED_IN = 1'b0,
  parameter int unsigned RW        = 8,   // residue output width
  parameter int unsigned QW        = 8    // quotient output width
) (
  input  logic [W-1:0]  x,
  output logic [RW-1:0] r,
  output logic [QW-1:0] q
);
  localparam int unsigned M     = (1 << K) - 1;
  // Offset that makes a signed input non-negative, a multiple of m.
  localparam int unsigned OFFQ  = SIGNED_IN ? (((1 << (W - 1)) + M - 1) / M) : 0;
  localparam int unsigned OFF   = OFFQ * M;
  // Width of the (offset) unsigned value that is folded.
  localparam int unsigned UW0   = SIGNED_IN ? $clog2((1 << (W - 1)) + OFF) : W;
  localparam int unsigned UW    = (UW0 > K + 1) ? UW0 : K + 1;
  localparam int unsigned HW    = UW - K;   // width of Y1

  logic [UW-1:0] u;        // non-negative value to encode
  logic [K-1:0]  res;
  logic [UW:0]   quo;      // quotient of u

  always_comb begin
    if (SIGNED_IN) u = UW'($signed({x[W-1], x}) + $signed({1'b0, (W+1)'(OFF)}));
    else           u = UW'(x);
  end

  if (HW <= K) begin : g_fold
    logic [K-1:0]  y0;
    logic [HW-1:0] y1;
    logic [K:0]    s;      // Y0 + Y1
    logic [K-1:0]  z0;
    logic          z1;
    logic [K:0]    t;      // Z0 + Z1, at most m
    logic          beta;   // Z0 + Z1 == m
    always_comb begin
      y0   = u[K-1:0];
      y1   = u[UW-1:K];
      s    = {1'b0, y0} + (K+1)'(y1);
      z0   = s[K-1:0];
      z1   = s[K];
      t    = {1'b0, z0} + (K+1)'(z1);
      beta = (t == (K+1)'(M));
      res  = beta ? '0 : t[K-1:0];
      quo  = (UW+1)'(y1) + (UW+1)'(z1) + (UW+1)'(beta);
    end
  end else begin : g_div
    always_comb begin
      res = K'(u % UW'(M));
      quo = (UW+1)'(u / UW'(M));
    end
  end

  always_comb begin
    r = RW'(res);
    if (SIGNED_IN) q = QW'($signed({1'b0, quo}) - $signed((UW+2)'(OFFQ)));
    else           q = QW'(quo);
  end
endmodule
