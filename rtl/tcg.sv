// tcg: test code generator (TCG).
//
// Predicts the RQ code (R_T, Q_T) of the SAD of a block without computing
// the SAD itself, working on the RQ codes of the individual pixels. Each
// enabled cycle takes one pixel pair:
//   comparator   X = larger, Y = smaller of Cur_pixel and Ref_pixel, so that
//                X - Y = |Cur - Ref|
//   RQCG_0/RQCG_2  (r_x, q_x) and (r_y, q_y), the RQ codes of X and Y
//   SUB_1, SUB_2   r = r_x - r_y (may be negative), q = q_x - q_y (>= 0)
// Residue path:  RQCG_3 reduces r to |r|_m, ACC_1 sums it, RQCG_5 reduces
//                the sum:  R_T = | sum |r|_m |_m
// Quotient path: ACC_2 sums r (signed), ACC_3 sums q, RQCG_4 gives the floor
//                quotient of the r sum and ADD forms
//                Q_T = sum q + floor(sum r / m).
// Since X - Y = (q_x - q_y) m + (r_x - r_y), the pair (R_T, Q_T) equals the
// residue and quotient of the SAD by m. The chain of blocks is the one in
// the document's TCG diagram; the handling of negative residue differences
// (signed subtractors and accumulators, floor quotient) is this design's,
// because the document does not say how the sign is carried.
//
// Interface: clr clears the three accumulators, en adds the current pixel
// pair. rt and qt are combinational from the accumulator registers, valid the
// cycle after the last enabled pixel.
module tcg #(
  parameter int unsigned PIX_W = eddr_pkg::PIX_W,
  parameter int unsigned NPIX  = eddr_pkg::NPIX,
  parameter int unsigned K     = eddr_pkg::RQ_K,
  parameter int unsigned RQ_W  = eddr_pkg::RQ_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             en,
  input  logic [PIX_W-1:0] cur_pixel,
  input  logic [PIX_W-1:0] ref_pixel,
  output logic [RQ_W-1:0]  rt,
  output logic [RQ_W-1:0]  qt
);
  localparam int unsigned M    = (1 << K) - 1;
  localparam int unsigned PQ_W = $clog2(((1 << PIX_W) - 1) / M + 1); // pixel quotient
  localparam int unsigned A1_W = $clog2(NPIX * (M - 1) + 1);        // ACC_1
  localparam int unsigned A2_W = $clog2(NPIX * (M - 1) + 1) + 1;    // ACC_2, signed
  localparam int unsigned A3_W = $clog2(NPIX * ((1 << PIX_W) - 1) / M + 1); // ACC_3
  localparam int unsigned SQ_W = A2_W;                              // RQCG_4 quotient

  // Comparator
  logic [PIX_W-1:0] x_ij, y_ij;
  always_comb begin
    if (cur_pixel >= ref_pixel) begin
      x_ij = cur_pixel;  y_ij = ref_pixel;
    end else begin
      x_ij = ref_pixel;  y_ij = cur_pixel;
    end
  end

  // RQCG_0 and RQCG_2 on the two pixels
  logic [K-1:0]    r_x, r_y;
  logic [PQ_W-1:0] q_x, q_y;
  rqcg #(.W(PIX_W), .K(K), .SIGNED_IN(1'b0), .RW(K), .QW(PQ_W)) u_rqcg0 (
    .x(x_ij), .r(r_x), .q(q_x));
  rqcg #(.W(PIX_W), .K(K), .SIGNED_IN(1'b0), .RW(K), .QW(PQ_W)) u_rqcg2 (
    .x(y_ij), .r(r_y), .q(q_y));

  // SUB_1 (signed residue difference) and SUB_2 (quotient difference)
  logic signed [K:0] r_ij;
  logic [PQ_W-1:0]   q_ij;
  always_comb begin
    r_ij = $signed({1'b0, r_x}) - $signed({1'b0, r_y});
    q_ij = q_x - q_y;
  end

  // RQCG_3: |r_ij|_m
  logic [K-1:0] r_ij_mod;
  logic [1:0]   r_ij_quo_unused;
  rqcg #(.W(K+1), .K(K), .SIGNED_IN(1'b1), .RW(K), .QW(2)) u_rqcg3 (
    .x(r_ij), .r(r_ij_mod), .q(r_ij_quo_unused));

  // ACC_1, ACC_2, ACC_3
  logic [A1_W-1:0]        acc1;
  logic signed [A2_W-1:0] acc2;
  logic [A3_W-1:0]        acc3;
  always_ff @(posedge clk) begin
    if (!rst_n || clr) begin
      acc1 <= '0;
      acc2 <= '0;
      acc3 <= '0;
    end else if (en) begin
      acc1 <= acc1 + A1_W'(r_ij_mod);
      acc2 <= acc2 + A2_W'(r_ij);
      acc3 <= acc3 + A3_W'(q_ij);
    end
  end

  // RQCG_5: R_T
  logic [RQ_W-1:0] acc1_quo_unused;
  rqcg #(.W(A1_W), .K(K), .SIGNED_IN(1'b0), .RW(RQ_W), .QW(RQ_W)) u_rqcg5 (
    .x(acc1), .r(rt), .q(acc1_quo_unused));

  // RQCG_4: floor(sum r / m), two's complement
  logic [K-1:0]  acc2_res_unused;
  logic [SQ_W-1:0] acc2_quo;
  rqcg #(.W(A2_W), .K(K), .SIGNED_IN(1'b1), .RW(K), .QW(SQ_W)) u_rqcg4 (
    .x(acc2), .r(acc2_res_unused), .q(acc2_quo));

  // ADD: Q_T
  always_comb begin
    qt = RQ_W'($signed({1'b0, acc3}) + $signed(acc2_quo));
  end
endmodule
