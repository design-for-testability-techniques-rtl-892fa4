// pe_top: the processing element under test together with the RQ code
// generator on its output (RQCG_1 of the document's PE testing path).
//
// The PE accumulates the SAD of one block, one pixel pair per enabled cycle.
// RQCG_1 encodes the accumulated SAD combinationally as a residue R_PE and a
// quotient Q_PE of the modulus m = 2^K - 1, which the error detection circuit
// compares with the code predicted by the test code generator. The grouping
// and the three outputs (SAD, R_PE, Q_PE) follow the document's block
// diagrams.
//
// Interface: clr/en/pixels as for pe. pe_out, rpe and qpe follow the
// accumulator register, so they are valid the cycle after the last pixel.
module pe_top #(
  parameter int unsigned PIX_W = eddr_pkg::PIX_W,
  parameter int unsigned SAD_W = eddr_pkg::SAD_W,
  parameter int unsigned K     = eddr_pkg::RQ_K,
  parameter int unsigned RQ_W  = eddr_pkg::RQ_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             en,
  input  logic [PIX_W-1:0] cur_pixel,
  input  logic [PIX_W-1:0] ref_pixel,
  output logic [SAD_W-1:0] pe_out,
  output logic [RQ_W-1:0]  rpe,
  output logic [RQ_W-1:0]  qpe
);
  pe #(.PIX_W(PIX_W), .SAD_W(SAD_W)) u_pe (
    .clk, .rst_n, .clr, .en, .cur_pixel, .ref_pixel, .sad(pe_out)
  );

  rqcg #(.W(SAD_W), .K(K), .SIGNED_IN(1'b0), .RW(RQ_W), .QW(RQ_W)) u_rqcg1 (
    .x(pe_out), .r(rpe), .q(qpe)
  );
endmodule
