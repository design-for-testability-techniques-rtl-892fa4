// eddr_top: processing element with embedded error detection and data
// recovery (EDDR) based on a residue-and-quotient (RQ) code.
//
// A motion-estimation PE (the circuit under test) computes the sum of
// absolute differences (SAD) of a BLK_N x BLK_N block. In parallel, the test
// code generator (TCG) derives the RQ code (R_T, Q_T) of the same SAD from
// the RQ codes of the single pixels. RQCG_1 encodes the PE's SAD as
// (R_PE, Q_PE); the error detection circuit (EDC) flags any difference; the
// data recovery circuit (DRC) rebuilds the SAD as Q_T*m + R_T; and the
// selector outputs the PE's SAD when there is no error and the recovered SAD
// when there is one. m = 2^RQ_K - 1 (63 by default).
//
// The PE and the TCG each have their own pixel buses, as in the document's
// top-level schematic: driving them with the same pixels is normal
// operation, driving the PE with different pixels emulates a faulty PE.
// Pixel p of a block is bits [PIX_W*p +: PIX_W] of a bus.
//
// Timing (this design's choice; the document gives none): the four buses are
// captured when `start` is accepted, one pixel pair per clock is accumulated
// during the next NPIX cycles, and `done` is high for one cycle NPIX cycles
// after start. eddrout, error and the observation outputs then stay stable
// until the next start. rst_n is synchronous and active low.
module eddr_top #(
  parameter int unsigned PIX_W = eddr_pkg::PIX_W,
  parameter int unsigned NPIX  = eddr_pkg::NPIX,
  parameter int unsigned SAD_W = eddr_pkg::SAD_W,
  parameter int unsigned RQ_K  = eddr_pkg::RQ_K,
  parameter int unsigned RQ_W  = eddr_pkg::RQ_W
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic [NPIX*PIX_W-1:0] cur_pix_pe,
  input  logic [NPIX*PIX_W-1:0] ref_pix_pe,
  input  logic [NPIX*PIX_W-1:0] cur_pix_tcg,
  input  logic [NPIX*PIX_W-1:0] ref_pix_tcg,
  output logic [SAD_W-1:0]      eddrout,
  output logic                  error,
  output logic                  busy,
  output logic                  done,
  // observation outputs, named as in the document's waveform
  output logic [SAD_W-1:0]      pe_out,
  output logic [SAD_W-1:0]      data,
  output logic [RQ_W-1:0]       rpe,
  output logic [RQ_W-1:0]       qpe,
  output logic [RQ_W-1:0]       rt,
  output logic [RQ_W-1:0]       qt
);
  localparam int unsigned BW = NPIX * PIX_W;

  logic                    clr, en;
  logic [$clog2(NPIX)-1:0] idx;
  logic [BW-1:0]           cur_pe_q, ref_pe_q, cur_tcg_q, ref_tcg_q;
  logic [PIX_W-1:0]        cur_pe_px, ref_pe_px, cur_tcg_px, ref_tcg_px;

  eddr_ctrl #(.NPIX(NPIX)) u_ctrl (
    .clk, .rst_n, .start, .busy, .clr, .en, .idx, .done
  );

  // Block buffers, loaded when a block starts.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cur_pe_q  <= '0;
      ref_pe_q  <= '0;
      cur_tcg_q <= '0;
      ref_tcg_q <= '0;
    end else if (clr) begin
      cur_pe_q  <= cur_pix_pe;
      ref_pe_q  <= ref_pix_pe;
      cur_tcg_q <= cur_pix_tcg;
      ref_tcg_q <= ref_pix_tcg;
    end
  end

  always_comb begin
    cur_pe_px  = cur_pe_q [PIX_W*idx +: PIX_W];
    ref_pe_px  = ref_pe_q [PIX_W*idx +: PIX_W];
    cur_tcg_px = cur_tcg_q[PIX_W*idx +: PIX_W];
    ref_tcg_px = ref_tcg_q[PIX_W*idx +: PIX_W];
  end

  pe_top #(.PIX_W(PIX_W), .SAD_W(SAD_W), .K(RQ_K), .RQ_W(RQ_W)) u_pe_top (
    .clk, .rst_n, .clr, .en,
    .cur_pixel(cur_pe_px), .ref_pixel(ref_pe_px),
    .pe_out, .rpe, .qpe
  );

  tcg #(.PIX_W(PIX_W), .NPIX(NPIX), .K(RQ_K), .RQ_W(RQ_W)) u_tcg (
    .clk, .rst_n, .clr, .en,
    .cur_pixel(cur_tcg_px), .ref_pixel(ref_tcg_px),
    .rt, .qt
  );

  edc #(.RQ_W(RQ_W)) u_edc (.rpe, .qpe, .rt, .qt, .error);

  drc #(.K(RQ_K), .RQ_W(RQ_W), .SAD_W(SAD_W)) u_drc (.rt, .qt, .data);

  eddr_mux #(.SAD_W(SAD_W)) u_mux (.pe_out, .data, .error, .eddrout);
endmodule
