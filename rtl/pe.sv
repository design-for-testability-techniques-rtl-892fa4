// pe: processing element of a motion-estimation array, the circuit under
// test of the EDDR scheme.
//
// Each enabled cycle it takes one current-block pixel and one reference
// pixel, forms their absolute difference with an 8-bit subtractor (the
// document's "8-b ADD") and adds it into a 12-bit accumulator (the "12-b ADD"
// and "ACC"). After the NPIX pixel pairs of a block the accumulator holds the
// sum of absolute differences (SAD). The widths are the document's; the
// clear/enable control and the synchronous active-low reset are this
// design's choices.
//
// Interface: clr restarts the sum (takes priority over en), en adds the
// current pixel pair. sad is the accumulator register, valid the cycle after
// the last enabled pixel.
module pe #(
  parameter int unsigned PIX_W = eddr_pkg::PIX_W,
  parameter int unsigned SAD_W = eddr_pkg::SAD_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             en,
  input  logic [PIX_W-1:0] cur_pixel,
  input  logic [PIX_W-1:0] ref_pixel,
  output logic [SAD_W-1:0] sad
);
  logic [PIX_W-1:0] absdiff;   // output of the 8-bit absolute-difference adder

  always_comb begin
    if (cur_pixel >= ref_pixel) absdiff = cur_pixel - ref_pixel;
    else                        absdiff = ref_pixel - cur_pixel;
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clr) sad <= '0;
    else if (en)       sad <= sad + SAD_W'(absdiff);
  end
endmodule
