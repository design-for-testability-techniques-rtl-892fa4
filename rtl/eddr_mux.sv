// eddr_mux: output selector of the EDDR scheme.
//
// Passes the PE's own result when the error detection circuit reports no
// error and the data recovery circuit's result when it reports an error, so
// that the next processing element always receives error-free data.
//
// Interface: combinational, no clock.
module eddr_mux #(
  parameter int unsigned SAD_W = eddr_pkg::SAD_W
) (
  input  logic [SAD_W-1:0] pe_out,
  input  logic [SAD_W-1:0] data,
  input  logic             error,
  output logic [SAD_W-1:0] eddrout
);
  always_comb eddrout = error ? data : pe_out;
endmodule
