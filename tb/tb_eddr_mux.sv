// tb_eddr_mux: self-checking test of the output selector.
//
// With error low the PE result must pass, with error high the recovered
// value, for random data on both inputs.
module tb_eddr_mux;
  logic [11:0] pe_out, data, eddrout;
  logic error;
  int checks = 0, failures = 0;

  eddr_mux dut (.pe_out, .data, .error, .eddrout);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 1000; t++) begin
      pe_out = 12'($urandom); data = 12'($urandom); error = 1'($urandom);
      #1;
      checks++;
      if (eddrout !== (error ? data : pe_out)) begin
        failures++;
        $display("FAIL error=%b pe_out=%0d data=%0d eddrout=%0d", error, pe_out, data, eddrout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
