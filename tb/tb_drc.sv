// tb_drc: self-checking test of the data recovery circuit.
//
// For every SAD value 0 .. 4080 (the range of a 4x4 block of 8-bit pixels)
// the residue and quotient modulo 63 are applied and the rebuilt value must
// equal the SAD.
module tb_drc;
  import eddr_pkg::*;
  logic [7:0] rt, qt;
  logic [11:0] data;
  int checks = 0, failures = 0;

  drc dut (.rt, .qt, .data);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s <= NPIX * 255; s++) begin
      rt = 8'(s % RQ_M);
      qt = 8'(s / RQ_M);
      #1;
      checks++;
      if (int'(data) != s) begin
        failures++;
        if (failures < 10) $display("FAIL sad=%0d data=%0d", s, data);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
