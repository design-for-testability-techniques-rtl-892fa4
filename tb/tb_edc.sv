// tb_edc: self-checking test of the error detection circuit.
//
// Applies equal code pairs (error must be 0) and code pairs that differ in
// one random bit of R, of Q, or in random bits (error must be 1).
module tb_edc;
  logic [7:0] rpe, qpe, rt, qt;
  logic error;
  int checks = 0, failures = 0;

  edc dut (.rpe, .qpe, .rt, .qt, .error);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_err;
    for (int t = 0; t < 4000; t++) begin
      rt = 8'($urandom); qt = 8'($urandom);
      rpe = rt; qpe = qt;
      case (t % 4)
        1: rpe = rt ^ (8'd1 << ($urandom % 8));
        2: qpe = qt ^ (8'd1 << ($urandom % 8));
        3: begin rpe = 8'($urandom); qpe = 8'($urandom); end
        default: ;
      endcase
      exp_err = (rpe != rt) || (qpe != qt);
      #1;
      checks++;
      if (error !== exp_err) begin
        failures++;
        $display("FAIL rpe=%0d rt=%0d qpe=%0d qt=%0d error=%b", rpe, rt, qpe, qt, error);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
