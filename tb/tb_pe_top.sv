// tb_pe_top: self-checking test of the PE with its RQ code generator.
//
// Streams random blocks through the PE and checks after the last pixel that
// pe_out is the SAD and that (rpe, qpe) are its residue and quotient modulo
// 63, computed in the testbench with integer arithmetic.
module tb_pe_top;
  import eddr_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, en = 1'b0;
  logic [7:0] cur = '0, rf = '0;
  logic [11:0] pe_out;
  logic [7:0] rpe, qpe;
  int checks = 0, failures = 0;

  pe_top dut (.clk, .rst_n, .clr, .en, .cur_pixel(cur), .ref_pixel(rf), .pe_out, .rpe, .qpe);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_sad;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk); clr = 1'b1;
      @(negedge clk); clr = 1'b0;
      exp_sad = 0;
      for (int p = 0; p < NPIX; p++) begin
        en = 1'b1;
        cur = (t == 0) ? 8'd255 : 8'($urandom);
        rf  = (t == 0) ? 8'd0   : 8'($urandom);
        exp_sad += (cur > rf) ? int'(cur) - int'(rf) : int'(rf) - int'(cur);
        @(negedge clk);
      end
      en = 1'b0;
      checks++;
      if (int'(pe_out) != exp_sad || int'(rpe) != exp_sad % RQ_M || int'(qpe) != exp_sad / RQ_M) begin
        failures++;
        $display("FAIL sad=%0d/%0d r=%0d q=%0d", pe_out, exp_sad, rpe, qpe);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
