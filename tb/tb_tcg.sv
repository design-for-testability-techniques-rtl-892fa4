// tb_tcg: self-checking test of the test code generator.
//
// Streams random blocks, blocks with all pixels equal, blocks with the
// largest SAD and blocks whose pixel residues make the residue differences
// negative, then checks R_T and Q_T against the residue and quotient of the
// SAD by 63 worked out in the testbench. It counts how often a negative
// residue difference and a swapped pixel pair (Ref > Cur) occurred and fails
// if either never did.
module tb_tcg;
  import eddr_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, en = 1'b0;
  logic [7:0] cur = '0, rf = '0;
  logic [7:0] rt, qt;
  int checks = 0, failures = 0;
  int n_negres = 0, n_swap = 0;

  tcg dut (.clk, .rst_n, .clr, .en, .cur_pixel(cur), .ref_pixel(rf), .rt, .qt);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_sad, hi, lo;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk); clr = 1'b1;
      @(negedge clk); clr = 1'b0;
      exp_sad = 0;
      for (int p = 0; p < NPIX; p++) begin
        en = 1'b1;
        case (t % 4)
          0: begin cur = 8'($urandom); rf = 8'($urandom); end
          1: begin cur = 8'(t); rf = 8'(t); end
          2: begin cur = (t % 8 == 2) ? 8'd255 : 8'd0; rf = ~cur; end
          default: begin   // larger pixel with the smaller residue
            lo = 1 + $urandom % 200;
            hi = lo + 1 + $urandom % (255 - lo);
            cur = 8'(hi); rf = 8'(lo);
            if ($urandom % 2 == 1) begin cur = 8'(lo); rf = 8'(hi); end
          end
        endcase
        hi = (cur > rf) ? int'(cur) : int'(rf);
        lo = (cur > rf) ? int'(rf) : int'(cur);
        if (hi % RQ_M < lo % RQ_M) n_negres++;
        if (rf > cur) n_swap++;
        exp_sad += hi - lo;
        @(negedge clk);
      end
      en = 1'b0;
      checks++;
      if (int'(rt) != exp_sad % RQ_M || int'(qt) != exp_sad / RQ_M) begin
        failures++;
        if (failures < 10)
          $display("FAIL sad=%0d rt=%0d (exp %0d) qt=%0d (exp %0d)", exp_sad, rt,
                   exp_sad % RQ_M, qt, exp_sad / RQ_M);
      end
    end
    checks++;
    if (n_negres == 0 || n_swap == 0) begin
      failures++;
      $display("FAIL coverage negres=%0d swap=%0d", n_negres, n_swap);
    end
    $display("negative residue differences=%0d swapped pairs=%0d", n_negres, n_swap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
