// tb_pe: self-checking test of the processing element.
//
// Feeds random and extreme 16-pixel blocks one pixel pair per cycle and
// compares the accumulated SAD with a sum of absolute differences computed
// in the testbench. Also checks that the sum holds while en is low and that
// clr restarts it.
module tb_pe;
  import eddr_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, en = 1'b0;
  logic [7:0] cur, rf;
  logic [11:0] sad;
  int checks = 0, failures = 0;

  pe dut (.clk, .rst_n, .clr, .en, .cur_pixel(cur), .ref_pixel(rf), .sad);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_block(input logic [7:0] c[NPIX], input logic [7:0] r[NPIX]);
    int exp_sad = 0;
    @(negedge clk); clr = 1'b1; en = 1'b0;
    @(negedge clk); clr = 1'b0;
    for (int p = 0; p < NPIX; p++) begin
      en = 1'b1; cur = c[p]; rf = r[p];
      exp_sad += (c[p] > r[p]) ? int'(c[p]) - int'(r[p]) : int'(r[p]) - int'(c[p]);
      @(negedge clk);
    end
    en = 1'b0; cur = $urandom; rf = $urandom;
    checks++;
    if (int'(sad) != exp_sad) begin
      failures++;
      $display("FAIL sad=%0d exp=%0d", sad, exp_sad);
    end
    // hold while en is low
    repeat (3) @(negedge clk);
    checks++;
    if (int'(sad) != exp_sad) begin
      failures++;
      $display("FAIL hold sad=%0d exp=%0d", sad, exp_sad);
    end
  endtask

  initial begin
    logic [7:0] c[NPIX], r[NPIX];
    cur = '0; rf = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int p = 0; p < NPIX; p++) begin c[p] = 8'd255; r[p] = 8'd0; end
    run_block(c, r);                       // maximum SAD 4080
    for (int p = 0; p < NPIX; p++) begin c[p] = 8'd0; r[p] = 8'd255; end
    run_block(c, r);
    for (int t = 0; t < 200; t++) begin
      for (int p = 0; p < NPIX; p++) begin c[p] = 8'($urandom); r[p] = 8'($urandom); end
      run_block(c, r);
    end
    // clr clears
    @(negedge clk); clr = 1'b1; en = 1'b1; cur = 8'd9; rf = 8'd1;
    @(negedge clk); clr = 1'b0; en = 1'b0;
    checks++;
    if (sad != 0) begin failures++; $display("FAIL clr sad=%0d", sad); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
