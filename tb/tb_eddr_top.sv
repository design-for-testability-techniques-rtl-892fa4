// tb_eddr_top: end-to-end self-checking test of the EDDR processing element
// at its default size (4x4 block of 8-bit pixels, m = 63).
//
// Each block is started with one `start` pulse, and the test checks that
// `done` comes exactly NPIX cycles later. Then it checks:
//  - fault-free blocks (same pixels on the PE and TCG buses): error = 0,
//    eddrout = pe_out = SAD, and (rpe, qpe) = (rt, qt) = (SAD mod 63, SAD / 63);
//  - blocks where the PE sees corrupted pixels (emulated PE fault): error = 1
//    exactly when the PE's SAD differs, and eddrout = the recovered SAD
//    computed from the TCG's pixels;
//  - the case of the reference waveform: TCG block SAD 2124, PE block SAD
//    1092, which must give rt = 45, qt = 33, error = 1, eddrout = 2124;
//  - a start while busy is ignored.
// Every mechanism is counted (fault-free pass, detection and recovery,
// single-bit pixel faults, faults that leave the SAD unchanged, negative
// residue differences in the TCG, swapped pixel pairs, ignored start), and a
// mechanism that never happened counts as a failure.
module tb_eddr_top;
  import eddr_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [BUS_W-1:0] cur_pix_pe, ref_pix_pe, cur_pix_tcg, ref_pix_tcg;
  logic [SAD_W-1:0] eddrout, pe_out, data;
  logic [RQ_W-1:0]  rpe, qpe, rt, qt;
  logic error, busy, done;

  int checks = 0, failures = 0;
  int n_clean = 0, n_recovered = 0, n_bitflip = 0, n_masked = 0;
  int n_negres = 0, n_swap = 0, n_fig = 0, n_ignored = 0;

  eddr_top dut (
    .clk, .rst_n, .start, .cur_pix_pe, .ref_pix_pe, .cur_pix_tcg, .ref_pix_tcg,
    .eddrout, .error, .busy, .done, .pe_out, .data, .rpe, .qpe, .rt, .qt
  );

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int block_sad(input logic [BUS_W-1:0] c, input logic [BUS_W-1:0] r);
    int s = 0;
    for (int p = 0; p < NPIX; p++) begin
      int a = int'(c[PIX_W*p +: PIX_W]);
      int b = int'(r[PIX_W*p +: PIX_W]);
      s += (a > b) ? a - b : b - a;
    end
    return s;
  endfunction

  // Count TCG-internal situations from the TCG's pixels.
  function automatic void count_tcg(input logic [BUS_W-1:0] c, input logic [BUS_W-1:0] r);
    for (int p = 0; p < NPIX; p++) begin
      int a = int'(c[PIX_W*p +: PIX_W]);
      int b = int'(r[PIX_W*p +: PIX_W]);
      int hi = (a > b) ? a : b;
      int lo = (a > b) ? b : a;
      if (hi % RQ_M < lo % RQ_M) n_negres++;
      if (b > a) n_swap++;
    end
  endfunction

  // Build a block whose SAD is exactly `sad` (at most NPIX*255).
  function automatic void make_block(input int sad, output logic [BUS_W-1:0] c,
                                     output logic [BUS_W-1:0] r);
    int left = sad;
    for (int p = 0; p < NPIX; p++) begin
      int d = (left > 255) ? 255 : left;
      int b = (d == 255) ? 0 : int'($urandom % (256 - d));
      left -= d;
      if ($urandom % 2 == 1) begin
        c[PIX_W*p +: PIX_W] = PIX_W'(b + d); r[PIX_W*p +: PIX_W] = PIX_W'(b);
      end else begin
        c[PIX_W*p +: PIX_W] = PIX_W'(b); r[PIX_W*p +: PIX_W] = PIX_W'(b + d);
      end
    end
  endfunction

  task automatic run_block(input logic [BUS_W-1:0] cpe, input logic [BUS_W-1:0] rpe_i,
                           input logic [BUS_W-1:0] ctcg, input logic [BUS_W-1:0] rtcg,
                           output int lat);
    cur_pix_pe = cpe; ref_pix_pe = rpe_i; cur_pix_tcg = ctcg; ref_pix_tcg = rtcg;
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    // scramble the buses: they are captured at start
    cur_pix_pe = {4{$urandom}}; ref_pix_pe = {4{$urandom}};
    cur_pix_tcg = {4{$urandom}}; ref_pix_tcg = {4{$urandom}};
    lat = 0;   // clock edges after the edge that sampled start
    while (!done) begin
      if (lat == 5) begin    // a start while busy must be ignored
        start = 1'b1;
        if (busy) n_ignored++;
      end else start = 1'b0;
      @(negedge clk);
      lat++;
    end
    start = 1'b0;
    checks++;
    if (lat != NPIX) begin
      failures++;
      $display("FAIL latency %0d cycles, expected %0d", lat, NPIX);
    end
  endtask

  task automatic check_result(input int sad_pe, input int sad_tcg);
    logic exp_err = (sad_pe != sad_tcg);
    checks++;
    if (error !== exp_err || int'(eddrout) != sad_tcg || int'(pe_out) != sad_pe ||
        int'(rt) != sad_tcg % RQ_M || int'(qt) != sad_tcg / RQ_M ||
        int'(rpe) != sad_pe % RQ_M || int'(qpe) != sad_pe / RQ_M ||
        int'(data) != sad_tcg) begin
      failures++;
      $display("FAIL sad_pe=%0d sad_tcg=%0d error=%b eddrout=%0d pe_out=%0d rt=%0d qt=%0d rpe=%0d qpe=%0d",
               sad_pe, sad_tcg, error, eddrout, pe_out, rt, qt, rpe, qpe);
    end
    // outputs hold after done
    @(negedge clk);
    checks++;
    if (int'(eddrout) != sad_tcg || error !== exp_err) begin
      failures++;
      $display("FAIL result not held");
    end
  endtask

  initial begin
    logic [BUS_W-1:0] c, r, c2, r2;
    int lat, s1, s2;
    cur_pix_pe = '0; ref_pix_pe = '0; cur_pix_tcg = '0; ref_pix_tcg = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // The reference waveform's case: TCG block SAD 2124, PE block SAD 1092.
    make_block(2124, c, r);
    make_block(1092, c2, r2);
    run_block(c2, r2, c, r, lat);
    checks++;
    if (int'(rt) != 45 || int'(qt) != 33 || int'(rpe) != 21 || int'(qpe) != 17 ||
        error !== 1'b1 || int'(eddrout) != 2124) begin
      failures++;
      $display("FAIL waveform case rt=%0d qt=%0d rpe=%0d qpe=%0d error=%b eddrout=%0d",
               rt, qt, rpe, qpe, error, eddrout);
    end else n_fig++;
    count_tcg(c, r);
    check_result(1092, 2124);

    for (int t = 0; t < 600; t++) begin
      for (int w = 0; w < BUS_W / 32; w++) begin
        c[32*w +: 32] = $urandom; r[32*w +: 32] = $urandom;
      end
      if (t % 10 == 1) make_block(NPIX * 255, c, r);     // largest SAD
      if (t % 10 == 2) r = c;                            // SAD 0
      s1 = block_sad(c, r);
      count_tcg(c, r);
      case (t % 3)
        0: begin  // fault-free
          run_block(c, r, c, r, lat);
          check_result(s1, s1);
          if (!error) n_clean++;
        end
        1: begin  // single-bit fault on one PE pixel input
          c2 = c; r2 = r;
          if ($urandom % 2 == 1) c2[$urandom % BUS_W] ^= 1'b1;
          else                   r2[$urandom % BUS_W] ^= 1'b1;
          s2 = block_sad(c2, r2);
          run_block(c2, r2, c, r, lat);
          check_result(s2, s1);
          n_bitflip++;
          if (s2 == s1) n_masked++;
          else if (error) n_recovered++;
        end
        default: begin  // PE sees an unrelated block
          for (int w = 0; w < BUS_W / 32; w++) begin
            c2[32*w +: 32] = $urandom; r2[32*w +: 32] = $urandom;
          end
          s2 = block_sad(c2, r2);
          run_block(c2, r2, c, r, lat);
          check_result(s2, s1);
          if (error) n_recovered++;
        end
      endcase
    end

    $display("mechanisms: clean=%0d recovered=%0d bitflips=%0d masked=%0d negres=%0d swap=%0d waveform=%0d ignored_start=%0d",
             n_clean, n_recovered, n_bitflip, n_masked, n_negres, n_swap, n_fig, n_ignored);
    checks++;
    if (n_clean == 0 || n_recovered == 0 || n_bitflip == 0 || n_negres == 0 ||
        n_swap == 0 || n_fig == 0 || n_ignored == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
