// tb_rqcg: exhaustive self-checking test of the RQ code generator.
//
// Instances cover every way the design uses the block: unsigned 12-bit
// (SAD), unsigned 8-bit (pixel), unsigned 10-bit (residue sum), signed
// 7-bit (residue difference) and signed 11-bit (signed residue sum). A
// 14-bit instance exercises the wide-input fallback. Every input value is
// applied and R and Q are compared with integer modulo and floor division.
module tb_rqcg;
  import eddr_pkg::*;
  localparam int K = 6;
  localparam int M = (1 << K) - 1;

  int checks = 0, failures = 0;

  logic [11:0] xa;  logic [7:0] ra, qa;
  logic [7:0]  xb;  logic [7:0] rb, qb;
  logic [9:0]  xc;  logic [7:0] rc, qc;
  logic [6:0]  xd;  logic [7:0] rd, qd;
  logic [10:0] xe;  logic [7:0] re, qe;
  logic [13:0] xf;  logic [7:0] rf, qf;

  rqcg #(.W(12), .K(K), .SIGNED_IN(0), .RW(8), .QW(8)) dut_a (.x(xa), .r(ra), .q(qa));
  rqcg #(.W(8),  .K(K), .SIGNED_IN(0), .RW(8), .QW(8)) dut_b (.x(xb), .r(rb), .q(qb));
  rqcg #(.W(10), .K(K), .SIGNED_IN(0), .RW(8), .QW(8)) dut_c (.x(xc), .r(rc), .q(qc));
  rqcg #(.W(7),  .K(K), .SIGNED_IN(1), .RW(8), .QW(8)) dut_d (.x(xd), .r(rd), .q(qd));
  rqcg #(.W(11), .K(K), .SIGNED_IN(1), .RW(8), .QW(8)) dut_e (.x(xe), .r(re), .q(qe));
  rqcg #(.W(14), .K(K), .SIGNED_IN(0), .RW(8), .QW(8)) dut_f (.x(xf), .r(rf), .q(qf));

  task automatic check(string tag, int x, int r, int q);
    int er, eq;
    er = pos_mod(x, M);
    eq = floor_div(x, M);
    checks++;
    if (r != er || q != eq) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s x=%0d r=%0d (exp %0d) q=%0d (exp %0d)", tag, x, r, er, q, eq);
    end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4096; v++) begin
      xa = 12'(v); #1; check("u12", v, int'(ra), int'(qa));
    end
    for (int v = 0; v < 256; v++) begin
      xb = 8'(v); #1; check("u8", v, int'(rb), int'(qb));
    end
    for (int v = 0; v < 1024; v++) begin
      xc = 10'(v); #1; check("u10", v, int'(rc), int'(qc));
    end
    for (int v = -64; v < 64; v++) begin
      xd = 7'(v); #1; check("s7", v, int'(rd), int'($signed(qd)));
    end
    for (int v = -1024; v < 1024; v++) begin
      xe = 11'(v); #1; check("s11", v, int'(re), int'($signed(qe)));
    end
    for (int v = 0; v < 256 * M; v += 7) begin
      xf = 14'(v); #1; check("u14", v, int'(rf), int'(qf));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
