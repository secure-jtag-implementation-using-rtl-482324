// tb_ecdsa_ctrl: self-checking test of the ECDSA signature verifier driving
// the real ECMULT controller and datapath at full size (NIST P-192).
// Signatures are made in the bench with the reference package
// (r = (k*G).x mod n, s = k^-1 (e + r*d) mod n) and checked against the
// authority key Q = d*G. Cases: valid signature (accepted), altered s,
// altered e (refused), and out-of-range r = 0 and s = n (refused without
// any point multiplication). The cycle count of a full verification is
// reported and must stay inside the 482324-cycle budget of the ECDSA
// scenario of the design description (5 % margin).
//
// Expected values are worked out independently in the bench; the cases
// and sizes are this bench's own choice.
module tb_ecdsa_ctrl;
  import secjtag_pkg::*;
  import ec_ref_pkg::*;
  localparam int unsigned W = 192;
  localparam u192 DCA = 192'h0badc0de1234567890abcdef0fedcba987654321deadbeef;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [W-1:0] e = '0, r = '0, s = '0;
  logic busy, done, ok;
  logic ec_start, ec_done, ec_err;
  ecc_op_e ec_op;
  logic [W-1:0] ec_k, ec_x1, ec_y1, ec_x2, ec_y2, ec_m, ec_a, ec_x3, ec_y3;
  logic [W-1:0] n_dbl, n_add;
  int checks = 0, failures = 0, n_pm = 0;

  always #4 clk = ~clk;

  ecdsa_ctrl #(.W(W)) dut (
    .clk, .rst_n, .start, .e, .r, .s, .n(P192_N), .p(P192_P), .a(P192_A),
    .gx(P192_GX), .gy(P192_GY), .qx(DEF_Q_X), .qy(DEF_Q_Y),
    .busy, .done, .ok, .ec_start, .ec_op, .ec_k, .ec_x1, .ec_y1, .ec_x2, .ec_y2,
    .ec_m, .ec_a, .ec_done, .ec_err, .ec_x3, .ec_y3);

  ecmult_ctrl #(.W(W)) u_ecm (
    .clk, .rst_n, .start(ec_start), .op(ec_op), .k(ec_k), .x1(ec_x1), .y1(ec_y1),
    .x2(ec_x2), .y2(ec_y2), .m(ec_m), .a(ec_a), .busy(), .done(ec_done), .err(ec_err),
    .x3(ec_x3), .y3(ec_y3), .n_dbl, .n_add);

  always @(posedge clk) if (ec_start && ec_op == OP_PMUL) n_pm++;

  task automatic check(input bit ok_, input string what);
    checks++; if (!ok_) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic verify(input u192 ee, input u192 rr, input u192 ss, input bit want,
                        input int exp_pm, input string what);
    longint t = 0;
    int pm0 = n_pm;
    @(posedge clk); e <= ee; r <= rr; s <= ss; start <= 1'b1;
    @(posedge clk); start <= 1'b0;
    while (!done && t < 2000000) begin @(posedge clk); t++; end
    check(done, {what, ": finished"});
    check(ok == want, $sformatf("%s: ok=%0d expected %0d", what, ok, want));
    check(n_pm - pm0 == exp_pm, $sformatf("%s: %0d PointMults, expected %0d", what, n_pm - pm0, exp_pm));
    $display("%s: %0d cycles", what, t);
    if (exp_pm == 2) check(t * 100 <= 64'd482324 * 105, {what, ": within the ECDSA cycle budget"});
    @(posedge clk);
  endtask

  initial begin
    u192 k, ee, rr, ss;
    pt_t kg;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    check(gen() == '{1'b0, P192_GX, P192_GY}, "reference generator");
    check(pmul(DCA, gen()) == '{1'b0, DEF_Q_X, DEF_Q_Y}, "authority key Q = d*G");
    for (int i = 0; i < 2; i++) begin
      k  = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom} >> 2;
      ee = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom} >> 1;
      kg = pmul(k, gen());
      rr = (kg.x >= P192_N) ? kg.x - P192_N : kg.x;
      ss = mmul(minv(k, P192_N), madd((ee >= P192_N) ? ee - P192_N : ee,
                mmul(rr, DCA, P192_N), P192_N), P192_N);
      verify(ee, rr, ss, 1'b1, 2, $sformatf("valid signature %0d", i));
      if (i == 0) begin
        verify(ee, rr, madd(ss, 192'd1, P192_N), 1'b0, 2, "altered s");
        verify(ee ^ 192'h100, rr, ss, 1'b0, 2, "altered message");
      end
    end
    verify(ee, '0, ss, 1'b0, 0, "r = 0");
    verify(ee, rr, P192_N, 1'b0, 0, "s = n");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
