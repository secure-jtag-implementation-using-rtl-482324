// tb_schnorr_ctrl: self-checking test of the Schnorr protocol controller.
//
// The controller runs with the real NVM model and PRNG. Its two other
// partners are models in this bench:
//   - the ECMULT instruction port is answered by the reference package
//     (PointMult, PointAdd, FieldMult, FieldAdd) after a fixed 20-cycle delay,
//     so every result the controller uses comes from independent arithmetic;
//   - the ECDSA verifier port checks that e = m xor C, r and s arrive as sent
//     and answers with the verdict chosen by the bench.
// The tester side of the word exchange is a four-phase req/ack model.
// Cases: PROVER (checks s*G == T_a + n_b*P_a on the words received),
// VERIFIER with a wrong and then a correct response, a request while already
// unlocked (ignored), MUTUAL, ECDSA accepted and refused, and a tester that
// leaves UNLOCK in the middle of an exchange (abort). It also checks the
// number and kind of arithmetic instructions issued by each protocol.
//
// Expected values are worked out independently in the bench; the cases
// and sizes are this bench's own choice.
module tb_schnorr_ctrl;
  import secjtag_pkg::*;
  import ec_ref_pkg::*;
  localparam int unsigned W = 192;
  localparam u192 KB  = 192'h2f1e0d0c0b0a09080706050403020100fedcba9876543210;
  localparam u192 NBP = 192'h6b8b4567327b23c6643c98696633487374b0dc5119495cff;
  localparam u192 NB  = 192'h2ae8944a625558ec238e1f2946e87ccd3d1b58ba507ed7ab;

  logic clk = 1'b0, rst_n = 1'b0, request_unlock = 1'b0;
  auth_mode_e auth_mode = AUTH_PROVER;
  logic release_lock, busy, fail, reseed, xreq, xack = 1'b0;
  logic [3:0] nvm_addr;
  logic [W-1:0] nvm_rdata, rnd, xout, xin = '0;
  logic ec_start, ec_done = 1'b0, ec_err = 1'b0;
  ecc_op_e ec_op;
  logic [W-1:0] ec_k, ec_x1, ec_y1, ec_x2, ec_y2, ec_m, ec_a, ec_x3 = '0, ec_y3 = '0;
  logic ecdsa_start, ecdsa_done = 1'b0, ecdsa_ok = 1'b0;
  logic [W-1:0] ecdsa_e, ecdsa_r, ecdsa_s;
  logic [W-1:0] par_p, par_a, par_n, par_gx, par_gy, par_qx, par_qy;
  int checks = 0, failures = 0;
  int n_op[ecc_op_e];
  bit ecdsa_verdict;
  u192 exp_e, exp_r, exp_s;

  always #4 clk = ~clk;

  nvm #(.W(W)) u_nvm (.clk, .raddr(nvm_addr), .rdata(nvm_rdata), .prog_en(1'b0),
                      .prog_addr(4'd0), .prog_data('0));
  prng_lfsr #(.W(W)) u_prng (.clk, .rst_n, .reseed, .seed(192'h5eed), .rnd);

  schnorr_ctrl #(.W(W)) dut (
    .clk, .rst_n, .request_unlock, .auth_mode, .release_lock, .busy, .fail,
    .nvm_addr, .nvm_rdata, .rnd, .reseed, .xout, .xreq, .xin, .xack,
    .ec_start, .ec_op, .ec_k, .ec_x1, .ec_y1, .ec_x2, .ec_y2, .ec_m, .ec_a,
    .ec_done, .ec_err, .ec_x3, .ec_y3,
    .ecdsa_start, .ecdsa_e, .ecdsa_r, .ecdsa_s, .ecdsa_done, .ecdsa_ok,
    .par_p, .par_a, .par_n, .par_gx, .par_gy, .par_qx, .par_qy);

  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ECMULT model
  initial forever begin
    pt_t r;
    ecc_op_e op;
    u192 k, x1, y1, x2, y2, m;
    @(posedge clk);
    if (ec_start && rst_n) begin
      op = ec_op; k = ec_k; x1 = ec_x1; y1 = ec_y1; x2 = ec_x2; y2 = ec_y2; m = ec_m;
      n_op[op]++;
      repeat (20) @(posedge clk);
      ec_err <= 1'b0;
      unique case (op)
        OP_PMUL: begin
          check(m == P192_P, "PointMult uses the field prime");
          r = pmul(k, '{1'b0, x1, y1});
          ec_x3 <= r.x; ec_y3 <= r.y; ec_err <= r.inf;
        end
        OP_PADD: begin
          r = padd('{1'b0, x1, y1}, '{1'b0, x2, y2});
          ec_x3 <= r.x; ec_y3 <= r.y; ec_err <= r.inf;
        end
        OP_FMUL: begin check(m == P192_N, "FieldMult mod n"); ec_x3 <= mmul(x1, x2, m); end
        OP_FADD: begin check(m == P192_N, "FieldAdd mod n");  ec_x3 <= madd(x1, x2, m); end
        default: check(0, "unexpected instruction");
      endcase
      ec_done <= 1'b1;
      @(posedge clk);
      ec_done <= 1'b0;
    end
  end

  // ECDSA verifier model
  initial forever begin
    @(posedge clk);
    if (ecdsa_start && rst_n) begin
      check(ecdsa_e == exp_e && ecdsa_r == exp_r && ecdsa_s == exp_s,
            "ECDSA inputs e = m xor C, r, s");
      check(par_qx == DEF_Q_X && par_qy == DEF_Q_Y && par_n == P192_N, "ECDSA key and order");
      repeat (30) @(posedge clk);
      ecdsa_ok <= ecdsa_verdict; ecdsa_done <= 1'b1;
      @(posedge clk);
      ecdsa_done <= 1'b0;
    end
  end

  // tester side of one exchange
  task automatic xchg(input u192 win, output u192 wout);
    int t = 0;
    while (!(xreq && !xack) && t < 2000000) begin @(posedge clk); t++; end
    check(t < 2000000, "exchange offered");
    wout = xout;
    repeat (5) @(posedge clk);
    check(xout == wout, "offered word stable while req is high");
    xin <= win; xack <= 1'b1;
    while (xreq) @(posedge clk);
    repeat (3) @(posedge clk);
    xack <= 1'b0;                 // xin stays until the next exchange
    repeat (3) @(posedge clk);
  endtask

  task automatic start(input auth_mode_e m, input bit expect_busy = 1'b1);
    auth_mode = m;
    foreach (n_op[i]) n_op[i] = 0;
    n_op.delete();
    @(posedge clk); request_unlock <= 1'b0;
    repeat (4) @(posedge clk);
    request_unlock <= 1'b1;
    repeat (6) @(posedge clk);
    check(busy == expect_busy, "controller starts on UNLOCK only when locked");
  endtask

  task automatic finish(input bit expect_ok);
    int t = 0;
    while (busy && t < 4000000) begin @(posedge clk); t++; end
    check(!busy, "controller finishes");
    check(release_lock == expect_ok, $sformatf("release_lock=%0d expected %0d", release_lock, expect_ok));
    check(fail == !expect_ok, "fail flag");
  endtask

  function automatic int nop(ecc_op_e o);
    return n_op.exists(o) ? n_op[o] : 0;
  endfunction

  task automatic reset_dut();
    rst_n = 1'b0; request_unlock = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
  endtask

  task automatic prover_side(input bit good);
    u192 ta_x, ta_y, nap, s, d;
    pt_t lhs, rhs, tb;
    tb = pmul(NBP, gen());
    xchg(tb.x, ta_x);
    xchg(tb.y, ta_y);
    xchg(NB, nap);
    d = madd(NBP, mmul(KB, nap, P192_N), P192_N);
    if (!good) d = madd(d, 192'd1, P192_N);
    xchg(d, s);
    if (auth_mode != AUTH_VERIFIER) begin
      lhs = pmul(s, gen());
      rhs = padd('{1'b0, ta_x, ta_y}, pmul(NB, '{1'b0, DEF_PA_X, DEF_PA_Y}));
      check(lhs == rhs, "device proof s*G == T_a + n_b*P_a");
      check(nap == 0 || auth_mode == AUTH_MUTUAL, "PROVER sends no challenge");
    end else begin
      check(ta_x == 0 && ta_y == 0 && s == 0, "VERIFIER sends no proof");
      check(nap != 0 && nap < P192_N, "challenge in range");
    end
  endtask

  initial begin
    u192 c, w;
    reset_dut();
    // PROVER
    start(AUTH_PROVER);
    prover_side(1'b1);
    finish(1'b1);
    check(nop(OP_PMUL) == 1 && nop(OP_FMUL) == 1 && nop(OP_FADD) == 1 && nop(OP_PADD) == 0,
          "PROVER: one PointMult, FieldMult, FieldAdd");
    // further requests are ignored while unlocked
    start(AUTH_VERIFIER, 1'b0);
    check(!busy && release_lock, "request ignored while unlocked");
    // VERIFIER wrong then right
    reset_dut();
    start(AUTH_VERIFIER);
    prover_side(1'b0);
    finish(1'b0);
    start(AUTH_VERIFIER);
    prover_side(1'b1);
    finish(1'b1);
    check(nop(OP_PMUL) == 2 && nop(OP_PADD) == 1 && nop(OP_FMUL) == 0,
          "VERIFIER: two PointMult, one PointAdd");
    // MUTUAL
    reset_dut();
    start(AUTH_MUTUAL);
    prover_side(1'b1);
    finish(1'b1);
    check(nop(OP_PMUL) == 3 && nop(OP_PADD) == 1 && nop(OP_FMUL) == 1 && nop(OP_FADD) == 1,
          "MUTUAL: three PointMult, PointAdd, FieldMult, FieldAdd");
    // ECDSA refused, then accepted
    for (int g = 0; g < 2; g++) begin
      reset_dut();
      start(AUTH_ECDSA);
      ecdsa_verdict = g[0];
      exp_r = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom} >> 1;
      exp_s = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom} >> 1;
      xchg(192'h1234_5678_9abc, c);
      exp_e = 192'h1234_5678_9abc ^ c;
      check(c != 0 && c < P192_N, "challenge C in range");
      xchg(exp_r, w);
      check(w == 0, "ECDSA sends zero in X2");
      xchg(exp_s, w);
      finish(g[0]);
      check(nop(OP_PMUL) == 0, "ECDSA arithmetic runs in the ECDSA controller");
    end
    // abort: tester leaves UNLOCK while the device waits in an exchange
    reset_dut();
    start(AUTH_PROVER);
    while (!xreq) @(posedge clk);
    request_unlock <= 1'b0;
    repeat (10) @(posedge clk);
    check(!busy && fail && !release_lock, "abort leaves the design locked with fail");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
