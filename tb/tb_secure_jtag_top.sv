// tb_secure_jtag_top: end-to-end test of the secure JTAG at full size
// (W = 192, NIST P-192, default parameters).
//
// The external non-volatile memory is the behavioural model nvm. The
// Design I point multiplier beside the secure JTAG is checked once.
// A tester model drives TCK/TMS/TDI (100 MHz) while the functional clock runs
// at 123 MHz. For each authentication mode it resets the device, checks that
// the port is locked (a DUTREG scan only sees the one-bit bypass path and
// cannot write the core), loads UNLOCK and runs the protocol through the
// Schnorr register, polling the synchronisation bit until the device is
// ready. The tester's own side is computed with the reference package:
//   PROVER   : verifies s*G == T_a + n_b*P_a with the device's public key;
//   VERIFIER : proves with k_b (T_b = n_b'*G, s_1 = n_b' + k_b*n_a'); first
//              with a wrong s_1, which must be refused, then correctly;
//   MUTUAL   : both;
//   ECDSA    : signs m xor C with the authority key.
// After acceptance it reads and writes the DUT register and drives pins with
// EXTEST. It counts every mechanism (not-ready polls, word exchanges, lock
// refusals, failed and successful unlocks, each mode, PointMult runs) and
// fails if one never happened. It also reports the functional clock cycles
// of each protocol and checks them against the scenario budgets of Table 2
// of the design description (Design II) with 5 % margin.
//
// Expected values are worked out independently in the bench; the cases
// and sizes are this bench's own choice.
module tb_secure_jtag_top;
  import secjtag_pkg::*;
  import ec_ref_pkg::*;
  localparam int unsigned W = 192;

  localparam u192 KB  = 192'h2f1e0d0c0b0a09080706050403020100fedcba9876543210;
  localparam u192 DCA = 192'h0badc0de1234567890abcdef0fedcba987654321deadbeef;
  localparam u192 NBP = 192'h6b8b4567327b23c6643c98696633487374b0dc5119495cff;
  localparam u192 NB  = 192'h2ae8944a625558ec238e1f2946e87ccd3d1b58ba507ed7ab;
  localparam u192 KK  = 192'h41b71efb79e2a9e37545e146515f007ff4a6c2fe3f8f1f1b;
  localparam u192 MSG = 192'h0123456789abcdeffedcba98765432100011223344556677;

  logic tck = 1'b0, clk = 1'b0, tms = 1'b1, tdi = 1'b0, trst_n = 1'b0, rst_n = 1'b0;
  logic tdo;
  auth_mode_e auth_mode = AUTH_PROVER;
  logic [W-1:0] seed = 192'hc0ffee;
  logic [7:0]  core_out = 8'ha5;
  logic [7:0]  pin_out;
  logic [31:0] dut_status = 32'hdeadbeef, dut_ctrl;
  logic unlocked, auth_busy, auth_fail;
  logic d1_start = 1'b0, d1_busy, d1_done, d1_err;
  logic [W-1:0] d1_k = '0, d1_x, d1_y, d1_rr;
  initial d1_rr = mmul(192'(0) - P192_P, 192'(0) - P192_P, P192_P);   // 2^384 mod p
  int n_d1 = 0;
  logic [3:0] nvm_addr;
  logic [W-1:0] nvm_rdata;

  int checks = 0, failures = 0;
  int n_notready = 0, n_xchg = 0, n_refused = 0, n_fail = 0, n_unlock = 0, n_pmul = 0;
  int n_mode [4] = '{0, 0, 0, 0};
  longint ecc_cycles = 0;

  always #5 tck = ~tck;      // 100 MHz test clock
  always #4 clk = ~clk;      // 125 MHz functional clock (123 MHz in the description)

  secure_jtag_top dut (
    .tck, .tms, .tdi, .trst_n, .tdo, .clk, .rst_n, .auth_mode, .seed,
    .core_out, .pin_out, .dut_status, .dut_ctrl,
    .nvm_addr, .nvm_rdata,
    .d1_start, .d1_k, .d1_px(P192_GX), .d1_py(P192_GY), .d1_p(P192_P),
    .d1_rr, .d1_busy, .d1_done, .d1_err,
    .d1_x, .d1_y,
    .unlocked, .auth_busy, .auth_fail
  );

  // external non-volatile memory holding the curve and the keys
  nvm #(.W(W)) u_nvm (.clk, .raddr(nvm_addr), .rdata(nvm_rdata), .prog_en(1'b0),
                      .prog_addr(4'd0), .prog_data('0));

  always @(posedge clk) begin
    if (dut.u_ecmult.busy) ecc_cycles++;
    if (dut.u_ecmult.start && !dut.u_ecmult.busy && dut.u_ecmult.op == OP_PMUL) n_pmul++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // one TCK cycle: drive at the falling edge, sample TDO before the rising edge
  task automatic step(input logic m, input logic d, output logic o);
    @(negedge tck);
    #1 tms = m; tdi = d;
    #3 o = tdo;
    @(posedge tck);
  endtask

  task automatic goto_rti();
    logic o;
    for (int i = 0; i < 5; i++) step(1'b1, 1'b0, o);
    step(1'b0, 1'b0, o);
  endtask

  task automatic load_ir(input logic [IR_W-1:0] code, output logic [IR_W-1:0] cap);
    logic o;
    step(1, 0, o); step(1, 0, o); step(0, 0, o); step(0, 0, o);   // -> Shift-IR
    for (int i = 0; i < IR_W; i++) begin
      step(i == IR_W-1, code[i], o);
      cap[i] = o;
    end
    step(1, 0, o); step(0, 0, o);                                // Update-IR -> RTI
  endtask

  // plain DR scan of n bits (n <= 64)
  task automatic scan_dr(input int n, input logic [63:0] din, output logic [63:0] dout);
    logic o;
    dout = '0;
    step(1, 0, o); step(0, 0, o); step(0, 0, o);                 // -> Shift-DR
    for (int i = 0; i < n; i++) begin
      step(i == n-1, din[i], o);
      dout[i] = o;
    end
    step(1, 0, o); step(0, 0, o);
  endtask

  // one word exchange through the Schnorr register, polling until ready
  task automatic xchg(input u192 win, output u192 wout);
    logic o;
    int tries = 0;
    forever begin
      step(1, 0, o); step(0, 0, o); step(0, 0, o);               // -> Shift-DR
      // first bit: the synchronisation flag decides how long this scan is
      @(negedge tck);
      #1;
      if (tdo) begin
        tms = 1'b0; tdi = 1'b0;                                  // dummy bit in
        @(posedge tck);
        for (int i = 1; i <= W; i++) begin
          step(i == W, win[i-1], o);
          wout[i-1] = o;
        end
        step(1, 0, o); step(0, 0, o);                            // Update-DR -> RTI
        n_xchg++;
        return;
      end
      tms = 1'b1; tdi = 1'b0;                                    // 1-bit scan -> Exit1
      @(posedge tck);
      step(1, 0, o); step(0, 0, o);                              // Update -> RTI
      n_notready++;
      for (int i = 0; i < 200; i++) step(0, 0, o);               // idle before polling again
      tries++;
      if (tries > 100000) begin
        check(0, "device never became ready");
        return;
      end
    end
  endtask

  task automatic reset_all(input auth_mode_e m);
    trst_n = 1'b0; rst_n = 1'b0; auth_mode = m;
    repeat (4) @(posedge clk);
    trst_n = 1'b1; rst_n = 1'b1;
    goto_rti();
  endtask

  // access checks while locked: DUTREG behaves as a 1-bit bypass
  task automatic check_locked();
    logic [IR_W-1:0] cap;
    logic [63:0] dout;
    load_ir(IR_DUTREG, cap);
    check(cap[1:0] == 2'b01, "IR capture pattern");
    check(cap[3] == 1'b0, "IR capture shows locked");
    scan_dr(33, 64'h1_1234_5678, dout);
    @(negedge tck);
    check(dout[32:1] == 32'h1234_5678 && dout[0] == 1'b0, "locked DUTREG scan is a 1-bit bypass");
    check(dut_ctrl == 32'h0, "locked DUTREG cannot write the core");
    n_refused++;
  endtask

  task automatic check_unlocked();
    logic [IR_W-1:0] cap;
    logic [63:0] dout;
    load_ir(IR_DUTREG, cap);
    check(cap[3] == 1'b1, "IR capture shows unlocked");
    scan_dr(32, 64'h0000_0000_cafe_f00d, dout);
    @(negedge tck);
    check(dout[31:0] == dut_status, "unlocked DUTREG reads the core status");
    check(dut_ctrl == 32'hcafe_f00d, "unlocked DUTREG writes the core");
    load_ir(IR_EXTEST, cap);
    scan_dr(8, 64'h3c, dout);
    @(negedge tck);
    check(dout[7:0] == core_out, "EXTEST captures core outputs");
    check(pin_out == 8'h3c, "EXTEST drives the pins");
  endtask

  task automatic wait_done();
    int t = 0;
    while (auth_busy && t < 4000000) begin @(posedge clk); t++; end
    repeat (10) @(posedge tck);
  endtask

  task automatic run_mode(input auth_mode_e m, input bit good, input longint budget);
    logic [IR_W-1:0] cap;
    u192 ta_x, ta_y, w, s_dev, nap, c, r, s, e, s1;
    pt_t tb, lhs, rhs, rr;
    longint c0;
    reset_all(m);
    check_locked();
    c0 = ecc_cycles;
    load_ir(IR_UNLOCK, cap);
    tb = pmul(NBP, gen());
    if (m == AUTH_ECDSA) begin
      xchg(MSG, c);
      e  = MSG ^ c;
      rr = pmul(KK, gen());
      r  = (rr.x >= P192_N) ? rr.x - P192_N : rr.x;
      s  = mmul(minv(KK, P192_N),
                madd((e >= P192_N) ? e - P192_N : e, mmul(r, DCA, P192_N), P192_N), P192_N);
      xchg(r, w);
      xchg(good ? s : s ^ 192'h4, w);
    end else begin
      xchg(tb.x, ta_x);                    // X1
      xchg(tb.y, ta_y);                    // X2
      xchg(NB, nap);                       // X3
      s1 = madd(NBP, mmul(KB, nap, P192_N), P192_N);
      if (!good) s1 = madd(s1, 192'd1, P192_N);
      xchg(s1, s_dev);                     // X4
      if (m == AUTH_PROVER || m == AUTH_MUTUAL) begin
        lhs = pmul(s_dev, gen());
        rhs = padd('{1'b0, ta_x, ta_y}, pmul(NB, '{1'b0, DEF_PA_X, DEF_PA_Y}));
        check(!lhs.inf && lhs == rhs, "device proof s*G == T_a + n_b*P_a");
      end
    end
    wait_done();
    load_ir(IR_BYPASS, cap);               // leave UNLOCK
    check(unlocked == good, $sformatf("mode %s unlock=%0d expected %0d", m.name(), unlocked, good));
    check(auth_fail == !good, "fail flag");
    $display("mode %s good=%0d: %0d functional cycles in ECC (budget %0d)", m.name(), good,
             ecc_cycles - c0, budget);
    if (good) check((ecc_cycles - c0) * 100 <= budget * 105, "protocol cycles within Table 2 budget");
    if (good) begin check_unlocked(); n_unlock++; n_mode[m]++; end
    else begin check_locked(); n_fail++; end
  endtask

  // Design I point multiplier beside the secure JTAG: k*G
  task automatic run_design1(input u192 kk);
    pt_t e;
    int t = 0;
    @(posedge clk); d1_k <= kk; d1_start <= 1'b1;
    @(posedge clk); d1_start <= 1'b0;
    while (!d1_done && t < 3000000) begin @(posedge clk); t++; end
    e = pmul(kk, gen());
    check(!d1_err && d1_x == e.x && d1_y == e.y, "Design I point multiplication");
    $display("Design I k*G: %0d functional cycles (3068150 in the description)", t);
    n_d1++;
  endtask

  initial begin
    run_mode(AUTH_PROVER,   1'b1, 240762);
    run_design1(KK);
    run_mode(AUTH_VERIFIER, 1'b0, 482130);
    run_mode(AUTH_VERIFIER, 1'b1, 482130);
    run_mode(AUTH_MUTUAL,   1'b1, 722892);
    run_mode(AUTH_ECDSA,    1'b0, 482324);
    run_mode(AUTH_ECDSA,    1'b1, 482324);
    $display("mechanisms: notready=%0d xchg=%0d refused=%0d fail=%0d unlock=%0d pmul=%0d",
             n_notready, n_xchg, n_refused, n_fail, n_unlock, n_pmul);
    check(n_notready > 0, "not-ready poll seen");
    check(n_xchg > 0, "word exchange seen");
    check(n_refused > 0, "locked access refused");
    check(n_fail > 0, "failed authentication seen");
    check(n_pmul > 0, "PointMult seen");
    check(n_d1 > 0, "Design I point multiplication seen");
    for (int i = 0; i < 4; i++) check(n_mode[i] > 0, $sformatf("mode %0d unlocked", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
