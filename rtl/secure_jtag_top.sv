// secure_jtag_top: IEEE 1149.1 test access port locked behind Schnorr
// authentication on the NIST P-192 elliptic curve.
//
// TCK domain: TAP controller, instruction register, modified instruction
// decoder, Schnorr shift register with MUX2 and synchronisation flip-flop,
// boundary scan register and a DUT specific register, and MUX1 in front of
// TDO (TDO changes on the falling TCK edge). Functional clock domain: the
// Schnorr controller, the ECDSA controller, the ECMULT controller with the
// affine datapath (adder, subtractor, Blakley multiplier, binary
// inversion/division) and the 192-bit LFSR PRNG. The curve parameters and
// keys are read from an external non-volatile memory through the nvm_addr /
// nvm_rdata port (one word per clock, one clock of read latency). The two domains
// meet only through request_unlock, release_lock, the busy flag and the
// four-phase word handshake of the Schnorr shift register, all synchronised
// with two flip-flops; tck and clk may also be the same clock.
//
// Beside it, with ports of its own, stands the point multiplier of the
// alternative projective-coordinate ECC design (Design I, Montgomery
// multiplication); it is not used by the secure JTAG, which runs on the
// affine Design II engine.
//
// Use: after reset the port is locked and every DR scan goes through the
// one-bit synchronisation path. The tester loads UNLOCK, which starts the
// protocol selected by auth_mode, then repeatedly scans the Schnorr register:
// a scan whose first bit is 1 carries a W-bit word each way. When the
// controller accepts, release_lock opens EXTEST, SAMPLE and DUTREG. The IR
// capture value is {unlocked, busy, 0, 1}. The seed input provides the PRNG
// reseed value taken when UNLOCK is requested.
module secure_jtag_top
  import secjtag_pkg::*;
#(
  parameter int unsigned W     = 192,
  parameter int unsigned BSR_N = 8,
  parameter int unsigned DUT_N = 32
) (
  // JTAG port
  input  logic             tck,
  input  logic             tms,
  input  logic             tdi,
  input  logic             trst_n,
  output logic             tdo,
  // functional clock and reset
  input  logic             clk,
  input  logic             rst_n,
  input  auth_mode_e       auth_mode,
  input  logic [W-1:0]     seed,
  // protected core
  input  logic [BSR_N-1:0] core_out,
  output logic [BSR_N-1:0] pin_out,
  input  logic [DUT_N-1:0] dut_status,
  output logic [DUT_N-1:0] dut_ctrl,
  // external non-volatile memory (curve parameters and keys)
  output logic [3:0]       nvm_addr,
  input  logic [W-1:0]     nvm_rdata,
  // Design I point multiplier (separate unit, functional clock)
  input  logic             d1_start,
  input  logic [W-1:0]     d1_k,
  input  logic [W-1:0]     d1_px,
  input  logic [W-1:0]     d1_py,
  input  logic [W-1:0]     d1_p,
  input  logic [W-1:0]     d1_rr,
  output logic             d1_busy,
  output logic             d1_done,
  output logic             d1_err,
  output logic [W-1:0]     d1_x,
  output logic [W-1:0]     d1_y,
  // status
  output logic             unlocked,
  output logic             auth_busy,
  output logic             auth_fail
);
  // ---------------- TCK domain ----------------
  tap_state_e      tap_state;
  logic            tlr, cap_dr, sh_dr, upd_dr, cap_ir, sh_ir, upd_ir;
  logic [IR_W-1:0] ir;
  logic            ir_tdo, sj_tdo, bsr_tdo, dut_tdo, mux1_out;
  logic            request_unlock, sel_schnorr, sel_bsr, sel_dut, extest;
  logic [1:0]      mux1_sel;
  logic            unlocked_t, busy_t, ir_scan;
  logic            release_lock;   // functional domain, synchronised below
  logic [W-1:0]    xout, xin;
  logic            xreq, xack;

  tap_fsm u_tap (
    .tck, .trst_n, .tms, .state(tap_state), .test_logic_reset(tlr),
    .capture_dr(cap_dr), .shift_dr(sh_dr), .pause_dr(), .update_dr(upd_dr),
    .capture_ir(cap_ir), .shift_ir(sh_ir), .pause_ir(), .update_ir(upd_ir)
  );

  jtag_ir #(.IRW(IR_W), .RST_IR(IR_BYPASS)) u_ir (
    .tck, .trst_n, .tlr, .tdi, .capture_ir(cap_ir), .shift_ir(sh_ir), .update_ir(upd_ir),
    .cap_val({unlocked_t, busy_t, 2'b01}), .tdo_bit(ir_tdo), .ir
  );

  assign ir_scan = (tap_state inside {SEL_IR, CAPTURE_IR, SHIFT_IR, EXIT1_IR, PAUSE_IR,
                                      EXIT2_IR, UPDATE_IR});

  sync2 u_rel_sync  (.clk(tck), .rst_n(trst_n), .d(release_lock), .q(unlocked_t));
  sync2 u_busy_sync (.clk(tck), .rst_n(trst_n), .d(auth_busy),    .q(busy_t));

  instr_decoder u_dec (
    .ir, .unlocked(unlocked_t), .ir_scan, .request_unlock, .sel_schnorr, .sel_bsr,
    .sel_dut, .extest, .mux1_sel
  );

  schnorr_dr #(.W(W)) u_sdr (
    .tck, .trst_n, .tdi, .sel(sel_schnorr), .capture_dr(cap_dr), .shift_dr(sh_dr),
    .update_dr(upd_dr), .out_word(xout), .req(xreq), .in_word(xin), .ack(xack),
    .tdo_bit(sj_tdo), .valid()
  );

  boundary_scan #(.N(BSR_N)) u_bsr (
    .tck, .trst_n, .tdi, .sel(sel_bsr), .extest, .capture_dr(cap_dr), .shift_dr(sh_dr),
    .update_dr(upd_dr), .core_out, .pin_out, .tdo_bit(bsr_tdo)
  );

  dut_reg #(.N(DUT_N)) u_dut (
    .tck, .trst_n, .tdi, .sel(sel_dut), .capture_dr(cap_dr), .shift_dr(sh_dr),
    .update_dr(upd_dr), .status_in(dut_status), .ctrl_out(dut_ctrl), .tdo_bit(dut_tdo)
  );

  // MUX1
  always_comb begin
    unique case (mux1_sel)
      2'd0:    mux1_out = ir_tdo;
      2'd2:    mux1_out = bsr_tdo;
      2'd3:    mux1_out = dut_tdo;
      default: mux1_out = sj_tdo;
    endcase
  end

  always_ff @(negedge tck or negedge trst_n) begin
    if (!trst_n) tdo <= 1'b0;
    else         tdo <= mux1_out;
  end

  // ---------------- functional clock domain ----------------
  logic         reseed;
  logic [W-1:0] rnd;
  logic [W-1:0] par_p, par_a, par_n, par_gx, par_gy, par_qx, par_qy;
  logic [W-1:0] e_e, e_r, e_s;
  logic         e_start, e_busy, e_done, e_ok;
  // instruction ports: Schnorr (s_*), ECDSA (d_*), to ECMULT (m_*)
  logic         s_start, d_start, m_start, m_done, m_err;
  ecc_op_e      s_op, d_op, m_op;
  logic [W-1:0] s_k, s_x1, s_y1, s_x2, s_y2, s_m, s_a;
  logic [W-1:0] d_k, d_x1, d_y1, d_x2, d_y2, d_m, d_a;
  logic [W-1:0] m_k, m_x1, m_y1, m_x2, m_y2, m_m, m_a, m_x3, m_y3;

  prng_lfsr #(.W(W)) u_prng (.clk, .rst_n, .reseed, .seed, .rnd);

  schnorr_ctrl #(.W(W)) u_schnorr (
    .clk, .rst_n, .request_unlock, .auth_mode, .release_lock, .busy(auth_busy),
    .fail(auth_fail), .nvm_addr, .nvm_rdata, .rnd, .reseed,
    .xout, .xreq, .xin, .xack,
    .ec_start(s_start), .ec_op(s_op), .ec_k(s_k), .ec_x1(s_x1), .ec_y1(s_y1),
    .ec_x2(s_x2), .ec_y2(s_y2), .ec_m(s_m), .ec_a(s_a),
    .ec_done(m_done), .ec_err(m_err), .ec_x3(m_x3), .ec_y3(m_y3),
    .ecdsa_start(e_start), .ecdsa_e(e_e), .ecdsa_r(e_r), .ecdsa_s(e_s),
    .ecdsa_done(e_done), .ecdsa_ok(e_ok),
    .par_p, .par_a, .par_n, .par_gx, .par_gy, .par_qx, .par_qy
  );

  ecdsa_ctrl #(.W(W)) u_ecdsa (
    .clk, .rst_n, .start(e_start), .e(e_e), .r(e_r), .s(e_s), .n(par_n), .p(par_p),
    .a(par_a), .gx(par_gx), .gy(par_gy), .qx(par_qx), .qy(par_qy),
    .busy(e_busy), .done(e_done), .ok(e_ok),
    .ec_start(d_start), .ec_op(d_op), .ec_k(d_k), .ec_x1(d_x1), .ec_y1(d_y1),
    .ec_x2(d_x2), .ec_y2(d_y2), .ec_m(d_m), .ec_a(d_a),
    .ec_done(m_done), .ec_err(m_err), .ec_x3(m_x3), .ec_y3(m_y3)
  );

  // the ECDSA controller owns the ECMULT port while it runs
  always_comb begin
    if (e_busy) begin
      m_start = d_start; m_op = d_op; m_k = d_k; m_x1 = d_x1; m_y1 = d_y1;
      m_x2 = d_x2; m_y2 = d_y2; m_m = d_m; m_a = d_a;
    end else begin
      m_start = s_start; m_op = s_op; m_k = s_k; m_x1 = s_x1; m_y1 = s_y1;
      m_x2 = s_x2; m_y2 = s_y2; m_m = s_m; m_a = s_a;
    end
  end

  ecmult_ctrl #(.W(W)) u_ecmult (
    .clk, .rst_n, .start(m_start), .op(m_op), .k(m_k), .x1(m_x1), .y1(m_y1),
    .x2(m_x2), .y2(m_y2), .m(m_m), .a(m_a), .busy(), .done(m_done), .err(m_err),
    .x3(m_x3), .y3(m_y3), .n_dbl(), .n_add()
  );

  assign unlocked = release_lock;

  ecc_ctrl_design1 #(.W(W)) u_design1 (
    .clk, .rst_n, .start(d1_start), .k(d1_k), .px(d1_px), .py(d1_py), .p(d1_p), .rr(d1_rr),
    .busy(d1_busy), .done(d1_done), .err(d1_err), .x(d1_x), .y(d1_y)
  );
endmodule
