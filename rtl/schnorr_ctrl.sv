// schnorr_ctrl: Schnorr protocol controller of the secure JTAG.
//
// Starts when request_unlock rises (the UNLOCK instruction was loaded) while
// the design is locked. It reseeds the PRNG, copies the curve parameters
// and keys from the NVM into working registers, draws two nonces from the
// PRNG (W clocks apart, reduced modulo n) and then runs one of four
// protocols, chosen by auth_mode (a strap of the device):
//   PROVER   (device proves itself):  T_a = n_a*G; send T_a; receive the
//            challenge n_b; send s = n_a + k_a*n_b mod n.
//   VERIFIER (device checks tester):  receive T_b; send challenge n_a';
//            receive s_1; accept when s_1*G == T_b + n_a'*P_b.
//   MUTUAL   both of the above interleaved in the same four exchanges.
//   ECDSA    send a challenge C; receive m, r, s; accept when (r, s) is a
//            valid signature by the authority key Q on e = m xor C.
// Word exchanges with the tester (one W-bit word each way per scan) are
//   X1: out T_a.x or C,   in T_b.x or m
//   X2: out T_a.y,        in T_b.y or r
//   X3: out n_a',         in n_b   or s
//   X4: out s,            in s_1            (not used by ECDSA)
// with zero words where a role does not apply. Every arithmetic step is an
// instruction to the ECMULT controller (PointMult, PointAdd, FieldMult,
// FieldAdd); the ECDSA check runs in ecdsa_ctrl, started from here.
// release_lock rises when the tester was verified (VERIFIER, MUTUAL,
// ECDSA) or when the proof has been sent (PROVER, for the trusted
// manufacturing environment) and stays high until reset; a failed check
// sets fail and leaves the design locked until UNLOCK is requested again.
// The exchange order, the mode strap and the relock policy are this
// design's own; the protocol steps follow the Schnorr and ECDSA equations.
//
// Clocking: everything runs on the functional clock clk. request_unlock
// and xack come from the TCK domain and are synchronised here; xout is held
// stable while xreq is high and xin is read only after xack rises.
module schnorr_ctrl
  import secjtag_pkg::*;
#(
  parameter int unsigned W = 192
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         request_unlock,
  input  auth_mode_e   auth_mode,
  output logic         release_lock,
  output logic         busy,
  output logic         fail,
  // NVM read port (one clock latency)
  output logic [3:0]   nvm_addr,
  input  logic [W-1:0] nvm_rdata,
  // PRNG
  input  logic [W-1:0] rnd,
  output logic         reseed,
  // word exchange with the Schnorr shift register (four-phase handshake)
  output logic [W-1:0] xout,
  output logic         xreq,
  input  logic [W-1:0] xin,
  input  logic         xack,
  // ECMULT instruction port
  output logic         ec_start,
  output ecc_op_e      ec_op,
  output logic [W-1:0] ec_k,
  output logic [W-1:0] ec_x1,
  output logic [W-1:0] ec_y1,
  output logic [W-1:0] ec_x2,
  output logic [W-1:0] ec_y2,
  output logic [W-1:0] ec_m,
  output logic [W-1:0] ec_a,
  input  logic         ec_done,
  input  logic         ec_err,
  input  logic [W-1:0] ec_x3,
  input  logic [W-1:0] ec_y3,
  // ECDSA controller
  output logic         ecdsa_start,
  output logic [W-1:0] ecdsa_e,
  output logic [W-1:0] ecdsa_r,
  output logic [W-1:0] ecdsa_s,
  input  logic         ecdsa_done,
  input  logic         ecdsa_ok,
  // working copies of the NVM words, shared with the ECDSA controller
  output logic [W-1:0] par_p,
  output logic [W-1:0] par_a,
  output logic [W-1:0] par_n,
  output logic [W-1:0] par_gx,
  output logic [W-1:0] par_gy,
  output logic [W-1:0] par_qx,
  output logic [W-1:0] par_qy
);
  localparam int unsigned NL = 10;
  localparam int unsigned CW = $clog2(2*W + 2);

  typedef enum logic [4:0] {
    S_IDLE, S_LOAD, S_WARM, S_TA, S_XOUT, S_XWAIT, S_XREL, S_KNB, S_SADD,
    S_SP, S_NBP, S_SUM, S_CMP, S_ECDSA, S_FIN, S_ABORT
  } state_e;

  state_e       st;
  auth_mode_e   mode;
  logic         req_s, req_d, ack_s, issued, ok;
  logic [1:0]   xi;
  logic [3:0]   ld_i;
  logic [CW-1:0] wcnt;
  logic [W-1:0] ka, pbx, pby, na, nap, tax, tay, sv, w1, w2, w3, spx, spy;
  logic         prover, verifier, is_ecdsa;

  sync2 u_req_sync (.clk, .rst_n, .d(request_unlock), .q(req_s));
  sync2 u_ack_sync (.clk, .rst_n, .d(xack), .q(ack_s));

  assign prover   = (mode == AUTH_PROVER)   || (mode == AUTH_MUTUAL);
  assign verifier = (mode == AUTH_VERIFIER) || (mode == AUTH_MUTUAL);
  assign is_ecdsa = (mode == AUTH_ECDSA);

  function automatic logic [W-1:0] red(logic [W-1:0] v, logic [W-1:0] m);
    return (v >= m) ? v - m : v;
  endfunction

  // NVM words copied at start, in this order
  function automatic logic [3:0] ld_addr(logic [3:0] i);
    unique case (i)
      4'd0: ld_addr = NVM_P;    4'd1: ld_addr = NVM_A;    4'd2: ld_addr = NVM_N;
      4'd3: ld_addr = NVM_GX;   4'd4: ld_addr = NVM_GY;   4'd5: ld_addr = NVM_KA;
      4'd6: ld_addr = NVM_PB_X; 4'd7: ld_addr = NVM_PB_Y; 4'd8: ld_addr = NVM_Q_X;
      default: ld_addr = NVM_Q_Y;
    endcase
  endfunction

  assign nvm_addr = ld_addr(ld_i);

  // instruction port to the ECMULT controller
  always_comb begin
    ec_op = OP_NOP; ec_k = '0; ec_x1 = '0; ec_y1 = '0; ec_x2 = '0; ec_y2 = '0;
    ec_m = par_p; ec_a = par_a;
    unique case (st)
      S_TA:   begin ec_op = OP_PMUL; ec_k = na;  ec_x1 = par_gx; ec_y1 = par_gy; end
      S_KNB:  begin ec_op = OP_FMUL; ec_x1 = ka; ec_x2 = red(w3, par_n); ec_m = par_n; end
      S_SADD: begin ec_op = OP_FADD; ec_x1 = na; ec_x2 = sv; ec_m = par_n; end
      S_SP:   begin ec_op = OP_PMUL; ec_k = red(xin, par_n); ec_x1 = par_gx; ec_y1 = par_gy; end
      S_NBP:  begin ec_op = OP_PMUL; ec_k = nap; ec_x1 = pbx; ec_y1 = pby; end
      S_SUM:  begin ec_op = OP_PADD; ec_x1 = w1; ec_y1 = w2; ec_x2 = sv; ec_y2 = w3; end
      default: ;
    endcase
    ec_start = (st inside {S_TA, S_KNB, S_SADD, S_SP, S_NBP, S_SUM}) && !issued;
  end

  assign ecdsa_e = w1 ^ nap;
  assign ecdsa_r = w2;
  assign ecdsa_s = w3;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; mode <= AUTH_PROVER; req_d <= 1'b0; issued <= 1'b0; ok <= 1'b0;
      xi <= '0; ld_i <= '0; wcnt <= '0;
      release_lock <= 1'b0; fail <= 1'b0; reseed <= 1'b0; xreq <= 1'b0; xout <= '0;
      ecdsa_start <= 1'b0;
      par_p <= '0; par_a <= '0; par_n <= '0; par_gx <= '0; par_gy <= '0; par_qx <= '0; par_qy <= '0;
      ka <= '0; pbx <= '0; pby <= '0; na <= '0; nap <= '0; tax <= '0; tay <= '0; sv <= '0;
      w1 <= '0; w2 <= '0; w3 <= '0; spx <= '0; spy <= '0;
    end else begin
      req_d       <= req_s;
      reseed      <= 1'b0;
      ecdsa_start <= 1'b0;
      if (ec_start) issued <= 1'b1;
      unique case (st)
        S_IDLE: if (req_s && !req_d && !release_lock) begin
          mode <= auth_mode; reseed <= 1'b1; fail <= 1'b0; ok <= 1'b0;
          ld_i <= '0; st <= S_LOAD;
        end
        S_LOAD: begin
          ld_i <= ld_i + 1'b1;
          if (ld_i != 4'd0) begin
            unique case (ld_i - 1'b1)
              4'd0: par_p  <= nvm_rdata;  4'd1: par_a  <= nvm_rdata;
              4'd2: par_n  <= nvm_rdata;  4'd3: par_gx <= nvm_rdata;
              4'd4: par_gy <= nvm_rdata;  4'd5: ka     <= nvm_rdata;
              4'd6: pbx    <= nvm_rdata;  4'd7: pby    <= nvm_rdata;
              4'd8: par_qx <= nvm_rdata;  default: par_qy <= nvm_rdata;
            endcase
          end
          if (ld_i == 4'(NL)) begin wcnt <= '0; st <= S_WARM; end
        end
        S_WARM: begin
          // let the reseeded LFSR run W clocks between the two nonces
          wcnt <= wcnt + 1'b1;
          if (wcnt == CW'(W))   na  <= red(rnd, par_n);
          if (wcnt == CW'(2*W)) begin
            nap <= red(rnd, par_n);
            issued <= 1'b0; xi <= '0;
            st <= prover ? S_TA : S_XOUT;
          end
        end
        S_TA: if (ec_done) begin
          tax <= ec_x3; tay <= ec_y3; issued <= 1'b0;
          st <= ec_err ? S_FIN : S_XOUT;
        end
        S_XOUT: begin
          unique case (xi)
            2'd0: xout <= prover ? tax : (is_ecdsa ? nap : '0);
            2'd1: xout <= prover ? tay : '0;
            2'd2: xout <= (verifier ? nap : '0);
            default: xout <= prover ? sv : '0;
          endcase
          xreq <= 1'b1;
          st   <= S_XWAIT;
        end
        S_XWAIT: begin
          if (ack_s) begin
            unique case (xi)
              2'd0: w1 <= xin;
              2'd1: w2 <= xin;
              2'd2: w3 <= xin;
              default: ;          // s_1 is used directly from xin
            endcase
            xreq <= 1'b0;
            st   <= S_XREL;
          end else if (!req_s) begin
            xreq <= 1'b0;         // tester left UNLOCK: abort
            st   <= S_ABORT;
          end
        end
        S_XREL: if (!ack_s) begin
          issued <= 1'b0;
          xi <= xi + 1'b1;
          unique case (xi)
            2'd0: st <= S_XOUT;
            2'd1: st <= S_XOUT;
            2'd2: if (is_ecdsa) begin ecdsa_start <= 1'b1; st <= S_ECDSA; end
                  else if (prover) st <= S_KNB;
                  else             st <= S_XOUT;
            default: st <= verifier ? S_SP : S_FIN;
          endcase
          if (xi == 2'd3 && !verifier) ok <= 1'b1;
        end
        S_KNB: if (ec_done) begin
          sv <= ec_x3; issued <= 1'b0; st <= S_SADD;
        end
        S_SADD: if (ec_done) begin
          sv <= ec_x3; issued <= 1'b0; st <= S_XOUT;
        end
        S_SP: if (ec_done) begin
          spx <= ec_x3; spy <= ec_y3; issued <= 1'b0;
          st <= ec_err ? S_FIN : S_NBP;
        end
        S_NBP: if (ec_done) begin
          // n_a' * P_b kept in sv / w3 (no longer needed)
          sv <= ec_x3; w3 <= ec_y3; issued <= 1'b0;
          st <= ec_err ? S_FIN : S_SUM;
        end
        S_SUM: if (ec_done) begin
          ok <= !ec_err && (ec_x3 == spx) && (ec_y3 == spy) && (w1 < par_p) && (w2 < par_p);
          issued <= 1'b0;
          st <= S_FIN;
        end
        S_ECDSA: if (ecdsa_done) begin ok <= ecdsa_ok; st <= S_FIN; end
        S_FIN: begin
          release_lock <= ok;
          fail         <= !ok;
          st           <= S_IDLE;
        end
        S_ABORT: if (!ack_s) begin fail <= 1'b1; st <= S_IDLE; end
        default: st <= S_IDLE;
      endcase
    end
  end

  assign busy = (st != S_IDLE);
endmodule
