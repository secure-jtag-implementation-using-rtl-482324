// ecdsa_ctrl: ECDSA signature verification controller (Design II).
//
// Verifies a signature (r, s) on a W-bit message e with the public key Q of
// the signing authority, without hashing (the message is no longer than the
// field). It issues instructions to the ECMULT controller:
//   range check 1 <= r, s < n;  w  = FieldInv(s) mod n;
//   u1 = FieldMult(e mod n, w) mod n;  u2 = FieldMult(r, w) mod n;
//   X1 = PointMult(u1, G);  X2 = PointMult(u2, Q);  X = PointAdd(X1, X2);
//   valid when X.x mod n == r.
// Two scalar multiplications dominate the run time.
//
// Interface: e, r, s and the curve/key inputs are sampled on start in the
// idle state and must stay stable while busy (they are held by the Schnorr
// controller). done pulses one cycle with ok valid. The ec_* ports are the
// instruction port of the ECMULT controller: ec_start pulses once per
// instruction, the result is taken on ec_done; ec_a is the curve
// coefficient a passed straight through. Reset async, active low.
//
// The verification equations are standard ECDSA as the description uses
// them; the instruction order and the use of the divider for s^-1 are this
// design's own.
module ecdsa_ctrl
  import secjtag_pkg::*;
#(
  parameter int unsigned W = 192
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] e,
  input  logic [W-1:0] r,
  input  logic [W-1:0] s,
  input  logic [W-1:0] n,
  input  logic [W-1:0] p,
  input  logic [W-1:0] a,
  input  logic [W-1:0] gx,
  input  logic [W-1:0] gy,
  input  logic [W-1:0] qx,
  input  logic [W-1:0] qy,
  output logic         busy,
  output logic         done,
  output logic         ok,
  // instruction port to the ECMULT controller
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
  input  logic [W-1:0] ec_y3
);
  typedef enum logic [3:0] {S_IDLE, S_CHECK, S_INV, S_U1, S_U2, S_P1, S_P2, S_SUM, S_CMP, S_END} state_e;

  state_e       st;
  logic         issued, res;
  logic [W-1:0] w, u1, u2, x1p, y1p, xs;

  function automatic logic [W-1:0] red_n(logic [W-1:0] v, logic [W-1:0] nn);
    return (v >= nn) ? v - nn : v;
  endfunction

  always_comb begin
    ec_start = 1'b0;
    ec_op = OP_NOP; ec_k = '0; ec_x1 = '0; ec_y1 = '0; ec_x2 = '0; ec_y2 = '0;
    ec_m = n; ec_a = a;
    unique case (st)
      S_INV: begin ec_op = OP_FINV; ec_x1 = s; ec_y1 = W'(1); end
      S_U1:  begin ec_op = OP_FMUL; ec_x1 = red_n(e, n); ec_x2 = w; end
      S_U2:  begin ec_op = OP_FMUL; ec_x1 = r; ec_x2 = w; end
      S_P1:  begin ec_op = OP_PMUL; ec_k = u1; ec_x1 = gx; ec_y1 = gy; ec_m = p; end
      S_P2:  begin ec_op = OP_PMUL; ec_k = u2; ec_x1 = qx; ec_y1 = qy; ec_m = p; end
      S_SUM: begin ec_op = OP_PADD; ec_x1 = x1p; ec_y1 = y1p;
                   ec_x2 = xs; ec_y2 = u2; ec_m = p; end
      default: ;
    endcase
    if (st inside {S_INV, S_U1, S_U2, S_P1, S_P2, S_SUM}) ec_start = !issued;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; issued <= 1'b0; res <= 1'b0; done <= 1'b0; ok <= 1'b0;
      w <= '0; u1 <= '0; u2 <= '0; x1p <= '0; y1p <= '0; xs <= '0;
    end else begin
      done <= 1'b0;
      if (ec_start) issued <= 1'b1;
      unique case (st)
        S_IDLE: if (start) begin st <= S_CHECK; ok <= 1'b0; res <= 1'b0; end
        S_CHECK: begin
          issued <= 1'b0;
          if (r == '0 || s == '0 || r >= n || s >= n) st <= S_END;
          else                                         st <= S_INV;
        end
        S_INV: if (ec_done) begin
          w <= ec_x3; issued <= 1'b0; st <= ec_err ? S_END : S_U1;
        end
        S_U1: if (ec_done) begin u1 <= ec_x3; issued <= 1'b0; st <= S_U2; end
        S_U2: if (ec_done) begin u2 <= ec_x3; issued <= 1'b0; st <= S_P1; end
        S_P1: if (ec_done) begin
          x1p <= ec_x3; y1p <= ec_y3; issued <= 1'b0; st <= ec_err ? S_END : S_P2;
        end
        S_P2: if (ec_done) begin
          // keep Q-side result in xs / u2 (u2 is no longer needed)
          xs <= ec_x3; u2 <= ec_y3; issued <= 1'b0; st <= ec_err ? S_END : S_SUM;
        end
        S_SUM: if (ec_done) begin
          xs <= ec_x3; issued <= 1'b0; st <= ec_err ? S_END : S_CMP;
        end
        S_CMP: begin res <= (red_n(xs, n) == r); st <= S_END; end
        S_END: begin ok <= res; done <= 1'b1; st <= S_IDLE; end
        default: st <= S_IDLE;
      endcase
    end
  end

  assign busy = (st != S_IDLE);
endmodule
