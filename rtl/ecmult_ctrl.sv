// ecmult_ctrl: ECMULT controller of the affine ECC processor (Design II).
//
// Every instruction from the upper controllers (Schnorr and ECDSA) enters
// here. FieldAdd, FieldSub, FieldMult, FieldInv, PointAdd and PointDbl are
// handed unchanged to the datapath (ecc_datapath, instantiated inside).
// PointMult k*(x1,y1) is expanded into a sequence of PointDbl and PointAdd
// instructions with left-to-right double-and-add: leading zero bits of k are
// skipped (one clock each), the accumulator Q starts at P on the leading one,
// and for every following bit Q = 2Q and, if the bit is 1, Q = Q + P. A
// scalar of bit length L and Hamming weight h thus costs L-1 doublings and
// h-1 additions, in line with the count log2(k)*T_dbl + (#k-1)*T_add given
// for the design.
//
// Interface: inputs sampled on start in the idle state; done pulses one
// cycle with the result in x3/y3 (field results in x3). err with done: k = 0
// or an intermediate point at infinity (an addition of P and -P, or of P
// with itself, is not handled by the affine formulas). Reset async, active low.
//
// Expanding PointMult into PointDbl and PointAdd follows the description;
// the left-to-right scan and the refusal of the point at infinity are this
// design's own.
module ecmult_ctrl
  import secjtag_pkg::*;
#(
  parameter int unsigned W = 192
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  ecc_op_e      op,
  input  logic [W-1:0] k,
  input  logic [W-1:0] x1,
  input  logic [W-1:0] y1,
  input  logic [W-1:0] x2,
  input  logic [W-1:0] y2,
  input  logic [W-1:0] m,
  input  logic [W-1:0] a,
  output logic         busy,
  output logic         done,
  output logic         err,
  output logic [W-1:0] x3,
  output logic [W-1:0] y3,
  output logic [15:0]  n_dbl,   // PointDbl count of the last PointMult
  output logic [15:0]  n_add    // PointAdd count of the last PointMult
);
  localparam int unsigned CW = $clog2(W + 1);
  typedef enum logic [2:0] {S_IDLE, S_PASS, S_NORM, S_LOOP, S_DBL, S_ADD} state_e;

  state_e        st;
  logic [W-1:0]  kr, px, py, qx, qy, rm, ra, rx2, ry2;
  logic [CW-1:0] cnt;
  ecc_op_e       rop, dp_op;
  logic          dp_start, dp_done, dp_err, issued;
  logic [W-1:0]  dp_x1, dp_y1, dp_x2, dp_y2, dp_x3, dp_y3;

  always_comb begin
    dp_op = rop;
    dp_x1 = px;  dp_y1 = py;  dp_x2 = rx2;  dp_y2 = ry2;
    dp_start = 1'b0;
    unique case (st)
      S_PASS: dp_start = !issued;
      S_DBL: begin dp_op = OP_PDBL; dp_x1 = qx; dp_y1 = qy; dp_start = !issued; end
      S_ADD: begin dp_op = OP_PADD; dp_x1 = qx; dp_y1 = qy; dp_x2 = px; dp_y2 = py;
                   dp_start = !issued; end
      default: ;
    endcase
  end

  ecc_datapath #(.W(W)) u_dp (
    .clk, .rst_n, .start(dp_start), .op(dp_op),
    .x1(dp_x1), .y1(dp_y1), .x2(dp_x2), .y2(dp_y2), .m(rm), .a(ra),
    .busy(), .done(dp_done), .err(dp_err), .x3(dp_x3), .y3(dp_y3)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; kr <= '0; px <= '0; py <= '0; qx <= '0; qy <= '0; rm <= '0; ra <= '0;
      rx2 <= '0; ry2 <= '0; cnt <= '0; rop <= OP_NOP; issued <= 1'b0;
      done <= 1'b0; err <= 1'b0; x3 <= '0; y3 <= '0; n_dbl <= '0; n_add <= '0;
    end else begin
      done <= 1'b0;
      if (dp_start) issued <= 1'b1;
      unique case (st)
        S_IDLE: if (start) begin
          px <= x1; py <= y1; rx2 <= x2; ry2 <= y2; rm <= m; ra <= a; kr <= k;
          rop <= op; err <= 1'b0; issued <= 1'b0; cnt <= CW'(W);
          if (op == OP_PMUL) begin
            n_dbl <= '0; n_add <= '0;
            st <= S_NORM;
          end else begin
            st <= S_PASS;
          end
        end
        S_PASS: if (dp_done) begin
          x3 <= dp_x3; y3 <= dp_y3; err <= dp_err; done <= 1'b1; st <= S_IDLE;
        end
        S_NORM: begin
          if (kr == '0) begin
            err <= 1'b1; done <= 1'b1; st <= S_IDLE;
          end else begin
            kr  <= kr << 1;
            cnt <= cnt - 1'b1;
            if (kr[W-1]) begin
              qx <= px; qy <= py; st <= S_LOOP;
            end
          end
        end
        S_LOOP: begin
          issued <= 1'b0;
          if (cnt == '0) begin
            x3 <= qx; y3 <= qy; done <= 1'b1; st <= S_IDLE;
          end else begin
            st <= S_DBL;
          end
        end
        S_DBL: if (dp_done) begin
          qx <= dp_x3; qy <= dp_y3; issued <= 1'b0; n_dbl <= n_dbl + 1'b1;
          if (dp_err) begin
            err <= 1'b1; done <= 1'b1; st <= S_IDLE;
          end else if (kr[W-1]) begin
            st <= S_ADD;
          end else begin
            kr <= kr << 1; cnt <= cnt - 1'b1; st <= S_LOOP;
          end
        end
        S_ADD: if (dp_done) begin
          qx <= dp_x3; qy <= dp_y3; issued <= 1'b0; n_add <= n_add + 1'b1;
          kr <= kr << 1; cnt <= cnt - 1'b1;
          if (dp_err) begin
            err <= 1'b1; done <= 1'b1; st <= S_IDLE;
          end else begin
            st <= S_LOOP;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  assign busy = (st != S_IDLE);
endmodule
