// ecc_datapath: datapath controller and flexible datapath of the affine ECC
// processor (Design II).
//
// The datapath holds the operand latches x1, y1, x2, y2, m (modulus) and a
// (curve coefficient), five temporary registers t1, t2, t3, x3, y3, and four
// arithmetic units: a prime field adder and a prime field subtractor (both
// modaddsub), a Blakley multiplier and a binary inversion/division unit.
// The datapath controller steps through a short micro-program per
// instruction; every micro-op reads two sources, runs one unit and writes
// one temporary register:
//   PointAdd (affine, Appendix C):  t1 = y1-y2; t2 = x1-x2; t3 = t1/t2 (slope);
//                                   t1 = t3^2; t1 = t1-x1; x3 = t1-x2;
//                                   t2 = x1-x3; t1 = t3*t2; y3 = t1-y1
//   PointDbl:                       t1 = x1^2; t2 = 3*t1 + a (three adds);
//                                   t1 = 2*y1; t3 = t2/t1; then as PointAdd
//   FieldAdd/Sub/Mult: x3 = x1 op x2;  FieldInv: x3 = y1 / x1 (inverse if y1=1)
// Add and subtract take one clock, a multiplication W+2, a division at most
// about 2W+2. PointAdd therefore needs about 2W (division) + 2W (two
// multiplications) + 11 cycles, PointDbl about 2W + 3W + 16 cycles; the
// division time depends on the data.
//
// Interface: operands and op sampled when start is high in the idle state;
// done pulses one cycle when x3/y3 hold the result; err goes high with done
// when a division had no inverse (point at infinity or x1 = 0 in FieldInv).
// All field operands must be below m; m must be odd. Reset async active low.
//
// The affine formulas and the five temporary registers follow the
// description; the micro-program order, and so the cycle counts (about 670
// for PointAdd and 870 for PointDbl at W = 192, against 5W+6 and 4W+8 in the
// description), are this design's own.
module ecc_datapath
  import secjtag_pkg::*;
#(
  parameter int unsigned W = 192
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  ecc_op_e      op,
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
  output logic [W-1:0] y3
);
  typedef enum logic [2:0] {U_END, U_ADD, U_SUB, U_MUL, U_DIV} ukind_e;
  typedef enum logic [3:0] {R_X1, R_Y1, R_X2, R_Y2, R_A, R_T1, R_T2, R_T3, R_X3, R_Y3} reg_e;
  typedef struct packed {
    ukind_e kind;
    reg_e   dst;
    reg_e   sa;
    reg_e   sb;
  } uop_t;
  typedef enum logic [1:0] {S_IDLE, S_STEP, S_WAIT} state_e;

  // micro-program of the datapath controller
  function automatic uop_t uprog(ecc_op_e o, logic [3:0] s);
    uop_t u;
    u = '{U_END, R_T1, R_T1, R_T1};
    unique case (o)
      OP_FADD: if (s == 4'd0) u = '{U_ADD, R_X3, R_X1, R_X2};
      OP_FSUB: if (s == 4'd0) u = '{U_SUB, R_X3, R_X1, R_X2};
      OP_FMUL: if (s == 4'd0) u = '{U_MUL, R_X3, R_X1, R_X2};
      OP_FINV: if (s == 4'd0) u = '{U_DIV, R_X3, R_Y1, R_X1};
      OP_PADD: unique case (s)
        4'd0: u = '{U_SUB, R_T1, R_Y1, R_Y2};
        4'd1: u = '{U_SUB, R_T2, R_X1, R_X2};
        4'd2: u = '{U_DIV, R_T3, R_T1, R_T2};
        4'd3: u = '{U_MUL, R_T1, R_T3, R_T3};
        4'd4: u = '{U_SUB, R_T1, R_T1, R_X1};
        4'd5: u = '{U_SUB, R_X3, R_T1, R_X2};
        4'd6: u = '{U_SUB, R_T2, R_X1, R_X3};
        4'd7: u = '{U_MUL, R_T1, R_T3, R_T2};
        4'd8: u = '{U_SUB, R_Y3, R_T1, R_Y1};
        default: ;
      endcase
      OP_PDBL: unique case (s)
        4'd0:  u = '{U_MUL, R_T1, R_X1, R_X1};
        4'd1:  u = '{U_ADD, R_T2, R_T1, R_T1};
        4'd2:  u = '{U_ADD, R_T2, R_T2, R_T1};
        4'd3:  u = '{U_ADD, R_T2, R_T2, R_A};
        4'd4:  u = '{U_ADD, R_T1, R_Y1, R_Y1};
        4'd5:  u = '{U_DIV, R_T3, R_T2, R_T1};
        4'd6:  u = '{U_MUL, R_T1, R_T3, R_T3};
        4'd7:  u = '{U_SUB, R_T1, R_T1, R_X1};
        4'd8:  u = '{U_SUB, R_X3, R_T1, R_X1};
        4'd9:  u = '{U_SUB, R_T2, R_X1, R_X3};
        4'd10: u = '{U_MUL, R_T1, R_T3, R_T2};
        4'd11: u = '{U_SUB, R_Y3, R_T1, R_Y1};
        default: ;
      endcase
      default: ;
    endcase
    return u;
  endfunction

  state_e       st;
  ecc_op_e      cur_op;
  logic [3:0]   step;
  logic [W-1:0] rx1, ry1, rx2, ry2, rm, ra, t1, t2, t3;
  logic [W-1:0] opa, opb, add_s, sub_s, mul_r, div_q, wdata;
  logic         mul_done, div_done, div_err;
  logic         mul_start, div_start, wen;
  uop_t         u;

  function automatic logic [W-1:0] rd(reg_e r);
    unique case (r)
      R_X1: rd = rx1;  R_Y1: rd = ry1;  R_X2: rd = rx2;  R_Y2: rd = ry2;
      R_A:  rd = ra;   R_T1: rd = t1;   R_T2: rd = t2;   R_T3: rd = t3;
      R_X3: rd = x3;   R_Y3: rd = y3;
      default: rd = '0;
    endcase
  endfunction

  // multiplexers in front of the arithmetic units
  always_comb begin
    u   = uprog(cur_op, step);
    opa = rd(u.sa);
    opb = rd(u.sb);
  end

  modaddsub #(.W(W)) u_fadd (.a(opa), .b(opb), .m(rm), .op_add(1'b1), .modular(1'b1),
                             .s(add_s), .cout());
  modaddsub #(.W(W)) u_fsub (.a(opa), .b(opb), .m(rm), .op_add(1'b0), .modular(1'b1),
                             .s(sub_s), .cout());
  blakley_mult #(.W(W)) u_mul (.clk, .rst_n, .start(mul_start), .x(opa), .y(opb), .m(rm),
                               .busy(), .done(mul_done), .r(mul_r));
  // division: quotient = sa / sb
  binv_div #(.W(W)) u_div (.clk, .rst_n, .start(div_start), .x(opb), .y(opa), .m(rm),
                           .busy(), .done(div_done), .err(div_err), .q(div_q));

  always_comb begin
    mul_start = (st == S_STEP) && (u.kind == U_MUL);
    div_start = (st == S_STEP) && (u.kind == U_DIV);
    wen   = 1'b0;
    wdata = add_s;
    if (st == S_STEP && u.kind == U_ADD) begin wen = 1'b1; wdata = add_s; end
    if (st == S_STEP && u.kind == U_SUB) begin wen = 1'b1; wdata = sub_s; end
    if (st == S_WAIT && u.kind == U_MUL && mul_done) begin wen = 1'b1; wdata = mul_r; end
    if (st == S_WAIT && u.kind == U_DIV && div_done) begin wen = 1'b1; wdata = div_q; end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; cur_op <= OP_NOP; step <= '0;
      rx1 <= '0; ry1 <= '0; rx2 <= '0; ry2 <= '0; rm <= '0; ra <= '0;
      t1 <= '0; t2 <= '0; t3 <= '0; x3 <= '0; y3 <= '0;
      done <= 1'b0; err <= 1'b0;
    end else begin
      done <= 1'b0;
      if (wen) begin
        unique case (u.dst)
          R_T1: t1 <= wdata;
          R_T2: t2 <= wdata;
          R_T3: t3 <= wdata;
          R_X3: x3 <= wdata;
          R_Y3: y3 <= wdata;
          default: ;
        endcase
      end
      unique case (st)
        S_IDLE: if (start) begin
          rx1 <= x1; ry1 <= y1; rx2 <= x2; ry2 <= y2; rm <= m; ra <= a;
          cur_op <= op; step <= '0; err <= 1'b0;
          st <= S_STEP;
        end
        S_STEP: unique case (u.kind)
          U_END:          begin st <= S_IDLE; done <= 1'b1; end
          U_ADD, U_SUB:   step <= step + 1'b1;
          default:        st <= S_WAIT;
        endcase
        S_WAIT: begin
          if (u.kind == U_DIV && div_done && div_err) begin
            err <= 1'b1; done <= 1'b1; st <= S_IDLE;
          end else if ((u.kind == U_MUL && mul_done) || (u.kind == U_DIV && div_done)) begin
            step <= step + 1'b1;
            st   <= S_STEP;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  assign busy = (st != S_IDLE);
endmodule
