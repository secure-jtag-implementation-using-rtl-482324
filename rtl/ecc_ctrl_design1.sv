// ecc_ctrl_design1: point multiplier of the projective-coordinate ECC design
// (Design I): (x, y) = k * (px, py) on a short Weierstrass curve with a = -3.
//
// How it works: all field values live in Montgomery form (v * 2^W mod p) in
// a register file of W-bit words. A micro-program sequencer runs short
// programs of MUL (Montgomery product, mont_mult), ADD, SUB (modular,
// modaddsub) and CPY steps:
//   CONV  px, py and 1 into Montgomery form (multiplied by rr = 2^2W mod p);
//   ADD   general projective addition (12 multiplications + 2 squarings);
//   DBL   projective doubling for a = -3 (7 multiplications + 3 squarings);
//   FIN   x = X / Z, y = Y / Z and conversion out of Montgomery form.
// The scalar is processed by a Montgomery powering ladder from its most
// significant one bit: R0 = P, R1 = 2P, then for each further bit b
// R(1-b) = R0 + R1 and R(b) = 2 R(b), so every bit costs one addition and
// one doubling whatever its value. 1/Z is Z^(p-2), computed by square and
// multiply on the Montgomery multiplier (Fermat inversion).
//
// Interface: start samples k, px, py, p and rr; busy is high until done
// pulses with x, y valid (held until the next start). err is set with done
// when k = 0 or the result is the point at infinity (Z = 0). Inputs must be
// reduced below p, p odd. Timing: about 24 Montgomery products of 2W+2
// cycles per scalar bit plus about 2W products for the inversion, about
// 1.9 million cycles at W = 192. Reset asynchronous, active low.
//
// The addition and doubling formulas, the ladder, Montgomery multiplication
// and Fermat inversion follow the description of this design. The register
// file, the micro-programs and their order are this design's own, and the
// modular adder here is a separate modaddsub instance, while the description
// shares one adder between the controller and the multiplier.
module ecc_ctrl_design1 #(
  parameter int unsigned W = 192
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] k,
  input  logic [W-1:0] px,
  input  logic [W-1:0] py,
  input  logic [W-1:0] p,
  input  logic [W-1:0] rr,     // 2^(2W) mod p
  output logic         busy,
  output logic         done,
  output logic         err,
  output logic [W-1:0] x,
  output logic [W-1:0] y
);
  localparam int unsigned CW = $clog2(W + 1);

  // register file: 0-2 R0 (X,Y,Z), 3-5 R1, 6-15 temporaries,
  // 16-18 the R set selected by dsel, 19 rr, 20 plain 1, 21 inverse, 22 Montgomery 1
  localparam logic [4:0] X0 = 5'd0,  Y0 = 5'd1,  Z0 = 5'd2,  X1 = 5'd3,  Y1 = 5'd4,  Z1 = 5'd5;
  localparam logic [4:0] T6 = 5'd6,  T7 = 5'd7,  T8 = 5'd8,  T9 = 5'd9,  T10 = 5'd10;
  localparam logic [4:0] T11 = 5'd11, T12 = 5'd12, T13 = 5'd13, T14 = 5'd14, T15 = 5'd15;
  localparam logic [4:0] DX = 5'd16, DY = 5'd17, DZ = 5'd18;
  localparam logic [4:0] RRR = 5'd19, ONE = 5'd20, INV = 5'd21, MONE = 5'd22;
  localparam int unsigned NR = 23;

  typedef enum logic [2:0] {K_END, K_MUL, K_ADD, K_SUB, K_CPY} kind_e;
  typedef enum logic [2:0] {G_CONV, G_ADD, G_DBL, G_SQR, G_MULZ, G_IINIT, G_FIN} prog_e;
  typedef struct packed {
    kind_e      kind;
    logic [4:0] dst;
    logic [4:0] sa;
    logic [4:0] sb;
  } uop_t;

  function automatic uop_t uo(kind_e kd, logic [4:0] d, logic [4:0] a, logic [4:0] b);
    uop_t u;
    u.kind = kd; u.dst = d; u.sa = a; u.sb = b;
    return u;
  endfunction

  function automatic uop_t uprog(prog_e g, logic [4:0] s);
    uop_t u;
    u = uo(K_END, 5'd0, 5'd0, 5'd0);
    unique case (g)
      G_CONV: unique case (s)
        5'd0: u = uo(K_MUL, X0, X0, RRR);
        5'd1: u = uo(K_MUL, Y0, Y0, RRR);
        5'd2: u = uo(K_MUL, Z0, ONE, RRR);
        5'd3: u = uo(K_CPY, MONE, Z0, Z0);
        5'd4: u = uo(K_CPY, X1, X0, X0);
        5'd5: u = uo(K_CPY, Y1, Y0, Y0);
        5'd6: u = uo(K_CPY, Z1, Z0, Z0);
        default: ;
      endcase
      G_ADD: unique case (s)                       // D = R0 + R1
        5'd0:  u = uo(K_MUL, T6,  Y0,  Z1);         // Y1Z2
        5'd1:  u = uo(K_MUL, T7,  X0,  Z1);         // X1Z2
        5'd2:  u = uo(K_MUL, T8,  Z0,  Z1);         // Z1Z2
        5'd3:  u = uo(K_MUL, T9,  Y1,  Z0);
        5'd4:  u = uo(K_SUB, T9,  T9,  T6);         // u
        5'd5:  u = uo(K_MUL, T10, T9,  T9);         // uu
        5'd6:  u = uo(K_MUL, T11, X1,  Z0);
        5'd7:  u = uo(K_SUB, T11, T11, T7);         // v
        5'd8:  u = uo(K_MUL, T12, T11, T11);        // vv
        5'd9:  u = uo(K_MUL, T13, T11, T12);        // vvv
        5'd10: u = uo(K_MUL, T14, T12, T7);         // R
        5'd11: u = uo(K_MUL, T15, T10, T8);
        5'd12: u = uo(K_SUB, T15, T15, T13);
        5'd13: u = uo(K_SUB, T15, T15, T14);
        5'd14: u = uo(K_SUB, T15, T15, T14);        // A
        5'd15: u = uo(K_MUL, DX,  T11, T15);        // X3 = v*A
        5'd16: u = uo(K_SUB, T10, T14, T15);
        5'd17: u = uo(K_MUL, T10, T9,  T10);
        5'd18: u = uo(K_MUL, T12, T13, T6);
        5'd19: u = uo(K_SUB, DY,  T10, T12);        // Y3 = u*(R-A) - vvv*Y1Z2
        5'd20: u = uo(K_MUL, DZ,  T13, T8);         // Z3 = vvv*Z1Z2
        default: ;
      endcase
      G_DBL: unique case (s)                       // D = 2 D
        5'd0:  u = uo(K_SUB, T6,  DX,  DZ);
        5'd1:  u = uo(K_ADD, T7,  DX,  DZ);
        5'd2:  u = uo(K_MUL, T6,  T6,  T7);
        5'd3:  u = uo(K_ADD, T7,  T6,  T6);
        5'd4:  u = uo(K_ADD, T7,  T7,  T6);         // w
        5'd5:  u = uo(K_MUL, T8,  DY,  DZ);
        5'd6:  u = uo(K_ADD, T8,  T8,  T8);         // s
        5'd7:  u = uo(K_MUL, T9,  T8,  T8);         // ss
        5'd8:  u = uo(K_MUL, T10, T8,  T9);         // sss
        5'd9:  u = uo(K_MUL, T11, DY,  T8);         // R
        5'd10: u = uo(K_MUL, T12, T11, T11);        // RR
        5'd11: u = uo(K_MUL, T13, DX,  T11);
        5'd12: u = uo(K_ADD, T13, T13, T13);        // B
        5'd13: u = uo(K_MUL, T14, T7,  T7);
        5'd14: u = uo(K_SUB, T14, T14, T13);
        5'd15: u = uo(K_SUB, T14, T14, T13);        // h
        5'd16: u = uo(K_MUL, DX,  T14, T8);         // X3 = h*s
        5'd17: u = uo(K_SUB, T15, T13, T14);
        5'd18: u = uo(K_MUL, T15, T7,  T15);
        5'd19: u = uo(K_ADD, T12, T12, T12);
        5'd20: u = uo(K_SUB, DY,  T15, T12);        // Y3 = w*(B-h) - 2RR
        5'd21: u = uo(K_CPY, DZ,  T10, T10);        // Z3 = sss
        default: ;
      endcase
      G_IINIT: if (s == 5'd0) u = uo(K_CPY, INV, MONE, MONE);
      G_SQR:   if (s == 5'd0) u = uo(K_MUL, INV, INV, INV);
      G_MULZ:  if (s == 5'd0) u = uo(K_MUL, INV, INV, Z0);
      G_FIN: unique case (s)
        5'd0: u = uo(K_MUL, T6, X0, INV);
        5'd1: u = uo(K_MUL, T7, T6, ONE);
        5'd2: u = uo(K_MUL, T8, Y0, INV);
        5'd3: u = uo(K_MUL, T9, T8, ONE);
        default: ;
      endcase
      default: ;
    endcase
    return u;
  endfunction

  typedef enum logic [3:0] {
    S_IDLE, S_NORM, S_CONV, S_DBL0, S_LOOP, S_LADD, S_LDBL, S_IINIT, S_ILOOP, S_ISQR,
    S_IMUL, S_FIN
  } state_e;

  state_e        st;
  prog_e         prog;
  logic [4:0]    pc;
  logic          dsel, issued;
  logic [W-1:0]  rf [NR];
  logic [W-1:0]  kr, pm, ex;
  logic [CW-1:0] cnt;
  uop_t          u;
  logic [W-1:0]  opa, opb, as_s;
  logic          mm_start, mm_done;
  logic [W-1:0]  mm_r;

  function automatic logic [4:0] phys(logic [4:0] c, logic ds);
    return (c >= DX && c <= DZ) ? ((ds ? X1 : X0) + (c - DX)) : c;
  endfunction

  always_comb begin
    unique case (st)
      S_CONV:         prog = G_CONV;
      S_DBL0, S_LDBL: prog = G_DBL;
      S_LADD:         prog = G_ADD;
      S_IINIT:        prog = G_IINIT;
      S_ISQR:         prog = G_SQR;
      S_IMUL:         prog = G_MULZ;
      default:        prog = G_FIN;
    endcase
    u   = uprog(prog, pc);
    opa = rf[phys(u.sa, dsel)];
    opb = rf[phys(u.sb, dsel)];
    mm_start = (st inside {S_CONV, S_DBL0, S_LADD, S_LDBL, S_IINIT, S_ISQR, S_IMUL, S_FIN})
               && u.kind == K_MUL && !issued;
  end

  mont_mult #(.W(W)) u_mont (.clk, .rst_n, .start(mm_start), .x(opa), .y(opb), .m(pm),
                             .busy(), .done(mm_done), .r(mm_r));

  modaddsub #(.W(W)) u_addsub (.a(opa), .b(opb), .m(pm), .op_add(u.kind == K_ADD),
                               .modular(1'b1), .s(as_s), .cout());

  // one program step; returns 1 when the program has ended
  logic step_end;
  assign step_end = (u.kind == K_END);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; pc <= '0; dsel <= 1'b0; issued <= 1'b0;
      kr <= '0; pm <= '0; ex <= '0; cnt <= '0;
      busy <= 1'b0; done <= 1'b0; err <= 1'b0; x <= '0; y <= '0;
      for (int i = 0; i < NR; i++) rf[i] <= '0;
    end else begin
      done <= 1'b0;
      if (mm_start) issued <= 1'b1;
      // micro-program execution in every program state
      if (st inside {S_CONV, S_DBL0, S_LADD, S_LDBL, S_IINIT, S_ISQR, S_IMUL, S_FIN} && !step_end) begin
        unique case (u.kind)
          K_MUL: if (mm_done) begin
            rf[phys(u.dst, dsel)] <= mm_r; issued <= 1'b0; pc <= pc + 1'b1;
          end
          K_ADD, K_SUB: begin rf[phys(u.dst, dsel)] <= as_s; pc <= pc + 1'b1; end
          K_CPY:        begin rf[phys(u.dst, dsel)] <= opa;  pc <= pc + 1'b1; end
          default: ;
        endcase
      end
      unique case (st)
        S_IDLE: if (start) begin
          rf[X0] <= px; rf[Y0] <= py; rf[RRR] <= rr; rf[ONE] <= W'(1);
          kr <= k; pm <= p; ex <= p - W'(2); cnt <= CW'(W);
          busy <= 1'b1; err <= 1'b0; st <= S_NORM;
        end
        S_NORM: begin
          // skip leading zeros and consume the leading one bit
          if (kr == '0) begin
            err <= 1'b1; done <= 1'b1; busy <= 1'b0; st <= S_IDLE;
          end else begin
            kr  <= kr << 1;
            cnt <= cnt - 1'b1;
            if (kr[W-1]) begin pc <= '0; st <= S_CONV; end
          end
        end
        S_CONV: if (step_end) begin pc <= '0; dsel <= 1'b1; st <= S_DBL0; end
        S_DBL0: if (step_end) st <= S_LOOP;
        S_LOOP: begin
          pc <= '0;
          if (cnt == '0) st <= S_IINIT;
          else begin dsel <= !kr[W-1]; st <= S_LADD; end
        end
        S_LADD: if (step_end) begin pc <= '0; dsel <= kr[W-1]; st <= S_LDBL; end
        S_LDBL: if (step_end) begin
          kr <= kr << 1; cnt <= cnt - 1'b1; st <= S_LOOP;
        end
        S_IINIT: if (step_end) begin pc <= '0; cnt <= CW'(W); st <= S_ILOOP; end
        S_ILOOP: begin
          pc <= '0;
          st <= (cnt == '0) ? S_FIN : S_ISQR;
        end
        S_ISQR: if (step_end) begin
          pc <= '0;
          if (ex[W-1]) st <= S_IMUL;
          else begin ex <= ex << 1; cnt <= cnt - 1'b1; st <= S_ILOOP; end
        end
        S_IMUL: if (step_end) begin ex <= ex << 1; cnt <= cnt - 1'b1; st <= S_ILOOP; end
        S_FIN: if (step_end) begin
          x <= rf[T7]; y <= rf[T9];
          err  <= (rf[Z0] == '0);
          done <= 1'b1; busy <= 1'b0; st <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
