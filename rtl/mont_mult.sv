// mont_mult: bit-serial Montgomery multiplier of Design I,
// r = x * y * 2^-W mod m.
//
// Radix-2 Montgomery algorithm with a single shared adder: for each bit x_i,
// least significant first, the accumulator R takes R + x_i*y in one clock and
// (R + r0*m)/2 in the next, where r0 is the low bit of R. A last clock forms
// R - m and keeps it when it does not borrow. All additions go through one
// modaddsub working in its ordinary (non-modular) mode at W+2 bits, which is
// how the adder/subtractor is shared with the ECC controller in Design I;
// that costs about twice the cycles of a two-adder design: 2W+2 cycles from
// start to done.
//
// Requirements: m odd, x, y < m. R stays below 2m, so W+2 bits suffice.
// done pulses one cycle with r valid; r is held until the next start.
// Reset asynchronous, active low.
//
// The algorithm and the shared adder follow the description of the
// projective design; the state sequence is this design's own.
module mont_mult #(
  parameter int unsigned W = 192
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] m,
  output logic         busy,
  output logic         done,
  output logic [W-1:0] r
);
  localparam int unsigned AW = W + 2;
  localparam int unsigned CW = $clog2(W + 1);

  typedef enum logic [1:0] {S_IDLE, S_ADDY, S_ADDM, S_FINAL} state_e;
  state_e        st;
  logic [W-1:0]  xs;
  logic [AW-1:0] acc, ys, mx, add_b, add_s;
  logic [CW-1:0] cnt;
  logic          add_op, add_c;

  always_comb begin
    add_op = 1'b1;
    add_b  = '0;
    unique case (st)
      S_ADDY:  add_b = xs[0]  ? ys : '0;
      S_ADDM:  add_b = acc[0] ? mx : '0;
      S_FINAL: begin add_b = mx; add_op = 1'b0; end
      default: add_b = '0;
    endcase
  end

  modaddsub #(.W(AW)) u_adder (.a(acc), .b(add_b), .m('0), .op_add(add_op), .modular(1'b0),
                               .s(add_s), .cout(add_c));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; xs <= '0; acc <= '0; ys <= '0; mx <= '0; cnt <= '0;
      r <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          xs <= x; ys <= AW'(y); mx <= AW'(m); acc <= '0; cnt <= CW'(W);
          st <= S_ADDY;
        end
        S_ADDY: begin
          acc <= add_s;
          st  <= S_ADDM;
        end
        S_ADDM: begin
          acc <= add_s >> 1;
          xs  <= xs >> 1;
          cnt <= cnt - 1'b1;
          st  <= (cnt == CW'(1)) ? S_FINAL : S_ADDY;
        end
        S_FINAL: begin
          // add_c = 1: no borrow, acc >= m
          r    <= add_c ? add_s[W-1:0] : acc[W-1:0];
          done <= 1'b1;
          st   <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  assign busy = (st != S_IDLE);
endmodule
