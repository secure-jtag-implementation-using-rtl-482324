// binv_div: binary Euclidean modular division, q = y / x mod m.
//
// Keeps four registers with the invariants a*y = u*x and b*y = v*x (mod m),
// starting from a = x, u = y, b = m, v = 0. Each clock does one of:
//   a even        : a = a/2, u = u/2 mod m
//   b even        : b = b/2, v = v/2 mod m
//   a >= b (odd)  : a = (a-b)/2, u = (u-v)/2 mod m
//   a <  b (odd)  : b = (b-a)/2, v = (v-u)/2 mod m
// and stops when a or b reaches 1, returning u or v. Every step shortens a or
// b by at least one bit, so a division takes at most 2W cycles (2 log2 p in
// the description). Halving modulo an odd m adds m first when the value is
// odd. Modular subtraction uses modaddsub. With y = 1 the unit computes the
// inverse of x.
//
// Interface: inputs sampled on start; done pulses for one cycle with q valid
// (held until the next start); err is set with done when x = 0 or
// gcd(x, m) != 1. m must be odd. Reset asynchronous, active low.
module binv_div #(
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
  output logic         err,
  output logic [W-1:0] q
);
  logic [W-1:0] ra, rb, ru, rv, ms;
  logic [W-1:0] d_ab, d_ba, uv, vu, half_in, half_out;
  logic         ab_ge;
  logic [W:0]   half_sum;

  // modular u - v and v - u
  modaddsub #(.W(W)) u_uv (.a(ru), .b(rv), .m(ms), .op_add(1'b0), .modular(1'b1), .s(uv), .cout());
  modaddsub #(.W(W)) u_vu (.a(rv), .b(ru), .m(ms), .op_add(1'b0), .modular(1'b1), .s(vu), .cout());

  always_comb begin
    d_ab  = ra - rb;
    d_ba  = rb - ra;
    ab_ge = (ra >= rb);
    // value to halve modulo m for this step
    if (!ra[0])          half_in = ru;
    else if (!rb[0])     half_in = rv;
    else if (ab_ge)      half_in = uv;
    else                 half_in = vu;
    half_sum = half_in[0] ? ({1'b0, half_in} + {1'b0, ms}) : {1'b0, half_in};
    half_out = W'(half_sum >> 1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ra <= '0; rb <= '0; ru <= '0; rv <= '0; ms <= '0; q <= '0;
      busy <= 1'b0; done <= 1'b0; err <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        ra <= x; rb <= m; ru <= y; rv <= '0; ms <= m;
        busy <= 1'b1; err <= 1'b0;
      end else if (busy) begin
        if (ra == W'(1)) begin
          q <= ru; busy <= 1'b0; done <= 1'b1;
        end else if (rb == W'(1)) begin
          q <= rv; busy <= 1'b0; done <= 1'b1;
        end else if (ra == '0 || rb == '0) begin
          q <= '0; busy <= 1'b0; done <= 1'b1; err <= 1'b1;
        end else if (!ra[0]) begin
          ra <= ra >> 1; ru <= half_out;
        end else if (!rb[0]) begin
          rb <= rb >> 1; rv <= half_out;
        end else if (ab_ge) begin
          ra <= d_ab >> 1; ru <= half_out;
        end else begin
          rb <= d_ba >> 1; rv <= half_out;
        end
      end
    end
  end
endmodule
