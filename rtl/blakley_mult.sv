// blakley_mult: bit-serial Blakley modular multiplier, r = x * y mod m.
//
// Interleaved double-and-add: the accumulator starts at zero and, for each
// bit of x from the most significant down, is doubled modulo m and then, if
// the bit is set, y is added modulo m. Both steps use the carry-select modular
// adder (modaddsub), so the accumulator always stays reduced and no final
// reduction is needed. One bit is processed per clock: done pulses for one
// cycle W+1 clock edges after the edge that sampled start, with the product
// in r, which is held until the next start.
//
// Requirements: x, y < m, m odd or even but non-zero. Inputs are sampled at
// start. Reset is asynchronous, active low.
module blakley_mult #(
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
  localparam int unsigned CW = $clog2(W + 1);

  logic [W-1:0]  xs, ys, ms, acc_dbl, acc_add;
  logic [CW-1:0] cnt;

  modaddsub #(.W(W)) u_dbl (.a(r), .b(r), .m(ms), .op_add(1'b1), .modular(1'b1),
                            .s(acc_dbl), .cout());
  modaddsub #(.W(W)) u_add (.a(acc_dbl), .b(ys), .m(ms), .op_add(1'b1), .modular(1'b1),
                            .s(acc_add), .cout());

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xs <= '0; ys <= '0; ms <= '0; r <= '0; cnt <= '0; busy <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        xs <= x; ys <= y; ms <= m; r <= '0;
        cnt <= CW'(W); busy <= 1'b1;
      end else if (busy) begin
        r   <= xs[W-1] ? acc_add : acc_dbl;
        xs  <= {xs[W-2:0], 1'b0};
        cnt <= cnt - 1'b1;
        if (cnt == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end
endmodule
