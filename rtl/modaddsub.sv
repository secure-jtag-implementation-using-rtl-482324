// modaddsub: combined modular / ordinary adder-subtractor.
//
// Two W-bit adder/subtractors in series. The first forms a+b (op_add=1) or
// a-b (op_add=0). The second corrects the result by the modulus: it subtracts
// m after an addition and adds m after a subtraction. Which of the two results
// is kept is decided from carries alone, so no magnitude comparator is needed:
//   addition    : keep the corrected sum when the first stage carried out OR
//                 the second stage did not borrow (a+b >= m),
//   subtraction : keep the corrected difference when the first stage borrowed.
// This is the carry-select structure with an OR gate and an inverter of the
// optimised adder/subtractor in the description; the ordinary mode
// (modular=0) returns the raw first-stage result and its carry, so the same
// unit can serve the Montgomery multiplier.
//
// Interface: purely combinational. In modular mode a and b must be below m.
// cout is the first-stage carry (for subtraction: 1 = no borrow).
module modaddsub #(
  parameter int unsigned W = 192
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] m,
  input  logic         op_add,   // 1: addition, 0: subtraction
  input  logic         modular,  // 1: modular result, 0: ordinary result
  output logic [W-1:0] s,
  output logic         cout
);
  logic [W:0]   st1, st2;
  logic [W-1:0] b_x, m_x;
  logic         use_corr;

  always_comb begin
    // stage 1: a +/- b (subtraction as a + ~b + 1)
    b_x = op_add ? b : ~b;
    st1 = {1'b0, a} + {1'b0, b_x} + {{W{1'b0}}, ~op_add};
    // stage 2: correction by the modulus, opposite operation
    m_x = op_add ? ~m : m;
    st2 = {1'b0, st1[W-1:0]} + {1'b0, m_x} + {{W{1'b0}}, op_add};
    use_corr = op_add ? (st1[W] | st2[W]) : ~st1[W];
    cout = st1[W];
    s    = (modular && use_corr) ? st2[W-1:0] : st1[W-1:0];
  end
endmodule
