// tb_binv_div: self-checking test of the binary inversion/division unit.
// Computes y/x modulo the P-192 prime, the P-192 order and a small prime for
// random and corner operands and checks q*x = y (mod m) and q < m with
// wide-integer arithmetic, the at-most-2W-cycle bound of the algorithm, and
// that x = 0 is reported as an error.
//
// Expected values are worked out independently in the bench; the cases
// and sizes are this bench's own choice.
module tb_binv_div;
  localparam int unsigned W = 192;
  typedef logic [2*W-1:0] u384;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [W-1:0] x = '0, y = '0, m = 192'd7;
  logic busy, done, err;
  logic [W-1:0] q;
  int checks = 0, failures = 0, cyc, maxcyc = 0;

  always #5 clk = ~clk;

  binv_div #(.W(W)) dut (.clk, .rst_n, .start, .x, .y, .m, .busy, .done, .err, .q);

  function automatic logic [W-1:0] rnd_below(logic [W-1:0] mm);
    logic [W-1:0] v;
    for (int i = 0; i < W/32; i++) v[i*32 +: 32] = $urandom;
    return v % mm;
  endfunction

  task automatic one(input logic [W-1:0] x_, input logic [W-1:0] y_, input logic [W-1:0] m_);
    @(negedge clk);
    x = x_; y = y_; m = m_; start = 1'b1;
    @(negedge clk); start = 1'b0; cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    if (cyc > maxcyc) maxcyc = cyc;
    checks++;
    if (x_ == '0) begin
      if (!err) begin failures++; $display("FAIL x=0 not flagged"); end
    end else if (err || q >= m_ || (u384'(q) * u384'(x_)) % u384'(m_) != u384'(y_)) begin
      failures++; $display("FAIL %h / %h mod %h -> %h", y_, x_, m_, q);
    end
    checks++;
    if (cyc > 2*W + 3) begin failures++; $display("FAIL %0d cycles", cyc); end
  endtask

  initial begin
    logic [W-1:0] mods [3];
    mods[0] = 192'hfffffffffffffffffffffffffffffffeffffffffffffffff;
    mods[1] = 192'hffffffffffffffffffffffff99def836146bc9b1b4d22831;
    mods[2] = 192'd1000003;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    foreach (mods[k]) begin
      one(192'd1, 192'd1, mods[k]);
      one(mods[k] - 1, 192'd1, mods[k]);
      one(192'd2, mods[k] - 1, mods[k]);
      one('0, 192'd3, mods[k]);
      for (int i = 0; i < 30; i++) one(rnd_below(mods[k] - 1) + 1, rnd_below(mods[k]), mods[k]);
    end
    $display("longest division: %0d cycles", maxcyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
