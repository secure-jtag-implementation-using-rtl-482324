// tb_blakley_mult: self-checking test of the blakley_mult multiplier.
// Random operands below the P-192 prime, the P-192 order and a small odd
// modulus, plus corner cases (0, 1, m-1). Checks x*y mod m, W cycles per product (one bit per clock),
// against wide-integer reference arithmetic, and the latency from start to done.
//
// Expected values are worked out independently in the bench; the cases
// and sizes are this bench's own choice.
module tb_blakley_mult;
  localparam int unsigned W = 192;
  typedef logic [2*W-1:0] u384;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [W-1:0] x = '0, y = '0, m = 192'd7;
  logic busy, done;
  logic [W-1:0] r;
  int checks = 0, failures = 0, cyc;

  always #5 clk = ~clk;

  blakley_mult #(.W(W)) dut (.clk, .rst_n, .start, .x, .y, .m, .busy, .done, .r);

  function automatic logic [W-1:0] rnd_below(logic [W-1:0] mm);
    logic [W-1:0] v;
    for (int i = 0; i < W/32; i++) v[i*32 +: 32] = $urandom;
    return v % mm;
  endfunction

  task automatic one(input logic [W-1:0] x_, input logic [W-1:0] y_, input logic [W-1:0] m_);
    u384 exp_r;
    @(negedge clk);
    x = x_; y = y_; m = m_; start = 1'b1;
    @(negedge clk); start = 1'b0; cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    exp_r = (u384'(x_) * u384'(y_)) % u384'(m_);
    checks++;
    if (!(r == exp_r)) begin failures++; $display("FAIL %h * %h mod %h -> %h", x_, y_, m_, r); end
    checks++;
    if (cyc != W + 1) begin failures++; $display("FAIL latency %0d", cyc); end
  endtask

  initial begin
    logic [W-1:0] mods [3];
    mods[0] = 192'hfffffffffffffffffffffffffffffffeffffffffffffffff;
    mods[1] = 192'hffffffffffffffffffffffff99def836146bc9b1b4d22831;
    mods[2] = 192'd1000003;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    foreach (mods[k]) begin
      one('0, mods[k] - 1, mods[k]);
      one(192'd1, mods[k] - 1, mods[k]);
      one(mods[k] - 1, mods[k] - 1, mods[k]);
      for (int i = 0; i < 20; i++) one(rnd_below(mods[k]), rnd_below(mods[k]), mods[k]);
    end
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
