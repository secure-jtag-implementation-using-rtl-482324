// tb_ecc_ctrl_design1: self-checking test of the projective-coordinate point
// multiplier at full size (NIST P-192). Results are compared with the
// affine reference package for small scalars (1, 2, 3, 5), for the group
// order minus one (result -G), for random 192-bit scalars and for a
// non-generator base point; k = 0 must return err. The cycle count of one
// 192-bit multiplication is reported and must stay below the 3068150
// functional cycles of one scalar multiplication given for this design
// (Table 2 of the description, scenario 1).
// Expected values are worked out independently in the bench; the cases
// and sizes are this bench's own choice.
module tb_ecc_ctrl_design1;
  import secjtag_pkg::*;
  import ec_ref_pkg::*;
  localparam int unsigned W = 192;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [W-1:0] k = '0, px = '0, py = '0, x, y;
  logic busy, done, err;
  u192 rr;
  int checks = 0, failures = 0;

  always #4 clk = ~clk;

  ecc_ctrl_design1 #(.W(W)) dut (.clk, .rst_n, .start, .k, .px, .py, .p(P192_P), .rr,
                                 .busy, .done, .err, .x, .y);

  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run(input u192 kk, input pt_t pt, input string what, input bit timed = 1'b0);
    pt_t e;
    longint t = 0;
    @(posedge clk); k <= kk; px <= pt.x; py <= pt.y; start <= 1'b1;
    @(posedge clk); start <= 1'b0;
    while (!done && t < 3000000) begin @(posedge clk); t++; end
    check(done, {what, ": finished"});
    if (kk == '0) check(err, {what, ": k = 0 refused"});
    else begin
      e = pmul(kk, pt);
      check(!err && x == e.x && y == e.y, {what, ": point matches the reference"});
    end
    $display("%s: %0d cycles", what, t);
    if (timed) check(t < 3068150, {what, ": within the cycle count of the description"});
  endtask

  initial begin
    pt_t g, h;
    u192 r1;
    g  = gen();
    r1 = 192'(0) - P192_P;                    // 2^192 mod p
    rr = mmul(r1, r1, P192_P);                // 2^384 mod p
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run(192'd1, g, "k = 1");
    run(192'd2, g, "k = 2");
    run(192'd3, g, "k = 3");
    run(192'd5, g, "k = 5");
    run(P192_N - 1, g, "k = n - 1", 1'b1);
    run({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom}, g, "random k", 1'b1);
    h = pmul(192'd77, g);
    run({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom} >> 8, h, "random k, other point");
    run('0, g, "k = 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
