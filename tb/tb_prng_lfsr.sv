// tb_prng_lfsr: self-checking test of the 192-bit LFSR PRNG.
// A reference model computes the next state as multiplication by x modulo
// x^192 + x^191 + x^189 + x^80 + 1, written bit by bit from the polynomial
// definition. Checks the reset value, several thousand steps, reseeding with
// a new seed (and with zero, which must not lock the register), and that the
// output never becomes zero.
//
// Expected values are worked out independently in the bench; the cases
// and sizes are this bench's own choice.
module tb_prng_lfsr;
  localparam int unsigned W = 192;
  logic clk = 1'b0, rst_n = 1'b0, reseed = 1'b0;
  logic [W-1:0] seed = '0, rnd, model;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  prng_lfsr #(.W(W)) dut (.clk, .rst_n, .reseed, .seed, .rnd);

  function automatic logic [W-1:0] times_x(logic [W-1:0] s);
    logic [W:0] t;
    t = {s, 1'b0};
    if (t[W]) begin
      t[W] = 1'b0; t[191] ^= 1'b1; t[189] ^= 1'b1; t[80] ^= 1'b1; t[0] ^= 1'b1;
    end
    return t[W-1:0];
  endfunction

  task automatic run(input int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      checks++;
      if (rnd != model || rnd == '0) begin failures++; $display("FAIL step %0d", i); end
      model = times_x(model);
    end
  endtask

  initial begin
    #12 rst_n = 1'b1;
    model = times_x(192'h1f2e3d4c5b6a79880123456789abcdeffedcba9876543210);
    run(3000);
    seed = 192'habcdef; reseed = 1'b1; @(negedge clk); reseed = 1'b0;
    model = times_x(192'habcdef);
    checks++; if (rnd != 192'habcdef) begin failures++; $display("FAIL reseed"); end
    run(1000);
    seed = '0; reseed = 1'b1; @(negedge clk); reseed = 1'b0;
    model = times_x(192'd1);
    run(500);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
