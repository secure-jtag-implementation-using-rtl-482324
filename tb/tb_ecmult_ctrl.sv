// tb_ecmult_ctrl: self-checking test of the ECMULT controller.
// Computes k*G on P-192 for several scalars (small, single-bit-apart, random,
// full-length) and compares with independently computed points. Checks that
// the controller issued exactly bitlength(k)-1 PointDbl and weight(k)-1
// PointAdd instructions, that a FieldMult is passed straight to the datapath,
// and that k = 0 is reported as an error.
//
// Expected values are worked out independently in the bench; the cases
// and sizes are this bench's own choice.
module tb_ecmult_ctrl;
  import secjtag_pkg::*;
  localparam int unsigned W = 192;
localparam int NK = 5;
localparam logic [191:0] k_v [NK] = '{192'h000000000000000000000000000000000000000000000003,
  192'h000000000000000000000000000000000000000000000010,
  192'ha8948c893b61867626bb7dbd2d1c9af0153e7c2a26a2c0be,
  192'h2eae05cf96d0cc5fd4c28c2e7c26847f0316909e3bbbe9eb,
  192'h800000000000000000000000000000000000000000000001};
localparam logic [191:0] k_x [NK] = '{192'h76e32a2557599e6edcd283201fb2b9aadfd0d359cbb263da,
  192'hb7310b4548fbfdbd29005092a5355bfcd99473733048afdf,
  192'h4459c68dad4bb3cc0e48df0baba46f3c57ac6a6b1f038a7c,
  192'ha784e49cbb0260a114daeab0d29ee29d90cfd66092dc22de,
  192'he9facfe6c57b50c1ede190b8b6f17c1499734adb5eebc3bd};
localparam logic [191:0] k_y [NK] = '{192'h782c37e372ba4520aa62e0fed121d49ef3b543660cfd05fd,
  192'hff9eae9edcd27c1e42d8585c4546d9491845c56629cf2290,
  192'hdd5cac7d2136a63d2a931f64f4f4ff4e6a3fbf508802ecc9,
  192'hd993793ca131ca56170aae50329cf2adf99f9b3233a087be,
  192'h5c25116f16e7deda2698ffc7472dfb0f5b1327273eb5f109};
localparam int k_len [NK] = '{2, 5, 192, 190, 192};
localparam int k_hw [NK] = '{2, 1, 94, 99, 2};
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  ecc_op_e op = OP_NOP;
  logic [W-1:0] k = '0, x1 = '0, y1 = '0, x2 = '0, y2 = '0;
  logic busy, done, err;
  logic [W-1:0] x3, y3;
  logic [15:0] n_dbl, n_add;
  int checks = 0, failures = 0, cyc;

  always #5 clk = ~clk;

  ecmult_ctrl #(.W(W)) dut (.clk, .rst_n, .start, .op, .k, .x1, .y1, .x2, .y2,
                            .m(P192_P), .a(P192_A), .busy, .done, .err, .x3, .y3,
                            .n_dbl, .n_add);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(input ecc_op_e o, input logic [W-1:0] kk, input logic [W-1:0] a1,
                     input logic [W-1:0] b1, input logic [W-1:0] a2);
    @(negedge clk);
    op = o; k = kk; x1 = a1; y1 = b1; x2 = a2; y2 = '0; start = 1'b1;
    @(negedge clk); start = 1'b0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < NK; i++) begin
      run(OP_PMUL, k_v[i], P192_GX, P192_GY, '0);
      check(!err, $sformatf("k[%0d] err", i));
      check(x3 == k_x[i] && y3 == k_y[i], $sformatf("k[%0d] point", i));
      check(int'(n_dbl) == k_len[i] - 1, $sformatf("k[%0d] doublings %0d", i, n_dbl));
      check(int'(n_add) == k_hw[i] - 1, $sformatf("k[%0d] additions %0d", i, n_add));
      $display("PointMult k[%0d]: %0d cycles, %0d dbl, %0d add", i, cyc, n_dbl, n_add);
    end
    // pass-through of a field instruction: 5*7 mod p
    run(OP_FMUL, '0, 192'd5, '0, 192'd7);
    check(!err && x3 == 192'd35, "FieldMult pass-through");
    // k = 0 -> error
    run(OP_PMUL, '0, P192_GX, P192_GY, '0);
    check(err, "k=0 flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
