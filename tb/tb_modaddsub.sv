// tb_modaddsub: self-checking test of the modular / ordinary adder-subtractor.
// Random and corner operands (0, m-1, equal operands, sums near 2^W) against
// wide-integer reference arithmetic, for the P-192 prime and order and for a
// small odd modulus, in modular and ordinary modes.
//
// Expected values are worked out independently in the bench; the cases
// and sizes are this bench's own choice.
module tb_modaddsub;
  localparam int unsigned W = 192;
  logic [W-1:0] a, b, m, s;
  logic op_add, modular, cout;
  int checks = 0, failures = 0;

  modaddsub #(.W(W)) dut (.a, .b, .m, .op_add, .modular, .s, .cout);

  function automatic logic [W-1:0] rnd_below(logic [W-1:0] mm);
    logic [W-1:0] v;
    for (int i = 0; i < W/32; i++) v[i*32 +: 32] = $urandom;
    return v % mm;
  endfunction

  task automatic one(input logic [W-1:0] aa, input logic [W-1:0] bb, input logic [W-1:0] mm);
    logic [W+1:0] ref_s;
    a = aa; b = bb; m = mm;
    // modular add
    op_add = 1; modular = 1; #1;
    ref_s = ({2'b0, aa} + {2'b0, bb}) % {2'b0, mm};
    checks++; if (s != ref_s[W-1:0]) begin failures++; $display("FAIL add %h %h", aa, bb); end
    // modular sub
    op_add = 0; modular = 1; #1;
    ref_s = ({2'b0, aa} + {2'b0, mm} - {2'b0, bb}) % {2'b0, mm};
    checks++; if (s != ref_s[W-1:0]) begin failures++; $display("FAIL sub %h %h", aa, bb); end
    // ordinary add and sub
    op_add = 1; modular = 0; #1;
    ref_s = {2'b0, aa} + {2'b0, bb};
    checks++; if ({cout, s} != ref_s[W:0]) begin failures++; $display("FAIL oadd"); end
    op_add = 0; modular = 0; #1;
    checks++; if (s != aa - bb || cout != (aa >= bb)) begin failures++; $display("FAIL osub"); end
  endtask

  initial begin
    logic [W-1:0] mods [3];
    mods[0] = 192'hfffffffffffffffffffffffffffffffeffffffffffffffff;
    mods[1] = 192'hffffffffffffffffffffffff99def836146bc9b1b4d22831;
    mods[2] = 192'd1000003;
    foreach (mods[k]) begin
      one('0, '0, mods[k]);
      one(mods[k] - 1, mods[k] - 1, mods[k]);
      one(mods[k] - 1, 192'd1, mods[k]);
      one(192'd1, mods[k] - 1, mods[k]);
      one(192'd5, 192'd5, mods[k]);
      for (int i = 0; i < 200; i++) one(rnd_below(mods[k]), rnd_below(mods[k]), mods[k]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
