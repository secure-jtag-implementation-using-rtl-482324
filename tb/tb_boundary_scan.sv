// tb_boundary_scan: self-checking test of the boundary_scan test data register: capture of the
// core-side value, shifting (LSB towards TDO first), update of the output
// stage, no movement when not selected, and the EXTEST pin multiplexer
// (pins must keep the update stage while new data shifts through).
//
// Expected values are worked out independently in the bench; the cases
// and sizes are this bench's own choice.
module tb_boundary_scan;
  localparam int unsigned N = 8;
  logic tck = 1'b0, trst_n = 1'b0, tdi = 1'b0, sel = 1'b0, cap = 1'b0, sh = 1'b0, upd = 1'b0;
  logic extest = 1'b0;
  logic [N-1:0] cin = '0, pout;
  logic tdo_bit;
  logic [N-1:0] mid;                    // pins seen at the end of shifting
  int checks = 0, failures = 0;

  always #5 tck = ~tck;

  boundary_scan #(.N(N)) dut (.tck, .trst_n, .tdi, .sel, .capture_dr(cap), .shift_dr(sh),
    .update_dr(upd), .core_out(cin), .pin_out(pout), .extest, .tdo_bit);

  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic scan(input logic [N-1:0] din, output logic [N-1:0] dout);
    @(negedge tck); cap = 1'b1;
    @(negedge tck); cap = 1'b0; sh = 1'b1;
    for (int i = 0; i < N; i++) begin
      tdi = din[i]; dout[i] = tdo_bit;
      @(negedge tck);
    end
    mid = pout;
    sh = 1'b0; upd = 1'b1; @(negedge tck); upd = 1'b0;
  endtask

  initial begin
    logic [N-1:0] din, dout, last;
    #12 trst_n = 1'b1;
    sel = 1'b1;
    last = '0;
    for (int k = 0; k < 20; k++) begin
      cin = N'($urandom); din = N'($urandom);
      extest = k[0];
      scan(din, dout);
      check(dout == cin, "captured core value shifted out");
      check(mid == (extest ? last : cin), "pins hold the update stage while shifting");
      check(pout == (extest ? din : cin), "pin multiplexer after update");

      last = din;
    end
    // not selected: nothing moves
    sel = 1'b0; extest = 1'b1;
    scan(~last, dout);
    check(pout == last, "unselected register keeps its update stage");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge tck);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
