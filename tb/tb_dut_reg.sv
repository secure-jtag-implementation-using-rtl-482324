// tb_dut_reg: self-checking test of the dut_reg test data register: capture of the
// core-side value, shifting (LSB towards TDO first), update of the output
// stage, no movement when not selected.
//
// Expected values are worked out independently in the bench; the cases
// and sizes are this bench's own choice.
module tb_dut_reg;
  localparam int unsigned N = 32;
  logic tck = 1'b0, trst_n = 1'b0, tdi = 1'b0, sel = 1'b0, cap = 1'b0, sh = 1'b0, upd = 1'b0;
  logic extest = 1'b0;
  logic [N-1:0] cin = '0, pout;
  logic tdo_bit;
  int checks = 0, failures = 0;

  always #5 tck = ~tck;

  dut_reg #(.N(N)) dut (.tck, .trst_n, .tdi, .sel, .capture_dr(cap), .shift_dr(sh),
    .update_dr(upd), .status_in(cin), .ctrl_out(pout), .tdo_bit);

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

      check(pout == din, "control word updated");
      last = din;
    end
    // not selected: nothing moves
    sel = 1'b0; extest = 1'b1;
    scan(~last, dout);

    check(pout == last, "unselected register keeps its control word");
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
