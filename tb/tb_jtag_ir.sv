// tb_jtag_ir: self-checking test of the instruction register: capture value
// shifted out LSB first, new instruction shifted in and transferred only on
// Update-IR, and reset to BYPASS by Test-Logic-Reset and by TRST.
//
// Expected values are worked out independently in the bench; the cases
// and sizes are this bench's own choice.
module tb_jtag_ir;
  localparam int unsigned IRW = 4;
  logic tck = 1'b0, trst_n = 1'b0, tlr = 1'b0, tdi = 1'b0, cap = 1'b0, sh = 1'b0, upd = 1'b0;
  logic [IRW-1:0] cap_val = 4'b1001, ir;
  logic tdo_bit;
  int checks = 0, failures = 0;

  always #5 tck = ~tck;

  jtag_ir #(.IRW(IRW), .RST_IR(4'b1111)) dut (.tck, .trst_n, .tlr, .tdi, .capture_ir(cap),
    .shift_ir(sh), .update_ir(upd), .cap_val, .tdo_bit, .ir);

  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic load(input logic [IRW-1:0] code, output logic [IRW-1:0] got);
    @(negedge tck); cap = 1'b1;
    @(negedge tck); cap = 1'b0; sh = 1'b1;
    for (int i = 0; i < IRW; i++) begin
      tdi = code[i]; got[i] = tdo_bit;
      @(negedge tck);
    end
    sh = 1'b0;
    check(ir != code || code == 4'b1111, "instruction must not change before Update-IR");
    upd = 1'b1; @(negedge tck); upd = 1'b0;
  endtask

  initial begin
    logic [IRW-1:0] got;
    #12 trst_n = 1'b1;
    check(ir == 4'b1111, "reset value BYPASS");
    for (int k = 0; k < 16; k++) begin
      cap_val = 4'($urandom);
      load(4'(k), got);
      check(got == cap_val, "capture value shifted out");
      check(ir == 4'(k), $sformatf("instruction %0d loaded", k));
    end
    load(4'b1010, got);
    @(negedge tck); tlr = 1'b1; @(negedge tck); tlr = 1'b0;
    check(ir == 4'b1111, "Test-Logic-Reset selects BYPASS");
    load(4'b0010, got);
    trst_n = 1'b0; #1;
    check(ir == 4'b1111, "TRST selects BYPASS");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge tck);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
