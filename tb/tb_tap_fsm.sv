// tb_tap_fsm: self-checking test of the TAP controller. Random TMS sequences
// are applied and the state is compared after every TCK edge with a
// reference transition table written from IEEE 1149.1 (state numbering of
// the package). Also checks TRST, the five-ones reset and the strobes.
//
// Expected values are worked out independently in the bench; the cases
// and sizes are this bench's own choice.
module tb_tap_fsm;
  import secjtag_pkg::*;
  logic tck = 1'b0, trst_n = 1'b0, tms = 1'b1;
  tap_state_e state;
  logic tlr, cdr, sdr, pdr, udr, cir, sir, pir, uir;
  int checks = 0, failures = 0;
  int model;
  int nxt0 [16] = '{1, 1, 3, 4, 4, 6, 6, 4, 1, 10, 11, 11, 13, 13, 11, 1};
  int nxt1 [16] = '{0, 2, 9, 5, 5, 8, 7, 8, 2, 0, 12, 12, 15, 14, 15, 2};

  always #5 tck = ~tck;

  tap_fsm dut (.tck, .trst_n, .tms, .state, .test_logic_reset(tlr), .capture_dr(cdr),
               .shift_dr(sdr), .pause_dr(pdr), .update_dr(udr), .capture_ir(cir),
               .shift_ir(sir), .pause_ir(pir), .update_ir(uir));

  initial begin
    #12 trst_n = 1'b1;
    model = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge tck);
      checks++;
      if (int'(state) != model) begin failures++; $display("FAIL step %0d: %0d vs %0d", i, state, model); end
      checks++;
      if (tlr != (model == 0) || cdr != (model == 3) || sdr != (model == 4) || udr != (model == 8) ||
          cir != (model == 10) || sir != (model == 11) || uir != (model == 15) ||
          pdr != (model == 6) || pir != (model == 13)) begin
        failures++; $display("FAIL strobes at state %0d", model);
      end
      tms = ($urandom % 4) == 0;
      model = tms ? nxt1[model] : nxt0[model];
    end
    // five ones reach Test-Logic-Reset from anywhere
    @(negedge tck); tms = 1'b0;
    repeat (3) @(negedge tck);
    tms = 1'b1;
    repeat (5) @(negedge tck);
    checks++; if (state != TLR) begin failures++; $display("FAIL five ones"); end
    tms = 1'b0; repeat (4) @(negedge tck);
    trst_n = 1'b0; #1;
    checks++; if (state != TLR) begin failures++; $display("FAIL trst"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge tck);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
