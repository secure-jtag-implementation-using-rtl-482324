// tb_instr_decoder: self-checking test of the lock in the instruction
// decoder. Every instruction code is decoded locked and unlocked, in and out
// of an IR scan, and compared with the expected selects: while locked only
// the Schnorr/bypass path may reach TDO and no register may be selected.
//
// Expected values are worked out independently in the bench; the cases
// and sizes are this bench's own choice.
module tb_instr_decoder;
  import secjtag_pkg::*;
  logic [IR_W-1:0] ir;
  logic unlocked, ir_scan;
  logic request_unlock, sel_schnorr, sel_bsr, sel_dut, extest;
  logic [1:0] mux1_sel;
  int checks = 0, failures = 0;

  instr_decoder dut (.ir, .unlocked, .ir_scan, .request_unlock, .sel_schnorr, .sel_bsr,
                     .sel_dut, .extest, .mux1_sel);

  initial begin
    logic [1:0] exp_mux;
    bit e_bsr, e_dut, e_ext;
    for (int u = 0; u < 2; u++)
      for (int s = 0; s < 2; s++)
        for (int c = 0; c < 16; c++) begin
          ir = 4'(c); unlocked = u[0]; ir_scan = s[0];
          #1;
          e_bsr = u[0] && (c == 0 || c == 1);
          e_dut = u[0] && (c == 2);
          e_ext = u[0] && (c == 0);
          exp_mux = s[0] ? 2'd0 : e_bsr ? 2'd2 : e_dut ? 2'd3 : 2'd1;
          checks++;
          if (request_unlock != (c == 10) || sel_schnorr != (c == 10) || sel_bsr != e_bsr ||
              sel_dut != e_dut || extest != e_ext || mux1_sel != exp_mux) begin
            failures++; $display("FAIL ir=%0d unlocked=%0d scan=%0d", c, u, s);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
