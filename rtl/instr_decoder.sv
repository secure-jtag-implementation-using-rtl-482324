// instr_decoder: modified JTAG instruction decoder with the access lock.
//
// Decodes the current instruction into register selects and the TDO
// multiplexer (MUX1) select. The design starts locked. While the lock is
// held (unlocked = 0) every data-register scan goes through the Schnorr
// path (MUX2 and the synchronisation flip-flop), whatever instruction is
// loaded, so no DUT register can be read, written or driven onto the pins.
// Loading the UNLOCK instruction raises request_unlock, which starts the
// authentication in the Schnorr controller; that controller's release_lock
// (synchronised to TCK, input unlocked) opens the other instructions:
// EXTEST and SAMPLE select the boundary scan register (EXTEST also drives
// the pins from it), DUTREG selects the DUT specific register, everything
// else (BYPASS, UNLOCK) uses the one-bit path through the synchronisation
// flip-flop. During IR scans MUX1 selects the instruction register.
// Purely combinational. The instruction codes are this design's own.
module instr_decoder
  import secjtag_pkg::*;
(
  input  logic [IR_W-1:0] ir,
  input  logic            unlocked,
  input  logic            ir_scan,         // TAP is in the IR column
  output logic            request_unlock,
  output logic            sel_schnorr,
  output logic            sel_bsr,
  output logic            sel_dut,
  output logic            extest,
  output logic [1:0]      mux1_sel         // 0: IR, 1: Schnorr/sync, 2: BSR, 3: DUT reg
);
  always_comb begin
    request_unlock = (ir == IR_UNLOCK);
    sel_schnorr    = (ir == IR_UNLOCK);
    sel_bsr        = unlocked && (ir == IR_EXTEST || ir == IR_SAMPLE);
    sel_dut        = unlocked && (ir == IR_DUTREG);
    extest         = unlocked && (ir == IR_EXTEST);
    if (ir_scan)       mux1_sel = 2'd0;
    else if (sel_bsr)  mux1_sel = 2'd2;
    else if (sel_dut)  mux1_sel = 2'd3;
    else               mux1_sel = 2'd1;
  end
endmodule
