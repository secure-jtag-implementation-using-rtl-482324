// tap_fsm: IEEE 1149.1 TAP controller, the 16-state machine stepped by TMS
// on rising TCK edges (Test-Logic-Reset, Run-Test/Idle, and the DR and IR
// columns Select, Capture, Shift, Exit1, Pause, Exit2, Update). The secure
// JTAG leaves this machine unchanged. Besides the state it decodes the
// strobes used by the registers: a register captures, shifts or updates on
// the rising TCK edge at which the machine is in the matching state.
// TRST (trst_n, asynchronous, active low) forces Test-Logic-Reset, as does
// holding TMS high for five TCK edges.
//
// The state diagram is the standard one the description shows; the state
// encoding is this design's own.
module tap_fsm
  import secjtag_pkg::*;
(
  input  logic       tck,
  input  logic       trst_n,
  input  logic       tms,
  output tap_state_e state,
  output logic       test_logic_reset,
  output logic       capture_dr,
  output logic       shift_dr,
  output logic       pause_dr,
  output logic       update_dr,
  output logic       capture_ir,
  output logic       shift_ir,
  output logic       pause_ir,
  output logic       update_ir
);
  tap_state_e nxt;

  always_comb begin
    unique case (state)
      TLR:        nxt = tms ? TLR      : RTI;
      RTI:        nxt = tms ? SEL_DR   : RTI;
      SEL_DR:     nxt = tms ? SEL_IR   : CAPTURE_DR;
      CAPTURE_DR: nxt = tms ? EXIT1_DR : SHIFT_DR;
      SHIFT_DR:   nxt = tms ? EXIT1_DR : SHIFT_DR;
      EXIT1_DR:   nxt = tms ? UPDATE_DR : PAUSE_DR;
      PAUSE_DR:   nxt = tms ? EXIT2_DR : PAUSE_DR;
      EXIT2_DR:   nxt = tms ? UPDATE_DR : SHIFT_DR;
      UPDATE_DR:  nxt = tms ? SEL_DR   : RTI;
      SEL_IR:     nxt = tms ? TLR      : CAPTURE_IR;
      CAPTURE_IR: nxt = tms ? EXIT1_IR : SHIFT_IR;
      SHIFT_IR:   nxt = tms ? EXIT1_IR : SHIFT_IR;
      EXIT1_IR:   nxt = tms ? UPDATE_IR : PAUSE_IR;
      PAUSE_IR:   nxt = tms ? EXIT2_IR : PAUSE_IR;
      EXIT2_IR:   nxt = tms ? UPDATE_IR : SHIFT_IR;
      UPDATE_IR:  nxt = tms ? SEL_DR   : RTI;
      default:    nxt = TLR;
    endcase
  end

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n) state <= TLR;
    else         state <= nxt;
  end

  assign test_logic_reset = (state == TLR);
  assign capture_dr = (state == CAPTURE_DR);
  assign shift_dr   = (state == SHIFT_DR);
  assign pause_dr   = (state == PAUSE_DR);
  assign update_dr  = (state == UPDATE_DR);
  assign capture_ir = (state == CAPTURE_IR);
  assign shift_ir   = (state == SHIFT_IR);
  assign pause_ir   = (state == PAUSE_IR);
  assign update_ir  = (state == UPDATE_IR);
endmodule
