// jtag_ir: JTAG instruction register. A shift stage between TDI and TDO and
// an update stage that holds the current instruction. On Capture-IR the
// shift stage loads cap_val (the top level puts the lock status in the upper
// bits and the mandatory 01 pattern in the two lowest bits); during Shift-IR
// it shifts towards TDO (least significant bit out first); on Update-IR the
// instruction is transferred. Test-Logic-Reset and TRST load RST_IR (BYPASS).
//
// Standard IEEE 1149.1 behaviour; the width, the codes and the capture
// value are this design's own.
module jtag_ir #(
  parameter int unsigned IRW = 4,
  parameter logic [IRW-1:0] RST_IR = '1
) (
  input  logic           tck,
  input  logic           trst_n,
  input  logic           tlr,
  input  logic           tdi,
  input  logic           capture_ir,
  input  logic           shift_ir,
  input  logic           update_ir,
  input  logic [IRW-1:0] cap_val,
  output logic           tdo_bit,
  output logic [IRW-1:0] ir
);
  logic [IRW-1:0] sh;

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n) begin
      sh <= '0;
      ir <= RST_IR;
    end else if (tlr) begin
      ir <= RST_IR;
    end else begin
      if (capture_ir)    sh <= cap_val;
      else if (shift_ir) sh <= {tdi, sh[IRW-1:1]};
      if (update_ir)     ir <= sh;
    end
  end

  assign tdo_bit = sh[0];
endmodule
