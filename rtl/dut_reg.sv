// dut_reg: DUT specific test data register (an internal debug register of
// the protected core). Capture-DR loads the core's status word, Shift-DR
// shifts from TDI towards TDO, Update-DR writes the shifted word to the
// control outputs of the core. It only moves when selected, which the
// decoder allows only after the lock is released. Width and meaning of the
// words are this design's choice.
//
// The description only names DUT specific registers; this status/control
// register and its length of 32 are this design's own.
module dut_reg #(
  parameter int unsigned N = 32
) (
  input  logic         tck,
  input  logic         trst_n,
  input  logic         tdi,
  input  logic         sel,
  input  logic         capture_dr,
  input  logic         shift_dr,
  input  logic         update_dr,
  input  logic [N-1:0] status_in,
  output logic [N-1:0] ctrl_out,
  output logic         tdo_bit
);
  logic [N-1:0] sh;

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n) begin
      sh <= '0; ctrl_out <= '0;
    end else if (sel) begin
      if (capture_dr)     sh       <= status_in;
      else if (shift_dr)  sh       <= {tdi, sh[N-1:1]};
      else if (update_dr) ctrl_out <= sh;
    end
  end

  assign tdo_bit = sh[0];
endmodule
