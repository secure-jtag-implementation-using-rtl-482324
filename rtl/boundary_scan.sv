// boundary_scan: DUT boundary scan register of N cells.
//
// Each cell has a capture/shift stage and an update stage. Capture-DR loads
// the signals the core drives towards the pins (core_out), Shift-DR shifts
// from TDI towards TDO (cell 0 nearest TDO), Update-DR copies the shift
// stage into the update stage. With EXTEST active the pins are driven from
// the update stage instead of the core. The register only moves when the
// decoder selects it (sel), which it does only once the lock is released.
// The cell count and the cell type are this design's choice.
//
// The description only names a DUT boundary scan register; the standard
// capture/shift/update cell chain and its length of 8 are this design's own.
module boundary_scan #(
  parameter int unsigned N = 8
) (
  input  logic         tck,
  input  logic         trst_n,
  input  logic         tdi,
  input  logic         sel,
  input  logic         extest,
  input  logic         capture_dr,
  input  logic         shift_dr,
  input  logic         update_dr,
  input  logic [N-1:0] core_out,
  output logic [N-1:0] pin_out,
  output logic         tdo_bit
);
  logic [N-1:0] sh, upd;

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n) begin
      sh <= '0; upd <= '0;
    end else if (sel) begin
      if (capture_dr)     sh  <= core_out;
      else if (shift_dr)  sh  <= {tdi, sh[N-1:1]};
      else if (update_dr) upd <= sh;
    end
  end

  assign pin_out = extest ? upd : core_out;
  assign tdo_bit = sh[0];
endmodule
