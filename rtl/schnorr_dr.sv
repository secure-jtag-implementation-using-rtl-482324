// schnorr_dr: Schnorr shift register, MUX2 and synchronisation flip-flop.
//
// The tester and the Schnorr controller exchange one W-bit word per
// data-register scan. The controller offers an exchange by putting a word on
// out_word and raising req (functional clock domain); the level is
// synchronised to TCK. The scan chain is TDI -> W-bit shift register ->
// MUX2 -> synchronisation flip-flop -> TDO. On Capture-DR with UNLOCK
// selected:
//   exchange pending : the shift register loads out_word and the sync
//                      flip-flop loads 1; MUX2 selects the shift register, so
//                      a W+1 bit scan shifts out 1 followed by out_word
//                      (least significant bit first) and shifts in the
//                      tester's word (one leading bit that is dropped, then
//                      the word, least significant bit first);
//   nothing pending  : the sync flip-flop loads 0 and MUX2 selects TDI, so the
//                      path is one bit long, like BYPASS.
// The first bit a scan returns thus tells the tester whether the controller
// is ready. On Update-DR after a valid scan the shift register is copied to
// in_word and ack rises, which hands the word to the controller; ack falls
// again once the controller has dropped req, and in_word stays stable until
// the next exchange. A controller that drops req before the scan (an
// aborted protocol) simply withdraws the offer. When UNLOCK is not selected the
// flip-flop still forms the one-bit path, which the top uses as the bypass
// register. The handshake is this design's own; the register, the
// multiplexer and the flag follow the description.
module schnorr_dr #(
  parameter int unsigned W = 192
) (
  input  logic         tck,
  input  logic         trst_n,
  input  logic         tdi,
  input  logic         sel,
  input  logic         capture_dr,
  input  logic         shift_dr,
  input  logic         update_dr,
  input  logic [W-1:0] out_word,
  input  logic         req,
  output logic [W-1:0] in_word,
  output logic         ack,
  output logic         tdo_bit,
  output logic         valid      // current scan carries a word
);
  logic [W-1:0] sr;
  logic         sync_ff, req_s, pending;

  sync2 u_req_sync (.clk(tck), .rst_n(trst_n), .d(req), .q(req_s));
  assign pending = req_s && !ack;

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n) begin
      sr <= '0; sync_ff <= 1'b0; valid <= 1'b0; in_word <= '0; ack <= 1'b0;
    end else begin
      if (capture_dr) begin
        valid   <= sel && pending;
        sync_ff <= sel && pending;
        if (sel && pending) sr <= out_word;
      end else if (shift_dr) begin
        if (valid) begin
          sync_ff <= sr[0];
          sr      <= {tdi, sr[W-1:1]};
        end else begin
          sync_ff <= tdi;      // MUX2 selects TDI
        end
      end else if (update_dr && valid) begin
        in_word <= sr;
        ack     <= 1'b1;
        valid   <= 1'b0;
      end
      if (ack && !req_s) ack <= 1'b0;
    end
  end

  assign tdo_bit = sync_ff;
endmodule
