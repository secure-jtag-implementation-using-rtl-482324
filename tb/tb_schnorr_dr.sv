// tb_schnorr_dr: self-checking test of the Schnorr data register.
// A behavioural controller offers words with a four-phase req/ack handshake.
// The tester scans with UNLOCK selected and checks:
//   - with nothing pending the first bit is 0 and the path is one bit long;
//   - with a word pending the first bit is 1, the next W bits are the offered
//     word (LSB first), and after Update-DR in_word holds the tester's word
//     and ack rises exactly then, falling after req is dropped;
//   - a scan with the register not selected never transfers a word.
// Small width (W = 16) keeps the run short; the logic does not depend on W.
//
// Expected values are worked out independently in the bench; the cases
// and sizes are this bench's own choice.
module tb_schnorr_dr;
  localparam int unsigned W = 16;
  logic tck = 1'b0, trst_n = 1'b0, tdi = 1'b0, sel = 1'b1;
  logic cap = 1'b0, sh = 1'b0, upd = 1'b0, req = 1'b0;
  logic [W-1:0] out_word = '0, in_word;
  logic ack, tdo_bit, valid;
  int checks = 0, failures = 0;

  always #5 tck = ~tck;

  schnorr_dr #(.W(W)) dut (.tck, .trst_n, .tdi, .sel, .capture_dr(cap), .shift_dr(sh),
    .update_dr(upd), .out_word, .req, .in_word, .ack, .tdo_bit, .valid);

  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // scan nbits bits; din[0] enters first; dout[0] is the first bit out
  task automatic scan(input int nbits, input logic [W:0] din, output logic [W:0] dout);
    @(negedge tck); cap = 1'b1;
    @(negedge tck); cap = 1'b0; sh = 1'b1;
    dout = '0;
    for (int i = 0; i < nbits; i++) begin
      tdi = din[i]; dout[i] = tdo_bit;
      @(negedge tck);
    end
    sh = 1'b0; upd = 1'b1; @(negedge tck); upd = 1'b0;
  endtask

  initial begin
    logic [W:0] dout;
    logic [W-1:0] word, tw;
    #12 trst_n = 1'b1;
    // nothing pending: one-bit path, first bit 0, then TDI delayed by one
    scan(W + 1, {1'b0, 16'hA5C3}, dout);
    check(dout[0] == 1'b0, "idle scan starts with 0");
    check(dout[W:1] == 16'hA5C3, "idle path is one flip-flop long");
    check(!ack, "no ack without a word");
    for (int k = 0; k < 8; k++) begin
      word = W'($urandom); tw = W'($urandom);
      @(negedge tck); out_word = word; req = 1'b1;
      repeat (3) @(negedge tck);            // synchroniser
      if (k == 7) begin
        sel = 1'b0;
        scan(W + 1, {tw, 1'b0}, dout);
        check(!ack, "unselected register transfers no word");
        sel = 1'b1;
      end
      scan(W + 1, {tw, 1'b0}, dout);
      check(dout[0] == 1'b1, "pending scan starts with 1");
      check(dout[W:1] == word, "offered word shifted out LSB first");
      check(ack, "ack rises on Update-DR");
      check(in_word == tw, "tester word received");
      // a second scan while ack is high must not be valid
      scan(1, '0, dout);
      check(dout[0] == 1'b0, "no second transfer for one request");
      req = 1'b0;
      repeat (4) @(negedge tck);
      check(!ack, "ack falls after req drops");
      check(in_word == tw, "received word held");
    end
    // withdrawn offer
    req = 1'b1; repeat (3) @(negedge tck); req = 1'b0; repeat (3) @(negedge tck);
    scan(1, '0, dout);
    check(dout[0] == 1'b0 && !ack, "withdrawn offer gives an idle scan");
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
