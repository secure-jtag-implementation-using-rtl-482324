// tb_nvm: self-checking test of the NVM model: reads every word after
// power-up and compares with the P-192 parameters from the standard and
// the example keys, checks the one-clock read latency, and reprograms a
// key word.
//
// Expected values are worked out independently in the bench; the cases
// and sizes are this bench's own choice.
module tb_nvm;
  import secjtag_pkg::*;
  localparam int unsigned W = 192;
  logic clk = 1'b0, prog_en = 1'b0;
  logic [3:0] raddr = '0, prog_addr = '0;
  logic [W-1:0] rdata, prog_data = '0;
  logic [W-1:0] expv [13];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  nvm #(.W(W)) dut (.clk, .raddr, .rdata, .prog_en, .prog_addr, .prog_data);

  initial begin
    expv = '{192'hfffffffffffffffffffffffffffffffeffffffffffffffff,
             192'hfffffffffffffffffffffffffffffffefffffffffffffffc,
             192'h64210519e59c80e70fa7e9ab72243049feb8deecc146b9b1,
             192'hffffffffffffffffffffffff99def836146bc9b1b4d22831,
             192'h188da80eb03090f67cbf20eb43a18800f4ff0afd82ff1012,
             192'h07192b95ffc8da78631011ed6b24cdd573f977a11e794811,
             192'h5a3c96e1f00dbaadc0ffee0123456789abcdef0112233445,
             192'h9242123e80988821d57580feb1f1b8c219409e4d91a8b785,
             192'h3ce4f72f9bdc36a55991eb6a9aaf8834de352cef6154aaa7,
             192'h66d37cc253acb37bd24aea96b01cee72d1c4e8a4caaa9cd1,
             192'h903b6282447d7ecf2f43dcb1ef726b7aafddc1ae19adef32,
             192'h518119e0fea6a055cc6134ed5604ff8c09f41771c12911de,
             192'h67bf0e58a19566ad5ed44e510720b5b518486ca7c83c83ae};
    for (int i = 0; i < 13; i++) begin
      @(negedge clk); raddr = 4'(i);
      @(negedge clk);
      checks++;
      if (rdata != expv[i]) begin failures++; $display("FAIL word %0d", i); end
    end
    @(negedge clk); prog_en = 1'b1; prog_addr = NVM_KA; prog_data = 192'h1234;
    @(negedge clk); prog_en = 1'b0; raddr = NVM_KA;
    @(negedge clk);
    checks++; if (rdata != 192'h1234) begin failures++; $display("FAIL program"); end
    raddr = NVM_N;
    #1 checks++; if (rdata != 192'h1234) begin failures++; $display("FAIL latency"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
