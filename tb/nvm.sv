// nvm: behavioural model of the external non-volatile memory that stores the
// curve parameters and the keys of the secure JTAG.
//
// Test model only: the memory itself is outside the design, which reads it
// through its nvm_addr / nvm_rdata port. The model has a word-wide read port
// with one clock of latency and a programming port that writes one word.
// Its contents at power-up are the P-192 parameters (p, a, b, n, Gx, Gy),
// the device private key k_a and public key P_a, the trusted tester public
// key P_b and the public key Q of the signing authority, in the word order
// of secjtag_pkg::nvm_addr_e. The key values are examples.
//
// The word map and the example keys are this design's own.
module nvm
  import secjtag_pkg::*;
#(
  parameter int unsigned W = 192,
  parameter logic [W-1:0] KA   = W'(DEF_KA),
  parameter logic [W-1:0] PA_X = W'(DEF_PA_X),
  parameter logic [W-1:0] PA_Y = W'(DEF_PA_Y),
  parameter logic [W-1:0] PB_X = W'(DEF_PB_X),
  parameter logic [W-1:0] PB_Y = W'(DEF_PB_Y),
  parameter logic [W-1:0] Q_X  = W'(DEF_Q_X),
  parameter logic [W-1:0] Q_Y  = W'(DEF_Q_Y)
) (
  input  logic         clk,
  input  logic [3:0]   raddr,
  output logic [W-1:0] rdata,
  input  logic         prog_en,
  input  logic [3:0]   prog_addr,
  input  logic [W-1:0] prog_data
);
  logic [W-1:0] mem [16];

  initial begin
    for (int i = 0; i < 16; i++) mem[i] = '0;
    mem[NVM_P]    = W'(P192_P);
    mem[NVM_A]    = W'(P192_A);
    mem[NVM_B]    = W'(P192_B);
    mem[NVM_N]    = W'(P192_N);
    mem[NVM_GX]   = W'(P192_GX);
    mem[NVM_GY]   = W'(P192_GY);
    mem[NVM_KA]   = KA;
    mem[NVM_PA_X] = PA_X;
    mem[NVM_PA_Y] = PA_Y;
    mem[NVM_PB_X] = PB_X;
    mem[NVM_PB_Y] = PB_Y;
    mem[NVM_Q_X]  = Q_X;
    mem[NVM_Q_Y]  = Q_Y;
  end

  always @(posedge clk) begin
    if (prog_en) mem[prog_addr] <= prog_data;
    rdata <= mem[raddr];
  end
endmodule
