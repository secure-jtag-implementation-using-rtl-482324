// secjtag_pkg: types and constants shared by the secure JTAG design.
//
// Holds the NIST P-192 curve parameters (the curve the design is built for),
// the instruction set of the ECC datapath (FieldAdd, FieldSub, FieldMult,
// FieldInv, PointAdd, PointDbl, PointMult), the 16 TAP controller states of
// IEEE 1149.1, the JTAG instruction codes and the authentication modes of the
// Schnorr controller. The instruction codes, the mode encoding and the NVM
// word map are choices of this design; the curve constants and the
// instruction names follow the description of the architecture.
package secjtag_pkg;

  localparam int unsigned ECC_W = 192;

  // NIST P-192 domain parameters
  localparam logic [191:0] P192_P  = 192'hfffffffffffffffffffffffffffffffeffffffffffffffff;
  localparam logic [191:0] P192_A  = 192'hfffffffffffffffffffffffffffffffefffffffffffffffc; // -3 mod p
  localparam logic [191:0] P192_B  = 192'h64210519e59c80e70fa7e9ab72243049feb8deecc146b9b1;
  localparam logic [191:0] P192_N  = 192'hffffffffffffffffffffffff99def836146bc9b1b4d22831;
  localparam logic [191:0] P192_GX = 192'h188da80eb03090f67cbf20eb43a18800f4ff0afd82ff1012;
  localparam logic [191:0] P192_GY = 192'h07192b95ffc8da78631011ed6b24cdd573f977a11e794811;

  // Default key material loaded into the NVM model (example keys only).
  localparam logic [191:0] DEF_KA   = 192'h5a3c96e1f00dbaadc0ffee0123456789abcdef0112233445;
  localparam logic [191:0] DEF_PA_X = 192'h9242123e80988821d57580feb1f1b8c219409e4d91a8b785;
  localparam logic [191:0] DEF_PA_Y = 192'h3ce4f72f9bdc36a55991eb6a9aaf8834de352cef6154aaa7;
  localparam logic [191:0] DEF_PB_X = 192'h66d37cc253acb37bd24aea96b01cee72d1c4e8a4caaa9cd1;
  localparam logic [191:0] DEF_PB_Y = 192'h903b6282447d7ecf2f43dcb1ef726b7aafddc1ae19adef32;
  localparam logic [191:0] DEF_Q_X  = 192'h518119e0fea6a055cc6134ed5604ff8c09f41771c12911de;
  localparam logic [191:0] DEF_Q_Y  = 192'h67bf0e58a19566ad5ed44e510720b5b518486ca7c83c83ae;

  // NVM word map
  typedef enum logic [3:0] {
    NVM_P    = 4'd0,  NVM_A    = 4'd1,  NVM_B    = 4'd2,  NVM_N    = 4'd3,
    NVM_GX   = 4'd4,  NVM_GY   = 4'd5,  NVM_KA   = 4'd6,  NVM_PA_X = 4'd7,
    NVM_PA_Y = 4'd8,  NVM_PB_X = 4'd9,  NVM_PB_Y = 4'd10, NVM_Q_X  = 4'd11,
    NVM_Q_Y  = 4'd12
  } nvm_addr_e;
  localparam int unsigned NVM_WORDS = 13;

  // ECC instruction set (Fig. 4 names)
  typedef enum logic [2:0] {
    OP_NOP   = 3'd0,
    OP_FADD  = 3'd1,  // x3 = x1 + x2 mod m
    OP_FSUB  = 3'd2,  // x3 = x1 - x2 mod m
    OP_FMUL  = 3'd3,  // x3 = x1 * x2 mod m
    OP_FINV  = 3'd4,  // x3 = y1 / x1 mod m (inversion when y1 = 1)
    OP_PADD  = 3'd5,  // (x3,y3) = (x1,y1) + (x2,y2)
    OP_PDBL  = 3'd6,  // (x3,y3) = 2 (x1,y1)
    OP_PMUL  = 3'd7   // (x3,y3) = k (x1,y1)
  } ecc_op_e;

  // IEEE 1149.1 TAP controller states
  typedef enum logic [3:0] {
    TLR        = 4'h0, RTI        = 4'h1,
    SEL_DR     = 4'h2, CAPTURE_DR = 4'h3, SHIFT_DR = 4'h4, EXIT1_DR = 4'h5,
    PAUSE_DR   = 4'h6, EXIT2_DR   = 4'h7, UPDATE_DR = 4'h8,
    SEL_IR     = 4'h9, CAPTURE_IR = 4'hA, SHIFT_IR = 4'hB, EXIT1_IR = 4'hC,
    PAUSE_IR   = 4'hD, EXIT2_IR   = 4'hE, UPDATE_IR = 4'hF
  } tap_state_e;

  // JTAG instructions (4-bit instruction register)
  localparam int unsigned IR_W = 4;
  localparam logic [IR_W-1:0] IR_EXTEST  = 4'b0000;
  localparam logic [IR_W-1:0] IR_SAMPLE  = 4'b0001;
  localparam logic [IR_W-1:0] IR_DUTREG  = 4'b0010;
  localparam logic [IR_W-1:0] IR_UNLOCK  = 4'b1010;
  localparam logic [IR_W-1:0] IR_BYPASS  = 4'b1111;

  // Authentication modes of the Schnorr controller (Table 2 scenarios)
  typedef enum logic [1:0] {
    AUTH_PROVER   = 2'd0,  // scenario 1: device proves its identity
    AUTH_VERIFIER = 2'd1,  // scenario 2: device verifies the tester
    AUTH_MUTUAL   = 2'd2,  // scenario 3: both directions
    AUTH_ECDSA    = 2'd3   // scenario 4: ECDSA signature verification
  } auth_mode_e;

endpackage
