// medha_pkg: types and constants shared by the Medha homomorphic-encryption
// accelerator. Every residue polynomial arithmetic unit (RPAU) works on one
// RNS residue of a ciphertext: polynomials of N coefficients modulo one
// word-sized prime q. Coefficients travel through the datapath as QW-bit words
// (wide enough for the 54-bit and the 60-bit moduli); memories store them in
// rows of LANES coefficients.
// The microcode word layout, the opcode encoding and the dyadic operation set
// are this design's own choices; the document names a microcoded controller
// but does not publish its instruction set.
package medha_pkg;

  // Datapath word width: the widest RNS modulus is 60 bits.
  localparam int unsigned QW     = 60;
  // Coefficients per memory row = butterflies in the NTT unit (16).
  localparam int unsigned LANES  = 16;
  // Dyadic cores (4).
  localparam int unsigned DCORES = 4;
  // Largest supported ring degree (2^15, the larger parameter set).
  localparam int unsigned LOGN_MAX = 15;
  // Polynomial slots per RPAU at N = 2^14.
  localparam int unsigned SLOT_W = 6;
  // Width of the per-modulus Barrett shift (bit length of q).
  localparam int unsigned KW     = 7;

  typedef logic [QW-1:0]          coef_t;
  typedef coef_t [LANES-1:0]      row_t;

  // Per-modulus constants of one RPAU, written by the host.
  typedef struct packed {
    coef_t            q;    // RNS modulus
    logic [QW:0]      mu;   // floor(2^(2k) / q)
    logic [KW-1:0]    k;    // bit length of q
  } modulus_t;

  // Microcode opcodes.
  typedef enum logic [3:0] {
    OP_NOP   = 4'd0,
    OP_NTT   = 4'd1,   // forward NTT  a -> dst, scratch c
    OP_INTT  = 4'd2,   // inverse NTT (without the 1/N scaling)
    OP_DYA   = 4'd3,   // dyadic operation dyop(a, b, c) -> dst
    OP_SEND  = 4'd4,   // stream slot a to the next RPAU
    OP_RECV  = 4'd5,   // store the stream from the previous RPAU in dst
    OP_WAIT  = 4'd6,   // wait until the units in imm[2:0] are idle
    OP_SEED  = 4'd7,   // load the key PRNG seed from imm
    OP_HALT  = 4'd15
  } opcode_e;

  // Dyadic (coefficient-wise) operations.
  typedef enum logic [2:0] {
    DY_ADD   = 3'd0,   // dst = a + b
    DY_SUB   = 3'd1,   // dst = a - b
    DY_MUL   = 3'd2,   // dst = a * b
    DY_MAC   = 3'd3,   // dst = c + a * b
    DY_MULK  = 3'd4,   // dst = a * K0          (K0 from the key PRNG)
    DY_MACK  = 3'd5,   // dst = c + a * K0      (key switching with generated key)
    DY_MULS  = 3'd6    // dst = a * scalar[b]   (constant register b)
  } dyop_e;

  // Unit masks for OP_WAIT.
  localparam logic [2:0] U_NTT = 3'b001;
  localparam logic [2:0] U_DYA = 3'b010;
  localparam logic [2:0] U_LNK = 3'b100;

  typedef struct packed {
    opcode_e           op;     // 4
    dyop_e             dyop;   // 3
    logic [SLOT_W-1:0] dst;    // 6
    logic [SLOT_W-1:0] a;      // 6
    logic [SLOT_W-1:0] b;      // 6
    logic [SLOT_W-1:0] c;      // 6
    logic [32:0]       imm;    // 33
  } instr_t;                   // 64 bits

  // Command handed from the sequencer to one execution unit.
  typedef struct packed {
    dyop_e             dyop;
    logic              inverse;
    logic [SLOT_W-1:0] dst;
    logic [SLOT_W-1:0] a;
    logic [SLOT_W-1:0] b;
    logic [SLOT_W-1:0] c;
  } ucmd_t;

  // Modular helpers (operands already reduced, q < 2^(QW-1)).
  function automatic coef_t mod_add(coef_t x, coef_t y, coef_t q);
    logic [QW:0] s;
    s = {1'b0, x} + {1'b0, y};
    return (s >= {1'b0, q}) ? coef_t'(s - {1'b0, q}) : coef_t'(s);
  endfunction

  function automatic coef_t mod_sub(coef_t x, coef_t y, coef_t q);
    return (x >= y) ? coef_t'(x - y) : coef_t'(x + q - y);
  endfunction

endpackage
