// rsa_pkg: constants and types shared by the RSA coprocessor.
//
// The coprocessor works on 32-bit words only. A 1024-bit operand is held as
// NWORDS_DEFAULT = 32 words, least significant word at the lowest address of
// its region. The memory is split into equal regions of NW words, one per
// operand; region indices are given here. The exponent length in encryption
// mode (16 bits) and the bit positions of the control register follow the
// published description; the memory map is this design's own choice.
package rsa_pkg;

  localparam int unsigned WORD_W          = 32;   // datapath word width
  localparam int unsigned NWORDS_DEFAULT  = 32;   // 1024-bit operands
  localparam int unsigned ENC_KEY_BITS    = 16;   // exponent length, encryption

  // Memory regions, each NW words long (word address = region*NW + index).
  localparam int unsigned REG_X      = 0;  // message x (or first factor)
  localparam int unsigned REG_Y      = 1;  // second factor (multiplication mode)
  localparam int unsigned REG_M      = 2;  // modulus m (odd)
  localparam int unsigned REG_E      = 3;  // exponent e / d
  localparam int unsigned REG_R2     = 4;  // R^2 mod m, R = 2^(32*NW)
  localparam int unsigned REG_XP     = 5;  // x in Montgomery form (internal)
  localparam int unsigned REG_A      = 6;  // running product (internal)
  localparam int unsigned REG_RES    = 7;  // result
  localparam int unsigned REG_MPRIME = 8;  // word 0: m' = -m^-1 mod 2^32
  localparam int unsigned NREGIONS   = 9;

  // Control register bit positions (Table of the control register).
  localparam int unsigned CR_START = 0;  // operation start
  localparam int unsigned CR_MODE  = 1;  // 0: x*y mod m, 1: x^e mod m
  localparam int unsigned CR_EXPM  = 2;  // 0: encryption (16-bit key), 1: decryption (full key)
  localparam int unsigned CR_INIT  = 3;  // initialise processor
  localparam int unsigned CR_EOP   = 4;  // end of operation
  localparam int unsigned CR_W     = 5;

  typedef logic [WORD_W-1:0] word_t;

  // Operand selection for the second Montgomery factor.
  typedef enum logic [1:0] {
    YSRC_MEM = 2'd0,   // y read from memory
    YSRC_ONE = 2'd1    // y = 1, used to leave the Montgomery domain
  } ysrc_e;

endpackage
