// ecc_pkg: constants and types shared by the P-256 ECC processor.
//
// Holds the NIST P-256 domain parameters, the Montgomery constants derived
// from them, the operand-memory address map, the host command codes and the
// micro-operation format executed by the control unit.
//
// The curve (NIST P-256) and the use of Montgomery multiplication follow the
// source design. The address map, command codes and micro-op encoding are
// this implementation's own choices.
//
// Montgomery constants, with R = 2^256:
//   R2P = R^2 mod p, R2N = R^2 mod n, C3R = 3*R mod p (curve a = -3 in
//   Montgomery form, negated).
package ecc_pkg;

  localparam int unsigned WIDTH = 256;
  typedef logic [WIDTH-1:0] word_t;

  // NIST P-256 (FIPS 186-4, D.1.2.3)
  localparam word_t P256_P  = 256'hFFFFFFFF_00000001_00000000_00000000_00000000_FFFFFFFF_FFFFFFFF_FFFFFFFF;
  localparam word_t P256_N  = 256'hFFFFFFFF_00000000_FFFFFFFF_FFFFFFFF_BCE6FAAD_A7179E84_F3B9CAC2_FC632551;
  localparam word_t P256_GX = 256'h6B17D1F2_E12C4247_F8BCE6E5_63A440F2_77037D81_2DEB33A0_F4A13945_D898C296;
  localparam word_t P256_GY = 256'h4FE342E2_FE1A7F9B_8EE7EB4A_7C0F9E16_2BCE3357_6B315ECE_CBB64068_37BF51F5;
  localparam word_t MONT_R2P = 256'h00000004_FFFFFFFD_FFFFFFFF_FFFFFFFE_FFFFFFFB_FFFFFFFF_00000000_00000003;
  localparam word_t MONT_R2N = 256'h66E12D94_F3D95620_2845B239_2B6BEC59_4699799C_49BD6FA6_83244C95_BE79EEA2;
  localparam word_t MONT_C3R = 256'h00000002_FFFFFFFC_FFFFFFFF_FFFFFFFF_FFFFFFFD_00000000_00000000_00000003;

  // Operand memory address map (32 words of 256 bits).
  typedef logic [4:0] reg_addr_t;
  // working registers
  localparam reg_addr_t RA_X   = 5'd0;   // current point Q (Montgomery form)
  localparam reg_addr_t RA_Y   = 5'd1;
  localparam reg_addr_t RA_PX  = 5'd2;   // point added in each step (Montgomery form)
  localparam reg_addr_t RA_PY  = 5'd3;
  localparam reg_addr_t RA_T1  = 5'd4;
  localparam reg_addr_t RA_T2  = 5'd5;
  localparam reg_addr_t RA_T3  = 5'd6;
  localparam reg_addr_t RA_SX  = 5'd7;   // saved partial result (verify)
  localparam reg_addr_t RA_SY  = 5'd8;
  // host-visible words
  localparam reg_addr_t RA_K   = 5'd9;   // scalar / ECDSA nonce
  localparam reg_addr_t RA_D   = 5'd10;  // private key (write-only from the host)
  localparam reg_addr_t RA_H   = 5'd11;  // message hash H(m)
  localparam reg_addr_t RA_R   = 5'd12;  // signature r
  localparam reg_addr_t RA_S   = 5'd13;  // signature s
  localparam reg_addr_t RA_QX  = 5'd14;  // public key
  localparam reg_addr_t RA_QY  = 5'd15;
  localparam reg_addr_t RA_INX = 5'd16;  // input point
  localparam reg_addr_t RA_INY = 5'd17;
  localparam reg_addr_t RA_OX  = 5'd18;  // output point
  localparam reg_addr_t RA_OY  = 5'd19;
  localparam reg_addr_t RA_U1  = 5'd20;
  localparam reg_addr_t RA_U2  = 5'd21;
  // read-only constants
  localparam reg_addr_t RA_FIRST_CONST = 5'd25;
  localparam reg_addr_t RA_ZERO = 5'd25;
  localparam reg_addr_t RA_ONE  = 5'd26;
  localparam reg_addr_t RA_R2P  = 5'd27;
  localparam reg_addr_t RA_R2N  = 5'd28;
  localparam reg_addr_t RA_C3R  = 5'd29;
  localparam reg_addr_t RA_GX   = 5'd30;
  localparam reg_addr_t RA_GY   = 5'd31;

  // Host commands
  typedef enum logic [2:0] {
    CMD_NOP    = 3'd0,
    CMD_KEYGEN = 3'd1,  // (QX,QY) = D * G
    CMD_ECDH   = 3'd2,  // (OX,OY) = D * (INX,INY)
    CMD_PMUL   = 3'd3,  // (OX,OY) = K * (INX,INY)
    CMD_SIGN   = 3'd4,  // (R,S)   = ECDSA signature of H with key D, nonce K
    CMD_VERIFY = 3'd5   // valid   = ECDSA check of (R,S) on H with key (QX,QY)
  } cmd_t;

  // Micro-operations
  typedef enum logic [3:0] {
    UOP_ADD  = 4'd0,  // dst = a + b mod m
    UOP_SUB  = 4'd1,  // dst = a - b mod m
    UOP_MUL  = 4'd2,  // dst = a * b * 2^-256 mod m (Montgomery)
    UOP_DIV  = 4'd3,  // dst = a / b mod m
    UOP_LDK  = 4'd4,  // scalar register = a
    UOP_SMUL = 4'd5,  // (X,Y) = scalar * (PX,PY), Montgomery form
    UOP_PADD = 4'd6,  // (X,Y) = (X,Y) + (PX,PY), Montgomery form
    UOP_CMP  = 4'd7,  // valid = (a == b)
    UOP_END  = 4'd8   // end of a command program
  } uop_code_t;

  typedef struct packed {
    uop_code_t op;
    logic      modn;   // 0: modulus p, 1: modulus n
    logic      last;   // last micro-op of a point routine
    reg_addr_t dst;
    reg_addr_t a;
    reg_addr_t b;
  } uop_t;

endpackage
