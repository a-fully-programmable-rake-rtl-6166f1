// risc_pkg: instruction encoding of the RISC controller.
//
// All instructions are 32 bits: opcode [31:26], rd [25:22], rs [21:18],
// immediate [15:0]; register-register instructions take rt from imm[3:0].
// The three instruction classes (16-bit RISC, complex DSP/vector instructions
// issued to a SIMD cluster, and synchronisation by idle instructions) follow
// the document; the encoding and the opcode list are this design's.
package risc_pkg;

  typedef enum logic [5:0] {
    OP_NOP   = 6'd0,
    OP_ADD   = 6'd1,   // rd = rs + rt
    OP_SUB   = 6'd2,   // rd = rs - rt
    OP_AND   = 6'd3,
    OP_OR    = 6'd4,
    OP_XOR   = 6'd5,
    OP_SHL   = 6'd6,   // rd = rs << imm[3:0]
    OP_SHR   = 6'd7,   // rd = rs >>> imm[3:0]
    OP_ADDI  = 6'd8,   // rd = rs + imm
    OP_LI    = 6'd9,   // rd = imm
    OP_MUL   = 6'd10,  // rd = low 16 bits of rs * rt
    OP_MAC   = 6'd11,  // acc += rs * rt (32-bit MAC unit)
    OP_MFA   = 6'd12,  // rd = acc >>> imm[3:0] (low 16 bits)
    OP_CLA   = 6'd13,  // acc = 0
    OP_BEQ   = 6'd14,  // if rd == rs: pc = imm
    OP_BNE   = 6'd15,  // if rd != rs: pc = imm
    OP_JMP   = 6'd16,  // pc = imm
    OP_LD    = 6'd17,  // rd = intmem[rs + imm]
    OP_ST    = 6'd18,  // intmem[rs + imm] = rd
    OP_CFG   = 6'd19,  // cfg register imm[7:0] = rs
    OP_VALU  = 6'd20,  // ALU cluster: op imm[2:0], length rs
    OP_VCMAC = 6'd21,  // CMAC cluster: op imm[2:0], length rs
    OP_IDLE  = 6'd22,  // wait until the clusters in imm[1:0] are idle
    OP_OUT   = 6'd23,  // output port = rs
    OP_LDS   = 6'd24,  // rd = re, r(imm[3:0]) = im of next word on the sample-memory port
    OP_STS   = 6'd25,  // next word on the sample-memory port = {re: rs, im: rd}
    OP_RDMAX = 6'd26,  // rd = index of the maximum found by the CMAC cluster
    OP_HALT  = 6'd27
  } opcode_e;

  typedef struct packed {
    opcode_e     op;
    logic [3:0]  rd;
    logic [3:0]  rs;
    logic [1:0]  unused;
    logic [15:0] imm;
  } instr_t;

endpackage
