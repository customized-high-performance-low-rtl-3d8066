// tta_pkg: types, sizes and instruction encoding shared by the transport-triggered
// (TTA) speaker-localization processor.
//
// The processor is programmed by moves: every instruction names, per transport bus,
// one source (a function-unit result register, a register-file entry or the immediate
// unit) and one destination (an operand port, a trigger port or a register-file entry).
// A move into a trigger port starts the operation whose opcode is part of the
// destination code. The datapath width follows the document: 32 lanes of 32-bit
// integers (1024-bit vectors), two 16-entry vector register files and a 64-bit
// instruction word fetched from a 2048-word instruction memory.
//
// The bit-level encoding below is this design's own; the document gives only the
// instruction width (64 bits), the number of general transport buses (four) and the
// direct SIMD-ALU result-to-input connection, which is encoded here as its own
// two-bit field.
//
// 64-bit instruction word:
//   [63]     template: 0 = four move slots, 1 = long immediate (slots 0 and 1 only,
//            imm = sign-extended {[60], [59:30]} written into the immediate unit)
//   [62:61]  SIMD bypass: 0 none, 1 ALU_SIMD result -> ALU_SIMD operand A,
//            2 ALU_SIMD result -> ALU_SIMD operand C, 3 reserved (no move)
//   [60]     spare in template 0, immediate bit 30 in template 1
//   [15k+14 : 15k]  move slot k (k = 0..3): guard[14:13], src[12:7], dst[6:0]
package tta_pkg;

  localparam int unsigned LANES   = 32;             // SIMD lanes (gammatone channels)
  localparam int unsigned EW      = 32;             // element / scalar width
  localparam int unsigned VW      = LANES * EW;     // 1024-bit vector
  localparam int unsigned NBUS    = 4;              // general transport buses
  localparam int unsigned IW      = 64;             // instruction width
  localparam int unsigned IMEM_AW = 11;             // 2048 instruction words
  localparam int unsigned SLOT_W  = 15;
  localparam int unsigned NVREG   = 16;             // entries of RF_SIMDA / RF_SIMDB
  localparam int unsigned NSREG   = 16;             // entries of the scalar RF
  localparam int unsigned DMEM_AW = 17;             // 32-bit words: 400 kB = 102400 words

  typedef logic [EW-1:0]         word_t;
  typedef logic [VW-1:0]         vec_t;
  typedef logic [IW-1:0]         instr_t;
  typedef logic [IMEM_AW-1:0]    pc_t;

  // guard field
  typedef enum logic [1:0] {
    G_ALWAYS = 2'd0,  // unconditional move
    G_TRUE   = 2'd1,  // move if boolean register is 1
    G_FALSE  = 2'd2,  // move if boolean register is 0
    G_NOP    = 2'd3   // empty slot
  } guard_e;

  typedef struct packed {
    guard_e     guard;
    logic [5:0] src;
    logic [6:0] dst;
  } move_t;

  // ---------------- source codes (6 bits) ----------------
  localparam logic [5:0] S_RFA  = 6'd0;   // 0..15  RF_SIMDA[i]
  localparam logic [5:0] S_RFB  = 6'd16;  // 16..31 RF_SIMDB[i]
  localparam logic [5:0] S_RF   = 6'd32;  // 32..47 RF[i]
  localparam logic [5:0] S_LSU  = 6'd48;  // LSU result
  localparam logic [5:0] S_ALU  = 6'd49;  // scalar ALU result
  localparam logic [5:0] S_SIMD = 6'd50;  // ALU_SIMD result
  localparam logic [5:0] S_AUX  = 6'd51;  // AUX result
  localparam logic [5:0] S_IU   = 6'd52;  // immediate unit
  localparam logic [5:0] S_RA   = 6'd53;  // GCU return address
  localparam logic [5:0] S_BOOL = 6'd54;  // boolean register (0/1)

  // ---------------- destination codes (7 bits) ----------------
  // Each trigger range starts at a multiple of its size, so the low bits of the code
  // are the opcode.
  localparam logic [6:0] D_RFA    = 7'd0;   // 0..15  RF_SIMDA[i]
  localparam logic [6:0] D_RFB    = 7'd16;  // 16..31 RF_SIMDB[i]
  localparam logic [6:0] D_RF     = 7'd32;  // 32..47 RF[i]
  localparam logic [6:0] D_BOOL   = 7'd48;  // boolean (guard) register, bit 0
  localparam logic [6:0] D_LSU_O  = 7'd49;  // LSU data / gather offset vector
  localparam logic [6:0] D_ALU_O  = 7'd50;  // scalar ALU operand A
  localparam logic [6:0] D_SIMD_A = 7'd51;  // ALU_SIMD operand A
  localparam logic [6:0] D_SIMD_C = 7'd52;  // ALU_SIMD operand C (third operand)
  localparam logic [6:0] D_AUX_V  = 7'd53;  // AUX vector operand
  localparam logic [6:0] D_AUX_S  = 7'd54;  // AUX scalar operand
  localparam logic [6:0] D_LSU_T  = 7'd64;  // 64..67  LSU trigger (address) + op
  localparam logic [6:0] D_AUX_T  = 7'd68;  // 68..71  AUX trigger + op
  localparam logic [6:0] D_GCU_T  = 7'd72;  // 72..73  GCU trigger (target) + op
  localparam logic [6:0] D_ALU_T  = 7'd80;  // 80..95  ALU trigger (operand B) + op
  localparam logic [6:0] D_SIMD_T = 7'd96;  // 96..127 ALU_SIMD trigger (operand B) + op

  // ---------------- opcodes ----------------
  typedef enum logic [1:0] {
    LSU_LD     = 2'd0,  // result lane 0 = mem[addr]
    LSU_ST     = 2'd1,  // mem[addr] = data lane 0
    LSU_GATHER = 2'd2   // result lane i = mem[addr + offset lane i], one word per access
  } lsu_op_e;

  typedef enum logic [3:0] {
    ALU_ADD = 4'd0, ALU_SUB = 4'd1, ALU_AND = 4'd2, ALU_OR  = 4'd3,
    ALU_XOR = 4'd4, ALU_SHL = 4'd5, ALU_SHR = 4'd6, ALU_SHRU = 4'd7,
    ALU_EQ  = 4'd8, ALU_GT  = 4'd9, ALU_GTU = 4'd10, ALU_MUL = 4'd11
  } alu_op_e;

  typedef enum logic [4:0] {
    V_ADD = 5'd0,  V_SUB = 5'd1,  V_AND = 5'd2,  V_OR  = 5'd3,
    V_XOR = 5'd4,  V_SHL = 5'd5,  V_SHR = 5'd6,  V_ABS = 5'd7,
    V_EQ  = 5'd8,  V_GT  = 5'd9,  V_LT  = 5'd10, V_MAX = 5'd11,
    V_MIN = 5'd12, V_CAS = 5'd13, V_MULSH = 5'd14, V_CLZ = 5'd15,
    V_SEL = 5'd16
  } simd_op_e;

  typedef enum logic [1:0] {
    AUX_EXTRACT   = 2'd0,  // scalar = vec[idx]
    AUX_INSERT    = 2'd1,  // vec with vec[idx] = scalar
    AUX_BROADCAST = 2'd2   // every lane = scalar
  } aux_op_e;

  typedef enum logic [1:0] {
    GCU_JUMP = 2'd0,
    GCU_CALL = 2'd1
  } gcu_op_e;

  // destination ports of the interconnect (one write per port per cycle)
  typedef enum logic [3:0] {
    P_RFA, P_RFB, P_RF, P_BOOL, P_LSU_O, P_ALU_O, P_SIMD_A, P_SIMD_C, P_AUX_V, P_AUX_S,
    P_LSU_T, P_ALU_T, P_AUX_T, P_GCU_T, P_SIMD_T, P_NONE
  } port_e;
  localparam int unsigned NPORT = 15;

  // one write into a unit port, produced by the interconnect
  typedef struct packed {
    logic       v;     // write this cycle
    logic [4:0] sub;   // register index or opcode
    vec_t       data;  // bus value
  } port_wr_t;

  function automatic move_t slot_of(instr_t ins, int unsigned k);
    return move_t'(ins[SLOT_W*k +: SLOT_W]);
  endfunction

endpackage
