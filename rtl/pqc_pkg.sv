// pqc_pkg: types and constants shared by the lattice-crypto SIMD extension.
//
// The SIMD register of the extension is one row of the five 64-bit register
// files PR1..PR5. Inside the RTL a row is a vec320_t indexed by register file:
// index 0..3 are PR1..PR4 and index 4 is PR5. In 256-bit mode the eight 32-bit
// lanes are PR1..PR4, lane 2p in bits [31:0] and lane 2p+1 in bits [63:32] of
// PR(p+1). In 320-bit (Keccak) mode the five 64-bit Keccak lanes A[x,y] of one
// plane y sit in the order PR5, PR1, PR2, PR3, PR4 for x = 0..4, which is the
// layout of the state once it has been loaded and rotated with shufflev.
//
// The rotation table of the rxorv0..rxorv4 instructions, the instruction list
// and the field positions of xornavi (rs2 in instr[24:20], a 3-bit immediate in
// instr[27:25]) follow the published design. The opcode and funct values are
// this design's own choice: SIMD arithmetic in custom-0, Keccak in custom-1,
// SIMD loads in custom-2 and SIMD stores in custom-3.
package pqc_pkg;

  localparam int unsigned XLEN      = 32;
  localparam int unsigned LANES     = 8;    // 32-bit lanes in 256-bit mode
  localparam int unsigned KLANES    = 10;   // 32-bit lanes in 320-bit mode
  localparam int unsigned NPR       = 5;    // register files PR1..PR5
  localparam int unsigned PR_ROWS   = 16;   // rows per register file
  localparam int unsigned PR_W      = 64;   // bits per row
  localparam int unsigned NFIX      = 2;    // rows of the FIX register file
  localparam int unsigned MEM_W     = 128;  // load/store data path

  typedef logic [31:0]            word_t;
  typedef logic [NPR-1:0][63:0]   vec320_t;
  typedef logic [LANES-1:0][31:0] vec256_t;
  typedef logic [3:0]             row_t;

  // RISC-V major opcodes
  localparam logic [6:0] OPC_CUSTOM0 = 7'b0001011;  // SIMD arithmetic
  localparam logic [6:0] OPC_CUSTOM1 = 7'b0101011;  // SIMD Keccak
  localparam logic [6:0] OPC_CUSTOM2 = 7'b1011011;  // SIMD loads
  localparam logic [6:0] OPC_CUSTOM3 = 7'b1111011;  // SIMD stores
  localparam logic [6:0] OPC_LOAD    = 7'b0000011;
  localparam logic [6:0] OPC_STORE   = 7'b0100011;
  localparam logic [6:0] OPC_BRANCH  = 7'b1100011;
  localparam logic [6:0] OPC_JAL     = 7'b1101111;
  localparam logic [6:0] OPC_JALR    = 7'b1100111;
  localparam logic [6:0] OPC_LUI     = 7'b0110111;
  localparam logic [6:0] OPC_AUIPC   = 7'b0010111;

  // custom-0 funct7 values (funct3 = 0); bgeuv uses funct3 = 7 (B-type)
  localparam logic [2:0] F3_BGEUV = 3'd7;

  typedef enum logic [5:0] {
    OP_NONE    = 6'd0,
    OP_ADDV    = 6'd1,  OP_SUBV    = 6'd2,  OP_ANDV    = 6'd3,  OP_XORV   = 6'd4,
    OP_ADDVM   = 6'd5,  OP_SUBVM   = 6'd6,  OP_ADDVMT  = 6'd7,  OP_SUBVMT = 6'd8,
    OP_ADDVTI  = 6'd9,  OP_SUBVTI  = 6'd10, OP_MULV    = 6'd11, OP_MULVH  = 6'd12,
    OP_MULVM   = 6'd13, OP_MULVHF  = 6'd14, OP_CBD2    = 6'd15, OP_CBD3   = 6'd16,
    OP_SLLVI   = 6'd17, OP_SRAVI   = 6'd18, OP_BGEUV   = 6'd19,
    OP_XORV3   = 6'd20, OP_XORRV   = 6'd21, OP_RXORV   = 6'd22, OP_XORV2  = 6'd23,
    OP_XORV2RC = 6'd24, OP_XORNAVI = 6'd25, OP_SHUFFLEV = 6'd26,
    OP_LV      = 6'd27, OP_LW64    = 6'd28, OP_LWF     = 6'd29,
    OP_SV      = 6'd30, OP_SW64    = 6'd31
  } simd_op_e;

  // custom-0 funct7 encoding: funct7 = op - 1 for OP_ADDV..OP_SRAVI
  function automatic simd_op_e arith_op(input logic [6:0] funct7);
    if (funct7 <= 7'd17) return simd_op_e'(6'(funct7) + 6'd1);
    return OP_NONE;
  endfunction

  // custom-1 funct3 encoding
  localparam logic [2:0] F3_XORV3    = 3'd0;
  localparam logic [2:0] F3_XORRV    = 3'd1;
  localparam logic [2:0] F3_RXORV    = 3'd2;  // rotation set k in instr[27:25]
  localparam logic [2:0] F3_XORV2    = 3'd3;
  localparam logic [2:0] F3_XORV2RC  = 3'd4;
  localparam logic [2:0] F3_XORNAVI  = 3'd5;
  localparam logic [2:0] F3_SHUFFLEV = 3'd6;

  // Rows read by xornavi besides rs1 and rs2 (fixed addresses)
  localparam row_t XORNAVI_RS3 = 4'd11;
  localparam row_t XORNAVI_RS4 = 4'd12;
  localparam row_t XORNAVI_RS5 = 4'd13;

  // Instruction class as seen by the dual-issue logic
  typedef enum logic [1:0] {
    CLS_ALU = 2'd0,   // any non-load/store, non-control instruction
    CLS_LS  = 2'd1,   // scalar or SIMD load/store
    CLS_BR  = 2'd2    // branch or jump, scalar or bgeuv
  } iclass_e;

  // Operations of one 32-bit PALU core
  typedef enum logic [3:0] {
    L_ADD, L_SUB, L_AND, L_XOR, L_MADD, L_MSUB, L_MULL, L_MULH, L_SLL, L_SRA
  } lane_op_e;

  // Decoded instruction
  typedef struct packed {
    logic       simd;          // executed by the SIMD extension
    simd_op_e   op;
    iclass_e    cls;
    logic [4:0] rd, rs1, rs2;
    logic [2:0] imm3;          // instr[27:25]
    logic [4:0] shamt;         // instr[24:20]
    logic [11:0] imm12;        // load/store offset
    logic [12:0] bimm;         // branch offset of bgeuv
    logic [4:0] pr_rd_en;      // PR rows read as source a..e
    logic [4:0][3:0] pr_rd_row;
    logic       st_rd_en;      // PR row read as store data (port f)
    row_t       st_rd_row;
    logic       pr_wr_en;
    row_t       pr_wr_row;
    logic [NPR-1:0] pr_wr_mask;
    logic       fix_rd;
    logic       fix_wr;
    logic       gpr_rs1_en, gpr_rs2_en, gpr_wr_en;
  } dec_t;

  // Table 3: rotation amount of the 64-bit rotator in PALU j for rxorv k.
  // PALU j serves Keccak lane x = 4 - j (these are the rho offsets r[4-j, k]).
  localparam logic [5:0] ROT_TABLE [5][5] = '{
    '{6'd27, 6'd28, 6'd62, 6'd1,  6'd0 },
    '{6'd20, 6'd55, 6'd6,  6'd44, 6'd36},
    '{6'd39, 6'd25, 6'd43, 6'd10, 6'd3 },
    '{6'd8,  6'd21, 6'd15, 6'd45, 6'd41},
    '{6'd14, 6'd56, 6'd61, 6'd2,  6'd18}
  };

  // Register file (0..4 = PR1..PR5) that holds Keccak lane x of a plane
  function automatic int unsigned kslot(input int unsigned x);
    return (x == 0) ? 4 : x - 1;
  endfunction

  function automatic logic [63:0] rotl64(input logic [63:0] v, input logic [5:0] r);
    logic [127:0] d;
    d = {v, v} << r;
    return d[127:64];
  endfunction

endpackage
