// btf_pkg: types and constants shared by the butterfly-extended dual-issue back end.
//
// The modulus q = 8380417 and 32-bit values follow the ML-DSA butterfly instructions
// this design implements (btf.ct, btf.gs, btf.mm). QINV = q^-1 mod 2^32 is the constant of
// the standard ML-DSA signed Montgomery reduction. The opcode and funct3 values are those
// of the instruction encoding table of the extension. The decoded-instruction struct, the
// functional-unit enum and the scoreboard record are this design's own choices.
package btf_pkg;


  // Scoreboard entry index width; scoreboards of up to 2**SB_ID_W entries are supported
  localparam int unsigned SB_ID_W = 3;

  // ML-DSA modulus and its inverse modulo 2^32
  localparam logic [31:0] Q    = 32'd8380417;
  localparam logic [31:0] QINV = 32'd58728449;

  // Opcodes (RISC-V base plus the custom butterfly opcode)
  localparam logic [6:0] OPC_BTF    = 7'b1110111;
  localparam logic [6:0] OPC_LOAD   = 7'b0000011;
  localparam logic [6:0] OPC_STORE  = 7'b0100011;
  localparam logic [6:0] OPC_OPIMM  = 7'b0010011;
  localparam logic [6:0] OPC_OP     = 7'b0110011;

  localparam logic [2:0] F3_BTF_CT = 3'b100;
  localparam logic [2:0] F3_BTF_GS = 3'b101;
  localparam logic [2:0] F3_BTF_MM = 3'b011;

  typedef enum logic [1:0] {
    FU_ALU = 2'd0,
    FU_LSU = 2'd1,
    FU_BTF = 2'd2
  } fu_t;

  typedef enum logic [2:0] {
    OP_ADD    = 3'd0,
    OP_SUB    = 3'd1,
    OP_XOR    = 3'd2,
    OP_LW     = 3'd3,
    OP_SW     = 3'd4,
    OP_BTF_CT = 3'd5,
    OP_BTF_GS = 3'd6,
    OP_BTF_MM = 3'd7
  } op_t;

  // Decoded instruction. For btf.ct/gs: rd = a (also read), rs1 = b (also written), rs2 = z.
  typedef struct packed {
    logic        illegal;  // not an instruction of the supported subset
    fu_t         fu;
    op_t         op;
    logic [4:0]  rs1;
    logic [4:0]  rs2;
    logic [4:0]  rd;
    logic        use_rs1;
    logic        use_rs2;
    logic        use_rd_src; // reads rd as a third source (R^btf-type)
    logic        use_imm;
    logic        wr_rd;      // writes rd
    logic        wr_rs1;     // writes rs1 (second result of R^btf-type)
    logic [31:0] imm;
  } decoded_t;

  // A functional-unit result returned to the scoreboard
  typedef struct packed {
    logic        valid;
    logic [SB_ID_W-1:0] id; // scoreboard entry
    logic [31:0] data;
  } wb_t;

  // One scoreboard (reorder buffer) entry
  typedef struct packed {
    logic        valid;    // allocated
    logic        done;     // result present
    logic        wr;       // writes register rd at commit
    logic [4:0]  rd;
    logic        is_store; // performs a memory write at commit
    logic [31:0] data;     // result, or store data
    logic [31:0] addr;     // store address
  } sb_entry_t;

  // What the issue stage records when it allocates an entry
  typedef struct packed {
    logic       wr;
    logic [4:0] rd;
    logic       is_store;
  } sb_alloc_t;

  function automatic logic is_btf_pair(op_t op);
    return (op == OP_BTF_CT) || (op == OP_BTF_GS);
  endfunction

endpackage
