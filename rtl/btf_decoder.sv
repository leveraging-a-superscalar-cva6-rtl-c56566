// btf_decoder: decodes one 32-bit instruction into the fields the issue stage needs.
//
// Recognised: the three custom instructions of the extension on opcode 1110111 with
// funct7 = 0000000 -- btf.ct (funct3 100) and btf.gs (funct3 101) in the R^btf format,
// btf.mm (funct3 011) in the plain R format -- and the small RV32I subset this back end
// executes around them: lw, sw, addi, add, sub, xor. Anything else is flagged illegal.
// For the R^btf format, rd names operand a, which is read as well as written, and rs1
// names operand b, which is written as well as read (use_rd_src / wr_rs1); rs2 is zeta.
// btf.mm is decoded as a normal R-type instruction (rd = mont(rs1 * rs2)).
// Purely combinational. The base-instruction subset is this design's choice; the
// custom encodings follow the extension.
module btf_decoder
  import btf_pkg::*;
(
  input  logic [31:0] instr_i,
  output decoded_t    dec_o
);
  logic [6:0] opcode, funct7;
  logic [2:0] funct3;

  always_comb begin
    opcode = instr_i[6:0];
    funct3 = instr_i[14:12];
    funct7 = instr_i[31:25];

    dec_o            = '0;
    dec_o.fu         = FU_ALU;
    dec_o.op         = OP_ADD;
    dec_o.rs1        = instr_i[19:15];
    dec_o.rs2        = instr_i[24:20];
    dec_o.rd         = instr_i[11:7];
    dec_o.illegal    = 1'b1;

    unique case (opcode)
      OPC_BTF: begin
        if (funct7 == 7'b0000000) begin
          unique case (funct3)
            F3_BTF_CT, F3_BTF_GS: begin
              dec_o.illegal    = 1'b0;
              dec_o.fu         = FU_BTF;
              dec_o.op         = (funct3 == F3_BTF_CT) ? OP_BTF_CT : OP_BTF_GS;
              dec_o.use_rs1    = 1'b1;
              dec_o.use_rs2    = 1'b1;
              dec_o.use_rd_src = 1'b1;
              dec_o.wr_rd      = 1'b1;
              dec_o.wr_rs1     = 1'b1;
            end
            F3_BTF_MM: begin
              dec_o.illegal = 1'b0;
              dec_o.fu      = FU_BTF;
              dec_o.op      = OP_BTF_MM;
              dec_o.use_rs1 = 1'b1;
              dec_o.use_rs2 = 1'b1;
              dec_o.wr_rd   = 1'b1;
            end
            default: ;
          endcase
        end
      end
      OPC_LOAD: begin
        if (funct3 == 3'b010) begin
          dec_o.illegal = 1'b0;
          dec_o.fu      = FU_LSU;
          dec_o.op      = OP_LW;
          dec_o.use_rs1 = 1'b1;
          dec_o.use_imm = 1'b1;
          dec_o.wr_rd   = 1'b1;
          dec_o.imm     = {{20{instr_i[31]}}, instr_i[31:20]};
        end
      end
      OPC_STORE: begin
        if (funct3 == 3'b010) begin
          dec_o.illegal = 1'b0;
          dec_o.fu      = FU_LSU;
          dec_o.op      = OP_SW;
          dec_o.use_rs1 = 1'b1;
          dec_o.use_rs2 = 1'b1;
          dec_o.use_imm = 1'b1;
          dec_o.imm     = {{20{instr_i[31]}}, instr_i[31:25], instr_i[11:7]};
        end
      end
      OPC_OPIMM: begin
        if (funct3 == 3'b000) begin
          dec_o.illegal = 1'b0;
          dec_o.op      = OP_ADD;
          dec_o.use_rs1 = 1'b1;
          dec_o.use_imm = 1'b1;
          dec_o.wr_rd   = 1'b1;
          dec_o.imm     = {{20{instr_i[31]}}, instr_i[31:20]};
        end
      end
      OPC_OP: begin
        if (funct3 == 3'b000 && funct7 == 7'b0000000) begin
          dec_o.illegal = 1'b0;
          dec_o.op      = OP_ADD;
        end else if (funct3 == 3'b000 && funct7 == 7'b0100000) begin
          dec_o.illegal = 1'b0;
          dec_o.op      = OP_SUB;
        end else if (funct3 == 3'b100 && funct7 == 7'b0000000) begin
          dec_o.illegal = 1'b0;
          dec_o.op      = OP_XOR;
        end
        if (!dec_o.illegal) begin
          dec_o.use_rs1 = 1'b1;
          dec_o.use_rs2 = 1'b1;
          dec_o.wr_rd   = 1'b1;
        end
      end
      default: ;
    endcase

    // x0 is never written
    if (dec_o.rd == 5'd0)  dec_o.wr_rd  = 1'b0;
    if (dec_o.rs1 == 5'd0) dec_o.wr_rs1 = 1'b0;
  end
endmodule
