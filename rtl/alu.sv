// alu: integer ALU of the back end (two instances, ALU and ALU2).
//
// The core's general ALUs are reused, not designed, by the butterfly extension; this one
// implements only what the back end needs around the butterflies: add (add, addi), sub
// and xor. It is combinational: a result is returned on the ALU's result bus in the
// cycle the instruction is issued. The operation set is this design's choice.
module alu
  import btf_pkg::*;
(
  input  logic               valid_i,
  input  op_t                op_i,
  input  logic [31:0]        op_a_i,
  input  logic [31:0]        op_b_i,
  input  logic [SB_ID_W-1:0] id_i,
  output wb_t                wb_o
);
  logic [31:0] res;
  always_comb begin
    unique case (op_i)
      OP_SUB:  res = op_a_i - op_b_i;
      OP_XOR:  res = op_a_i ^ op_b_i;
      default: res = op_a_i + op_b_i;
    endcase
    wb_o = '{valid: valid_i, id: id_i, data: res};
  end
endmodule
