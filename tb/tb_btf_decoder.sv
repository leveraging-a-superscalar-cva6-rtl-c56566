// tb_btf_decoder: decodes the three butterfly instructions and the base subset, built
// with the encoders of tb_util_pkg from random register numbers and immediates, and
// checks unit, operation, register fields, source/destination flags and immediates;
// also checks that other opcodes and funct fields are flagged illegal.
module tb_btf_decoder;
  import btf_pkg::*;
  import tb_util_pkg::*;
  logic [31:0] instr;
  decoded_t d;
  int checks = 0, failures = 0;

  btf_decoder dut (.instr_i(instr), .dec_o(d));

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s %h", msg, instr); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      automatic int ra = $urandom_range(1, 31), rb = $urandom_range(1, 31), rz = $urandom_range(0, 31);
      automatic int im = int'($urandom_range(0, 4095)) - 2048;
      instr = btf_ct(ra, rb, rz); #1;
      chk(!d.illegal && d.fu == FU_BTF && d.op == OP_BTF_CT && d.rd == 5'(ra) && d.rs1 == 5'(rb)
          && d.rs2 == 5'(rz) && d.use_rs1 && d.use_rs2 && d.use_rd_src && d.wr_rd && d.wr_rs1, "ct");
      instr = btf_gs(ra, rb, rz); #1;
      chk(!d.illegal && d.fu == FU_BTF && d.op == OP_BTF_GS && d.use_rd_src && d.wr_rs1, "gs");
      instr = btf_mm(ra, rb, rz); #1;
      chk(!d.illegal && d.fu == FU_BTF && d.op == OP_BTF_MM && d.wr_rd && !d.wr_rs1 &&
          !d.use_rd_src && d.rs1 == 5'(rb) && d.rs2 == 5'(rz), "mm");
      instr = lw(ra, im, rb); #1;
      chk(!d.illegal && d.fu == FU_LSU && d.op == OP_LW && d.use_rs1 && !d.use_rs2 && d.wr_rd &&
          int'(d.imm) == im, "lw");
      instr = sw(ra, im, rb); #1;
      chk(!d.illegal && d.fu == FU_LSU && d.op == OP_SW && d.use_rs2 && !d.wr_rd &&
          d.rs2 == 5'(ra) && d.rs1 == 5'(rb) && int'(d.imm) == im, "sw");
      instr = addi(ra, rb, im); #1;
      chk(!d.illegal && d.fu == FU_ALU && d.op == OP_ADD && d.use_imm && int'(d.imm) == im, "addi");
      instr = add(ra, rb, rz); #1;
      chk(!d.illegal && d.op == OP_ADD && !d.use_imm && d.use_rs2, "add");
      instr = sub(ra, rb, rz); #1;
      chk(!d.illegal && d.op == OP_SUB, "sub");
      instr = xor_(ra, rb, rz); #1;
      chk(!d.illegal && d.op == OP_XOR, "xor");
      // illegal: unknown funct3 on the custom opcode, nonzero funct7, other opcodes
      instr = btf_ct(ra, rb, rz) ^ 32'h0000_6000; #1;   // funct3 010
      chk(d.illegal, "custom funct3 010");
      instr = btf_gs(ra, rb, rz) | 32'h0200_0000; #1;
      chk(d.illegal, "custom funct7");
      instr = 32'h0000_006f; #1;                        // jal
      chk(d.illegal, "jal");
    end
    instr = btf_ct(0, 0, 3); #1;
    chk(!d.wr_rd && !d.wr_rs1, "x0 not written");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
