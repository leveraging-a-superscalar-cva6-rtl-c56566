// tb_alu: random add, sub and xor operations against the SystemVerilog operators, plus
// the pass-through of valid and entry number.
module tb_alu;
  import btf_pkg::*;
  logic valid;
  op_t op;
  logic [31:0] x, y;
  logic [2:0] id;
  wb_t wb;
  int checks = 0, failures = 0;

  alu dut (.valid_i(valid), .op_i(op), .op_a_i(x), .op_b_i(y), .id_i(id), .wb_o(wb));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 1000; n++) begin
      logic [31:0] e;
      x = $urandom; y = $urandom; id = 3'($urandom); valid = 1'($urandom);
      case (n % 3)
        0: begin op = OP_ADD; e = x + y; end
        1: begin op = OP_SUB; e = x - y; end
        default: begin op = OP_XOR; e = x ^ y; end
      endcase
      #1;
      checks++;
      if (wb.data != e || wb.valid != valid || wb.id != id) begin
        failures++;
        $display("FAIL op=%0d %h %h -> %h", op, x, y, wb.data);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
