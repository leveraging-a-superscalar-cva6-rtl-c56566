// tb_btf_unit: checks the butterfly unit's results and timing.
//
// Random btf.ct, btf.gs and btf.mm operations are issued back to back (a gs right after a
// ct is held one cycle, as the issue stage would). Expected results come from 64-bit
// integer arithmetic: for ct, a' - a and a - b' must both be congruent to z*b*2^-32 mod q
// and lie in (-q, q); for gs, a' = a + b exactly and b' congruent to (a-b)*z*2^-32;
// for mm, r congruent to b*z*2^-32. Timing: ct and mm results appear exactly one cycle
// after issue, the gs sum in the issue cycle and its product one cycle later.
module tb_btf_unit;
  import btf_pkg::*;
  import tb_util_pkg::*;

  logic clk = 0, rst_n = 0;
  logic valid;
  op_t  op;
  logic [31:0] a, b, z;
  logic [2:0] id_a, id_b;
  logic gs_block, busy;
  wb_t wb_a, wb_b;
  int checks = 0, failures = 0;

  btf_unit dut (.clk_i(clk), .rst_ni(rst_n), .valid_i(valid), .op_i(op), .a_i(a), .b_i(b),
                .z_i(z), .id_a_i(id_a), .id_b_i(id_b), .gs_block_o(gs_block),
                .stage2_busy_o(busy), .wb_a_o(wb_a), .wb_b_o(wb_b));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", msg);
    end
  endtask

  // what was issued in the previous cycle
  op_t pop; logic pvalid; int pa, pb, pz; logic [2:0] pida, pidb;

  initial begin
    valid = 0; op = OP_BTF_CT; a = 0; b = 0; z = 0; id_a = 0; id_b = 0; pvalid = 0;
    pop = OP_BTF_CT; pa = 0; pb = 0; pz = 0; pida = 0; pidb = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      valid = ($urandom_range(0, 4) != 0);
      case ($urandom_range(0, 2))
        0: op = OP_BTF_CT;
        1: op = OP_BTF_GS;
        default: op = OP_BTF_MM;
      endcase
      if (op == OP_BTF_GS && pvalid && pop == OP_BTF_CT) valid = 0;
      a = 32'(int'($urandom_range(0, 2 * (Q - 1))) - int'(Q - 1));
      b = 32'(int'($urandom_range(0, 2 * (Q - 1))) - int'(Q - 1));
      z = 32'(int'($urandom_range(0, 2 * (Q - 1))) - int'(Q - 1));
      id_a = 3'($urandom); id_b = id_a + 3'd1;
      #1;
      // ---- outputs of the current cycle ----
      chk(busy == pvalid, "stage2_busy");
      chk(gs_block == (pvalid && pop == OP_BTF_CT), "gs_block");
      // bus A
      if (pvalid && pop == OP_BTF_CT) begin
        chk(wb_a.valid && wb_a.id == pida && mont_ok(int'(wb_a.data) - pa, longint'(pb) * pz),
            $sformatf("ct a' a=%0d b=%0d z=%0d got %0d", pa, pb, pz, int'(wb_a.data)));
      end else if (valid && op == OP_BTF_GS) begin
        chk(wb_a.valid && wb_a.id == id_a && int'(wb_a.data) == int'(a) + int'(b), "gs a'");
      end else begin
        chk(!wb_a.valid, "bus A idle");
      end
      // bus B
      if (pvalid) begin
        case (pop)
          OP_BTF_CT: chk(wb_b.valid && wb_b.id == pidb &&
                         mont_ok(pa - int'(wb_b.data), longint'(pb) * pz), "ct b'");
          OP_BTF_GS: chk(wb_b.valid && wb_b.id == pidb &&
                         mont_ok(int'(wb_b.data), longint'(int'(pa - pb)) * pz), "gs b'");
          default:   chk(wb_b.valid && wb_b.id == pida &&
                         mont_ok(int'(wb_b.data), longint'(pb) * pz), "mm");
        endcase
        if (pop == OP_BTF_CT)
          chk(int'(wb_a.data) + int'(wb_b.data) == 2 * pa, "ct a'+b' = 2a");
      end else begin
        chk(!wb_b.valid, "bus B idle");
      end
      @(posedge clk);
      pvalid = valid; pop = op; pa = int'(a); pb = int'(b); pz = int'(z);
      pida = id_a; pidb = id_b;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
