// tb_montgomery_reduce: checks the combinational Montgomery reduction on edge cases and
// random products z*b with z in (-q, q) and b a 32-bit signed value: the result must be
// congruent to x * 2^-32 mod q and lie in (-q, q).
module tb_montgomery_reduce;
  import tb_util_pkg::*;
  logic signed [63:0] x;
  logic signed [31:0] r;
  int checks = 0, failures = 0;

  montgomery_reduce dut (.x_i(x), .r_o(r));

  task automatic check(longint v);
    x = v;
    #1;
    checks++;
    if (!mont_ok(r, v)) begin
      failures++;
      $display("FAIL x=%0d r=%0d", v, r);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(0); check(1); check(-1); check(Q); check(-Q);
    check(longint'(Q - 1) * 2147483647); check(-longint'(Q - 1) * 2147483647);
    check(longint'(Q - 1) * -64'sd2147483648);
    for (int i = 0; i < 3000; i++) begin
      automatic longint z = longint'($urandom_range(0, 32'(2 * (Q - 1)))) - (Q - 1);
      automatic longint b = longint'(int'($urandom));
      check(z * b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
