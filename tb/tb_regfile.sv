// tb_regfile: random writes on the three write ports and reads on the four read ports,
// compared with a shadow array; checks x0 and the rule that the highest-numbered port
// wins when several write the same register.
module tb_regfile;
  logic clk = 0, rst_n = 0;
  logic [3:0][4:0] ra;
  logic [3:0][31:0] rd;
  logic [2:0] we;
  logic [2:0][4:0] wa;
  logic [2:0][31:0] wd;
  logic [31:0] shadow [32];
  int checks = 0, failures = 0;

  regfile dut (.clk_i(clk), .rst_ni(rst_n), .raddr_i(ra), .rdata_o(rd), .we_i(we),
               .waddr_i(wa), .wdata_i(wd));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = '0; wa = '0; wd = '0; ra = '0;
    foreach (shadow[i]) shadow[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      for (int p = 0; p < 4; p++) begin
        ra[p] = 5'($urandom);
        #0;
      end
      #1;
      for (int p = 0; p < 4; p++) begin
        checks++;
        if (rd[p] != shadow[ra[p]]) begin
          failures++;
          if (failures < 10) $display("FAIL x%0d = %h, expected %h", ra[p], rd[p], shadow[ra[p]]);
        end
      end
      for (int p = 0; p < 3; p++) begin
        we[p] = 1'($urandom);
        wa[p] = (n % 4 == 0) ? 5'd7 : 5'($urandom);   // frequent same-register writes
        wd[p] = $urandom;
      end
      for (int p = 0; p < 3; p++) if (we[p] && wa[p] != 0) shadow[wa[p]] = wd[p];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
