// tb_scratchpad: random reads and writes on both ports against a shadow array, with the
// one-cycle read latency.
module tb_scratchpad;
  localparam int W = 2048;
  logic clk = 0;
  logic a_req, a_we, b_req, b_we;
  logic [31:0] a_addr, a_wdata, a_rdata, b_addr, b_wdata, b_rdata;
  logic [31:0] shadow [W];
  int checks = 0, failures = 0;

  scratchpad dut (.clk_i(clk), .a_req_i(a_req), .a_we_i(a_we), .a_addr_i(a_addr),
                  .a_wdata_i(a_wdata), .a_rdata_o(a_rdata), .b_req_i(b_req), .b_we_i(b_we),
                  .b_addr_i(b_addr), .b_wdata_i(b_wdata), .b_rdata_o(b_rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a_req = 0; b_req = 0; a_we = 0; b_we = 0; a_addr = 0; b_addr = 0; a_wdata = 0; b_wdata = 0;
    // fill through port B
    for (int i = 0; i < W; i++) begin
      @(negedge clk);
      b_req = 1; b_we = 1; b_addr = 4 * i; b_wdata = $urandom; shadow[i] = b_wdata;
    end
    @(negedge clk);
    b_req = 0;
    for (int n = 0; n < 4000; n++) begin
      bit ar, br;
      int ai, bi;
      @(negedge clk);
      ai = $urandom_range(0, W - 1);
      bi = $urandom_range(0, W - 1);
      if (bi == ai) bi = (bi + 1) % W;
      a_req = 1; a_we = 1'($urandom); a_addr = 4 * ai; a_wdata = $urandom;
      b_req = 1; b_we = 1'($urandom); b_addr = 4 * bi; b_wdata = $urandom;
      ar = !a_we; br = !b_we;
      @(posedge clk);
      #1;
      if (ar) begin
        checks++;
        if (a_rdata != shadow[ai]) failures++;
      end
      if (br) begin
        checks++;
        if (b_rdata != shadow[bi]) failures++;
      end
      if (a_we) shadow[ai] = a_wdata;
      if (b_we) shadow[bi] = b_wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
