// tb_lsu: random loads and stores, one per cycle or with gaps, against a memory model in
// this testbench that answers reads one cycle after the request. Checks the read request
// in the issue cycle and, one cycle later, the result bus: loaded data or store data and
// address, entry number and store flag.
module tb_lsu;
  import btf_pkg::*;
  logic clk = 0, rst_n = 0;
  logic valid;
  op_t op;
  logic [31:0] base, offset, sdata;
  logic [2:0] id;
  logic mem_req;
  logic [31:0] mem_addr, mem_rdata;
  wb_t wb;
  logic wb_store;
  logic [31:0] wb_addr;
  logic [31:0] mem [256];
  int checks = 0, failures = 0;

  lsu dut (.clk_i(clk), .rst_ni(rst_n), .valid_i(valid), .op_i(op), .base_i(base),
           .offset_i(offset), .sdata_i(sdata), .id_i(id), .mem_req_o(mem_req),
           .mem_addr_o(mem_addr), .mem_rdata_i(mem_rdata), .wb_o(wb), .wb_store_o(wb_store),
           .wb_addr_o(wb_addr));

  always #5 clk = ~clk;
  always @(posedge clk) if (mem_req) mem_rdata <= mem[mem_addr[9:2]];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  initial begin
    logic pv, pst; logic [31:0] paddr, pdata; logic [2:0] pid;
    foreach (mem[i]) mem[i] = $urandom;
    valid = 0; op = OP_LW; base = 0; offset = 0; sdata = 0; id = 0; mem_rdata = 0;
    pv = 0; pst = 0; paddr = 0; pdata = 0; pid = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      int word;
      @(negedge clk);
      valid  = ($urandom_range(0, 3) != 0);
      op     = ($urandom_range(0, 1) != 0) ? OP_LW : OP_SW;
      word   = $urandom_range(0, 255);
      offset = 32'(int'($urandom_range(0, 255)) * 4 - 512);
      base   = 32'(word * 4) - offset;
      sdata  = $urandom;
      id     = 3'($urandom);
      #1;
      chk(mem_req == (valid && op == OP_LW), "request");
      if (valid && op == OP_LW) chk(mem_addr == 32'(word * 4), "address");
      chk(wb.valid == pv, "wb valid");
      if (pv) begin
        chk(wb.id == pid && wb_store == pst, "wb id/kind");
        if (pst) chk(wb.data == pdata && wb_addr == paddr, "store data/address");
        else     chk(wb.data == mem[paddr[9:2]], "load data");
      end
      @(posedge clk);
      pv = valid; pst = (op == OP_SW); paddr = 32'(word * 4); pdata = sdata; pid = id;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
