// regfile: 32 x 32-bit register bank with four read ports and three write ports.
//
// Four asynchronous read ports are what a dual-issue core already has (two sources for
// each of two instructions); the butterfly extension adds no read port. Three write ports
// serve the triple commit. Register x0 reads as zero and ignores writes. When several
// ports write the same register in one cycle, the highest-numbered port (the youngest
// committed instruction) wins. Writes take effect at the rising clock edge; all registers
// reset to zero. The reset value and the write priority are this design's choices.
module regfile #(
  parameter int unsigned NR_READ  = 4,
  parameter int unsigned NR_WRITE = 3
) (
  input  logic                      clk_i,
  input  logic                      rst_ni,
  input  logic [NR_READ-1:0][4:0]   raddr_i,
  output logic [NR_READ-1:0][31:0]  rdata_o,
  input  logic [NR_WRITE-1:0]       we_i,
  input  logic [NR_WRITE-1:0][4:0]  waddr_i,
  input  logic [NR_WRITE-1:0][31:0] wdata_i
);
  logic [31:0][31:0] regs_q;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      regs_q <= '0;
    end else begin
      for (int p = 0; p < int'(NR_WRITE); p++) begin
        if (we_i[p] && waddr_i[p] != 5'd0) regs_q[waddr_i[p]] <= wdata_i[p];
      end
    end
  end

  always_comb begin
    for (int p = 0; p < int'(NR_READ); p++) begin
      rdata_o[p] = (raddr_i[p] == 5'd0) ? 32'd0 : regs_q[raddr_i[p]];
    end
  end
endmodule
