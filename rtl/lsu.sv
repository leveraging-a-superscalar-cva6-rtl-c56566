// lsu: load/store unit of the back end.
//
// lw and sw take a base register and a 12-bit immediate offset; the address is
// base + offset and must be word aligned (byte address, 32-bit words). A load sends a
// read request to the data memory in its issue cycle; the memory answers one cycle later
// and the load result goes to the scoreboard in that cycle on the LSU result bus. A
// store does not touch memory here: its address and data are returned to the scoreboard
// one cycle after issue, and the commit stage performs the write when the store retires.
// The unit is pipelined and accepts one memory instruction per cycle. Loads run in
// parallel with the butterfly unit. The one-cycle latency and the store-at-commit
// timing are this design's choices.
module lsu
  import btf_pkg::*;
(
  input  logic               clk_i,
  input  logic               rst_ni,
  input  logic               valid_i,
  input  op_t                op_i,       // OP_LW or OP_SW
  input  logic [31:0]        base_i,
  input  logic [31:0]        offset_i,
  input  logic [31:0]        sdata_i,
  input  logic [SB_ID_W-1:0] id_i,
  // data memory read request (load), response one cycle later
  output logic               mem_req_o,
  output logic [31:0]        mem_addr_o,
  input  logic [31:0]        mem_rdata_i,
  // result bus
  output wb_t                wb_o,
  output logic               wb_store_o,
  output logic [31:0]        wb_addr_o
);
  logic               q_valid, q_store;
  logic [SB_ID_W-1:0] q_id;
  logic [31:0]        q_addr, q_sdata;
  logic [31:0]        addr;

  assign addr       = base_i + offset_i;
  assign mem_req_o  = valid_i && (op_i == OP_LW);
  assign mem_addr_o = addr;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      q_valid <= 1'b0;
      q_store <= 1'b0;
      q_id    <= '0;
      q_addr  <= '0;
      q_sdata <= '0;
    end else begin
      q_valid <= valid_i;
      if (valid_i) begin
        q_store <= (op_i == OP_SW);
        q_id    <= id_i;
        q_addr  <= addr;
        q_sdata <= sdata_i;
      end
    end
  end

  always_comb begin
    wb_o       = '{valid: q_valid, id: q_id, data: q_store ? q_sdata : mem_rdata_i};
    wb_store_o = q_valid && q_store;
    wb_addr_o  = q_addr;
  end

  assert property (@(posedge clk_i) disable iff (!rst_ni) valid_i |-> addr[1:0] == 2'b00)
    else $error("lsu: misaligned word access");
  assert property (@(posedge clk_i) disable iff (!rst_ni) valid_i |-> op_i inside {OP_LW, OP_SW});
endmodule
