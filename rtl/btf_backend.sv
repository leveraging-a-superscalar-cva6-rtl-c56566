// btf_backend: issue, execute and commit stages of a dual-issue in-order RISC-V core
// extended with ML-DSA butterfly instructions (btf.ct, btf.gs, btf.mm).
//
// Instructions arrive two at a time from the instruction source (instr_i, instr_valid_i;
// entry 0 is the older) and are decoded, then issued in order by issue_stage, which reads
// up to four operands from the register bank or the scoreboard. Execution units:
//   ALU  (slot 0 ALU instructions) and ALU2 (slot 1), combinational;
//   btf_unit, the butterfly unit, two stages, whose results share the ALU result buses:
//     bus B = mux 3 (ALU or butterfly b' / btf.mm result),
//     bus A = mux 4 (ALU2 or butterfly a');
//   lsu, whose loads read the data scratchpad and run beside a butterfly.
// The scoreboard takes up to three new entries and three results per cycle, and
// commit_stage retires up to three entries per cycle into the register bank and
// performs stores on the scratchpad. Nothing is speculative: there are no branches,
// jumps or exceptions in this back end, and the fetch, branch-prediction and CSR parts of
// the full core are outside it.
// Interface: issue_cnt_o says how many of the two offered instructions were taken this
// cycle (0, 1 or 2); the source then shifts its stream by that amount. The host port
// (host_*) reads and writes the scratchpad (read data one cycle after the request);
// idle_o is high when no instruction is in flight. Register x0..x31 reset to zero.
module btf_backend
  import btf_pkg::*;
#(
  parameter int unsigned NR_SB_ENTRIES = 8,
  parameter int unsigned DMEM_WORDS    = 2048
) (
  input  logic             clk_i,
  input  logic             rst_ni,
  input  logic [1:0][31:0] instr_i,
  input  logic [1:0]       instr_valid_i,
  output logic [1:0]       issue_cnt_o,
  input  logic             host_req_i,
  input  logic             host_we_i,
  input  logic [31:0]      host_addr_i,
  input  logic [31:0]      host_wdata_i,
  output logic [31:0]      host_rdata_o,
  output logic             idle_o
);
  // decode
  decoded_t [1:0] dec;
  for (genvar i = 0; i < 2; i++) begin : g_dec
    btf_decoder u_dec (.instr_i(instr_i[i]), .dec_o(dec[i]));
  end

  // register bank
  logic [3:0][4:0]  rd_reg;
  logic [3:0][31:0] rf_rdata;
  logic [2:0]       rf_we;
  logic [2:0][4:0]  rf_waddr;
  logic [2:0][31:0] rf_wdata;

  regfile #(.NR_READ(4), .NR_WRITE(3)) u_regfile (
    .clk_i, .rst_ni,
    .raddr_i(rd_reg), .rdata_o(rf_rdata),
    .we_i(rf_we), .waddr_i(rf_waddr), .wdata_i(rf_wdata)
  );

  // scoreboard
  logic [1:0]              alloc_cnt, commit_cnt;
  sb_alloc_t [2:0]         alloc;
  logic [2:0][SB_ID_W-1:0] alloc_id;
  logic [3:0]              sb_free;
  wb_t [2:0]               wb;
  logic [3:0]              sb_hit, sb_ready;
  logic [3:0][31:0]        sb_data;
  sb_entry_t [2:0]         head;
  logic                    ld_conflict;
  logic [31:0]             ld_addr;
  logic                    st_req;
  logic                    lsu_wb_store;
  logic [31:0]             lsu_wb_addr;

  scoreboard #(.NR_ENTRIES(NR_SB_ENTRIES)) u_scoreboard (
    .clk_i, .rst_ni,
    .alloc_cnt_i(alloc_cnt), .alloc_i(alloc), .alloc_id_o(alloc_id), .free_o(sb_free),
    .wb_i(wb), .wb_addr_i(lsu_wb_addr), .wb_store_i(lsu_wb_store),
    .lookup_reg_i(rd_reg), .lookup_hit_o(sb_hit), .lookup_ready_o(sb_ready),
    .lookup_data_o(sb_data),
    .head_o(head), .commit_cnt_i(commit_cnt),
    .ld_addr_i(ld_addr), .ld_conflict_o(ld_conflict),
    .empty_o(idle_o)
  );

  // issue
  logic [1:0]              alu_valid;
  op_t [1:0]               alu_op;
  logic [1:0][31:0]        alu_a, alu_b;
  logic [1:0][SB_ID_W-1:0] alu_id;
  logic                    btf_valid, btf_gs_block, btf_busy;
  op_t                     btf_op;
  logic [31:0]             btf_a, btf_b, btf_z;
  logic [SB_ID_W-1:0]      btf_id_a, btf_id_b;
  logic                    lsu_valid;
  op_t                     lsu_op;
  logic [31:0]             lsu_base, lsu_offset, lsu_sdata;
  logic [SB_ID_W-1:0]      lsu_id;

  issue_stage u_issue (
    .dec_i(dec), .valid_i({instr_valid_i[1] && instr_valid_i[0], instr_valid_i[0]}),
    .issue_cnt_o,
    .rd_reg_o(rd_reg), .rf_data_i(rf_rdata),
    .sb_hit_i(sb_hit), .sb_ready_i(sb_ready), .sb_data_i(sb_data),
    .sb_free_i(sb_free), .sb_id_i(alloc_id), .alloc_cnt_o(alloc_cnt), .alloc_o(alloc),
    .ld_addr_o(ld_addr), .ld_conflict_i(ld_conflict), .st_commit_i(st_req),
    .alu_block_i(btf_busy), .btf_gs_block_i(btf_gs_block),
    .alu_valid_o(alu_valid), .alu_op_o(alu_op), .alu_a_o(alu_a), .alu_b_o(alu_b),
    .alu_id_o(alu_id),
    .btf_valid_o(btf_valid), .btf_op_o(btf_op), .btf_a_o(btf_a), .btf_b_o(btf_b),
    .btf_z_o(btf_z), .btf_id_a_o(btf_id_a), .btf_id_b_o(btf_id_b),
    .lsu_valid_o(lsu_valid), .lsu_op_o(lsu_op), .lsu_base_o(lsu_base),
    .lsu_offset_o(lsu_offset), .lsu_sdata_o(lsu_sdata), .lsu_id_o(lsu_id)
  );

  // execute
  wb_t [1:0] alu_wb;
  wb_t       btf_wb_a, btf_wb_b, lsu_wb;

  for (genvar i = 0; i < 2; i++) begin : g_alu
    alu u_alu (.valid_i(alu_valid[i]), .op_i(alu_op[i]), .op_a_i(alu_a[i]),
               .op_b_i(alu_b[i]), .id_i(alu_id[i]), .wb_o(alu_wb[i]));
  end

  btf_unit u_btf (
    .clk_i, .rst_ni,
    .valid_i(btf_valid), .op_i(btf_op), .a_i(btf_a), .b_i(btf_b), .z_i(btf_z),
    .id_a_i(btf_id_a), .id_b_i(btf_id_b),
    .gs_block_o(btf_gs_block), .stage2_busy_o(btf_busy),
    .wb_a_o(btf_wb_a), .wb_b_o(btf_wb_b)
  );

  logic        lsu_mem_req;
  logic [31:0] lsu_mem_addr, mem_rdata;

  lsu u_lsu (
    .clk_i, .rst_ni,
    .valid_i(lsu_valid), .op_i(lsu_op), .base_i(lsu_base), .offset_i(lsu_offset),
    .sdata_i(lsu_sdata), .id_i(lsu_id),
    .mem_req_o(lsu_mem_req), .mem_addr_o(lsu_mem_addr), .mem_rdata_i(mem_rdata),
    .wb_o(lsu_wb), .wb_store_o(lsu_wb_store), .wb_addr_o(lsu_wb_addr)
  );

  // result buses: mux 3 (bus B) and mux 4 (bus A), then the LSU bus
  always_comb begin
    wb[0] = btf_wb_b.valid ? btf_wb_b : alu_wb[0];
    wb[1] = btf_wb_a.valid ? btf_wb_a : alu_wb[1];
    wb[2] = lsu_wb;
  end

  // commit
  logic [31:0] st_addr, st_data;

  commit_stage u_commit (
    .head_i(head), .commit_cnt_o(commit_cnt),
    .rf_we_o(rf_we), .rf_waddr_o(rf_waddr), .rf_wdata_o(rf_wdata),
    .st_req_o(st_req), .st_addr_o(st_addr), .st_data_o(st_data)
  );

  // data scratchpad: port A shared by committed stores and loads
  scratchpad #(.DEPTH_WORDS(DMEM_WORDS)) u_dmem (
    .clk_i,
    .a_req_i(st_req || lsu_mem_req), .a_we_i(st_req),
    .a_addr_i(st_req ? st_addr : lsu_mem_addr), .a_wdata_i(st_data), .a_rdata_o(mem_rdata),
    .b_req_i(host_req_i), .b_we_i(host_we_i), .b_addr_i(host_addr_i),
    .b_wdata_i(host_wdata_i), .b_rdata_o(host_rdata_o)
  );

  // a bus carries one result per cycle; loads never meet a committing store
  assert property (@(posedge clk_i) disable iff (!rst_ni) !(btf_wb_b.valid && alu_wb[0].valid))
    else $error("btf_backend: bus B conflict");
  assert property (@(posedge clk_i) disable iff (!rst_ni) !(btf_wb_a.valid && alu_wb[1].valid))
    else $error("btf_backend: bus A conflict");
  assert property (@(posedge clk_i) disable iff (!rst_ni) !(st_req && lsu_mem_req))
    else $error("btf_backend: memory port conflict");
endmodule
