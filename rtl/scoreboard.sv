// scoreboard: reorder buffer that holds results between out-of-order completion and
// in-order commit, and forwards finished results to the issue stage.
//
// Entries form a circular queue (head = oldest). Per cycle:
//  * up to three entries are allocated at the tail (alloc_cnt_i, records alloc_i[0..2]
//    in program order). A Cooley-Tukey/Gentleman-Sande butterfly takes two entries (a and
//    b), and a load issued beside it takes the third;
//  * up to three results are written (a combinational unit may return its result in the
//    very cycle the entry is allocated) through the result ports wb_i (the two ALU buses,
//    which also carry the butterfly results, and the LSU bus; the LSU port also carries a
//    store address in wb_addr_i);
//  * up to three finished entries are retired from the head (commit_cnt_i, from the commit
//    stage, which sees the three oldest entries on head_o).
// free_o counts the entries that may be allocated this cycle. It treats entries retiring
// in this same cycle as free, so that an entry is reused in the cycle after it commits
// rather than one cycle later; this is the full-detection rule of the extension.
// Four lookup ports return, for a source register, whether an older uncommitted
// instruction writes it (hit), whether its result is present (ready) and that result;
// the youngest writer wins. ld_conflict_o tells the issue stage that a load to word
// address ld_addr_i must wait: an uncommitted store either has no address yet or writes
// that word (stores write memory only when they retire). NR_ENTRIES must be a power of two no larger than 2**SB_ID_W.
// There is no flush: the back end executes no branches and raises no exceptions.
// The entry count (8) is this design's choice; the extension does not state it.
module scoreboard
  import btf_pkg::*;
#(
  parameter int unsigned NR_ENTRIES = 8
) (
  input  logic                      clk_i,
  input  logic                      rst_ni,
  // allocation
  input  logic [1:0]                alloc_cnt_i,
  input  sb_alloc_t [2:0]           alloc_i,
  output logic [2:0][SB_ID_W-1:0]   alloc_id_o,
  output logic [3:0]                free_o,
  // results
  input  wb_t [2:0]                 wb_i,
  input  logic [31:0]               wb_addr_i,   // store address, with wb_i[2]
  input  logic                      wb_store_i,  // wb_i[2] is a store
  // operand lookup
  input  logic [3:0][4:0]           lookup_reg_i,
  output logic [3:0]                lookup_hit_o,
  output logic [3:0]                lookup_ready_o,
  output logic [3:0][31:0]          lookup_data_o,
  // commit
  output sb_entry_t [2:0]           head_o,
  input  logic [1:0]                commit_cnt_i,
  input  logic [31:0]               ld_addr_i,   // address of a load about to issue
  output logic                      ld_conflict_o,
  output logic                      empty_o
);
  localparam int unsigned PTR_W = $clog2(NR_ENTRIES);

  sb_entry_t [NR_ENTRIES-1:0] mem_q;
  logic [PTR_W-1:0]           head_q, tail_q;
  logic [PTR_W:0]             count_q;

  function automatic logic [PTR_W-1:0] ptr_add(logic [PTR_W-1:0] p, int k);
    return PTR_W'((int'(p) + k) % NR_ENTRIES);
  endfunction

  // ---------------- allocation view ----------------
  int free_nr;
  always_comb begin
    for (int k = 0; k < 3; k++) alloc_id_o[k] = SB_ID_W'(ptr_add(tail_q, k));
    free_nr = int'(NR_ENTRIES) - int'(count_q) + int'(commit_cnt_i);
    free_o  = (free_nr > 3) ? 4'd3 : 4'(free_nr);
  end

  // ---------------- head view, status ----------------
  always_comb begin
    ld_conflict_o = 1'b0;
    for (int k = 0; k < 3; k++) begin
      head_o[k] = mem_q[ptr_add(head_q, k)];
      if (k >= int'(count_q)) head_o[k].valid = 1'b0;
    end
    for (int e = 0; e < int'(NR_ENTRIES); e++) begin
      // an uncommitted store whose address is unknown or equal to the load's word
      if (mem_q[e].valid && mem_q[e].is_store &&
          (!mem_q[e].done || mem_q[e].addr[31:2] == ld_addr_i[31:2])) ld_conflict_o = 1'b1;
    end
    empty_o = (count_q == 0);
  end

  // ---------------- forwarding lookup (youngest writer wins) ----------------
  always_comb begin
    for (int p = 0; p < 4; p++) begin
      lookup_hit_o[p]   = 1'b0;
      lookup_ready_o[p] = 1'b0;
      lookup_data_o[p]  = '0;
      for (int i = 0; i < int'(NR_ENTRIES); i++) begin
        if (i < int'(count_q)) begin
          if (mem_q[ptr_add(head_q, i)].valid && mem_q[ptr_add(head_q, i)].wr &&
              mem_q[ptr_add(head_q, i)].rd == lookup_reg_i[p] && lookup_reg_i[p] != 5'd0) begin
            lookup_hit_o[p]   = 1'b1;
            lookup_ready_o[p] = mem_q[ptr_add(head_q, i)].done;
            lookup_data_o[p]  = mem_q[ptr_add(head_q, i)].data;
          end
        end
      end
    end
  end

  // ---------------- state update ----------------
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      mem_q   <= '0;
      head_q  <= '0;
      tail_q  <= '0;
      count_q <= '0;
    end else begin
      // retire
      for (int k = 0; k < 3; k++) begin
        if (k < int'(commit_cnt_i)) mem_q[ptr_add(head_q, k)].valid <= 1'b0;
      end
      // allocate (an entry being retired this cycle may be reallocated at once)
      for (int k = 0; k < 3; k++) begin
        if (k < int'(alloc_cnt_i)) begin
          mem_q[ptr_add(tail_q, k)] <= '{valid: 1'b1, done: 1'b0, wr: alloc_i[k].wr,
                                        rd: alloc_i[k].rd, is_store: alloc_i[k].is_store,
                                        data: 32'd0, addr: 32'd0};
        end
      end
      // results (a result may arrive in its allocation cycle: written after it)
      for (int w = 0; w < 3; w++) begin
        if (wb_i[w].valid) begin
          mem_q[PTR_W'(wb_i[w].id)].done <= 1'b1;
          mem_q[PTR_W'(wb_i[w].id)].data <= wb_i[w].data;
          if (w == 2 && wb_store_i) mem_q[PTR_W'(wb_i[w].id)].addr <= wb_addr_i;
        end
      end
      head_q  <= ptr_add(head_q, int'(commit_cnt_i));
      tail_q  <= ptr_add(tail_q, int'(alloc_cnt_i));
      count_q <= count_q + (PTR_W+1)'(alloc_cnt_i) - (PTR_W+1)'(commit_cnt_i);
    end
  end

  // ---------------- rules of use ----------------
  initial assert (NR_ENTRIES <= (1 << SB_ID_W) && (NR_ENTRIES & (NR_ENTRIES - 1)) == 0);
  assert property (@(posedge clk_i) disable iff (!rst_ni) 4'(alloc_cnt_i) <= free_o)
    else $error("scoreboard: allocation beyond free entries");
  assert property (@(posedge clk_i) disable iff (!rst_ni) 32'(commit_cnt_i) <= 32'(count_q))
    else $error("scoreboard: commit of unallocated entries");
endmodule
