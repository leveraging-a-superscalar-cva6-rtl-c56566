// tb_scoreboard: random allocation (up to three entries per cycle), out-of-order results
// and in-order retirement, checked every cycle against a queue model in this testbench:
// entry numbers handed out, free count (entries retiring this cycle count as free),
// the three oldest entries, forwarding lookups (youngest writer wins), the load/store
// address conflict and the empty flag. Counts how often an allocation used entries freed in the same cycle and
// how often the scoreboard refused three entries.
module tb_scoreboard;
  import btf_pkg::*;
  localparam int NR = 8;

  typedef struct {
    int id; bit wr; int rd; bit st; bit done; int data; int addr;
  } ent_t;

  logic clk = 0, rst_n = 0;
  logic [1:0] alloc_cnt, commit_cnt;
  sb_alloc_t [2:0] alloc;
  logic [2:0][2:0] alloc_id;
  logic [3:0] free;
  wb_t [2:0] wb;
  logic [31:0] wb_addr;
  logic wb_store;
  logic [3:0][4:0] lreg;
  logic [3:0] hit, rdy;
  logic [3:0][31:0] ldata;
  sb_entry_t [2:0] head;
  logic ld_conf, empty;
  logic [31:0] ld_addr;
  int checks = 0, failures = 0, n_credit = 0, n_full = 0, n_conf = 0;

  scoreboard #(.NR_ENTRIES(NR)) dut (
    .clk_i(clk), .rst_ni(rst_n), .alloc_cnt_i(alloc_cnt), .alloc_i(alloc),
    .alloc_id_o(alloc_id), .free_o(free), .wb_i(wb), .wb_addr_i(wb_addr),
    .wb_store_i(wb_store), .lookup_reg_i(lreg), .lookup_hit_o(hit), .lookup_ready_o(rdy),
    .lookup_data_o(ldata), .head_o(head), .commit_cnt_i(commit_cnt),
    .ld_addr_i(ld_addr), .ld_conflict_o(ld_conf), .empty_o(empty));

  always #5 clk = ~clk;

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

  ent_t q[$];
  int tail = 0;

  initial begin
    alloc_cnt = 0; commit_cnt = 0; alloc = '0; ld_addr = 0; wb = '0; wb_addr = 0; wb_store = 0; lreg = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      automatic int can, e_free, ncommit, nalloc;
      automatic int pend[$];
      bit anyst;
      @(negedge clk);
      // ---- retirement: a random part of the finished prefix ----
      can = 0;
      while (can < 3 && can < q.size() && q[can].done) can++;
      ncommit = $urandom_range(0, can);
      if ($urandom_range(0, 3) != 0) ncommit = can;
      commit_cnt = 2'(ncommit);
      #1;
      e_free = NR - q.size() + ncommit;
      if (e_free > 3) e_free = 3;
      chk(int'(free) == e_free, $sformatf("free %0d expected %0d", free, e_free));
      for (int k = 0; k < 3; k++) chk(int'(alloc_id[k]) == (tail + k) % NR, "alloc id");
      for (int k = 0; k < 3; k++) begin
        if (k < q.size())
          chk(head[k].valid && head[k].done == q[k].done && head[k].wr == q[k].wr &&
              int'(head[k].rd) == q[k].rd && head[k].is_store == q[k].st &&
              (!q[k].done || int'(head[k].data) == q[k].data) &&
              (!(q[k].done && q[k].st) || int'(head[k].addr) == q[k].addr), "head entry");
        else chk(!head[k].valid, "head beyond count");
      end
      // load/store conflict: pick an address that often matches a pending store
      ld_addr = $urandom;
      if (q.size() > 0 && $urandom_range(0, 1) != 0) ld_addr = 32'(q[$urandom_range(0, q.size() - 1)].addr) ^ 32'($urandom_range(0, 3));
      #1;
      anyst = 0;
      foreach (q[i]) if (q[i].st && (!q[i].done || q[i].addr[31:2] == ld_addr[31:2])) anyst = 1;
      if (anyst) n_conf++;
      chk(ld_conf == anyst && empty == (q.size() == 0), "flags");
      // ---- lookups ----
      for (int p = 0; p < 4; p++) lreg[p] = 5'($urandom_range(0, 7));
      #1;
      for (int p = 0; p < 4; p++) begin
        automatic int y = -1;
        foreach (q[i]) if (q[i].wr && q[i].rd == int'(lreg[p]) && lreg[p] != 0) y = i;
        chk(hit[p] == (y >= 0), $sformatf("lookup hit reg %0d y=%0d qsize=%0d count=%0d hit=%b", lreg[p], y, q.size(), dut.count_q, hit[p])); if (hit[p] != (y >= 0)) begin $display("head=%0d q1 id=%0d wr=%0d rd=%0d", dut.head_q, q[1].id, q[1].wr, q[1].rd); for (int e=0;e<8;e++) $display(" e%0d v=%b wr=%b rd=%0d", e, dut.mem_q[e].valid, dut.mem_q[e].wr, dut.mem_q[e].rd); end
        if (y >= 0) chk(rdy[p] == q[y].done && (!q[y].done || int'(ldata[p]) == q[y].data),
                        "lookup ready/data");
      end
      // ---- allocation ----
      // allocate no more than the block offers, as the issue stage does
      nalloc = $urandom_range(0, (int'(free) < e_free) ? int'(free) : e_free);
      if ($urandom_range(0, 1) != 0) nalloc = (int'(free) < e_free) ? int'(free) : e_free;
      if (nalloc < 3 && e_free < 3 && ncommit == can) n_full++;
      if (nalloc > NR - q.size()) n_credit++;
      alloc_cnt = 2'(nalloc);
      for (int k = 0; k < 3; k++)
        alloc[k] = '{wr: 1'($urandom), rd: 5'($urandom_range(0, 7)), is_store: ($urandom_range(0, 4) == 0)};
      // ---- results for up to three waiting entries ----
      foreach (q[i]) if (!q[i].done && i >= ncommit) pend.push_back(i);
      pend.shuffle();
      wb = '0; wb_store = 0; wb_addr = $urandom;
      for (int w = 0; w < 3 && w < pend.size(); w++) begin
        if ($urandom_range(0, 2) != 0) begin
          wb[w] = '{valid: 1'b1, id: 3'(q[pend[w]].id), data: $urandom};
          if (w == 2 && q[pend[w]].st) wb_store = 1;
        end
      end
      @(posedge clk);
      // ---- model update ----
      for (int w = 0; w < 3; w++) if (wb[w].valid) begin
        foreach (q[i]) if (q[i].id == int'(wb[w].id)) begin
          q[i].done = 1; q[i].data = int'(wb[w].data);
          if (w == 2 && wb_store) q[i].addr = int'(wb_addr);
        end
      end
      repeat (ncommit) void'(q.pop_front());
      for (int k = 0; k < nalloc; k++) begin
        automatic ent_t e;
        e.id = tail; e.wr = alloc[k].wr; e.rd = int'(alloc[k].rd); e.st = alloc[k].is_store;
        e.done = 0; e.data = 0; e.addr = 0;
        q.push_back(e);
        tail = (tail + 1) % NR;
      end
    end
    chk(n_credit > 0, "allocation into entries freed the same cycle never happened");
    chk(n_full > 0, "full scoreboard never happened");
    chk(n_conf > 0, "load conflict never happened");
    $display("credit allocations %0d, full cycles %0d", n_credit, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
