// tb_commit_stage: random contents of the three oldest scoreboard entries; checks that the
// longest finished prefix retires, at most one store per cycle, with the matching
// register-write and store outputs.
module tb_commit_stage;
  import btf_pkg::*;
  sb_entry_t [2:0] head;
  logic [1:0] cnt;
  logic [2:0] we;
  logic [2:0][4:0] wa;
  logic [2:0][31:0] wd;
  logic st_req;
  logic [31:0] st_addr, st_data;
  int checks = 0, failures = 0, triples = 0;

  commit_stage dut (.head_i(head), .commit_cnt_o(cnt), .rf_we_o(we), .rf_waddr_o(wa),
                    .rf_wdata_o(wd), .st_req_o(st_req), .st_addr_o(st_addr),
                    .st_data_o(st_data));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      int e_cnt, stores, e_st;
      for (int k = 0; k < 3; k++) begin
        head[k] = '{valid: ($urandom_range(0, 5) != 0), done: ($urandom_range(0, 4) != 0),
                    wr: 1'($urandom), rd: 5'($urandom), is_store: ($urandom_range(0, 3) == 0),
                    data: $urandom, addr: $urandom};
      end
      #1;
      e_cnt = 0; stores = 0; e_st = -1;
      for (int k = 0; k < 3; k++) begin
        if (e_cnt != k) break;
        if (!head[k].valid || !head[k].done) break;
        if (head[k].is_store && stores > 0) break;
        if (head[k].is_store) begin stores++; e_st = k; end
        e_cnt++;
      end
      if (e_cnt == 3) triples++;
      checks++;
      if (int'(cnt) != e_cnt) begin
        failures++;
        if (failures < 10) $display("FAIL count %0d expected %0d", cnt, e_cnt);
      end
      for (int k = 0; k < 3; k++) begin
        checks++;
        if (we[k] != (k < e_cnt && head[k].wr) || (we[k] && (wa[k] != head[k].rd || wd[k] != head[k].data)))
          failures++;
      end
      checks++;
      if (st_req != (e_st >= 0) || (st_req && (st_addr != head[e_st].addr || st_data != head[e_st].data)))
        failures++;
    end
    checks++;
    if (triples == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
