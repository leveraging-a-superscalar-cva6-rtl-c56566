// commit_stage: in-order retirement of up to three scoreboard entries per cycle.
//
// It looks at the three oldest scoreboard entries and retires the longest prefix of them
// whose results are present, so a butterfly's two results and a load's result can leave
// the scoreboard in the same cycle (triple commit, an extension of dual commit). A
// retired entry with a destination register drives one register-bank write port; port k
// carries the k-th retired entry (its address and data are the entry's own fields, passed
// straight through; only the write enable is decided here). A retired store drives the
// memory write port; since the data memory has a single port, at most one store is
// retired per cycle.
// Combinational: writes take effect at the next clock edge, when the scoreboard frees
// the entries. The one-store-per-cycle rule is this design's choice.
module commit_stage
  import btf_pkg::*;
(
  input  sb_entry_t [2:0]   head_i,
  output logic [1:0]        commit_cnt_o,
  output logic [2:0]        rf_we_o,
  output logic [2:0][4:0]   rf_waddr_o,
  output logic [2:0][31:0]  rf_wdata_o,
  output logic              st_req_o,
  output logic [31:0]       st_addr_o,
  output logic [31:0]       st_data_o
);
  always_comb begin
    logic stop;
    stop         = 1'b0;
    commit_cnt_o = '0;
    rf_we_o      = '0;
    st_req_o     = 1'b0;
    st_addr_o    = '0;
    st_data_o    = '0;
    for (int k = 0; k < 3; k++) begin
      rf_waddr_o[k] = head_i[k].rd;
      rf_wdata_o[k] = head_i[k].data;
      if (!stop && head_i[k].valid && head_i[k].done && !(head_i[k].is_store && st_req_o)) begin
        commit_cnt_o = commit_cnt_o + 2'd1;
        rf_we_o[k]   = head_i[k].wr;
        if (head_i[k].is_store) begin
          st_req_o  = 1'b1;
          st_addr_o = head_i[k].addr;
          st_data_o = head_i[k].data;
        end
      end else begin
        stop = 1'b1;
      end
    end
  end
endmodule
