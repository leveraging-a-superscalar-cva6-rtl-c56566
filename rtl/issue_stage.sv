// issue_stage: in-order dual issue with the butterfly extension's operand routing.
//
// Each cycle it looks at the two oldest instructions (slot 0, slot 1) and issues none,
// slot 0 alone, or both. It reads operands through four register-bank read ports, each
// backed by a scoreboard lookup that forwards results not yet committed:
//   port 0 = slot0.rs1, port 1 = slot0.rs2, port 2 = slot1.rs1,
//   port 3 = slot1.rs2, or, when slot 0 is btf.ct/btf.gs, that butterfly's rd (operand a).
// So a butterfly (three sources: b = rs1, z = rs2, a = rd) reads its third operand on the
// port a load in slot 1 leaves unused, and no read port is added.
// Rules (following the extension):
//  * a btf.ct/btf.gs in slot 1 never issues; it waits to reach slot 0;
//  * with a btf.ct/btf.gs in slot 0, slot 1 issues only if it is a lw;
//  * a btf.ct/btf.gs allocates two scoreboard entries (a = rd, then b = rs1); with the
//    lw beside it, three entries are allocated in one cycle; btf.mm is an ordinary
//    R-type instruction with one entry;
//  * the butterfly results use the ALU result buses, so no ALU instruction issues while
//    the butterfly unit's second stage is busy (alu_block_i), and a btf.gs waits while
//    a btf.ct result is due on the same bus (btf_gs_block_i).
// Rules that are this design's own: an instruction waits until every source written by
// an older uncommitted instruction has its result in the scoreboard; slot 1 does not
// issue if it reads a register slot 0 writes; one memory instruction per cycle; a lw
// waits while an uncommitted store has no address yet or writes the same word (stores
// write memory at commit), and while a store is using the memory port; illegal
// instructions issue as no-ops that take one entry. Combinational; issue_cnt_o tells the
// instruction source how many instructions left.
module issue_stage
  import btf_pkg::*;
(
  input  decoded_t [1:0]          dec_i,
  input  logic [1:0]              valid_i,       // valid_i[1] implies valid_i[0]
  output logic [1:0]              issue_cnt_o,
  // register bank and scoreboard lookup
  output logic [3:0][4:0]         rd_reg_o,
  input  logic [3:0][31:0]        rf_data_i,
  input  logic [3:0]              sb_hit_i,
  input  logic [3:0]              sb_ready_i,
  input  logic [3:0][31:0]        sb_data_i,
  // scoreboard allocation
  input  logic [3:0]              sb_free_i,
  input  logic [2:0][SB_ID_W-1:0] sb_id_i,
  output logic [1:0]              alloc_cnt_o,
  output sb_alloc_t [2:0]         alloc_o,
  output logic [31:0]             ld_addr_o,      // address of the load in slot 0 or 1
  input  logic                    ld_conflict_i,  // it hits an uncommitted store
  input  logic                    st_commit_i,    // a store uses the memory port now
  // structural state of the units
  input  logic                    alu_block_i,
  input  logic                    btf_gs_block_i,
  // dispatch: ALU (slot 0) and ALU2 (slot 1)
  output logic [1:0]              alu_valid_o,
  output op_t [1:0]               alu_op_o,
  output logic [1:0][31:0]        alu_a_o,
  output logic [1:0][31:0]        alu_b_o,
  output logic [1:0][SB_ID_W-1:0] alu_id_o,
  // dispatch: butterfly unit
  output logic                    btf_valid_o,
  output op_t                     btf_op_o,
  output logic [31:0]             btf_a_o,
  output logic [31:0]             btf_b_o,
  output logic [31:0]             btf_z_o,
  output logic [SB_ID_W-1:0]      btf_id_a_o,
  output logic [SB_ID_W-1:0]      btf_id_b_o,
  // dispatch: LSU
  output logic                    lsu_valid_o,
  output op_t                     lsu_op_o,
  output logic [31:0]             lsu_base_o,
  output logic [31:0]             lsu_offset_o,
  output logic [31:0]             lsu_sdata_o,
  output logic [SB_ID_W-1:0]      lsu_id_o
);
  decoded_t    s0, s1;
  logic        s0_pair;                 // slot 0 is btf.ct / btf.gs
  logic [3:0]  need;                    // port p carries a needed source
  logic [3:0]  avail;                   // port p operand is available
  logic [3:0][31:0] opnd;
  logic [2:0]  n0, n1;                  // scoreboard entries slot 0 / slot 1 need
  logic        fu0_ok, fu1_ok, raw01, pair_ok;
  logic        iss0, iss1;

  function automatic logic writes(decoded_t d, logic [4:0] r);
    return r != 5'd0 && ((d.wr_rd && d.rd == r) || (d.wr_rs1 && d.rs1 == r));
  endfunction

  always_comb begin
    s0      = dec_i[0];
    s1      = dec_i[1];
    s0_pair = is_btf_pair(s0.op) && s0.fu == FU_BTF && !s0.illegal;

    // ---------------- read-port mapping ----------------
    rd_reg_o[0] = s0.rs1;
    rd_reg_o[1] = s0.rs2;
    rd_reg_o[2] = s1.rs1;
    rd_reg_o[3] = s0_pair ? s0.rd : s1.rs2;
    need[0] = s0.use_rs1;
    need[1] = s0.use_rs2;
    need[2] = s1.use_rs1;
    need[3] = s0_pair ? s0.use_rd_src : s1.use_rs2;
    for (int p = 0; p < 4; p++) begin
      avail[p] = !need[p] || !sb_hit_i[p] || sb_ready_i[p];
      opnd[p]  = sb_hit_i[p] ? sb_data_i[p] : rf_data_i[p];
      if (rd_reg_o[p] == 5'd0) opnd[p] = '0;
    end

    // the load address seen by the store check (only one memory instruction issues)
    ld_addr_o = (s0.fu == FU_LSU) ? opnd[0] + s0.imm : opnd[2] + s1.imm;

    n0 = s0_pair ? 3'd2 : 3'd1;
    n1 = 3'd1;

    // ---------------- slot 0 ----------------
    unique case (s0.fu)
      FU_ALU:  fu0_ok = !alu_block_i;
      FU_LSU:  fu0_ok = (s0.op == OP_SW) || !(ld_conflict_i || st_commit_i);
      default: fu0_ok = !(s0.op == OP_BTF_GS && btf_gs_block_i);
    endcase
    if (s0.illegal) fu0_ok = !alu_block_i;
    iss0 = valid_i[0] && fu0_ok && avail[0] && avail[1] && (!s0_pair || avail[3]) &&
           (4'(n0) <= sb_free_i);

    // ---------------- slot 1 ----------------
    raw01 = (s1.use_rs1 && writes(s0, s1.rs1)) || (s1.use_rs2 && writes(s0, s1.rs2));
    if (s0_pair) pair_ok = (s1.op == OP_LW) && (s1.fu == FU_LSU) && !s1.illegal;
    else         pair_ok = !(s1.fu == FU_BTF && !s1.illegal && is_btf_pair(s1.op));
    unique case (s1.fu)
      FU_ALU:  fu1_ok = !alu_block_i;
      FU_LSU:  fu1_ok = (s0.fu != FU_LSU || s0.illegal) &&
                        ((s1.op == OP_SW) || !(ld_conflict_i || st_commit_i));
      default: fu1_ok = (s0.fu != FU_BTF || s0.illegal);   // only btf.mm reaches here
    endcase
    if (s1.illegal) fu1_ok = !alu_block_i;
    iss1 = iss0 && valid_i[1] && pair_ok && fu1_ok && !raw01 && avail[2] &&
           (s0_pair || avail[3]) && (4'(n0 + n1) <= sb_free_i);

    issue_cnt_o = iss1 ? 2'd2 : (iss0 ? 2'd1 : 2'd0);

    // ---------------- scoreboard allocation ----------------
    alloc_o = '0;
    alloc_o[0] = '{wr: s0.wr_rd && !s0.illegal, rd: s0.rd, is_store: s0.op == OP_SW && !s0.illegal};
    if (s0_pair) begin
      alloc_o[1] = '{wr: s0.wr_rs1, rd: s0.rs1, is_store: 1'b0};
      alloc_o[2] = '{wr: s1.wr_rd && !s1.illegal, rd: s1.rd, is_store: s1.op == OP_SW && !s1.illegal};
    end else begin
      alloc_o[1] = '{wr: s1.wr_rd && !s1.illegal, rd: s1.rd, is_store: s1.op == OP_SW && !s1.illegal};
    end
    alloc_cnt_o = 2'(iss0 ? n0 : 3'd0) + 2'(iss1 ? n1 : 3'd0);

    // ---------------- dispatch ----------------
    alu_valid_o  = '0;
    alu_op_o     = {OP_ADD, OP_ADD};
    alu_a_o      = '0;
    alu_b_o      = '0;
    alu_id_o     = '0;
    btf_valid_o  = 1'b0;
    btf_op_o     = s0.op;
    btf_a_o      = opnd[3];
    btf_b_o      = opnd[0];
    btf_z_o      = opnd[1];
    btf_id_a_o   = sb_id_i[0];
    btf_id_b_o   = sb_id_i[1];
    lsu_valid_o  = 1'b0;
    lsu_op_o     = OP_LW;
    lsu_base_o   = '0;
    lsu_offset_o = '0;
    lsu_sdata_o  = '0;
    lsu_id_o     = '0;

    if (iss0) begin
      if (s0.illegal) begin
        alu_valid_o[0] = 1'b1;                       // no-op, completes at once
        alu_id_o[0]    = sb_id_i[0];
      end else begin
        unique case (s0.fu)
          FU_ALU: begin
            alu_valid_o[0] = 1'b1;
            alu_op_o[0]    = s0.op;
            alu_a_o[0]     = opnd[0];
            alu_b_o[0]     = s0.use_imm ? s0.imm : opnd[1];
            alu_id_o[0]    = sb_id_i[0];
          end
          FU_LSU: begin
            lsu_valid_o  = 1'b1;
            lsu_op_o     = s0.op;
            lsu_base_o   = opnd[0];
            lsu_offset_o = s0.imm;
            lsu_sdata_o  = opnd[1];
            lsu_id_o     = sb_id_i[0];
          end
          default: btf_valid_o = 1'b1;
        endcase
      end
    end

    if (iss1) begin
      if (s1.illegal) begin
        alu_valid_o[1] = 1'b1;
        alu_id_o[1]    = sb_id_i[n0[1:0]];
      end else begin
        unique case (s1.fu)
          FU_ALU: begin
            alu_valid_o[1] = 1'b1;
            alu_op_o[1]    = s1.op;
            alu_a_o[1]     = opnd[2];
            alu_b_o[1]     = s1.use_imm ? s1.imm : opnd[3];
            alu_id_o[1]    = sb_id_i[n0[1:0]];
          end
          FU_LSU: begin
            lsu_valid_o  = 1'b1;
            lsu_op_o     = s1.op;
            lsu_base_o   = opnd[2];
            lsu_offset_o = s1.imm;
            lsu_sdata_o  = opnd[3];
            lsu_id_o     = sb_id_i[n0[1:0]];
          end
          default: begin                               // btf.mm in slot 1
            btf_valid_o = 1'b1;
            btf_op_o    = s1.op;
            btf_b_o     = opnd[2];
            btf_z_o     = opnd[3];
            btf_id_a_o  = sb_id_i[n0[1:0]];
          end
        endcase
      end
    end
  end
endmodule
