// tb_issue_stage: directed cases for the dual-issue rules and operand routing.
//
// Two instructions are decoded by btf_decoder instances; register-bank data is a fixed
// function of the register number (x_n reads n * 0x01010101 + 7), and scoreboard lookups,
// free entries and unit states are set per case. Each case checks how many instructions
// issue, how many scoreboard entries are allocated and for which registers, which read
// port serves which operand, and what reaches the ALU, butterfly and load/store units.
// A second, random part draws instruction pairs over a few registers (so that they
// collide), a random scoreboard state per register (nothing pending, pending without a
// result, or pending with a result) and random unit states, and compares the outcome with
// a reference written at the level of instructions (their sources, destinations, units
// and entry counts), without the read-port mapping.
module tb_issue_stage;
  import btf_pkg::*;
  import tb_util_pkg::*;

  logic [1:0][31:0] instr;
  decoded_t [1:0] dec;
  logic [1:0] valid, cnt, alloc_cnt;
  logic [3:0][4:0] rreg;
  logic [3:0][31:0] rf;
  logic [3:0] hit, rdy;
  logic [3:0][31:0] sbd;
  logic [3:0] free;
  logic [2:0][2:0] ids;
  sb_alloc_t [2:0] alloc;
  logic ld_conf, st_commit, alu_block, gs_block;
  logic [31:0] ld_addr;
  logic [1:0] alu_v;
  op_t [1:0] alu_op;
  logic [1:0][31:0] alu_a, alu_b;
  logic [1:0][2:0] alu_id;
  logic btf_v, lsu_v;
  op_t btf_op, lsu_op;
  logic [31:0] btf_a, btf_b, btf_z, lsu_base, lsu_off, lsu_sd;
  logic [2:0] btf_ida, btf_idb, lsu_id;
  int checks = 0, failures = 0;
  // random part: scoreboard state per register, 0 none, 1 pending, 2 result present
  bit rnd = 0;
  int pend[32];
  logic [3:0] hit_c, rdy_c;
  logic [3:0][31:0] sbd_c;

  for (genvar i = 0; i < 2; i++) begin : g_dec
    btf_decoder u_dec (.instr_i(instr[i]), .dec_o(dec[i]));
  end

  issue_stage dut (
    .dec_i(dec), .valid_i(valid), .issue_cnt_o(cnt), .rd_reg_o(rreg), .rf_data_i(rf),
    .sb_hit_i(hit_c), .sb_ready_i(rdy_c), .sb_data_i(sbd_c), .sb_free_i(free), .sb_id_i(ids),
    .alloc_cnt_o(alloc_cnt), .alloc_o(alloc), .ld_addr_o(ld_addr),
    .ld_conflict_i(ld_conf), .st_commit_i(st_commit),
    .alu_block_i(alu_block), .btf_gs_block_i(gs_block),
    .alu_valid_o(alu_v), .alu_op_o(alu_op), .alu_a_o(alu_a), .alu_b_o(alu_b), .alu_id_o(alu_id),
    .btf_valid_o(btf_v), .btf_op_o(btf_op), .btf_a_o(btf_a), .btf_b_o(btf_b), .btf_z_o(btf_z),
    .btf_id_a_o(btf_ida), .btf_id_b_o(btf_idb),
    .lsu_valid_o(lsu_v), .lsu_op_o(lsu_op), .lsu_base_o(lsu_base), .lsu_offset_o(lsu_off),
    .lsu_sdata_o(lsu_sd), .lsu_id_o(lsu_id));

  function automatic logic [31:0] rv(int r);
    return (r == 0) ? 32'd0 : 32'(r) * 32'h0101_0101 + 32'd7;
  endfunction

  function automatic logic [31:0] sv_(int r);
    return 32'(r) * 32'h1000_0001 ^ 32'h5A5A_0000;
  endfunction

  always_comb for (int p = 0; p < 4; p++) rf[p] = rv(int'(rreg[p]));
  always_comb
    for (int p = 0; p < 4; p++) begin
      if (rnd) begin
        hit_c[p] = rreg[p] != 0 && pend[rreg[p]] != 0;
        rdy_c[p] = pend[rreg[p]] == 2;
        sbd_c[p] = sv_(int'(rreg[p]));
      end else begin
        hit_c[p] = hit[p]; rdy_c[p] = rdy[p]; sbd_c[p] = sbd[p];
      end
    end

  // ---------------- reference for the random part ----------------
  typedef enum int {K_CT, K_GS, K_MM, K_LW, K_SW, K_ADD, K_ADDI, K_SUB, K_XOR, K_ILL} kind_t;
  typedef struct {
    kind_t k;
    int    rd, rs1, rs2, imm;
  } ins_t;

  function automatic logic [31:0] enc(ins_t i);
    case (i.k)
      K_CT:   return btf_ct(i.rd, i.rs1, i.rs2);
      K_GS:   return btf_gs(i.rd, i.rs1, i.rs2);
      K_MM:   return btf_mm(i.rd, i.rs1, i.rs2);
      K_LW:   return lw(i.rd, i.imm, i.rs1);
      K_SW:   return sw(i.rs2, i.imm, i.rs1);
      K_ADD:  return add(i.rd, i.rs1, i.rs2);
      K_ADDI: return addi(i.rd, i.rs1, i.imm);
      K_SUB:  return sub(i.rd, i.rs1, i.rs2);
      K_XOR:  return xor_(i.rd, i.rs1, i.rs2);
      default: return 32'h0000_0000;
    endcase
  endfunction
  function automatic bit is_pair(ins_t i); return i.k == K_CT || i.k == K_GS; endfunction
  function automatic bit is_mem(ins_t i);  return i.k == K_LW || i.k == K_SW; endfunction
  function automatic bit is_btf(ins_t i);  return i.k == K_CT || i.k == K_GS || i.k == K_MM; endfunction
  function automatic int entries(ins_t i); return is_pair(i) ? 2 : 1; endfunction
  function automatic bit reads(ins_t i, int r);
    if (r == 0) return 0;
    case (i.k)
      K_CT, K_GS:                  return r == i.rd || r == i.rs1 || r == i.rs2;
      K_MM, K_ADD, K_SUB, K_XOR, K_SW: return r == i.rs1 || r == i.rs2;
      K_LW, K_ADDI:                return r == i.rs1;
      default:                     return 0;
    endcase
  endfunction
  function automatic bit writes_r(ins_t i, int r);
    if (r == 0 || i.k == K_SW || i.k == K_ILL) return 0;
    return r == i.rd || (is_pair(i) && r == i.rs1);
  endfunction
  function automatic bit raw(ins_t i0, ins_t i1);
    for (int r = 1; r < 32; r++) if (reads(i1, r) && writes_r(i0, r)) return 1;
    return 0;
  endfunction
  function automatic bit srcs_ready(ins_t i);
    for (int r = 1; r < 32; r++) if (reads(i, r) && pend[r] == 1) return 0;
    return 1;
  endfunction
  function automatic bit unit_ok(ins_t i);
    if (i.k == K_GS) return !gs_block;
    if (i.k == K_LW) return !(ld_conf || st_commit);
    if (is_btf(i) || i.k == K_SW) return 1;
    return !alu_block;                       // ALU instructions and illegal no-ops
  endfunction
  function automatic logic [31:0] val(int r);
    if (r == 0) return 32'd0;
    return (pend[r] == 2) ? sv_(r) : rv(r);
  endfunction
  function automatic ins_t rnd_ins();
    ins_t i;
    i.k   = kind_t'($urandom_range(0, 9));
    i.rd  = int'($urandom_range(0, 6));
    i.rs1 = int'($urandom_range(0, 6));
    i.rs2 = int'($urandom_range(0, 6));
    i.imm = (i.k == K_ADDI) ? int'($urandom_range(0, 4095)) - 2048 : 4 * (int'($urandom_range(0, 63)) - 32);
    return i;
  endfunction

  // dispatch checks for one issued instruction in slot s
  task automatic chk_dispatch(ins_t i, int s, int id);
    case (i.k)
      K_CT, K_GS: chk(btf_v && btf_op == ((i.k == K_CT) ? OP_BTF_CT : OP_BTF_GS) &&
                      btf_a == val(i.rd) && btf_b == val(i.rs1) && btf_z == val(i.rs2) &&
                      int'(btf_ida) == id && int'(btf_idb) == (id + 1) % 8,
                      $sformatf("random: ct/gs dispatch x%0d x%0d x%0d: %h %h %h ids %0d %0d (%0d)",
                                i.rd, i.rs1, i.rs2, btf_a, btf_b, btf_z, btf_ida, btf_idb, id));
      K_MM:       chk(btf_v && btf_op == OP_BTF_MM && btf_b == val(i.rs1) &&
                      btf_z == val(i.rs2) && int'(btf_ida) == id, "random: mm dispatch");
      K_LW, K_SW: chk(lsu_v && lsu_op == ((i.k == K_LW) ? OP_LW : OP_SW) &&
                      lsu_base == val(i.rs1) && lsu_off == 32'(i.imm) && int'(lsu_id) == id &&
                      (i.k == K_LW || lsu_sd == val(i.rs2)), "random: memory dispatch");
      K_ILL:      chk(alu_v[s] && int'(alu_id[s]) == id, "random: no-op dispatch");
      default:    chk(alu_v[s] && int'(alu_id[s]) == id && alu_a[s] == val(i.rs1) &&
                      alu_b[s] == ((i.k == K_ADDI) ? 32'(i.imm) : val(i.rs2)) &&
                      alu_op[s] == ((i.k == K_SUB) ? OP_SUB : (i.k == K_XOR) ? OP_XOR : OP_ADD),
                      "random: ALU dispatch");
    endcase
  endtask

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic setup(logic [31:0] i0, logic [31:0] i1);
    instr = {i1, i0}; valid = 2'b11; hit = '0; rdy = '0; sbd = '0; free = 4'd3;
    ids = {3'd6, 3'd5, 3'd4}; ld_conf = 0; st_commit = 0; alu_block = 0; gs_block = 0;
    #1;
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // 1. btf.ct beside a lw: both issue, three entries, operand a on port 3
    setup(btf_ct(1, 2, 3), lw(4, 8, 5));
    chk(cnt == 2 && alloc_cnt == 3, "ct+lw issue two, allocate three");
    chk(rreg[0] == 2 && rreg[1] == 3 && rreg[2] == 5 && rreg[3] == 1, "ct+lw read ports");
    chk(alloc[0].wr && alloc[0].rd == 1 && alloc[1].wr && alloc[1].rd == 2 &&
        alloc[2].wr && alloc[2].rd == 4 && !alloc[2].is_store, "ct+lw entries a, b, d");
    chk(btf_v && btf_op == OP_BTF_CT && btf_a == rv(1) && btf_b == rv(2) && btf_z == rv(3) &&
        btf_ida == 4 && btf_idb == 5, "ct operands and entries");
    chk(lsu_v && lsu_op == OP_LW && lsu_base == rv(5) && lsu_off == 8 && lsu_id == 6,
        "lw operands and entry");
    chk(alu_v == 0, "no ALU");
    // 2. btf.gs beside an add: only the butterfly issues
    setup(btf_gs(1, 2, 3), add(4, 5, 6));
    chk(cnt == 1 && alloc_cnt == 2 && btf_v && btf_op == OP_BTF_GS && alu_v == 0, "gs+add");
    // 3. a butterfly in slot 1 waits
    setup(add(4, 5, 6), btf_ct(1, 2, 3));
    chk(cnt == 1 && alloc_cnt == 1 && !btf_v && alu_v == 2'b01 && alu_a[0] == rv(5) &&
        alu_b[0] == rv(6) && alu_id[0] == 4, "add then ct in slot 1");
    // 4. scoreboard space
    setup(btf_ct(1, 2, 3), lw(4, 8, 5)); free = 4'd2; #1;
    chk(cnt == 1 && alloc_cnt == 2, "two free entries: butterfly alone");
    free = 4'd1; #1;
    chk(cnt == 0 && alloc_cnt == 0 && !btf_v && !lsu_v, "one free entry: stall");
    // 5. gs held back by a ct result, ct not
    setup(btf_gs(1, 2, 3), lw(4, 8, 5)); gs_block = 1; #1;
    chk(cnt == 0, "gs blocked");
    setup(btf_ct(1, 2, 3), lw(4, 8, 5)); gs_block = 1; #1;
    chk(cnt == 2, "ct not blocked by gs rule");
    // 6. ALU held back while the butterfly unit uses the result buses
    setup(add(4, 5, 6), lw(7, 0, 8)); alu_block = 1; #1;
    chk(cnt == 0, "ALU blocked");
    // 7. one memory instruction per cycle, loads wait for stores
    setup(lw(1, 0, 2), lw(3, 4, 2));
    chk(cnt == 1 && lsu_v && lsu_id == 4, "two loads");
    setup(sw(1, 0, 2), add(3, 4, 5));
    chk(cnt == 2 && lsu_v && lsu_op == OP_SW && lsu_sd == rv(1) && alloc[0].is_store &&
        !alloc[0].wr && alu_v == 2'b10 && alu_id[1] == 5, "store + add");
    setup(lw(1, 12, 2), add(3, 4, 5));
    chk(ld_addr == rv(2) + 12, "load address for the store check");
    ld_conf = 1; #1;
    chk(cnt == 0, "load waits for a conflicting store");
    ld_conf = 0; st_commit = 1; #1;
    chk(cnt == 0, "load waits while a store uses the memory port");
    setup(add(3, 4, 5), lw(1, -4, 6));
    chk(ld_addr == rv(6) - 4 && cnt == 2, "slot 1 load address");
    ld_conf = 1; #1;
    chk(cnt == 1, "slot 1 load waits for a conflicting store");
    // 8. operands from the scoreboard
    setup(add(4, 5, 6), add(7, 8, 9)); hit[1] = 1; rdy[1] = 0; #1;
    chk(cnt == 0, "source not ready");
    rdy[1] = 1; sbd[1] = 32'hCAFE_F00D; #1;
    chk(cnt == 2 && alu_b[0] == 32'hCAFE_F00D && alu_v == 2'b11 && alu_a[1] == rv(8) &&
        alu_b[1] == rv(9) && alu_id[1] == 5, "forwarded operand, dual ALU");
    setup(btf_ct(1, 2, 3), lw(4, 8, 5)); hit[3] = 1; rdy[3] = 0; #1;
    chk(cnt == 0, "butterfly waits for operand a");
    // 9. slot 1 reads what slot 0 writes (including the butterfly's second result)
    setup(add(4, 5, 6), add(7, 4, 9));
    chk(cnt == 1, "RAW between slots");
    setup(btf_ct(1, 2, 3), lw(4, 0, 2));
    chk(cnt == 1, "lw base written by butterfly b");
    // 10. btf.mm is an ordinary R-type instruction
    setup(btf_mm(1, 2, 3), lw(4, 8, 5));
    chk(cnt == 2 && alloc_cnt == 2 && btf_v && btf_op == OP_BTF_MM && btf_b == rv(2) &&
        btf_z == rv(3) && btf_ida == 4 && lsu_id == 5, "mm + lw");
    setup(btf_mm(1, 2, 3), btf_mm(4, 5, 6));
    chk(cnt == 1, "one butterfly unit");
    setup(add(7, 8, 9), btf_mm(1, 2, 3));
    chk(cnt == 2 && btf_v && btf_op == OP_BTF_MM && btf_b == rv(2) && btf_z == rv(3) &&
        btf_ida == 5, "mm in slot 1");
    // 11. single valid instruction
    setup(btf_ct(1, 2, 3), lw(4, 8, 5)); valid = 2'b01; #1;
    chk(cnt == 1, "slot 1 empty");

    // random part
    rnd = 1;
    for (int n = 0; n < 20000; n++) begin
      automatic ins_t i0 = rnd_ins(), i1 = rnd_ins();
      automatic bit ok0, ok1;
      automatic int exp_cnt, exp_alloc, v;
      // a butterfly followed by a load is the pair that matters: draw it often
      if ($urandom_range(0, 3) == 0) begin i0.k = ($urandom_range(0, 1) != 0) ? K_CT : K_GS; i1.k = K_LW; end
      for (int r = 0; r < 32; r++) pend[r] = ($urandom_range(0, 3) == 0) ? int'($urandom_range(1, 2)) : 0;
      instr     = {enc(i1), enc(i0)};
      v         = int'($urandom_range(0, 9));
      valid     = (v == 0) ? 2'b00 : (v == 1) ? 2'b01 : 2'b11;
      free      = 4'($urandom_range(0, 3));
      ids       = {3'($urandom_range(0, 7)), 3'($urandom_range(0, 7)), 3'($urandom_range(0, 7))};
      ids[1]    = ids[0] + 3'd1; ids[2] = ids[0] + 3'd2;
      ld_conf   = ($urandom_range(0, 3) == 0);
      st_commit = ($urandom_range(0, 3) == 0);
      alu_block = ($urandom_range(0, 3) == 0);
      gs_block  = ($urandom_range(0, 3) == 0);
      #1;
      ok0 = valid[0] && unit_ok(i0) && srcs_ready(i0) && entries(i0) <= int'(free);
      ok1 = ok0 && valid[1] && unit_ok(i1) && srcs_ready(i1) &&
            (is_pair(i0) ? i1.k == K_LW : !is_pair(i1)) &&
            !(is_mem(i0) && is_mem(i1)) && !(is_btf(i0) && is_btf(i1)) &&
            !raw(i0, i1) &&
            entries(i0) + entries(i1) <= int'(free);
      exp_cnt   = ok1 ? 2 : (ok0 ? 1 : 0);
      exp_alloc = (ok0 ? entries(i0) : 0) + (ok1 ? entries(i1) : 0);
      chk(int'(cnt) == exp_cnt && int'(alloc_cnt) == exp_alloc,
          $sformatf("random: %s/%s issue %0d (want %0d), entries %0d (want %0d)",
                    i0.k.name(), i1.k.name(), cnt, exp_cnt, alloc_cnt, exp_alloc));
      if (ok0) begin
        chk_dispatch(i0, 0, int'(ids[0]));
        chk(alloc[0].wr == (i0.k != K_SW && i0.k != K_ILL && i0.rd != 0) &&
            (!alloc[0].wr || int'(alloc[0].rd) == i0.rd) && alloc[0].is_store == (i0.k == K_SW),
            "random: slot 0 entry");
        if (is_pair(i0))
          chk(alloc[1].wr == (i0.rs1 != 0) && (!alloc[1].wr || int'(alloc[1].rd) == i0.rs1),
              "random: butterfly second entry");
      end
      if (ok1) chk_dispatch(i1, 1, (int'(ids[0]) + entries(i0)) % 8);
      if (!ok0) chk(!btf_v && !lsu_v && alu_v == 0, "random: nothing dispatched");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
