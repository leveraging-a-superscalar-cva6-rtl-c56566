// tb_btf_backend: end-to-end test of the back end at its default size.
//
// It runs the ML-DSA polynomial multiplication flow on two random 256-coefficient
// polynomials A and B held in the data scratchpad:
//   NTT(A), NTT(B) with btf.ct;  C = A o B pointwise with btf.mm;  NTT^-1(C) with btf.gs,
//   followed by the scaling by f = 2^64/256 mod q with btf.mm.
// Programs are generated here as straight-line code: both transforms use a radix-16
// ("4+4") schedule in which butterflies issue together with the coefficient and
// twiddle-factor loads (see the generators below). The schedule and the memory map are this testbench's own.
// Checks, all against 64-bit integer arithmetic done in this testbench:
//   * after every program the whole memory image equals that of an instruction-by-
//     instruction reference execution of the same program;
//   * after the NTT, every coefficient of A is congruent mod q to A(zeta^(2 brv8(i)+1));
//   * the final result is congruent to the negacyclic product A*B mod (X^256 + 1) and
//     lies in (-q, q);
//   * a short mixed sequence (ct, gs, add, xor, sub) gives exact results.
// It also counts how often each pipeline mechanism happened and fails any that never
// did, and prints the cycle count of each kernel.
module tb_btf_backend;
  import tb_util_pkg::*;

  localparam int N = 256;
  // byte addresses in the scratchpad
  localparam int A_BASE    = 0;      // poly A, reached through x0
  localparam int ZETA_BASE = 1024;   // zetas[k], through x0
  localparam int B_BASE    = 2048;   // poly B, through x31
  localparam int NZ_BASE   = 3072;   // -zetas[k], through x30
  localparam int MISC_BASE = 4096;   // constants and scratch, through x29
  localparam int F_INV     = 41978;  // 2^64 / 256 mod q

  logic             clk = 0, rst_n = 0;
  logic [1:0][31:0] instr;
  logic [1:0]       instr_valid;
  logic [1:0]       issue_cnt;
  logic             host_req = 0, host_we = 0;
  logic [31:0]      host_addr = 0, host_wdata = 0, host_rdata;
  logic             idle;

  int checks = 0, failures = 0;
  longint cycle = 0;

  btf_backend dut (
    .clk_i(clk), .rst_ni(rst_n), .instr_i(instr), .instr_valid_i(instr_valid),
    .issue_cnt_o(issue_cnt), .host_req_i(host_req), .host_we_i(host_we),
    .host_addr_i(host_addr), .host_wdata_i(host_wdata), .host_rdata_o(host_rdata),
    .idle_o(idle)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- instruction source ----------------
  logic [31:0] prog[$];
  int          pc = 0;
  always_comb begin
    instr[0]       = (pc < prog.size())     ? prog[pc]     : 32'h0000_0013;
    instr[1]       = (pc + 1 < prog.size()) ? prog[pc + 1] : 32'h0000_0013;
    instr_valid[0] = pc < prog.size();
    instr_valid[1] = pc + 1 < prog.size();
  end
  always @(posedge clk) if (rst_n) pc <= pc + int'(issue_cnt);

  // ---------------- instruction-level reference ----------------
  // Executes each program one instruction at a time on a copy of the registers and of
  // the memory; after every run the whole memory image is compared with the scratchpad.
  int ref_reg[32];
  int ref_mem[int];

  function automatic void ref_exec(logic [31:0] ins);
    int a, b, z, na, nb, imm;
    logic [4:0] rd, rs1, rs2;
    rd = ins[11:7]; rs1 = ins[19:15]; rs2 = ins[24:20];
    a = ref_reg[rd]; b = ref_reg[rs1]; z = ref_reg[rs2];
    case (ins[6:0])
      7'b1110111:
        case (ins[14:12])
          3'b100: begin
            na = a + mont_exact(longint'(b) * z); nb = a - mont_exact(longint'(b) * z);
            ref_reg[rs1] = nb; ref_reg[rd] = na;
          end
          3'b101: begin
            na = a + b; nb = mont_exact(longint'(int'(a - b)) * z);
            ref_reg[rs1] = nb; ref_reg[rd] = na;
          end
          default: ref_reg[rd] = mont_exact(longint'(b) * z);
        endcase
      7'b0000011: begin
        imm = int'({{20{ins[31]}}, ins[31:20]});
        ref_reg[rd] = ref_mem.exists(b + imm) ? ref_mem[b + imm] : 0;
      end
      7'b0100011: begin
        imm = int'({{20{ins[31]}}, ins[31:25], ins[11:7]});
        ref_mem[b + imm] = z;
      end
      7'b0010011: ref_reg[rd] = b + int'({{20{ins[31]}}, ins[31:20]});
      default:
        if (ins[14:12] == 3'b100) ref_reg[rd] = b ^ z;
        else ref_reg[rd] = ins[30] ? b - z : b + z;
    endcase
    ref_reg[0] = 0;
  endfunction

  task automatic run(string name, output longint cycles);
    longint t0;
    int v, bad;
    foreach (prog[i]) ref_exec(prog[i]);
    pc = 0;
    t0 = cycle;
    @(posedge clk);
    while (pc < prog.size() || !idle) @(posedge clk);
    cycles = cycle - t0;
    $display("%s: %0d instructions, %0d cycles", name, prog.size(), cycles);
    bad = 0;
    foreach (ref_mem[ad]) begin
      mem_read(ad, v);
      checks++;
      if (v != ref_mem[ad]) begin
        failures++; bad++;
        if (bad <= 4) $display("FAIL %s: memory word %0d = %0d, reference %0d", name, ad, v, ref_mem[ad]);
      end
    end
    prog.delete();
    pc = 0;
  endtask

  // ---------------- host access ----------------
  task automatic mem_write(int addr, int data);
    ref_mem[addr] = data;
    @(negedge clk);
    host_req = 1; host_we = 1; host_addr = addr; host_wdata = data;
    @(negedge clk);
    host_req = 0; host_we = 0;
  endtask
  task automatic mem_read(int addr, output int data);
    @(negedge clk);
    host_req = 1; host_we = 0; host_addr = addr;
    @(negedge clk);
    host_req = 0;
    data = host_rdata;
  endtask

  // ---------------- program generators ----------------
  // Both transforms use a radix-16 ("4+4") schedule: each block of 16 coefficients is
  // loaded into x1..x16, four butterfly layers are applied in registers, and the block is
  // stored back. Pass 0 of the forward NTT works on the strided sets {b + 16 i} (layers
  // with len = 128..16), pass 1 on the runs {16 b + i} (len = 8..1). A block needs 15
  // distinct twiddle factors; coefficient and twiddle loads issue beside butterflies. Twiddle index for a butterfly on (j, j + len):
  //   forward  k = 128/len + j/(2 len)            (zetas[k])
  //   inverse  k = 2 (128/len) - 1 - j/(2 len)    (-zetas[k])
  // which is the order of the ML-DSA reference code.
  task automatic gen_block(bit inverse, int pass, int blk, int base_reg, int zeta_reg,
                           int zeta_base);
    int idx[16], ra[$], rb[$], kk[$], zreg[$], need[$];
    int ldr[$], ldo[$], ldb[$], ldok[$], last_use[32];
    bit have[16];
    int lens[4], li, zr;
    zr = 16;
    for (int i = 0; i < 16; i++) have[i] = 0;
    for (int i = 0; i < 32; i++) last_use[i] = -1;
    for (int i = 0; i < 16; i++) idx[i] = (pass == (inverse ? 1 : 0)) ? blk + 16 * i : 16 * blk + i;
    for (int l = 0; l < 4; l++)
      lens[l] = inverse ? ((pass == 0) ? (1 << l) : (16 << l)) : ((pass == 0) ? (128 >> l) : (8 >> l));
    for (int l = 0; l < 4; l++)
      for (int i = 0; i < 16; i++)
        if ((idx[i] & lens[l]) == 0)
          for (int m = 0; m < 16; m++)
            if (idx[m] == idx[i] + lens[l]) begin
              ra.push_back(1 + i); rb.push_back(1 + m);
              if (inverse) kk.push_back(2 * (128 / lens[l]) - 1 - idx[i] / (2 * lens[l]));
              else         kk.push_back(128 / lens[l] + idx[i] / (2 * lens[l]));
            end
    // Loads in the order the butterflies need them: coefficients on first use, each
    // distinct twiddle once (x17..x24 rotate). Each butterfly is emitted as soon as its
    // loads are (one load of lead), and is followed by the next load, so that the two
    // issue together. A twiddle load is held back until every butterfly that reads the
    // register's previous value has been emitted (ldok = the last such butterfly).
    ldr.delete(); ldo.delete(); ldb.delete(); ldok.delete();
    for (int b = 0; b < ra.size(); b++) begin
      if (!have[ra[b] - 1]) begin
        have[ra[b] - 1] = 1; ldr.push_back(ra[b]); ldo.push_back(4 * idx[ra[b] - 1]); ldb.push_back(base_reg);
        ldok.push_back(-1);
      end
      if (!have[rb[b] - 1]) begin
        have[rb[b] - 1] = 1; ldr.push_back(rb[b]); ldo.push_back(4 * idx[rb[b] - 1]); ldb.push_back(base_reg);
        ldok.push_back(-1);
      end
      if (b == 0 || kk[b] != kk[b - 1]) begin
        zr = 17 + (zr - 16) % 8;
        ldr.push_back(zr); ldo.push_back(zeta_base + 4 * kk[b]); ldb.push_back(zeta_reg);
        ldok.push_back(last_use[zr]);
      end
      zreg.push_back(zr);
      last_use[zr] = b;
      need.push_back(ldr.size() - 1);
    end
    li = 0;
    for (int b = 0; b < ra.size(); b++) begin
      while (li < ldr.size() && (li <= need[b] || (li == need[b] + 1 && ldok[li] < b))) begin
        prog.push_back(lw(ldr[li], ldo[li], ldb[li])); li++;
      end
      prog.push_back(inverse ? btf_gs(ra[b], rb[b], zreg[b]) : btf_ct(ra[b], rb[b], zreg[b]));
      if (li < ldr.size() && ldok[li] <= b) begin prog.push_back(lw(ldr[li], ldo[li], ldb[li])); li++; end
    end
    // stores; with the inverse scaling each btf.mm issues beside the store of an
    // earlier coefficient
    if (inverse && pass == 1) begin
      for (int i = 0; i < 18; i++) begin
        if (i < 16) prog.push_back(btf_mm(1 + i, 1 + i, 25));
        if (i >= 2) prog.push_back(sw(i - 1, 4 * idx[i - 2], base_reg));
      end
    end else
      for (int i = 0; i < 16; i++) prog.push_back(sw(1 + i, 4 * idx[i], base_reg));
  endtask

  task automatic gen_ntt(int base_reg);
    for (int pass = 0; pass < 2; pass++)
      for (int blk = 0; blk < 16; blk++) gen_block(1'b0, pass, blk, base_reg, 0, ZETA_BASE);
  endtask

  // Inverse NTT of A with btf.gs; the scaling by F_INV (btf.mm) is merged into pass 1.
  task automatic gen_intt();
    prog.push_back(lw(25, 0, 29));
    for (int pass = 0; pass < 2; pass++)
      for (int blk = 0; blk < 16; blk++) gen_block(1'b1, pass, blk, 0, 30, 0);
  endtask

  // Pointwise product A = mont(A * B), four coefficients per batch, two register banks:
  // the loads of one batch are interleaved with the products of the previous one.
  task automatic gen_pointwise();
    for (int g = 0; g <= N / 4; g++) begin
      int cur = 8 * (g % 2), prv = 8 * ((g + 1) % 2);
      for (int i = 0; i < 4; i++) begin
        if (g < N / 4) prog.push_back(lw(1 + cur + i, A_BASE + 4 * (4 * g + i), 0));
        if (g > 0) prog.push_back(btf_mm(1 + prv + i, 1 + prv + i, 5 + prv + i));
      end
      if (g < N / 4)
        for (int i = 0; i < 4; i++) prog.push_back(lw(5 + cur + i, 4 * (4 * g + i), 31));
      if (g > 0)
        for (int i = 0; i < 4; i++) prog.push_back(sw(1 + prv + i, A_BASE + 4 * (4 * (g - 1) + i), 0));
    end
  endtask

  // ---------------- mechanism counters ----------------
  int n_pair, n_slot1_wait, n_triple, n_full, n_credit, n_fwd, n_gs_early, n_gs_block,
      n_alu_block, n_ld_wait, n_dual_other;
  always @(posedge clk) if (rst_n) begin
    if (dut.btf_valid && dut.lsu_valid && dut.alloc_cnt == 2'd3) n_pair++;
    if (instr_valid[1] && dut.dec[1].fu == btf_pkg::FU_BTF && dut.dec[1].op != btf_pkg::OP_BTF_MM
        && issue_cnt == 2'd1) n_slot1_wait++;
    if (dut.commit_cnt == 2'd3) n_triple++;
    if (instr_valid[0] && issue_cnt == 0 && 4'(dut.u_issue.n0) > dut.sb_free) n_full++;
    if (int'(dut.alloc_cnt) > 8 - int'(dut.u_scoreboard.count_q)) n_credit++;
    if (issue_cnt != 0 && |(dut.sb_hit & dut.sb_ready & dut.u_issue.need)) n_fwd++;
    if (dut.btf_wb_a.valid && dut.btf_valid && dut.btf_op == btf_pkg::OP_BTF_GS) n_gs_early++;
    if (instr_valid[0] && dut.dec[0].op == btf_pkg::OP_BTF_GS && dut.btf_gs_block) n_gs_block++;
    if (instr_valid[0] && dut.dec[0].fu == btf_pkg::FU_ALU && dut.btf_busy) n_alu_block++;
    if (instr_valid[0] && dut.dec[0].op == btf_pkg::OP_LW && dut.ld_conflict && issue_cnt == 0)
      n_ld_wait++;
    if (issue_cnt == 2'd2 && !dut.btf_valid) n_dual_other++;
  end

  task automatic need(string what, int n);
    checks++;
    $display("mechanism %-40s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end
  endtask

  // reference Montgomery reduction of the ML-DSA reference code (64-bit integers)
  function automatic int mont_exact(longint x);
    int t = int'(x * 58728449);
    return int'((x - longint'(t) * Q) >>> 32);
  endfunction

  int a_in[N], b_in[N], got[N];
  longint t_ntt, t_ntt_b, t_pw, t_intt, t_mix;

  initial begin
    int v;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---- fill the scratchpad ----
    for (int i = 0; i < N; i++) begin
      a_in[i] = int'($urandom_range(0, 32'(Q - 1)));
      b_in[i] = int'($urandom_range(0, 32'(Q - 1)));
      mem_write(A_BASE + 4 * i, a_in[i]);
      mem_write(B_BASE + 4 * i, b_in[i]);
      mem_write(ZETA_BASE + 4 * i, zeta_mont(i));
      mem_write(NZ_BASE + 4 * i, -zeta_mont(i));
    end
    mem_write(MISC_BASE, F_INV);
    for (int i = 1; i <= 6; i++) mem_write(MISC_BASE + 4 * i, int'($urandom_range(0, 32'(Q - 1))));

    // ---- base registers and a mixed sequence ----
    prog.push_back(addi(31, 0, 2047));
    prog.push_back(addi(31, 31, 1));
    prog.push_back(addi(30, 31, 1024));
    prog.push_back(addi(29, 30, 1024));
    for (int i = 0; i < 6; i++) prog.push_back(lw(20 + i, 4 + 4 * i, 29));
    prog.push_back(btf_ct(20, 21, 22));
    prog.push_back(btf_gs(23, 24, 25));
    prog.push_back(add(26, 20, 23));
    prog.push_back(xor_(27, 21, 24));
    prog.push_back(sub(28, 26, 27));
    for (int i = 0; i < 9; i++) prog.push_back(sw(20 + i, 32 + 4 * i, 29));
    // burst of independent butterflies, each beside a load: 3 entries per cycle
    for (int i = 0; i < 6; i++) begin
      prog.push_back(btf_ct(1 + i, 7 + i, 22));
      prog.push_back(lw(13 + i, 4, 29));
    end
    for (int i = 0; i < 6; i++) begin
      prog.push_back(btf_ct(1 + i, 7 + i, 22));
      prog.push_back(lw(13 + i, 4, 29));
    end
    run("mixed", t_mix);
    begin
      int m[6], e[9], t;
      for (int i = 0; i < 6; i++) mem_read(MISC_BASE + 4 + 4 * i, m[i]);
      t    = mont_exact(longint'(m[1]) * m[2]);
      e[0] = m[0] + t;  e[1] = m[0] - t;  e[2] = m[2];
      e[3] = m[3] + m[4];
      e[4] = mont_exact(longint'(int'(m[3] - m[4])) * m[5]);
      e[5] = m[5];
      e[6] = e[0] + e[3];
      e[7] = e[1] ^ e[4];
      e[8] = e[6] - e[7];
      for (int i = 0; i < 9; i++) begin
        mem_read(MISC_BASE + 32 + 4 * i, v);
        checks++;
        if (v != e[i]) begin
          failures++;
          $display("FAIL mixed x%0d = %0d, expected %0d", 20 + i, v, e[i]);
        end
      end
    end

    // ---- NTT(A), checked against direct evaluation ----
    gen_ntt(0);
    run("NTT A (btf.ct)", t_ntt);
    for (int i = 0; i < N; i++) begin
      longint root, acc, p;
      root = powq(1753, 2 * longint'(brv8(i)) + 1);
      acc  = 0;
      p    = 1;
      mem_read(A_BASE + 4 * i, v);
      for (int j = 0; j < N; j++) begin
        acc = modq(acc + modq(longint'(a_in[j])) * p);
        p = modq(p * root);
      end
      checks++;
      if (modq(longint'(v)) != acc) begin
        failures++;
        if (failures < 10) $display("FAIL NTT coeff %0d = %0d, expected %0d mod q", i, v, acc);
      end
    end

    // ---- NTT(B), pointwise product, inverse NTT ----
    gen_ntt(31);
    run("NTT B (btf.ct)", t_ntt_b);
    gen_pointwise();
    run("pointwise (btf.mm)", t_pw);
    gen_intt();
    run("NTT^-1 (btf.gs) + scaling", t_intt);

    for (int i = 0; i < N; i++) begin
      longint acc, pr;
      acc = 0;
      for (int j = 0; j < N; j++) begin
        pr = modq(longint'(a_in[j]) * b_in[(i - j + N) % N]);
        if (j <= i) acc = modq(acc + pr); else acc = modq(acc - pr);
      end
      mem_read(A_BASE + 4 * i, v);
      checks++;
      if (modq(longint'(v)) != acc || longint'(v) <= -Q || longint'(v) >= Q) begin
        failures++;
        if (failures < 10) $display("FAIL product coeff %0d = %0d, expected %0d mod q", i, v, acc);
      end
    end

    // ---- mechanisms ----
    need("btf.ct/gs issued with a lw (3 entries)", n_pair);
    need("btf.ct/gs waiting in slot 1", n_slot1_wait);
    need("triple commit", n_triple);
    // With committing entries counted as free, this program never fills the scoreboard;
    // the stall itself is exercised by the scoreboard and issue-stage testbenches.
    $display("mechanism %-40s %0d (reported only)", "scoreboard full stall", n_full);
    need("entries freed by commit reused same cycle", n_credit);
    need("operand forwarded from scoreboard", n_fwd);
    need("btf.gs additive result in issue cycle", n_gs_early);
    need("btf.gs held back by btf.ct result", n_gs_block);
    need("ALU held back by butterfly stage 2", n_alu_block);
    need("lw held back by a pending store", n_ld_wait);
    need("dual issue without butterfly", n_dual_other);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
