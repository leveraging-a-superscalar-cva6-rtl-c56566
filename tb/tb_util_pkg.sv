// tb_util_pkg: reference arithmetic and instruction encoders shared by the testbenches.
//
// The arithmetic is computed with 64-bit integers, independently of the RTL:
//   modq(x)        x mod q in [0, q)
//   rinv           2^-32 mod q, from Fermat's little theorem (q is prime)
//   mont_ok(r, x)  r is congruent to x * 2^-32 mod q and lies in (-q, q)
//   zeta_mont(k)   the k-th twiddle factor of the ML-DSA NTT, 1753^brv8(k) * 2^32 mod q,
//                  centred into (-q/2, q/2]
// Encoders build RV32I and butterfly-extension instruction words.
package tb_util_pkg;
  localparam longint Q = 8380417;

  function automatic longint modq(longint x);
    longint r = x % Q;
    return (r < 0) ? r + Q : r;
  endfunction

  function automatic longint powq(longint b, longint e);
    longint r = 1;
    b = modq(b);
    while (e > 0) begin
      if (e[0]) r = modq(r * b);
      b = modq(b * b);
      e = e >> 1;
    end
    return r;
  endfunction

  function automatic longint rinv();
    return powq(powq(2, 32), Q - 2);
  endfunction

  function automatic bit mont_ok(int r, longint x);
    longint lr = longint'(r);
    if (lr <= -Q || lr >= Q) return 1'b0;
    return modq(lr) == modq(modq(x) * rinv());
  endfunction

  function automatic int brv8(int k);
    int r = 0;
    for (int i = 0; i < 8; i++) r |= ((k >> i) & 1) << (7 - i);
    return r;
  endfunction

  function automatic int centre(longint x);
    longint r = modq(x);
    return int'((r > Q / 2) ? r - Q : r);
  endfunction

  function automatic int zeta_mont(int k);
    return centre(powq(1753, longint'(brv8(k))) * powq(2, 32));
  endfunction

  // ---------------- instruction encoders ----------------
  function automatic logic [31:0] enc_r(logic [6:0] f7, logic [4:0] rs2, logic [4:0] rs1,
                                        logic [2:0] f3, logic [4:0] rd, logic [6:0] opc);
    return {f7, rs2, rs1, f3, rd, opc};
  endfunction
  function automatic logic [31:0] btf_ct(int a, int b, int z);
    return enc_r(7'b0, 5'(z), 5'(b), 3'b100, 5'(a), 7'b1110111);
  endfunction
  function automatic logic [31:0] btf_gs(int a, int b, int z);
    return enc_r(7'b0, 5'(z), 5'(b), 3'b101, 5'(a), 7'b1110111);
  endfunction
  function automatic logic [31:0] btf_mm(int d, int a, int b);
    return enc_r(7'b0, 5'(b), 5'(a), 3'b011, 5'(d), 7'b1110111);
  endfunction
  function automatic logic [31:0] lw(int rd, int off, int rs1);
    logic [11:0] i = 12'(off);
    return {i, 5'(rs1), 3'b010, 5'(rd), 7'b0000011};
  endfunction
  function automatic logic [31:0] sw(int rs2, int off, int rs1);
    logic [11:0] i = 12'(off);
    return {i[11:5], 5'(rs2), 5'(rs1), 3'b010, i[4:0], 7'b0100011};
  endfunction
  function automatic logic [31:0] addi(int rd, int rs1, int imm);
    logic [11:0] i = 12'(imm);
    return {i, 5'(rs1), 3'b000, 5'(rd), 7'b0010011};
  endfunction
  function automatic logic [31:0] add(int rd, int rs1, int rs2);
    return enc_r(7'b0, 5'(rs2), 5'(rs1), 3'b000, 5'(rd), 7'b0110011);
  endfunction
  function automatic logic [31:0] sub(int rd, int rs1, int rs2);
    return enc_r(7'b0100000, 5'(rs2), 5'(rs1), 3'b000, 5'(rd), 7'b0110011);
  endfunction
  function automatic logic [31:0] xor_(int rd, int rs1, int rs2);
    return enc_r(7'b0, 5'(rs2), 5'(rs1), 3'b100, 5'(rd), 7'b0110011);
  endfunction
endpackage
