// montgomery_reduce: combinational signed Montgomery reduction modulo q = 8380417.
//
// For a signed 64-bit input x it returns r = (x - t*q) / 2^32 with t = (int32)(x * QINV),
// so that r is congruent to x * 2^-32 (mod q) and lies in (-q, q) for |x| < q * 2^31.
// This is a hardware transcription of the reduction used by the ML-DSA reference
// software; the constant multiplications are left to synthesis, which turns the
// sparse constant q = 2^23 - 2^13 + 1 into shifts and adds. Purely combinational.
module montgomery_reduce
  import btf_pkg::*;
(
  input  logic signed [63:0] x_i,
  output logic signed [31:0] r_o
);
  logic signed [31:0] t;
  logic signed [63:0] tq;
  logic signed [63:0] diff;

  always_comb begin
    t    = signed'(x_i[31:0] * QINV);   // low 32 bits of x * q^-1
    // t * q with q = 2^23 - 2^13 + 1
    tq   = (64'(t) <<< 23) - (64'(t) <<< 13) + 64'(t);
    diff = x_i - tq;                    // low 32 bits are zero by construction
    r_o  = diff[63:32];
  end
endmodule
