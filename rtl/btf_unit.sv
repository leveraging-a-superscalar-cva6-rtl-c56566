// btf_unit: execute-stage functional unit for the butterfly instructions.
//
// One unit serves btf.ct (Cooley-Tukey), btf.gs (Gentleman-Sande) and btf.mm (Montgomery
// multiplication). Structure, following the modified execute stage of the extension:
//   mux 1 picks the multiplier operand: b (ct, mm) or a - b (gs, from the added subtractor);
//   the multiplier gives the full signed 64-bit product of that operand and z;
//   a pipeline register cuts the path between the multiplier and the reduction;
//   the Montgomery reduction (mod q) follows the register;
//   mux 2 feeds the adder with the reduced product (ct) or with b (gs);
//   the subtractor after the reduction gives a - zeta*b (ct).
// Results leave on the two result buses of the ALUs:
//   bus A (mux 4, the ALU2 bus) carries a'  : ct a + mont(b*z), gs a + b;
//   bus B (mux 3, the ALU bus)  carries b'  : ct a - mont(b*z), gs mont((a-b)*z),
//                                 or the btf.mm result mont(b*z).
// Timing: ct and mm results appear one cycle after issue (two-cycle instruction);
// the gs additive result appears in the issue cycle, its multiplicative result one cycle
// later. A gs must not be issued while a ct is in the second stage, since both would drive
// bus A in the same cycle (gs_block_o is high). While the second stage is busy the ALUs may not
// use the result buses (stage2_busy_o). The additions are plain 32-bit two's-complement
// operations and the reduction returns values in (-q, q), as in the ML-DSA reference code;
// results are therefore congruent mod q to the butterfly equations, with the Montgomery
// factor 2^-32 on every product. Keeping a in the second stage for ct, the single shared
// adder and the bus-conflict rule are this design's choices.
module btf_unit
  import btf_pkg::*;
(
  input  logic               clk_i,
  input  logic               rst_ni,
  input  logic               valid_i,
  input  op_t                op_i,      // OP_BTF_CT, OP_BTF_GS or OP_BTF_MM
  input  logic [31:0]        a_i,       // a   (rd read as source, data[1].rs2)
  input  logic [31:0]        b_i,       // b   (rs1, data[0].rs1)
  input  logic [31:0]        z_i,       // zeta(rs2, data[0].rs2)
  input  logic [SB_ID_W-1:0] id_a_i,    // entry receiving a' (or the mm result)
  input  logic [SB_ID_W-1:0] id_b_i,    // entry receiving b'
  output logic               gs_block_o,   // a btf.gs may not be issued this cycle
  output logic               stage2_busy_o,
  output wb_t                wb_a_o,    // bus A (mux 4)
  output wb_t                wb_b_o     // bus B (mux 3)
);
  // ---------------- stage 1: operand selection and multiplication ----------------
  logic [31:0]        sub_in;      // a - b, the subtractor ahead of the multiplier
  logic [31:0]        mul_op;      // mux 1
  logic signed [63:0] product;

  // ---------------- stage 2 registers ----------------
  logic               s2_valid_q;
  op_t                s2_op_q;
  logic signed [63:0] s2_prod_q;
  logic [31:0]        s2_a_q;
  logic [SB_ID_W-1:0] s2_id_a_q, s2_id_b_q;

  logic signed [31:0] red;
  logic [31:0]        add_x, add_y, add_res;
  logic [31:0]        sub_res;

  always_comb begin
    sub_in  = a_i - b_i;
    mul_op  = (op_i == OP_BTF_GS) ? sub_in : b_i;
    product = $signed(mul_op) * $signed(z_i);
  end

  assign gs_block_o    = s2_valid_q && (s2_op_q == OP_BTF_CT);
  assign stage2_busy_o = s2_valid_q;

  wire accept = valid_i;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      s2_valid_q <= 1'b0;
      s2_op_q    <= OP_BTF_MM;
      s2_prod_q  <= '0;
      s2_a_q     <= '0;
      s2_id_a_q  <= '0;
      s2_id_b_q  <= '0;
    end else begin
      s2_valid_q <= accept;
      if (accept) begin
        s2_op_q   <= op_i;
        s2_prod_q <= product;
        s2_a_q    <= a_i;
        s2_id_a_q <= id_a_i;
        s2_id_b_q <= id_b_i;
      end
    end
  end

  // ---------------- stage 2: reduction, add / subtract ----------------
  montgomery_reduce u_reduce (.x_i(s2_prod_q), .r_o(red));

  always_comb begin
    // mux 2 and the shared adder: ct uses the reduced product, gs uses b in stage 1
    if (s2_valid_q && s2_op_q == OP_BTF_CT) begin
      add_x = s2_a_q;
      add_y = red;
    end else begin
      add_x = a_i;
      add_y = b_i;
    end
    add_res = add_x + add_y;
    sub_res = s2_a_q - red;

    // mux 4: bus A
    wb_a_o = '0;
    if (s2_valid_q && s2_op_q == OP_BTF_CT) begin
      wb_a_o = '{valid: 1'b1, id: s2_id_a_q, data: add_res};
    end else if (accept && op_i == OP_BTF_GS) begin
      wb_a_o = '{valid: 1'b1, id: id_a_i, data: add_res};
    end

    // mux 3: bus B
    wb_b_o = '0;
    if (s2_valid_q) begin
      unique case (s2_op_q)
        OP_BTF_CT: wb_b_o = '{valid: 1'b1, id: s2_id_b_q, data: sub_res};
        OP_BTF_GS: wb_b_o = '{valid: 1'b1, id: s2_id_b_q, data: red};
        default:   wb_b_o = '{valid: 1'b1, id: s2_id_a_q, data: red};
      endcase
    end
  end

  // btf.ct/gs/mm are the only operations this unit accepts
  assert property (@(posedge clk_i) disable iff (!rst_ni)
    valid_i |-> (op_i inside {OP_BTF_CT, OP_BTF_GS, OP_BTF_MM}));
  // bus A is taken by a Cooley-Tukey result in the cycle after its issue
  assert property (@(posedge clk_i) disable iff (!rst_ni)
    valid_i && op_i == OP_BTF_GS |-> !gs_block_o) else $error("btf_unit: gs issued into a bus conflict");
endmodule
