// scratchpad: word-addressed data scratchpad memory with two ports.
//
// Port A belongs to the core (loads from the LSU, stores from the commit stage); port B
// lets a host fill and read the memory. Each port performs one read or one write per
// cycle; read data appears on the port's rdata the cycle after the request (synchronous
// read). Addresses are byte addresses; bits [1:0] are ignored. Writing the same word from
// both ports in one cycle leaves port A's value. The core reaches its scratchpads through
// the bus of the base core; that bus protocol is reduced here to this simple request
// interface. DEPTH_WORDS (2048 words, 8 KiB) is this design's choice.
module scratchpad #(
  parameter int unsigned DEPTH_WORDS = 2048
) (
  input  logic        clk_i,
  input  logic        a_req_i,
  input  logic        a_we_i,
  input  logic [31:0] a_addr_i,
  input  logic [31:0] a_wdata_i,
  output logic [31:0] a_rdata_o,
  input  logic        b_req_i,
  input  logic        b_we_i,
  input  logic [31:0] b_addr_i,
  input  logic [31:0] b_wdata_i,
  output logic [31:0] b_rdata_o
);
  localparam int unsigned AW = $clog2(DEPTH_WORDS);

  logic [31:0] mem [DEPTH_WORDS];
  logic [AW-1:0] a_idx, b_idx;

  assign a_idx = a_addr_i[AW+1:2];
  assign b_idx = b_addr_i[AW+1:2];

  always_ff @(posedge clk_i) begin
    if (b_req_i && b_we_i) mem[b_idx] <= b_wdata_i;
    if (a_req_i && a_we_i) mem[a_idx] <= a_wdata_i;
  end

  always_ff @(posedge clk_i) begin
    if (a_req_i && !a_we_i) a_rdata_o <= mem[a_idx];
    if (b_req_i && !b_we_i) b_rdata_o <= mem[b_idx];
  end
endmodule
