// valid_bank: the valid bits of every line of every way.
//
// One bit per line, WAYS x 2^INDEX_W bits in flip-flops. Reading is
// combinational so that the valid bits of a set are known in the same cycle
// as the request, before any tag or data sub-array is enabled: the index is
// decoded to one-hot and, for each way, the decoder lines are ANDed with the
// valid bits and ORed together. A fill sets one bit (set_en, set_way,
// set_index) on the clock edge; clr clears all bits synchronously and wins
// over a fill. One bit per line (128 per way) follows the set count of the
// reference design; the synchronous clear is this implementation's choice.
module valid_bank #(
  parameter int unsigned WAYS    = 4,
  parameter int unsigned INDEX_W = 7
) (
  input  logic                    clk,
  input  logic                    clr,
  input  logic                    set_en,
  input  logic [$clog2(WAYS)-1:0] set_way,
  input  logic [INDEX_W-1:0]      set_index,
  input  logic [INDEX_W-1:0]      rd_index,
  output logic [WAYS-1:0]         valid
);
  localparam int unsigned SETS = 1 << INDEX_W;

  logic [SETS-1:0] bits [WAYS];
  logic [SETS-1:0] set_sel;

  index_decoder #(.INDEX_W(INDEX_W)) u_dec (.index(rd_index), .set_sel(set_sel));

  always_ff @(posedge clk) begin
    if (clr) begin
      for (int w = 0; w < WAYS; w++) bits[w] <= '0;
    end else if (set_en) begin
      bits[set_way][set_index] <= 1'b1;
    end
  end

  always_comb begin
    for (int w = 0; w < WAYS; w++) valid[w] = |(bits[w] & set_sel);
  end
endmodule
