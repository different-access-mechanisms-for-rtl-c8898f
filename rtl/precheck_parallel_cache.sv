// precheck_parallel_cache: four-way set-associative cache with parallel
// access and valid-bit pre-check.
//
// A lookup reads all ways at once, as a conventional parallel cache does,
// except that a way whose valid bit for the addressed set is 0 is not
// activated at all: neither its tag nor its data sub-array is enabled. The
// valid bits live in flip-flops (valid_bank) and are read combinationally
// from the request address, so the decision is made in the request cycle.
// Depending on how many lines of the set are valid, the cache therefore
// behaves as a 0-, 1-, 2-, 3- or 4-way parallel cache on each access, and
// the result still arrives in one cycle.
//
// Interface and timing:
//   en && read       start a lookup of CPU_address (tag | index | offset).
//                    On the next rising edge the enabled sub-arrays are read
//                    into their buffers; right after that edge done pulses
//                    for one cycle and tag_hit/out show the result. They hold
//                    until the next lookup or clr. busy is always 0.
//   en && fill && !read
//                    write fill_line and the tag of CPU_address into way
//                    fill_way of the addressed set, and set its valid bit.
//   clr              synchronous: clears all valid bits and the result.
//   tag_ce, data_ce  the sub-arrays activated in the current cycle.
// The out/tag_hit port names, the 32-bit address and the one-cycle access
// follow the reference design; the fill port, done/busy, the activation
// outputs and the clr behaviour are this implementation's additions, since
// the reference leaves loading and control unspecified. A miss returns 0.
module precheck_parallel_cache #(
  parameter int unsigned ADDR_W   = cache_pkg::ADDR_W,
  parameter int unsigned TAG_W    = cache_pkg::TAG_W,
  parameter int unsigned INDEX_W  = cache_pkg::INDEX_W,
  parameter int unsigned OFFSET_W = cache_pkg::OFFSET_W,
  parameter int unsigned WAYS     = cache_pkg::WAYS,
  parameter int unsigned WORD_W   = cache_pkg::WORD_W,
  parameter int unsigned LINE_W   = cache_pkg::LINE_W
) (
  input  logic                    clk,
  input  logic                    clr,
  input  logic                    en,
  input  logic                    read,
  input  logic [ADDR_W-1:0]       CPU_address,
  input  logic                    fill,
  input  logic [$clog2(WAYS)-1:0] fill_way,
  input  logic [LINE_W-1:0]       fill_line,
  output logic [WORD_W-1:0]       out,
  output logic                    tag_hit,
  output logic                    done,
  output logic                    busy,
  output logic [WAYS-1:0]         tag_ce,
  output logic [WAYS-1:0]         data_ce
);
  // Address fields.
  logic [TAG_W-1:0]    a_tag;
  logic [INDEX_W-1:0]  a_index;
  logic [OFFSET_W-1:0] a_offset;
  assign a_tag    = CPU_address[ADDR_W-1 -: TAG_W];
  assign a_index  = CPU_address[OFFSET_W +: INDEX_W];
  assign a_offset = CPU_address[OFFSET_W-1:0];

  logic req, fill_go;
  assign busy    = 1'b0;
  assign req     = en && read && !clr;
  assign fill_go = en && fill && !read && !clr;

  // Valid-bit pre-check: valid bits of the addressed set, this cycle.
  logic [WAYS-1:0] valid_now;
  valid_bank #(.WAYS(WAYS), .INDEX_W(INDEX_W)) u_valid (
    .clk, .clr,
    .set_en(fill_go), .set_way(fill_way), .set_index(a_index),
    .rd_index(a_index), .valid(valid_now)
  );

  // Sub-array enables: only valid ways take part in a lookup.
  always_comb begin
    for (int w = 0; w < WAYS; w++) begin
      tag_ce[w]  = (req && valid_now[w]) || (fill_go && int'(fill_way) == w);
      data_ce[w] = tag_ce[w];
    end
  end

  logic [TAG_W-1:0]  tag_rd  [WAYS];
  logic [LINE_W-1:0] data_rd [WAYS];
  for (genvar w = 0; w < WAYS; w++) begin : g_way
    sram_subarray #(.DEPTH(1 << INDEX_W), .WIDTH(TAG_W)) u_tag (
      .clk, .ce(tag_ce[w]), .we(fill_go), .addr(a_index),
      .wdata(a_tag), .rdata(tag_rd[w])
    );
    sram_subarray #(.DEPTH(1 << INDEX_W), .WIDTH(LINE_W)) u_data (
      .clk, .ce(data_ce[w]), .we(fill_go), .addr(a_index),
      .wdata(fill_line), .rdata(data_rd[w])
    );
  end

  // Request registers: which ways were read, and the tag/offset asked for.
  logic [WAYS-1:0]     read_q;
  logic [TAG_W-1:0]    tag_q;
  logic [OFFSET_W-1:0] off_q;
  always_ff @(posedge clk) begin
    if (clr) begin
      read_q <= '0;
      done   <= 1'b0;
    end else begin
      done <= req;
      if (req) begin
        read_q <= valid_now;
        tag_q  <= a_tag;
        off_q  <= a_offset;
      end
    end
  end

  // Compare the buffered tags; a way that was not read cannot hit.
  logic [WAYS-1:0] hit_vec;
  for (genvar w = 0; w < WAYS; w++) begin : g_cmp
    way_hit #(.TAG_W(TAG_W)) u_hit (
      .stored_tag(tag_rd[w]), .valid(read_q[w]), .req_tag(tag_q), .hit(hit_vec[w])
    );
  end

  logic [LINE_W-1:0] line;
  always_comb begin
    line = '0;
    for (int w = 0; w < WAYS; w++) if (hit_vec[w]) line |= data_rd[w];
  end
  assign tag_hit = |hit_vec;

  byte_select #(.LINE_W(LINE_W), .WORD_W(WORD_W)) u_sel (
    .line(line), .offset(off_q), .word(out)
  );

  // A set never holds the same tag twice, so at most one way hits.
  a_one_hit: assert property (@(posedge clk) disable iff (clr) $onehot0(hit_vec));
endmodule
