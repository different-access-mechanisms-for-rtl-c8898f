// phased_parallel_cache: four-way set-associative cache with phased
// parallel access.
//
// A lookup takes two cycles. In the first, the tag sub-arrays of all four
// ways are read together and compared with the tag of the address. In the
// second, only the data sub-array of the way that hit (tag equal and line
// valid) is read, and the addressed byte is selected from its line. The
// three data sub-arrays that cannot hold the data are never activated, and
// on a miss none is. This trades one cycle of latency for far fewer
// activations of the large data arrays.
//
// Interface and timing:
//   en && read && !busy  start a lookup of CPU_address (tag | index | offset).
//                    Edge 1 reads all tags (busy is then 1); edge 2 reads the
//                    data of the hit way; right after edge 2 done pulses for
//                    one cycle and tag_hit/out show the result, held until
//                    the next lookup or clr. A miss takes the same two
//                    cycles and returns out = 0.
//   en && fill && !read && !busy
//                    write fill_line and the tag of CPU_address into way
//                    fill_way of the addressed set, and set its valid bit.
//   clr              synchronous: clears all valid bits, the result and the
//                    controller.
//   tag_ce, data_ce  the sub-arrays activated in the current cycle.
// The two-phase access, port names and sizes follow the reference design;
// the fill port, done/busy, the activation outputs, the clr behaviour and
// the miss timing are this implementation's choices.
module phased_parallel_cache #(
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
  typedef enum logic {S_TAG, S_DATA} state_t;   // S_TAG doubles as idle
  state_t state;

  logic [TAG_W-1:0]    a_tag;
  logic [INDEX_W-1:0]  a_index;
  logic [OFFSET_W-1:0] a_offset;
  assign a_tag    = CPU_address[ADDR_W-1 -: TAG_W];
  assign a_index  = CPU_address[OFFSET_W +: INDEX_W];
  assign a_offset = CPU_address[OFFSET_W-1:0];

  logic req, fill_go;
  assign busy    = (state == S_DATA);
  assign req     = en && read && !busy && !clr;
  assign fill_go = en && fill && !read && !busy && !clr;

  logic [WAYS-1:0] valid_now;
  valid_bank #(.WAYS(WAYS), .INDEX_W(INDEX_W)) u_valid (
    .clk, .clr,
    .set_en(fill_go), .set_way(fill_way), .set_index(a_index),
    .rd_index(a_index), .valid(valid_now)
  );

  // Request registers, loaded in phase 1.
  logic [WAYS-1:0]     valid_q;
  logic [TAG_W-1:0]    tag_q;
  logic [INDEX_W-1:0]  idx_q;
  logic [OFFSET_W-1:0] off_q;

  logic [TAG_W-1:0]  tag_rd  [WAYS];
  logic [LINE_W-1:0] data_rd [WAYS];
  logic [WAYS-1:0]   hit_vec;     // phase-2 tag compare result
  logic [WAYS-1:0]   hit_q;       // way whose line is in its data buffer

  for (genvar w = 0; w < WAYS; w++) begin : g_cmp
    way_hit #(.TAG_W(TAG_W)) u_hit (
      .stored_tag(tag_rd[w]), .valid(valid_q[w]), .req_tag(tag_q), .hit(hit_vec[w])
    );
  end

  // Phase 1 reads every tag; phase 2 reads the data of the hit way only.
  logic [INDEX_W-1:0] arr_index;
  assign arr_index = busy ? idx_q : a_index;
  always_comb begin
    for (int w = 0; w < WAYS; w++) begin
      tag_ce[w]  = req || (fill_go && int'(fill_way) == w);
      data_ce[w] = (busy && hit_vec[w]) || (fill_go && int'(fill_way) == w);
    end
  end

  for (genvar w = 0; w < WAYS; w++) begin : g_way
    sram_subarray #(.DEPTH(1 << INDEX_W), .WIDTH(TAG_W)) u_tag (
      .clk, .ce(tag_ce[w]), .we(fill_go), .addr(arr_index),
      .wdata(a_tag), .rdata(tag_rd[w])
    );
    sram_subarray #(.DEPTH(1 << INDEX_W), .WIDTH(LINE_W)) u_data (
      .clk, .ce(data_ce[w]), .we(fill_go), .addr(arr_index),
      .wdata(fill_line), .rdata(data_rd[w])
    );
  end

  always_ff @(posedge clk) begin
    if (clr) begin
      state <= S_TAG;
      hit_q <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_TAG: if (req) begin
          valid_q <= valid_now;
          tag_q   <= a_tag;
          idx_q   <= a_index;
          off_q   <= a_offset;
          state   <= S_DATA;
        end
        S_DATA: begin
          hit_q <= hit_vec;
          done  <= 1'b1;
          state <= S_TAG;
        end
      endcase
    end
  end

  logic [LINE_W-1:0] line;
  always_comb begin
    line = '0;
    for (int w = 0; w < WAYS; w++) if (hit_q[w]) line |= data_rd[w];
  end
  assign tag_hit = |hit_q;

  byte_select #(.LINE_W(LINE_W), .WORD_W(WORD_W)) u_sel (
    .line(line), .offset(off_q), .word(out)
  );

  a_one_hit: assert property (@(posedge clk) disable iff (clr) busy |-> $onehot0(hit_vec));
  a_no_req_busy: assert property (@(posedge clk) disable iff (clr) busy |-> !(en && (read || fill)))
    else $error("request issued while the cache is busy");
endmodule
