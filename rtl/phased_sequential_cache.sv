// phased_sequential_cache: four-way set-associative cache with phased
// sequential access.
//
// The ways are searched one per cycle, way 0 first. A 2-bit way counter
// selects which tag sub-array is read and compared in each cycle (with that
// way's valid bit); the search stops at the first hit, and in the next cycle
// only the data sub-array of that way is read and the addressed byte is
// selected. Per lookup at most one data sub-array and only as many tag
// sub-arrays as ways probed are activated.
//
// Interface and timing (cycles counted from the request cycle):
//   en && read && !busy  start a lookup of CPU_address (tag | index | offset).
//                    A hit in way k needs k+1 tag cycles and one data cycle:
//                    done pulses right after edge k+2, i.e. 2 cycles for
//                    way 0 and 5 cycles for way 3. A miss is reported after
//                    all four tags were compared, 5 cycles, with out = 0.
//                    busy is 1 from the first edge until done. tag_hit/out
//                    hold until the next lookup or clr.
//   en && fill && !read && !busy
//                    write fill_line and the tag of CPU_address into way
//                    fill_way of the addressed set, and set its valid bit.
//   clr              synchronous: clears all valid bits, the result and the
//                    controller.
//   tag_ce, data_ce  the sub-arrays activated in the current cycle.
// The way order, the counter and the 2-to-5-cycle latency follow the
// reference design; the fill port, done/busy, the activation outputs, the
// clr behaviour and the miss timing are this implementation's choices.
module phased_sequential_cache #(
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
  localparam int unsigned WAY_W = $clog2(WAYS);
  typedef logic [WAY_W-1:0] way_t;
  localparam way_t LAST_WAY = way_t'(WAYS - 1);

  typedef enum logic {S_IDLE, S_SEARCH} state_t;
  state_t state;
  way_t   cnt;                    // way counter: the tag in the buffer

  logic [TAG_W-1:0]    a_tag;
  logic [INDEX_W-1:0]  a_index;
  logic [OFFSET_W-1:0] a_offset;
  assign a_tag    = CPU_address[ADDR_W-1 -: TAG_W];
  assign a_index  = CPU_address[OFFSET_W +: INDEX_W];
  assign a_offset = CPU_address[OFFSET_W-1:0];

  logic req, fill_go;
  assign busy    = (state == S_SEARCH);
  assign req     = en && read && !busy && !clr;
  assign fill_go = en && fill && !read && !busy && !clr;

  logic [WAYS-1:0] valid_now;
  valid_bank #(.WAYS(WAYS), .INDEX_W(INDEX_W)) u_valid (
    .clk, .clr,
    .set_en(fill_go), .set_way(fill_way), .set_index(a_index),
    .rd_index(a_index), .valid(valid_now)
  );

  logic [WAYS-1:0]     valid_q;
  logic [TAG_W-1:0]    tag_q;
  logic [INDEX_W-1:0]  idx_q;
  logic [OFFSET_W-1:0] off_q;

  logic [TAG_W-1:0]  tag_rd  [WAYS];
  logic [LINE_W-1:0] data_rd [WAYS];
  logic [WAYS-1:0]   hit_q;

  // The counter drives the select lines of the tag and valid-bit muxes.
  logic cur_hit;
  way_hit #(.TAG_W(TAG_W)) u_hit (
    .stored_tag(tag_rd[cnt]), .valid(valid_q[cnt]), .req_tag(tag_q), .hit(cur_hit)
  );

  logic [INDEX_W-1:0] arr_index;
  assign arr_index = busy ? idx_q : a_index;
  always_comb begin
    for (int w = 0; w < WAYS; w++) begin
      tag_ce[w]  = (req && w == 0)
                || (busy && !cur_hit && cnt != LAST_WAY && w == int'(cnt) + 1)
                || (fill_go && int'(fill_way) == w);
      data_ce[w] = (busy && cur_hit && w == int'(cnt))
                || (fill_go && int'(fill_way) == w);
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
      state <= S_IDLE;
      cnt   <= '0;
      hit_q <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (req) begin
          valid_q <= valid_now;
          tag_q   <= a_tag;
          idx_q   <= a_index;
          off_q   <= a_offset;
          cnt     <= '0;
          state   <= S_SEARCH;
        end
        S_SEARCH: begin
          if (cur_hit) begin
            hit_q        <= '0;
            hit_q[cnt]   <= 1'b1;
            done         <= 1'b1;
            state        <= S_IDLE;
          end else if (cnt == LAST_WAY) begin
            hit_q <= '0;
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            cnt <= cnt + 1'b1;
          end
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

  a_no_req_busy: assert property (@(posedge clk) disable iff (clr) busy |-> !(en && (read || fill)))
    else $error("request issued while the cache is busy");
endmodule
