// tb_cache_arch_top: end-to-end testbench of cache_arch_top at its default
// (full) size: three 16 KB four-way caches, 128 sets, 32-byte lines.
//
// The same stream of fills and lookups is sent to the phased parallel
// (pp), phased sequential (ps) and valid-bit pre-check parallel (vp)
// caches at once. The stream starts with a cold cache, fills part of it
// (sets hold 0 to 4 valid lines), runs a loop-like lookup stream with
// re-use of resident lines and some misses, replaces lines and ends with a
// clr. For each design and each lookup it checks the byte, tag_hit, the
// latency (pp 2 cycles, ps 2..5, vp 1) and the sub-array activations
// against a model in the testbench. It counts how often each mechanism of
// the three designs happened and fails if one never did:
//   pp: a hit that read a single data sub-array; a miss that read none
//   ps: search stopped early (hit in way 0..2); worst case (hit in way 3);
//       full search ending in a miss
//   vp: a lookup with some ways switched off by the pre-check; a lookup with
//       all ways off
//   all: fill, replacement, clr.
// Finally it prints the total tag and data sub-array activations of each
// design next to those of a conventional parallel cache (4 + 4 per lookup)
// for the same stream.
module tb_cache_arch_top;
  import cache_pkg::*;

  localparam int NSETS = 1 << INDEX_W;
  localparam int ND = 3;              // 0 = pp, 1 = ps, 2 = vp
  localparam string NAME [ND] = '{"pp", "ps", "vp"};

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                clr [ND], en [ND], read [ND], fill [ND];
  logic [ADDR_W-1:0]   addr [ND];
  logic [1:0]          fway [ND];
  logic [LINE_W-1:0]   fline [ND];
  logic [WORD_W-1:0]   out [ND];
  logic                hit [ND], done [ND], busy [ND];
  logic [WAYS-1:0]     tce [ND], dce [ND];

  cache_arch_top dut (
    .clk,
    .pp_clr(clr[0]), .pp_en(en[0]), .pp_read(read[0]), .pp_CPU_address(addr[0]),
    .pp_fill(fill[0]), .pp_fill_way(fway[0]), .pp_fill_line(fline[0]),
    .pp_out(out[0]), .pp_tag_hit(hit[0]), .pp_done(done[0]), .pp_busy(busy[0]),
    .pp_tag_ce(tce[0]), .pp_data_ce(dce[0]),
    .ps_clr(clr[1]), .ps_en(en[1]), .ps_read(read[1]), .ps_CPU_address(addr[1]),
    .ps_fill(fill[1]), .ps_fill_way(fway[1]), .ps_fill_line(fline[1]),
    .ps_out(out[1]), .ps_tag_hit(hit[1]), .ps_done(done[1]), .ps_busy(busy[1]),
    .ps_tag_ce(tce[1]), .ps_data_ce(dce[1]),
    .vp_clr(clr[2]), .vp_en(en[2]), .vp_read(read[2]), .vp_CPU_address(addr[2]),
    .vp_fill(fill[2]), .vp_fill_way(fway[2]), .vp_fill_line(fline[2]),
    .vp_out(out[2]), .vp_tag_hit(hit[2]), .vp_done(done[2]), .vp_busy(busy[2]),
    .vp_tag_ce(tce[2]), .vp_data_ce(dce[2])
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  logic [TAG_W-1:0]  m_tag  [WAYS][NSETS];
  logic              m_val  [WAYS][NSETS];
  logic [LINE_W-1:0] m_line [WAYS][NSETS];

  // Mechanism counters.
  int pp_one_data = 0, pp_miss_no_data = 0;
  int ps_early = 0, ps_worst = 0, ps_full_miss = 0;
  int vp_some_off = 0, vp_all_off = 0;
  int n_fill = 0, n_replace = 0, n_clr = 0, n_lookup = 0;
  longint tag_act [ND], data_act [ND];

  function automatic logic [ADDR_W-1:0] mk_addr(logic [TAG_W-1:0] t, int s, int off);
    addr_t a;
    a.tag = t; a.index = INDEX_W'(s); a.offset = OFFSET_W'(off);
    return a;
  endfunction

  task automatic idle_all();
    for (int d = 0; d < ND; d++) begin en[d] = 0; read[d] = 0; fill[d] = 0; end
  endtask

  task automatic do_fill(int s, int w, logic [TAG_W-1:0] t);
    logic [LINE_W-1:0] l;
    for (int i = 0; i < LINE_W / 32; i++) l[i*32 +: 32] = $urandom;
    if (m_val[w][s]) n_replace++;
    @(negedge clk);
    for (int d = 0; d < ND; d++) begin
      en[d] = 1; fill[d] = 1; read[d] = 0;
      addr[d] = mk_addr(t, s, 0); fway[d] = 2'(w); fline[d] = l;
    end
    @(negedge clk);
    idle_all();
    m_tag[w][s] = t; m_val[w][s] = 1'b1; m_line[w][s] = l;
    n_fill++;
  endtask

  task automatic do_clr();
    @(negedge clk);
    for (int d = 0; d < ND; d++) clr[d] = 1;
    idle_all();
    @(negedge clk);
    for (int d = 0; d < ND; d++) clr[d] = 0;
    foreach (m_val[w, s]) m_val[w][s] = 1'b0;
    n_clr++;
  endtask

  task automatic lookup(logic [TAG_W-1:0] t, int s, int off);
    int cyc [ND], nt [ND], nd [ND];
    bit fin [ND];
    bit h; int hw; int nv;
    logic [WORD_W-1:0] e;
    h = 0; hw = 0; nv = 0;
    for (int w = 0; w < WAYS; w++) begin
      nv += m_val[w][s];
      if (m_val[w][s] && m_tag[w][s] == t) begin h = 1; hw = w; end
    end
    e = h ? m_line[hw][s][off*WORD_W +: WORD_W] : '0;
    @(negedge clk);
    for (int d = 0; d < ND; d++) begin
      en[d] = 1; read[d] = 1; addr[d] = mk_addr(t, s, off);
      cyc[d] = 0; fin[d] = 0;
    end
    #1;
    for (int d = 0; d < ND; d++) begin nt[d] = $countones(tce[d]); nd[d] = $countones(dce[d]); end
    for (int c = 1; c <= 10 && !(fin[0] && fin[1] && fin[2]); c++) begin
      @(negedge clk);
      idle_all();
      #1;
      for (int d = 0; d < ND; d++) if (!fin[d]) begin
        if (done[d]) begin
          fin[d] = 1; cyc[d] = c;
          check(hit[d] == h && out[d] == e,
                $sformatf("%s set %0d tag %h off %0d: hit %b out %h, exp %b %h", NAME[d], s, t, off, hit[d], out[d], h, e));
        end else begin
          nt[d] += $countones(tce[d]); nd[d] += $countones(dce[d]);
        end
      end
    end
    for (int d = 0; d < ND; d++) begin
      check(fin[d], $sformatf("%s done", NAME[d]));
      tag_act[d] += nt[d]; data_act[d] += nd[d];
    end
    // Latency and activations of each organisation.
    check(cyc[0] == 2 && nt[0] == WAYS && nd[0] == int'(h), $sformatf("pp cyc %0d tags %0d data %0d", cyc[0], nt[0], nd[0]));
    check(cyc[1] == (h ? hw + 2 : WAYS + 1) && nt[1] == (h ? hw + 1 : WAYS) && nd[1] == int'(h),
          $sformatf("ps cyc %0d tags %0d data %0d (hit %b way %0d)", cyc[1], nt[1], nd[1], h, hw));
    check(cyc[2] == 1 && nt[2] == nv && nd[2] == nv, $sformatf("vp cyc %0d tags %0d data %0d valid %0d", cyc[2], nt[2], nd[2], nv));
    if (h && nd[0] == 1) pp_one_data++;
    if (!h && nd[0] == 0) pp_miss_no_data++;
    if (h && hw < WAYS - 1 && nt[1] < WAYS) ps_early++;
    if (h && hw == WAYS - 1 && cyc[1] == WAYS + 1) ps_worst++;
    if (!h && nt[1] == WAYS) ps_full_miss++;
    if (nv > 0 && nv < WAYS && nt[2] == nv) vp_some_off++;
    if (nv == 0 && nt[2] == 0) vp_all_off++;
    n_lookup++;
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    int base;
    for (int d = 0; d < ND; d++) begin
      clr[d] = 0; addr[d] = '0; fway[d] = '0; fline[d] = '0; tag_act[d] = 0; data_act[d] = 0;
    end
    idle_all();
    do_clr();

    // Cold cache.
    for (int i = 0; i < 8; i++) lookup(TAG_W'($urandom), $urandom_range(NSETS - 1), $urandom_range(31));

    // A program image: four 4 KB regions (tags 0x10..0x13) that alias onto
    // the same sets; region r is loaded into way r of the first (96 - 24 r)
    // sets, so set occupancy runs from 4 ways down to none.
    for (int r = 0; r < WAYS; r++)
      for (int s = 0; s < 96 - 24 * r; s++) do_fill(s, r, TAG_W'(32'h10 + r));

    // Loop-like access: walk 10 consecutive loaded lines of each region
    // in 8-byte strides, plus misses to a region that was never loaded.
    for (int pass = 0; pass < 3; pass++)
      for (int r = 0; r <= WAYS; r++) begin
        base = (r < WAYS) ? $urandom_range(96 - 24 * r - 10) : $urandom_range(NSETS - 1);
        for (int i = 0; i < 40; i++)
          lookup(TAG_W'(32'h10 + r), (base + i / 4) % NSETS, (i * 8) % 32);
      end

    // Replace lines of region 0 by region 7 in a few sets.
    for (int s = 0; s < 8; s++) do_fill(s, 0, TAG_W'(32'h17));
    for (int s = 0; s < 8; s++) begin
      lookup(TAG_W'(32'h17), s, s);
      lookup(TAG_W'(32'h10), s, s);
    end

    // clr: everything misses afterwards.
    do_clr();
    for (int s = 0; s < 8; s++) lookup(TAG_W'(32'h11), s, 0);

    check(pp_one_data > 0,     "pp: hit reading one data sub-array");
    check(pp_miss_no_data > 0, "pp: miss reading no data sub-array");
    check(ps_early > 0,        "ps: search stopped early");
    check(ps_worst > 0,        "ps: worst case hit in the last way");
    check(ps_full_miss > 0,    "ps: full search ending in a miss");
    check(vp_some_off > 0,     "vp: some ways switched off");
    check(vp_all_off > 0,      "vp: all ways switched off");
    check(n_replace > 0,       "line replacement");
    check(n_clr > 1,           "clr");
    $display("lookups %0d fills %0d replacements %0d clr %0d", n_lookup, n_fill, n_replace, n_clr);
    $display("pp one-data hits %0d, no-data misses %0d", pp_one_data, pp_miss_no_data);
    $display("ps early stops %0d, way-3 hits %0d, full-search misses %0d", ps_early, ps_worst, ps_full_miss);
    $display("vp partly switched off %0d, fully switched off %0d", vp_some_off, vp_all_off);
    $display("sub-array activations (tag / data) for %0d lookups:", n_lookup);
    $display("  conventional parallel (reference) %0d / %0d", WAYS * n_lookup, WAYS * n_lookup);
    for (int d = 0; d < ND; d++) $display("  %s %0d / %0d", NAME[d], tag_act[d], data_act[d]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
