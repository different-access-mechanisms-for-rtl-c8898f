// tb_phased_sequential_cache: self-checking testbench for phased_sequential_cache.
//
// Phased sequential access: tags are read one way per cycle from way 0 and
// the search stops at the first hit; then only that way's data sub-array is
// read. A hit in way k takes k+2 cycles (2 to 5), a miss 5 cycles.
// The testbench keeps its own model of the cache contents (tag, valid bit
// and line of every way and set), fills random lines with tags drawn from a
// small pool (so the same tag appears in many sets, and sets hold 0 to 4
// valid ways), and then issues random lookups, about two thirds of them to
// resident lines. For every lookup it checks the byte returned, tag_hit,
// the number of cycles until done, how many tag and data sub-arrays were
// activated and which ones, and that the result is held after done. It also
// checks a lookup of an empty cache, replacement of a line by a refill and
// that clr invalidates everything. Default (full-size) parameters.
module tb_phased_sequential_cache;
  import cache_pkg::*;

  localparam int NSETS = 1 << INDEX_W;

  logic                clk = 1'b0;
  logic                clr, en, read, fill;
  logic [ADDR_W-1:0]   CPU_address;
  logic [1:0]          fill_way;
  logic [LINE_W-1:0]   fill_line;
  logic [WORD_W-1:0]   out;
  logic                tag_hit, done, busy;
  logic [WAYS-1:0]     tag_ce, data_ce;

  phased_sequential_cache dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // Reference model of the cache contents.
  logic [TAG_W-1:0]  m_tag  [WAYS][NSETS];
  logic              m_val  [WAYS][NSETS];
  logic [LINE_W-1:0] m_line [WAYS][NSETS];

  // Coverage of the mechanisms exercised.
  int n_hit_way [WAYS];
  int n_miss = 0, n_nvalid [WAYS+1];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // Expected behaviour of this organisation.
  function automatic int exp_cycles(bit hit, int way);
    return hit ? way + 2 : WAYS + 1;
  endfunction
  function automatic logic [WAYS-1:0] exp_tag_mask(bit hit, int way, logic [WAYS-1:0] vmask);
    return hit ? WAYS'((1 << (way + 1)) - 1) : '1;
  endfunction
  function automatic logic [WAYS-1:0] exp_data_mask(bit hit, int way, logic [WAYS-1:0] vmask);
    return hit ? WAYS'(1 << way) : '0;
  endfunction

  function automatic logic [ADDR_W-1:0] mk_addr(logic [TAG_W-1:0] t, int s, int off);
    addr_t a;
    a.tag = t; a.index = INDEX_W'(s); a.offset = OFFSET_W'(off);
    return a;
  endfunction

  function automatic logic [LINE_W-1:0] rand_line();
    logic [LINE_W-1:0] l;
    for (int i = 0; i < LINE_W / 32; i++) l[i*32 +: 32] = $urandom;
    return l;
  endfunction

  task automatic idle_inputs();
    en = 1'b0; read = 1'b0; fill = 1'b0;
  endtask

  task automatic do_fill(int s, int w, logic [TAG_W-1:0] t, logic [LINE_W-1:0] l);
    @(negedge clk);
    en = 1'b1; fill = 1'b1; read = 1'b0;
    CPU_address = mk_addr(t, s, $urandom_range(31));
    fill_way = 2'(w); fill_line = l;
    @(negedge clk);
    idle_inputs();
    m_tag[w][s] = t; m_val[w][s] = 1'b1; m_line[w][s] = l;
  endtask

  task automatic do_clr();
    @(negedge clk);
    clr = 1'b1; idle_inputs();
    @(negedge clk);
    clr = 1'b0;
    for (int w = 0; w < WAYS; w++)
      for (int s = 0; s < NSETS; s++) m_val[w][s] = 1'b0;
  endtask

  task automatic lookup(logic [TAG_W-1:0] t, int s, int off);
    int cyc, ntag, ndata, hw;
    logic [WAYS-1:0] tmask, dmask, vmask;
    bit hit;
    logic [WORD_W-1:0] exp_out;
    hit = 1'b0; hw = 0; vmask = '0;
    for (int w = 0; w < WAYS; w++) begin
      vmask[w] = m_val[w][s];
      if (m_val[w][s] && m_tag[w][s] == t) begin hit = 1'b1; hw = w; end
    end
    exp_out = hit ? m_line[hw][s][off*WORD_W +: WORD_W] : '0;
    @(negedge clk);
    check(!busy, "cache idle before request");
    en = 1'b1; read = 1'b1; CPU_address = mk_addr(t, s, off);
    #1;
    ntag = $countones(tag_ce); ndata = $countones(data_ce);
    tmask = tag_ce; dmask = data_ce;
    cyc = 0;
    do begin
      @(negedge clk);
      idle_inputs();
      cyc++;
      #1;
      if (!done) begin
        ntag += $countones(tag_ce); ndata += $countones(data_ce);
        tmask |= tag_ce; dmask |= data_ce;
      end
    end while (!done && cyc < 20);
    check(done, "done arrives");
    check(tag_hit == hit, $sformatf("tag_hit set %0d tag %h: got %b exp %b", s, t, tag_hit, hit));
    check(out == exp_out, $sformatf("out set %0d off %0d: got %h exp %h", s, off, out, exp_out));
    check(cyc == exp_cycles(hit, hw), $sformatf("latency: got %0d exp %0d (hit %b way %0d)", cyc, exp_cycles(hit, hw), hit, hw));
    check(tmask == exp_tag_mask(hit, hw, vmask) && ntag == $countones(exp_tag_mask(hit, hw, vmask)),
          $sformatf("tag activations: %0d mask %b exp %b", ntag, tmask, exp_tag_mask(hit, hw, vmask)));
    check(dmask == exp_data_mask(hit, hw, vmask) && ndata == $countones(exp_data_mask(hit, hw, vmask)),
          $sformatf("data activations: %0d mask %b exp %b", ndata, dmask, exp_data_mask(hit, hw, vmask)));
    @(negedge clk);
    check(!done && tag_hit == hit && out == exp_out, "result held after done");
    if (hit) n_hit_way[hw]++; else n_miss++;
    n_nvalid[$countones(vmask)]++;
  endtask

  function automatic logic [TAG_W-1:0] pool_tag();
    return TAG_W'(32'h5A000 + $urandom_range(11));
  endfunction

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    logic [TAG_W-1:0] t;
    int s, w, k;
    for (int i = 0; i <= WAYS; i++) n_nvalid[i] = 0;
    for (int i = 0; i < WAYS; i++) n_hit_way[i] = 0;
    clr = 1'b0; idle_inputs(); CPU_address = '0; fill_way = '0; fill_line = '0;
    do_clr();

    // Empty cache: every lookup misses.
    lookup(TAG_W'(32'h12345), 3, 7);
    lookup(TAG_W'(0), 0, 0);

    // Fill each set with 0..4 lines, distinct tags within a set.
    for (s = 0; s < NSETS; s++) begin
      k = $urandom_range(WAYS);
      for (w = 0; w < k; w++) begin
        bit dup;
        int slot;
        slot = (s % 2) ? (WAYS - 1 - w) : w;   // also leave low ways empty
        do begin
          t = pool_tag(); dup = 1'b0;
          for (int v = 0; v < WAYS; v++) if (m_val[v][s] && m_tag[v][s] == t) dup = 1'b1;
        end while (dup);
        do_fill(s, slot, t, rand_line());
      end
    end

    // Random lookups.
    for (int n = 0; n < 1500; n++) begin
      s = $urandom_range(NSETS - 1);
      w = $urandom_range(WAYS - 1);
      if ($urandom_range(2) != 0 && m_val[w][s]) t = m_tag[w][s];
      else t = pool_tag();
      lookup(t, s, $urandom_range(31));
    end

    // Replacement: overwrite a line with a new tag; the old tag misses.
    for (int r = 0; r < 20; r++) begin
      logic [TAG_W-1:0] old_t, new_t;
      s = $urandom_range(NSETS - 1);
      w = $urandom_range(WAYS - 1);
      old_t = m_tag[w][s];
      new_t = TAG_W'(32'hC0000 + r);
      do_fill(s, w, new_t, rand_line());
      lookup(new_t, s, $urandom_range(31));
      lookup(old_t, s, $urandom_range(31));
    end

    // Every way hit in the way-ordered case, explicit.
    s = 5;
    for (w = 0; w < WAYS; w++) do_fill(s, w, TAG_W'(32'hAA000 + w), rand_line());
    for (w = 0; w < WAYS; w++) lookup(TAG_W'(32'hAA000 + w), s, w * 8 + 3);
    lookup(TAG_W'(32'hAA0FF), s, 1);

    // clr invalidates every line.
    do_clr();
    lookup(TAG_W'(32'hAA000), s, 0);
    lookup(TAG_W'(32'hAA003), s, 0);

    for (int i = 0; i < WAYS; i++) check(n_hit_way[i] > 0, $sformatf("a hit in way %0d happened", i));
    check(n_miss > 0, "a miss happened");
    for (int i = 0; i <= WAYS; i++) check(n_nvalid[i] > 0, $sformatf("a set with %0d valid ways looked up", i));
    $display("hits per way %0d %0d %0d %0d, misses %0d", n_hit_way[0], n_hit_way[1], n_hit_way[2], n_hit_way[3], n_miss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
