// cache_arch_top: the three low-power four-way set-associative cache
// organisations, side by side.
//
//   pp_*  phased_parallel_cache    all tags in cycle 1, one data way in cycle 2
//   ps_*  phased_sequential_cache  one tag per cycle from way 0, then one data
//                                  way: 2 to 5 cycles
//   vp_*  precheck_parallel_cache  one-cycle parallel access in which only
//                                  the ways with a valid line are activated
//
// They are alternative designs of the same 16 KB cache (32-byte lines,
// 128 sets, 32-bit byte address, 8-bit words) and share nothing but the
// clock; each has its own CPU, fill and activity ports, with the meaning and
// timing described in its own module. Putting them in one top lets the same
// access stream be run through all three and their sub-array activations be
// compared.
module cache_arch_top #(
  parameter int unsigned ADDR_W   = cache_pkg::ADDR_W,
  parameter int unsigned TAG_W    = cache_pkg::TAG_W,
  parameter int unsigned INDEX_W  = cache_pkg::INDEX_W,
  parameter int unsigned OFFSET_W = cache_pkg::OFFSET_W,
  parameter int unsigned WAYS     = cache_pkg::WAYS,
  parameter int unsigned WORD_W   = cache_pkg::WORD_W,
  parameter int unsigned LINE_W   = cache_pkg::LINE_W
) (
  input  logic clk,
  input  logic pp_clr,
  input  logic pp_en,
  input  logic pp_read,
  input  logic [ADDR_W-1:0] pp_CPU_address,
  input  logic pp_fill,
  input  logic [$clog2(WAYS)-1:0] pp_fill_way,
  input  logic [LINE_W-1:0] pp_fill_line,
  output logic [WORD_W-1:0] pp_out,
  output logic pp_tag_hit,
  output logic pp_done,
  output logic pp_busy,
  output logic [WAYS-1:0] pp_tag_ce,
  output logic [WAYS-1:0] pp_data_ce,
  input  logic ps_clr,
  input  logic ps_en,
  input  logic ps_read,
  input  logic [ADDR_W-1:0] ps_CPU_address,
  input  logic ps_fill,
  input  logic [$clog2(WAYS)-1:0] ps_fill_way,
  input  logic [LINE_W-1:0] ps_fill_line,
  output logic [WORD_W-1:0] ps_out,
  output logic ps_tag_hit,
  output logic ps_done,
  output logic ps_busy,
  output logic [WAYS-1:0] ps_tag_ce,
  output logic [WAYS-1:0] ps_data_ce,
  input  logic vp_clr,
  input  logic vp_en,
  input  logic vp_read,
  input  logic [ADDR_W-1:0] vp_CPU_address,
  input  logic vp_fill,
  input  logic [$clog2(WAYS)-1:0] vp_fill_way,
  input  logic [LINE_W-1:0] vp_fill_line,
  output logic [WORD_W-1:0] vp_out,
  output logic vp_tag_hit,
  output logic vp_done,
  output logic vp_busy,
  output logic [WAYS-1:0] vp_tag_ce,
  output logic [WAYS-1:0] vp_data_ce
);

  phased_parallel_cache #(
    .ADDR_W(ADDR_W), .TAG_W(TAG_W), .INDEX_W(INDEX_W), .OFFSET_W(OFFSET_W),
    .WAYS(WAYS), .WORD_W(WORD_W), .LINE_W(LINE_W)
  ) u_pp (
    .clk,
    .clr(pp_clr),
    .en(pp_en),
    .read(pp_read),
    .CPU_address(pp_CPU_address),
    .fill(pp_fill),
    .fill_way(pp_fill_way),
    .fill_line(pp_fill_line),
    .out(pp_out),
    .tag_hit(pp_tag_hit),
    .done(pp_done),
    .busy(pp_busy),
    .tag_ce(pp_tag_ce),
    .data_ce(pp_data_ce)
  );

  phased_sequential_cache #(
    .ADDR_W(ADDR_W), .TAG_W(TAG_W), .INDEX_W(INDEX_W), .OFFSET_W(OFFSET_W),
    .WAYS(WAYS), .WORD_W(WORD_W), .LINE_W(LINE_W)
  ) u_ps (
    .clk,
    .clr(ps_clr),
    .en(ps_en),
    .read(ps_read),
    .CPU_address(ps_CPU_address),
    .fill(ps_fill),
    .fill_way(ps_fill_way),
    .fill_line(ps_fill_line),
    .out(ps_out),
    .tag_hit(ps_tag_hit),
    .done(ps_done),
    .busy(ps_busy),
    .tag_ce(ps_tag_ce),
    .data_ce(ps_data_ce)
  );

  precheck_parallel_cache #(
    .ADDR_W(ADDR_W), .TAG_W(TAG_W), .INDEX_W(INDEX_W), .OFFSET_W(OFFSET_W),
    .WAYS(WAYS), .WORD_W(WORD_W), .LINE_W(LINE_W)
  ) u_vp (
    .clk,
    .clr(vp_clr),
    .en(vp_en),
    .read(vp_read),
    .CPU_address(vp_CPU_address),
    .fill(vp_fill),
    .fill_way(vp_fill_way),
    .fill_line(vp_fill_line),
    .out(vp_out),
    .tag_hit(vp_tag_hit),
    .done(vp_done),
    .busy(vp_busy),
    .tag_ce(vp_tag_ce),
    .data_ce(vp_data_ce)
  );
endmodule
