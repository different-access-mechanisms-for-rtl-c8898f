// cache_pkg: geometry shared by every block of the low-power four-way
// set-associative caches. A 16 KB cache with 32-byte lines and four ways has
// 128 sets, so a 32-bit byte address splits into a 20-bit tag, a 7-bit set
// index and a 5-bit byte offset; the processor word is one byte. These are
// the sizes of the reference design; the modules take them as parameters
// with these defaults.
package cache_pkg;
  localparam int unsigned ADDR_W   = 32;
  localparam int unsigned TAG_W    = 20;
  localparam int unsigned INDEX_W  = 7;
  localparam int unsigned OFFSET_W = 5;
  localparam int unsigned WAYS     = 4;
  localparam int unsigned WORD_W   = 8;
  localparam int unsigned LINE_W   = 256;   // 32 bytes

  // Default address layout: tag[31:12] | index[11:5] | offset[4:0].
  typedef struct packed {
    logic [TAG_W-1:0]    tag;
    logic [INDEX_W-1:0]  index;
    logic [OFFSET_W-1:0] offset;
  } addr_t;
endpackage
