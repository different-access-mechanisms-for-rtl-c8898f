// sram_subarray: one tag or data sub-array of one cache way.
//
// A single-port synchronous memory of DEPTH words of WIDTH bits. Nothing
// happens unless the chip enable ce is high: then a write (we=1) stores wdata
// at addr on the rising clock edge, or a read (we=0) copies the word at addr
// into the output register rdata on that edge. rdata keeps its value while
// the array is not enabled and is not changed by writes, so it serves as the
// "buffer" that holds a read tag or line for the rest of an access.
// Every enabled cycle is one activation, the unit in which the caches built
// from these arrays save power.
// The sizes (128 x 20 for tags, 128 x 256 for data) are the reference
// design's; the registered read port and the hold-when-disabled behaviour
// are this implementation's choice of SRAM model.
module sram_subarray #(
  parameter int unsigned DEPTH = 128,
  parameter int unsigned WIDTH = 20
) (
  input  logic                     clk,
  input  logic                     ce,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic [WIDTH-1:0]         wdata,
  output logic [WIDTH-1:0]         rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (ce) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end
endmodule
