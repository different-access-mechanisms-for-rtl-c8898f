// byte_select: the output word multiplexer.
//
// Picks word number `offset` out of a cache line, with word 0 in the least
// significant bits. With the reference sizes this is a 32:1 multiplexer of
// bytes driven by the 5-bit offset field. Combinational. The ordering of
// words within the line is this implementation's choice.
module byte_select #(
  parameter int unsigned LINE_W = 256,
  parameter int unsigned WORD_W = 8
) (
  input  logic [LINE_W-1:0]                  line,
  input  logic [$clog2(LINE_W/WORD_W)-1:0]   offset,
  output logic [WORD_W-1:0]                  word
);
  assign word = line[offset*WORD_W +: WORD_W];
endmodule
