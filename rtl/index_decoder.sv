// index_decoder: the 7-to-128 set decoder.
//
// Turns the binary set index into a one-hot vector with bit `index` set.
// Purely combinational. The valid-bit bank uses it to pick one set's valid
// bits by ANDing each valid bit with its decoder line, as in the valid-bit
// pre-check scheme. The 7-bit width is the reference design's.
module index_decoder #(
  parameter int unsigned INDEX_W = 7
) (
  input  logic [INDEX_W-1:0]      index,
  output logic [(1<<INDEX_W)-1:0] set_sel
);
  always_comb begin
    set_sel = '0;
    set_sel[index] = 1'b1;
  end
endmodule
