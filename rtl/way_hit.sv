// way_hit: hit detection for one way.
//
// The tag comparator of a way followed by the AND gate with the line's
// valid bit: hit is 1 when the stored tag equals the tag field of the
// requested address and the line is valid. Combinational.
module way_hit #(
  parameter int unsigned TAG_W = 20
) (
  input  logic [TAG_W-1:0] stored_tag,
  input  logic             valid,
  input  logic [TAG_W-1:0] req_tag,
  output logic             hit
);
  assign hit = valid && (stored_tag == req_tag);
endmodule
