// tb_way_hit: self-checking testbench for way_hit.
//
// Random stored and requested tags, with equal tags, tags that differ in a
// single bit and both values of the valid bit.
module tb_way_hit;
  logic [19:0] stored_tag, req_tag;
  logic        valid, hit;
  way_hit #(.TAG_W(20)) dut (.*);

  int checks = 0, failures = 0;

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4000; n++) begin
      bit e;
      stored_tag = 20'($urandom);
      case (n % 3)
        0: req_tag = stored_tag;
        1: req_tag = stored_tag ^ (20'(1) << $urandom_range(19));
        default: req_tag = 20'($urandom);
      endcase
      valid = 1'($urandom);
      #1;
      e = valid && (stored_tag == req_tag);
      checks++;
      if (hit != e) begin
        failures++;
        if (failures < 20) $display("FAIL %h %h v%b: hit %b", stored_tag, req_tag, valid, hit);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
