// tb_index_decoder: self-checking testbench for index_decoder.
//
// Applies all 128 index values and checks that exactly the addressed set
// line is high.
module tb_index_decoder;
  logic [6:0]   index;
  logic [127:0] set_sel;
  index_decoder #(.INDEX_W(7)) dut (.index, .set_sel);

  int checks = 0, failures = 0;

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 128; i++) begin
      index = 7'(i);
      #1;
      checks++;
      if (set_sel != (128'(1) << i)) begin
        failures++;
        $display("FAIL index %0d gives %h", i, set_sel);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
