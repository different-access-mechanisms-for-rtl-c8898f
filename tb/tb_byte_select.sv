// tb_byte_select: self-checking testbench for byte_select.
//
// Random 256-bit lines; every one of the 32 offsets is checked against the
// byte taken from the line in the testbench.
module tb_byte_select;
  logic [255:0] line;
  logic [4:0]   offset;
  logic [7:0]   word;
  byte_select #(.LINE_W(256), .WORD_W(8)) dut (.*);

  int checks = 0, failures = 0;

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 50; n++) begin
      logic [7:0] bytes [32];
      for (int b = 0; b < 32; b++) begin
        bytes[b] = 8'($urandom);
        line[b*8 +: 8] = bytes[b];
      end
      for (int b = 0; b < 32; b++) begin
        offset = 5'(b);
        #1;
        checks++;
        if (word != bytes[b]) begin
          failures++;
          if (failures < 20) $display("FAIL offset %0d: %h exp %h", b, word, bytes[b]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
