// tb_valid_bank: self-checking testbench for valid_bank.
//
// Sets random valid bits, reads random sets and compares with a model; checks
// that a bit appears on the edge after it is set, that the read is
// combinational, that clr clears every bit and that clr wins over a
// simultaneous set.
module tb_valid_bank;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic       clr, set_en;
  logic [1:0] set_way;
  logic [6:0] set_index, rd_index;
  logic [3:0] valid;
  valid_bank #(.WAYS(4), .INDEX_W(7)) dut (.*);

  logic m [4][128];
  int checks = 0, failures = 0;

  task automatic check_set(int s);
    logic [3:0] e;
    rd_index = 7'(s);
    #1;
    for (int w = 0; w < 4; w++) e[w] = m[w][s];
    checks++;
    if (valid != e) begin
      failures++;
      if (failures < 20) $display("FAIL set %0d valid %b exp %b", s, valid, e);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    set_en = 0; set_way = 0; set_index = 0; rd_index = 0;
    clr = 1;
    @(negedge clk); clr = 0;
    foreach (m[w, s]) m[w][s] = 1'b0;
    for (int s = 0; s < 128; s++) check_set(s);
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      set_en = ($urandom_range(3) == 0);
      set_way = 2'($urandom); set_index = 7'($urandom);
      if (set_en) m[set_way][set_index] = 1'b1;
      @(negedge clk);
      set_en = 0;
      check_set(set_index);
      check_set($urandom_range(127));
    end
    // clr together with a set: clr wins, everything is cleared.
    @(negedge clk);
    clr = 1; set_en = 1; set_way = 1; set_index = 9;
    @(negedge clk);
    clr = 0; set_en = 0;
    foreach (m[w, s]) m[w][s] = 1'b0;
    for (int s = 0; s < 128; s++) check_set(s);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
