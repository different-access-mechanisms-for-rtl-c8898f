// tb_sram_subarray: self-checking testbench for sram_subarray.
//
// Runs a tag-sized (128 x 20) and a line-sized (128 x 256) sub-array under
// random enabled writes, enabled reads and idle cycles, and compares every
// read buffer against a model of the memory. It checks that a read appears
// one edge after it is enabled, that the buffer holds while the array is
// not enabled and that a write leaves the buffer alone.
module tb_sram_subarray;
  localparam int DEPTH = 128;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic             ce_t, we_t, ce_d, we_d;
  logic [6:0]       addr_t, addr_d;
  logic [19:0]      wd_t, rd_t;
  logic [255:0]     wd_d, rd_d;

  sram_subarray #(.DEPTH(DEPTH), .WIDTH(20))  u_tag  (.clk, .ce(ce_t), .we(we_t), .addr(addr_t), .wdata(wd_t), .rdata(rd_t));
  sram_subarray #(.DEPTH(DEPTH), .WIDTH(256)) u_data (.clk, .ce(ce_d), .we(we_d), .addr(addr_d), .wdata(wd_d), .rdata(rd_d));

  logic [19:0]  m_t [DEPTH];
  logic [255:0] m_d [DEPTH];
  logic [19:0]  exp_t;
  logic [255:0] exp_d;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ce_t = 0; we_t = 0; ce_d = 0; we_d = 0; addr_t = 0; addr_d = 0; wd_t = 0; wd_d = 0;
    // Initialise both arrays through the write port.
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      ce_t = 1; we_t = 1; addr_t = 7'(a); wd_t = 20'($urandom); m_t[a] = wd_t;
      ce_d = 1; we_d = 1; addr_d = 7'(a);
      for (int i = 0; i < 8; i++) wd_d[i*32 +: 32] = $urandom;
      m_d[a] = wd_d;
    end
    @(negedge clk); ce_t = 1; we_t = 0; addr_t = 0; ce_d = 1; we_d = 0; addr_d = 0;
    exp_t = m_t[0]; exp_d = m_d[0];
    for (int n = 0; n < 5000; n++) begin
      int op;
      @(negedge clk);
      check(rd_t == exp_t, $sformatf("tag buffer %h exp %h", rd_t, exp_t));
      check(rd_d == exp_d, "data buffer");
      op = $urandom_range(2);   // 0 idle, 1 read, 2 write
      ce_t = (op != 0); we_t = (op == 2); addr_t = 7'($urandom); wd_t = 20'($urandom);
      if (op == 1) exp_t = m_t[addr_t];
      if (op == 2) m_t[addr_t] = wd_t;
      op = $urandom_range(2);
      ce_d = (op != 0); we_d = (op == 2); addr_d = 7'($urandom);
      for (int i = 0; i < 8; i++) wd_d[i*32 +: 32] = $urandom;
      if (op == 1) exp_d = m_d[addr_d];
      if (op == 2) m_d[addr_d] = wd_d;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
