// tb_line_ram: fills the 512 x 8 line RAM with random bytes, reads every
// address back with the two-cycle read latency, and checks that a read of
// the address being written returns the old byte.
module tb_line_ram;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we = 0, re = 0;
  logic [8:0] waddr = 0, raddr = 0;
  logic [7:0] wdata = 0, rdata;
  logic [7:0] ref_mem [512];

  line_ram dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 512; a++) begin
      @(negedge clk);
      we = 1; waddr = 9'(a); wdata = 8'($urandom); ref_mem[a] = wdata;
    end
    @(negedge clk);
    we = 0;
    for (int a = 0; a < 512; a++) begin
      int k = (a * 37) % 512;
      @(negedge clk);
      re = 1; raddr = 9'(k);
      @(negedge clk);
      re = 0;
      @(negedge clk);
      check(rdata == ref_mem[k], $sformatf("addr %0d: got %h exp %h", k, rdata, ref_mem[k]));
    end
    // read during write: old data
    @(negedge clk);
    we = 1; waddr = 9'd100; wdata = ~ref_mem[100]; re = 1; raddr = 9'd100;
    @(negedge clk);
    we = 0; re = 0;
    @(negedge clk);
    check(rdata == ref_mem[100], "read during write returns the old byte");
    @(negedge clk);
    re = 1;
    @(negedge clk);
    re = 0;
    @(negedge clk);
    check(rdata == ~ref_mem[100], "new byte after the write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
