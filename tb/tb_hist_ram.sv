// tb_hist_ram: random writes and reads of a 16 x 19 histogram RAM against a
// reference array, with the one-cycle read latency and old-data-on-collision
// behaviour.
module tb_hist_ram;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we = 0;
  logic [3:0] waddr = 0, raddr = 0;
  logic [18:0] wdata = 0, rdata;
  logic [18:0] ref_mem [16];

  hist_ram #(.ADDR_W(4), .DATA_W(19)) dut (.*);

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
    logic [18:0] exp_d;
    for (int a = 0; a < 16; a++) begin
      @(negedge clk);
      we = 1; waddr = 4'(a); wdata = 19'($urandom); ref_mem[a] = wdata;
    end
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      raddr = 4'($urandom);
      we = $urandom_range(0, 1) == 1;
      waddr = (t % 3 == 0) ? raddr : 4'($urandom);
      wdata = 19'($urandom);
      exp_d = ref_mem[raddr];
      @(posedge clk);
      if (we) ref_mem[waddr] = wdata;
      #1;
      check(rdata == exp_d, $sformatf("addr %0d: got %0d exp %0d", raddr, rdata, exp_d));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
