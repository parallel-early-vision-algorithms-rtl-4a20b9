// tb_bin_buffer: pushes four-bin groups at the pipeline's tile rate, in
// random gaps and in a burst that overfills the FIFO. Checks that the bins
// come out one per cycle in order, that a group pushed into an empty buffer
// starts two cycles later, that out_last marks the last bin of a last
// group, that a burst of six back-to-back groups overflows, and that only
// the groups flagged by overflow are missing from the output.
module tb_bin_buffer;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, in_last = 0;
  logic [3:0] in_bins [4];
  logic out_valid, out_last, overflow;
  logic [3:0] out_bin;
  logic [2:0] level;

  bin_buffer #(.BIN_W(4), .DEPTH(4)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // pushed groups: bins packed into 16 bits, plus last flag
  logic [16:0] pushed [$];
  int unsigned push_cyc [$];
  logic [16:0] expect_q [$];
  int n_ovf = 0, n_out = 0, sub = 0;
  int unsigned cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) if (rst_n) begin
    if (overflow) begin
      n_ovf++;
      // the group pushed in the previous cycle was dropped
      for (int i = pushed.size() - 1; i >= 0; i--)
        if (push_cyc[i] == cycle - 1) begin
          pushed.delete(i);
          push_cyc.delete(i);
          break;
        end
    end
    if (out_valid) begin
      logic [16:0] g;
      if (sub == 0) begin
        if (pushed.size() == 0) check(0, "output without a pushed group");
        else begin
          g = pushed.pop_front();
          void'(push_cyc.pop_front());
          expect_q.push_back(g);
        end
      end
      if (expect_q.size() > 0) begin
        g = expect_q[0];
        check(out_bin == g[4*sub +: 4], $sformatf("bin %0d of group: got %0d exp %0d",
                                                   sub, out_bin, g[4*sub +: 4]));
        check(out_last == (sub == 3 && g[16]), "out_last");
      end
      n_out++;
      sub = (sub + 1) % 4;
      if (sub == 0) void'(expect_q.pop_front());
    end
  end

  task automatic push(input bit last);
    logic [15:0] b = 16'($urandom);
    @(negedge clk);
    in_valid = 1; in_last = last;
    for (int i = 0; i < 4; i++) in_bins[i] = b[4*i +: 4];
    @(posedge clk);
    pushed.push_back({last, b});
    push_cyc.push_back(cycle);
    @(negedge clk);
    in_valid = 0; in_last = 0;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned t_push;
    for (int i = 0; i < 4; i++) in_bins[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    // latency from an empty buffer
    @(negedge clk);
    in_valid = 1; in_bins = '{4'd1, 4'd2, 4'd3, 4'd4};
    @(posedge clk);
    pushed.push_back({1'b0, 4'd4, 4'd3, 4'd2, 4'd1});
    push_cyc.push_back(cycle);
    t_push = cycle;
    @(negedge clk);
    in_valid = 0;
    wait (out_valid);
    check(cycle - t_push == 2, $sformatf("first bin %0d cycles after the push", cycle - t_push));
    repeat (6) @(posedge clk);
    // tile rate with random gaps
    for (int k = 0; k < 40; k++) begin
      push(k == 39);
      repeat ($urandom_range(1, 8)) @(negedge clk);
    end
    repeat (20) @(posedge clk);
    check(n_ovf == 0, "no overflow at one group per two cycles or slower");
    // burst of six back-to-back groups
    @(negedge clk);
    for (int k = 0; k < 6; k++) begin
      logic [15:0] b = 16'($urandom);
      in_valid = 1; in_last = (k == 5);
      for (int i = 0; i < 4; i++) in_bins[i] = b[4*i +: 4];
      @(posedge clk);
      pushed.push_back({in_last, b});
      push_cyc.push_back(cycle);
      @(negedge clk);
    end
    in_valid = 0; in_last = 0;
    repeat (40) @(posedge clk);
    check(n_ovf >= 1, $sformatf("burst overflowed (%0d groups dropped)", n_ovf));
    check(pushed.size() == 0 && expect_q.size() == 0, "every accepted group came out");
    check(n_out % 4 == 0 && n_out == 4 * (1 + 40 + 6 - n_ovf), $sformatf("%0d bins out", n_out));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
