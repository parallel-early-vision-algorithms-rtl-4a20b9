// tb_hist_unit: drives an 8-bin ping-pong histogram with random bin streams
// (back-to-back, with gaps and with long runs of the same bin, which need
// forwarding), swaps banks as the read-out controller would, and reads the
// finished bank back. Checks every count against a reference, that read
// clears the bank, that done comes three cycles after the last increment
// is presented, that busy covers the reset clearing and that
// forwarding was exercised.
module tb_hist_unit;
  localparam int AW = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic wbank = 0, inc_valid = 0, inc_last = 0, rd_en = 0;
  logic [AW-1:0] inc_bin = 0, rd_addr = 0;
  logic [18:0] rd_data;
  logic done, busy, fwd;

  hist_unit #(.ADDR_W(AW), .DATA_W(19)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int unsigned exp_cnt [2**AW];
  int n_fwd = 0, n_done = 0;
  int unsigned cycle = 0, t_last = 0;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (fwd) n_fwd++;
    if (done) begin
      n_done++;
      check(cycle - t_last == 3, $sformatf("done %0d cycles after the last bin", cycle - t_last));
    end
  end

  task automatic count_frame(input int kind, input int n);
    for (int i = 0; i < 2**AW; i++) exp_cnt[i] = 0;
    for (int k = 0; k < n; k++) begin
      logic [AW-1:0] b;
      case (kind)
        0: b = AW'($urandom);
        1: b = AW'(k / 7);          // runs of one bin
        default: b = AW'(k % 2);    // alternating two bins
      endcase
      @(negedge clk);
      inc_valid = 1; inc_bin = b; inc_last = (k == n - 1);
      exp_cnt[b]++;
      @(posedge clk);
      if (k == n - 1) t_last = cycle;
      if (kind == 0 && $urandom_range(0, 3) == 0) begin
        @(negedge clk);
        inc_valid = 0;
      end
    end
    @(negedge clk);
    inc_valid = 0; inc_last = 0;
    repeat (5) @(negedge clk);
  endtask

  task automatic read_bank(input string what);
    for (int a = 0; a < 2**AW; a++) begin
      @(negedge clk);
      rd_en = 1; rd_addr = AW'(a);
      @(negedge clk);
      rd_en = 0;
      check(32'(rd_data) == exp_cnt[a], $sformatf("%s bin %0d: got %0d exp %0d", what, a,
                                                  rd_data, exp_cnt[a]));
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned t0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    t0 = cycle;
    @(posedge clk);
    check(busy, "busy while clearing after reset");
    wait (!busy);
    check(cycle - t0 >= 2**AW && cycle - t0 <= 2**AW + 2, "clearing takes one cycle per bin");
    for (int f = 0; f < 6; f++) begin
      count_frame(f % 3, 60 + 13 * f);
      @(negedge clk);
      wbank = ~wbank;
      read_bank($sformatf("frame %0d", f));
      // the bank just read must now be empty
      for (int i = 0; i < 2**AW; i++) exp_cnt[i] = 0;
      read_bank("cleared bank");
    end
    check(n_done == 6, $sformatf("%0d done pulses", n_done));
    check(n_fwd > 0, "forwarding exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
