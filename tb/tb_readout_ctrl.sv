// tb_readout_ctrl: the read-out controller against three behavioural
// histogram banks (4 bins each, one-cycle read, clear on read). Checks the
// bank swap on frame_done, the order histogram 0..2 / bin 0..3, the counts,
// out_last, holding under random back-pressure, clearing of what was read,
// and the overrun flag when a frame ends during a read-out.
module tb_readout_ctrl;
  localparam int NH = 3, AW = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic frame_done = 0, wbank, out_valid, out_ready = 0, out_last, busy, overrun;
  logic rd_en [NH];
  logic [AW-1:0] rd_addr, out_bin;
  logic [18:0] rd_data [NH];
  logic [1:0] out_hist;
  logic [18:0] out_count;

  readout_ctrl #(.NUM_HIST(NH), .ADDR_W(AW), .DATA_W(19)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // behavioural banks: mem[bank][hist][bin]
  logic [18:0] mem [2][NH][2**AW];
  logic [18:0] golden [NH][2**AW];
  always @(posedge clk)
    for (int h = 0; h < NH; h++)
      if (rd_en[h]) begin
        rd_data[h] <= mem[~wbank][h][rd_addr];
        mem[~wbank][h][rd_addr] <= '0;
      end

  int idx = 0, n_stall = 0, n_ovr = 0, frames = 0;
  logic [18:0] held;
  logic held_v = 0;
  always @(posedge clk) if (rst_n) begin
    if (overrun) n_ovr++;
    if (out_valid && held_v) check(out_count == held, "output held while not accepted");
    held_v <= out_valid && !out_ready;
    held   <= out_count;
    if (out_valid && !out_ready) n_stall++;
    if (out_valid && out_ready) begin
      check(32'(out_hist) == idx / 4 && 32'(out_bin) == idx % 4, $sformatf("order at %0d", idx));
      check(out_count == golden[out_hist][out_bin], $sformatf("count hist %0d bin %0d", out_hist, out_bin));
      check(out_last == (idx == NH * 4 - 1), "out_last");
      idx = out_last ? 0 : idx + 1;
      if (out_last) frames++;
    end
  end

  always @(negedge clk) out_ready <= $urandom_range(0, 2) != 0;

  task automatic end_frame();
    @(negedge clk);
    frame_done = 1;
    @(negedge clk);
    frame_done = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic wb0;
    for (int b = 0; b < 2; b++) for (int h = 0; h < NH; h++) for (int a = 0; a < 4; a++)
      mem[b][h][a] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 4; f++) begin
      // fill the current write bank
      for (int h = 0; h < NH; h++) for (int a = 0; a < 4; a++) begin
        mem[wbank][h][a] = 19'($urandom);
        golden[h][a] = mem[wbank][h][a];
      end
      wb0 = wbank;
      end_frame();
      check(wbank != wb0, "banks swap at frame end");
      check(busy, "read-out starts");
      wait (!busy);
      @(negedge clk);
      check(frames == f + 1, "one read-out per frame");
      for (int h = 0; h < NH; h++) for (int a = 0; a < 4; a++)
        check(mem[~wbank][h][a] == 0, "read bank cleared");
    end
    // frame end during a read-out
    for (int h = 0; h < NH; h++) for (int a = 0; a < 4; a++) golden[h][a] = mem[wbank][h][a];
    wb0 = wbank;
    end_frame();
    repeat (3) @(negedge clk);
    end_frame();
    @(negedge clk);
    check(n_ovr == 1, "overrun flagged once");
    check(wbank == ~wb0, "no second swap during a read-out");
    wait (!busy);
    repeat (3) @(negedge clk);
    check(n_stall > 0, "back-pressure exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
