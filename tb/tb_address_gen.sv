// tb_address_gen: checks that each Bayer site is written to its own line
// RAM (G11 -> 0, R12 -> 1, B21 -> 2, G22 -> 3) at address col/2, and that a
// tile read is requested exactly one cycle after each G22 write, at the
// tile's address and with win_last for the frame's last tile.
module tb_address_gen;
  localparam int W = 16, H = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic pix_valid = 0, pix_last = 0;
  logic [1:0] pix_row = 0;
  logic [3:0] pix_col = 0;
  logic [7:0] pix_data = 0;
  logic [3:0] ram_we;
  logic [8:0] ram_waddr, win_addr;
  logic [7:0] ram_wdata;
  logic win_rd, win_last;

  address_gen #(.IMG_W(W), .IMG_H(H)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int n_rd = 0;
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_site;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        @(negedge clk);
        pix_valid = 1; pix_row = 2'(y); pix_col = 4'(x); pix_data = 8'($urandom);
        pix_last = (y == H-1 && x == W-1);
        exp_site = (y % 2) * 2 + (x % 2);
        #1;
        check(ram_we == 4'(1 << exp_site), $sformatf("write enable %b at %0d,%0d", ram_we, y, x));
        check(32'(ram_waddr) == x / 2, "write address col/2");
        check(ram_wdata == pix_data, "write data");
        @(negedge clk);
        pix_valid = 0;
        check(win_rd == (exp_site == 3), "tile read request after G22 only");
        if (win_rd) begin
          n_rd++;
          check(32'(win_addr) == x / 2, "tile read address");
          check(win_last == (y == H-1 && x == W-1), "win_last on the last tile");
        end
        #1;
        check(ram_we == 0, "no write without pix_valid");
        @(negedge clk);
        check(!win_rd, "single read request per tile");
      end
    check(n_rd == W * H / 4, $sformatf("%0d tile reads", n_rd));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
