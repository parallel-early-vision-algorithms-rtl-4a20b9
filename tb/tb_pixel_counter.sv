// tb_pixel_counter: checks the row/column tagging of the camera stream on
// an 8 x 4 frame: registered outputs one cycle after each strobe, wrap at
// line and frame end, pix_last on the final pixel, idle cycles between
// pixels, and re-alignment by cam_sof after stray pixels.
module tb_pixel_counter;
  localparam int W = 8, H = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cam_valid = 0, cam_sof = 0;
  logic [7:0] cam_data = 0;
  logic pix_valid, pix_last;
  logic [1:0] pix_row;
  logic [2:0] pix_col;
  logic [7:0] pix_data;

  pixel_counter #(.IMG_W(W), .IMG_H(H)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic pixel(input bit sof, input int row, input int col, input int gap);
    logic [7:0] d = 8'($urandom);
    @(negedge clk);
    cam_valid = 1; cam_sof = sof; cam_data = d;
    @(negedge clk);
    cam_valid = 0; cam_sof = 0;
    check(pix_valid, "pix_valid one cycle after the strobe");
    check(32'(pix_row) == row && 32'(pix_col) == col,
          $sformatf("position %0d,%0d expected %0d,%0d", pix_row, pix_col, row, col));
    check(pix_data == d, "pixel data");
    check(pix_last == (row == H-1 && col == W-1), "pix_last");
    repeat (gap) begin
      @(negedge clk);
      check(!pix_valid, "no pix_valid without a strobe");
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 2; f++)
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++)
          pixel(f == 0 && x == 0 && y == 0, y, x, (x + y) % 3);
    // stray pixels, then a start of frame
    pixel(0, 0, 0, 0);
    pixel(0, 0, 1, 0);
    pixel(0, 0, 2, 1);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++)
        pixel(x == 0 && y == 0, y, x, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
