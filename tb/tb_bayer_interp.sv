// tb_bayer_interp: random and corner-case 2x2 tiles; each output pixel is
// compared with the interpolation rule (red and blue copied, green kept at
// the green sites and averaged, rounded down, at the red and blue sites),
// one cycle after the input.
module tb_bayer_interp;
  import vision_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, in_last = 0, out_valid, out_last;
  bayer_win_t in_win = '0;
  rgb_t out_px [4];

  bayer_interp dut (.*);

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
    int g11, r12, b21, g22, gm;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      case (t)
        0: {g11, r12, b21, g22} = {32'd255, 32'd255, 32'd255, 32'd255};
        1: {g11, r12, b21, g22} = {32'd0, 32'd1, 32'd2, 32'd1};
        2: {g11, r12, b21, g22} = {32'd255, 32'd0, 32'd128, 32'd254};
        default: {g11, r12, b21, g22} = {$urandom_range(0, 255), $urandom_range(0, 255),
                                          $urandom_range(0, 255), $urandom_range(0, 255)};
      endcase
      in_valid = 1; in_last = (t == 299);
      in_win = '{g11: 8'(g11), r12: 8'(r12), b21: 8'(b21), g22: 8'(g22)};
      @(negedge clk);
      in_valid = 0;
      gm = (g11 + g22) / 2;
      check(out_valid, "out_valid one cycle later");
      check(out_last == (t == 299), "out_last");
      for (int p = 0; p < 4; p++) begin
        check(32'(out_px[p].r) == r12 && 32'(out_px[p].b) == b21,
              $sformatf("tile %0d pixel %0d red/blue", t, p));
      end
      check(32'(out_px[0].g) == g11, "G11 site keeps its green");
      check(32'(out_px[1].g) == gm, $sformatf("R12 site green %0d exp %0d", out_px[1].g, gm));
      check(32'(out_px[2].g) == gm, "B21 site green is the mean");
      check(32'(out_px[3].g) == g22, "G22 site keeps its green");
      @(negedge clk);
      check(!out_valid, "no output without input");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
