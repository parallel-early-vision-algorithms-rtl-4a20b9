// tb_bin_calc: bin numbers of random pixels for n = 4 (16 bins per colour,
// 4096 3-D bins) and n = 3 (8 bins per colour, 512 3-D bins), computed in
// the testbench by integer division by 2^(8-n).
module tb_bin_calc;
  import vision_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, in_last = 0;
  rgb_t in_px = '0;
  logic v4, l4, v3, l3;
  logic [3:0] r4, g4, b4;
  logic [11:0] d4;
  logic [2:0] r3, g3, b3;
  logic [8:0] d3;

  bin_calc dut4 (.clk, .rst_n, .in_valid, .in_px, .in_last, .out_valid(v4),
                 .r_bin(r4), .g_bin(g4), .b_bin(b4), .bin3d(d4), .out_last(l4));
  bin_calc #(.N_BITS(3)) dut3 (.clk, .rst_n, .in_valid, .in_px, .in_last, .out_valid(v3),
                 .r_bin(r3), .g_bin(g3), .b_bin(b3), .bin3d(d3), .out_last(l3));

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
    int r, g, b;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      r = $urandom_range(0, 255); g = $urandom_range(0, 255); b = $urandom_range(0, 255);
      if (t == 0) {r, g, b} = {32'd255, 32'd0, 32'd128};
      in_px = '{r: 8'(r), g: 8'(g), b: 8'(b)};
      in_valid = 1; in_last = (t == 399);
      @(negedge clk);
      in_valid = 0;
      check(v4 && v3, "out_valid one cycle later");
      check(l4 == (t == 399), "out_last");
      check(32'(r4) == r / 16 && 32'(g4) == g / 16 && 32'(b4) == b / 16, "16-bin RGB bins");
      check(32'(d4) == (r / 16) * 256 + (g / 16) * 16 + b / 16, "4096-bin 3-D bin");
      check(32'(r3) == r / 32 && 32'(g3) == g / 32 && 32'(b3) == b / 32, "8-bin RGB bins");
      check(32'(d3) == (r / 32) * 64 + (g / 32) * 8 + b / 32,
            $sformatf("512-bin 3-D bin %0d for %0d,%0d,%0d", d3, r, g, b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
