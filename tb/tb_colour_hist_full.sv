// tb_colour_hist_full: two full VGA frames through the pipeline at its
// default configuration (640 x 480 Bayer frames, separate 16-bin RGB
// histograms, 19-bit counts).
//
// Pixels arrive one every four clocks, the camera's 12.5 MHz pixel rate at a
// 50 MHz clock. The first frame is random, the second a smooth gradient.
// The testbench computes the expected histograms from the raw samples and
// compares every streamed count, checks that frame_done comes 14 clocks
// after the last pixel, that the counts of each histogram add up to the
// 307200 pixels of a frame and that no buffer overflows at this rate.
module tb_colour_hist_full;

  localparam int W = 640, H = 480;
  localparam int NB = 4;
  localparam int CPP = 4;
  localparam int LATENCY = 14;
  localparam int NFRAMES = 2;

  logic clk = 0, rst_n = 0;
  always #10 clk = ~clk;  // 50 MHz

  logic        cam_valid = 0, cam_sof = 0;
  logic [7:0]  cam_data = 0;
  logic        ready, ov, rdy, last, fd, wb, bo, ro, fw;
  logic [1:0]  hist;
  logic [NB-1:0] bin;
  logic [18:0] cnt;

  colour_hist_top dut (
    .clk, .rst_n, .cam_valid, .cam_sof, .cam_data, .ready,
    .out_valid(ov), .out_ready(rdy), .out_hist(hist), .out_bin(bin),
    .out_count(cnt), .out_last(last), .frame_done(fd), .wbank(wb),
    .buf_overflow(bo), .readout_overrun(ro), .fwd_event(fw));

  int checks = 0, failures = 0;
  int unsigned cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  int unsigned exp_rgb [NFRAMES][3][2**NB];
  int unsigned sum_rgb [3];
  logic [7:0]  img [H][W];

  function automatic void model(input int f);
    int g, r, b, gm, gs [4];
    for (int h = 0; h < 3; h++) for (int i = 0; i < 2**NB; i++) exp_rgb[f][h][i] = 0;
    for (int y = 0; y < H; y += 2)
      for (int x = 0; x < W; x += 2) begin
        g  = int'(img[y][x]);
        r  = int'(img[y][x+1]);
        b  = int'(img[y+1][x]);
        gm = (int'(img[y][x]) + int'(img[y+1][x+1])) / 2;
        gs = '{g, gm, gm, int'(img[y+1][x+1])};
        for (int p = 0; p < 4; p++) begin
          exp_rgb[f][0][r >> (8-NB)]++;
          exp_rgb[f][1][gs[p] >> (8-NB)]++;
          exp_rgb[f][2][b >> (8-NB)]++;
        end
      end
  endfunction

  int frames = 0, idx = 0, n_done = 0;
  int unsigned last_pix_cycle;

  always @(posedge clk) if (rst_n) begin
    if (ov && rdy) begin
      check(hist == 2'(idx / (2**NB)) && bin == NB'(idx % (2**NB)), "read-out order");
      check(32'(cnt) == exp_rgb[frames][hist][bin],
            $sformatf("frame %0d hist %0d bin %0d: got %0d exp %0d", frames, hist, bin,
                      cnt, exp_rgb[frames][hist][bin]));
      sum_rgb[hist] += 32'(cnt);
      idx++;
      if (last) begin
        for (int h = 0; h < 3; h++) begin
          check(sum_rgb[h] == W * H, $sformatf("histogram %0d sums to %0d", h, sum_rgb[h]));
          sum_rgb[h] = 0;
        end
        idx = 0;
        frames++;
      end
    end
    if (bo) check(0, "buffer overflow at the camera pixel rate");
    if (ro) check(0, "read-out overrun");
    if (fd) begin
      n_done++;
      check(cycle - last_pix_cycle == LATENCY,
            $sformatf("frame_done latency %0d, expected %0d", cycle - last_pix_cycle, LATENCY));
    end
  end

  always @(negedge clk) rdy <= ($urandom_range(0, 3) != 0);

  task automatic send_frame();
    @(negedge clk);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        cam_valid = 1;
        cam_sof   = (x == 0 && y == 0);
        cam_data  = img[y][x];
        @(posedge clk);
        if (y == H-1 && x == W-1) last_pix_cycle = cycle;
        @(negedge clk);
        cam_valid = 0;
        cam_sof   = 0;
        repeat (CPP - 1) @(negedge clk);
      end
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sum_rgb = '{0, 0, 0};
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (ready);
    for (int f = 0; f < NFRAMES; f++) begin
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++)
          img[y][x] = (f == 0) ? 8'($urandom) : 8'((x / 3 + y / 2) % 256);
      model(f);
      send_frame();
    end
    wait (frames == NFRAMES);
    repeat (10) @(posedge clk);
    check(n_done == NFRAMES, $sformatf("frame_done count %0d", n_done));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
