// tb_colour_hist_top: end-to-end test of the colour-histogram pipeline.
//
// Two pipelines share one camera stream: one builds separate 16-bin RGB
// histograms, the other a 64-bin 3-D histogram (2 bits per colour). Frames
// are 16 x 8 pixels to keep the run short. For every frame the testbench
// computes the expected histograms itself, from the raw Bayer samples, and
// compares them with what each pipeline streams out. It also checks that
// frame_done follows the last pixel by 14 clocks, that ready rises once the
// histogram RAMs are cleared, and it makes each mechanism happen at least
// once: bank swap, counter forwarding, read-out back-pressure, start-of-
// frame re-alignment, buffer overflow and read-out overrun. The last two
// are provoked in final frames sent at one pixel per clock while the
// read-out is held off (the buffers are set to two groups here so that a
// 16-pixel line can overflow them); those frames' counts are not compared.
module tb_colour_hist_top;

  localparam int W = 16, H = 8;
  localparam int NB = 4;          // RGB pipeline: 16 bins per colour
  localparam int NB3 = 2;         // 3-D pipeline: 64 bins
  localparam int CPP = 4;         // clocks per pixel (50 MHz / 12.5 MHz)
  localparam int LATENCY = 14;
  localparam int NFRAMES = 5;     // checked frames

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       cam_valid = 0, cam_sof = 0;
  logic [7:0] cam_data = 0;

  // RGB pipeline
  logic        ready_a, ov_a, rdy_a, last_a, fd_a, wb_a, bo_a, ro_a, fw_a;
  logic [1:0]  hist_a;
  logic [NB-1:0] bin_a;
  logic [18:0] cnt_a;
  // 3-D pipeline
  logic        ready_b, ov_b, rdy_b, last_b, fd_b, wb_b, bo_b, ro_b, fw_b;
  logic [1:0]  hist_b;
  logic [3*NB3-1:0] bin_b;
  logic [18:0] cnt_b;

  colour_hist_top #(.MODE(vision_pkg::HIST_RGB), .N_BITS(NB), .IMG_W(W), .IMG_H(H), .BUF_DEPTH(2)) dut_a (
    .clk, .rst_n, .cam_valid, .cam_sof, .cam_data, .ready(ready_a),
    .out_valid(ov_a), .out_ready(rdy_a), .out_hist(hist_a), .out_bin(bin_a),
    .out_count(cnt_a), .out_last(last_a), .frame_done(fd_a), .wbank(wb_a),
    .buf_overflow(bo_a), .readout_overrun(ro_a), .fwd_event(fw_a));

  colour_hist_top #(.MODE(vision_pkg::HIST_3D), .N_BITS(NB3), .IMG_W(W), .IMG_H(H), .BUF_DEPTH(2)) dut_b (
    .clk, .rst_n, .cam_valid, .cam_sof, .cam_data, .ready(ready_b),
    .out_valid(ov_b), .out_ready(rdy_b), .out_hist(hist_b), .out_bin(bin_b),
    .out_count(cnt_b), .out_last(last_b), .frame_done(fd_b), .wbank(wb_b),
    .buf_overflow(bo_b), .readout_overrun(ro_b), .fwd_event(fw_b));

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

  // ------------------------------------------------------ reference model
  int unsigned exp_rgb [NFRAMES+1][3][2**NB];
  int unsigned exp_3d  [NFRAMES+1][2**(3*NB3)];
  logic [7:0]  img [H][W];

  function automatic void model(input int f);
    int g, r, b, gm, gs [4];
    for (int h = 0; h < 3; h++) for (int i = 0; i < 2**NB; i++) exp_rgb[f][h][i] = 0;
    for (int i = 0; i < 2**(3*NB3); i++) exp_3d[f][i] = 0;
    for (int y = 0; y < H; y += 2)
      for (int x = 0; x < W; x += 2) begin
        g  = img[y][x];
        r  = img[y][x+1];
        b  = img[y+1][x];
        gm = (img[y][x] + img[y+1][x+1]) / 2;
        gs = '{g, gm, gm, img[y+1][x+1]};
        for (int p = 0; p < 4; p++) begin
          exp_rgb[f][0][r >> (8-NB)]++;
          exp_rgb[f][1][gs[p] >> (8-NB)]++;
          exp_rgb[f][2][b >> (8-NB)]++;
          exp_3d[f][((r >> (8-NB3)) << (2*NB3)) | ((gs[p] >> (8-NB3)) << NB3) | (b >> (8-NB3))]++;
        end
      end
  endfunction

  // ----------------------------------------------------------- monitors
  int unsigned got_rgb [3][2**NB];
  int unsigned got_3d  [2**(3*NB3)];
  int frames_a = 0, frames_b = 0, idx_a = 0, idx_b = 0;
  bit checking = 1;
  int n_swap = 0, n_fwd = 0, n_stall = 0, n_ovf = 0, n_overrun = 0, n_resync = 0, n_done = 0;
  int unsigned last_pix_cycle;
  logic wb_q = 0;

  always @(posedge clk) if (rst_n) begin
    if (ov_a && rdy_a) begin
      if (checking && frames_a < NFRAMES) begin
        check(hist_a == 2'(idx_a / (2**NB)) && bin_a == NB'(idx_a % (2**NB)), "RGB read-out order");
        check(last_a == (idx_a == 3*(2**NB) - 1), "RGB out_last");
        check(cnt_a == exp_rgb[frames_a][hist_a][bin_a],
              $sformatf("RGB frame %0d hist %0d bin %0d: got %0d exp %0d", frames_a, hist_a, bin_a,
                        cnt_a, exp_rgb[frames_a][hist_a][bin_a]));
      end
      idx_a++;
      if (last_a) begin idx_a = 0; frames_a++; end
    end
    if (ov_b && rdy_b) begin
      if (checking && frames_b < NFRAMES) begin
        check(hist_b == 0 && bin_b == 6'(idx_b), "3-D read-out order");
        check(cnt_b == exp_3d[frames_b][bin_b],
              $sformatf("3-D frame %0d bin %0d: got %0d exp %0d", frames_b, bin_b, cnt_b,
                        exp_3d[frames_b][bin_b]));
      end
      idx_b++;
      if (last_b) begin idx_b = 0; frames_b++; end
    end
    if (ov_a && !rdy_a) n_stall++;
    if (fw_a || fw_b) n_fwd++;
    if (bo_a || bo_b) begin
      n_ovf++;
      if (checking) check(0, "no buffer overflow at the camera pixel rate");
    end
    if (ro_a || ro_b) n_overrun++;
    wb_q <= wb_a;
    if (wb_a != wb_q) n_swap++;
    if (fd_a) begin
      n_done++;
      if (checking) check(cycle - last_pix_cycle == LATENCY,
            $sformatf("frame_done latency %0d, expected %0d", cycle - last_pix_cycle, LATENCY));
      check(fd_b, "both pipelines finish in the same cycle");
    end
  end

  // random back-pressure from the SRAM side while checking
  always @(negedge clk) begin
    rdy_a <= checking ? ($urandom_range(0, 2) != 0) : 1'b0;
    rdy_b <= checking ? ($urandom_range(0, 2) != 0) : 1'b0;
  end

  // ------------------------------------------------------------ stimulus
  // One pixel every cpp clocks.
  task automatic send_frame(input int cpp);
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
        repeat (cpp - 1) @(negedge clk);
      end
  endtask

  task automatic make_image(input int kind);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++)
        case (kind)
          0: img[y][x] = 8'($urandom);
          1: img[y][x] = 8'(40 + x * 3 + y);           // smooth ramp, many equal bins
          default: img[y][x] = ((x + y) % 2 != 0) ? 8'd250 : 8'd10;  // extremes
        endcase
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned t0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    t0 = cycle;
    wait (ready_a);
    check(cycle - t0 <= 2**NB + 2, "RGB pipeline ready after clearing 16 bins");
    wait (ready_b);
    check(cycle - t0 >= 2**(3*NB3) && cycle - t0 <= 2**(3*NB3) + 2,
          "3-D pipeline ready after clearing 64 bins");
    repeat (4) @(posedge clk);
    for (int f = 0; f < NFRAMES; f++) begin
      make_image(f < 2 ? f : (f == 2 ? 2 : 0));
      model(f);
      if (f == 3) begin
        // a few stray pixels; the next start of frame re-aligns the counter
        for (int k = 0; k < 5; k++) begin
          @(negedge clk); cam_valid = 1; cam_data = 8'($urandom);
          @(negedge clk); cam_valid = 0;
        end
        n_resync++;
      end
      send_frame(CPP);
      repeat (20) @(posedge clk);
    end
    wait (frames_a == NFRAMES && frames_b == NFRAMES);
    repeat (10) @(posedge clk);
    // Overload: read-out held off, pixels at one per clock.
    checking = 0;
    make_image(0);
    send_frame(1);
    repeat (30) @(posedge clk);
    make_image(0);
    send_frame(2);
    repeat (30) @(posedge clk);

    check(frames_a == NFRAMES && frames_b == NFRAMES, "all checked frames read out");
    check(n_done == NFRAMES + 2, $sformatf("frame_done count %0d", n_done));
    check(n_swap >= NFRAMES, $sformatf("bank swaps %0d", n_swap));
    check(n_fwd > 0, "counter forwarding happened");
    check(n_stall > 0, "read-out back-pressure happened");
    check(n_resync > 0, "start-of-frame re-alignment happened");
    check(n_ovf > 0, "buffer overflow happened");
    check(n_overrun > 0, "read-out overrun happened");
    $display("events: swap=%0d fwd=%0d stall=%0d resync=%0d overflow=%0d overrun=%0d",
             n_swap, n_fwd, n_stall, n_resync, n_ovf, n_overrun);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
