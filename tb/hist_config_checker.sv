// hist_config_checker: one colour-histogram pipeline in a given
// configuration, with its own reference model, for the workload testbench.
//
// It watches the shared camera stream, stores each frame, computes the
// expected histograms when the frame's last sample arrives (2x2
// interpolation, n-MSB bins, separate or 3-D), and compares every word the
// pipeline streams out, its order and out_last. It also checks the 14-clock
// latency of frame_done and that nothing overflows. Counts of checks and
// failures and the number of frames read out are outputs.
module hist_config_checker #(
  parameter vision_pkg::hist_mode_e MODE = vision_pkg::HIST_RGB,
  parameter int N_BITS = 4,
  parameter int W = 640,
  parameter int H = 480
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       cam_valid,
  input  logic       cam_sof,
  input  logic [7:0] cam_data,
  output logic       ready,
  output int         checks,
  output int         failures,
  output int         frames
);
  localparam int NH = (MODE == vision_pkg::HIST_RGB) ? 3 : 1;
  localparam int AW = (MODE == vision_pkg::HIST_RGB) ? N_BITS : 3 * N_BITS;
  localparam int NBINS = 2 ** AW;
  localparam int LATENCY = 14;

  logic          ov, last, fd, wb, bo, ro, fw;
  logic          rdy = 1;
  logic [1:0]    hist;
  logic [AW-1:0] bin;
  logic [18:0]   cnt;

  colour_hist_top #(.MODE(MODE), .N_BITS(N_BITS), .IMG_W(W), .IMG_H(H)) dut (
    .clk, .rst_n, .cam_valid, .cam_sof, .cam_data, .ready,
    .out_valid(ov), .out_ready(rdy), .out_hist(hist), .out_bin(bin),
    .out_count(cnt), .out_last(last), .frame_done(fd), .wbank(wb),
    .buf_overflow(bo), .readout_overrun(ro), .fwd_event(fw));

  logic [7:0]  img [H][W];
  int unsigned expct [NH][NBINS];
  int          x = 0, y = 0, idx = 0;
  int unsigned cycle = 0, last_pix_cycle = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL (mode %0d, n=%0d): %s", MODE, N_BITS, what);
    end
  endtask

  function automatic void model();
    int g11, r, b, g22, gm, gs [4], s;
    for (int h = 0; h < NH; h++) for (int i = 0; i < NBINS; i++) expct[h][i] = 0;
    for (int yy = 0; yy < H; yy += 2)
      for (int xx = 0; xx < W; xx += 2) begin
        g11 = int'(img[yy][xx]);
        r   = int'(img[yy][xx+1]);
        b   = int'(img[yy+1][xx]);
        g22 = int'(img[yy+1][xx+1]);
        gm  = (g11 + g22) / 2;
        gs  = '{g11, gm, gm, g22};
        s   = 8 - N_BITS;
        for (int p = 0; p < 4; p++)
          if (NH == 3) begin
            expct[0][r >> s]++;
            expct[NH > 1 ? 1 : 0][gs[p] >> s]++;
            expct[NH > 2 ? 2 : 0][b >> s]++;
          end else
            expct[0][((r >> s) << (2 * N_BITS)) | ((gs[p] >> s) << N_BITS) | (b >> s)]++;
      end
  endfunction

  initial begin
    checks = 0;
    failures = 0;
    frames = 0;
  end

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      if (cam_valid) begin
        if (cam_sof) begin x = 0; y = 0; end
        img[y][x] = cam_data;
        if (x == W - 1 && y == H - 1) begin
          model();
          last_pix_cycle = cycle;
        end
        if (x == W - 1) begin x = 0; y = (y == H - 1) ? 0 : y + 1; end
        else x++;
      end
      if (fd) check(cycle - last_pix_cycle == LATENCY,
                    $sformatf("frame_done latency %0d", cycle - last_pix_cycle));
      if (bo || ro) check(0, "overflow or overrun at the camera rate");
      if (ov && rdy) begin
        check(32'(hist) == idx / NBINS && 32'(bin) == idx % NBINS, "read-out order");
        check(32'(cnt) == expct[hist][bin],
              $sformatf("hist %0d bin %0d: got %0d exp %0d", hist, bin, cnt, expct[hist][bin]));
        check(last == (idx == NH * NBINS - 1), "out_last");
        idx = last ? 0 : idx + 1;
        if (last) frames++;
      end
    end
  end
endmodule
