// tb_colour_hist_workloads: the histogram configurations the design is
// evaluated with, each on full 640 x 480 frames at the camera rate (one
// sample every four clocks): 256 bins per colour separate RGB (the largest
// RGB build), 8 bins per colour separate RGB, and the 512-bin 3-D histogram
// with 8 bins per colour. The three pipelines share one camera stream; each
// checks itself against its own reference model. Two frames are sent: a
// random one and a smooth gradient.
module tb_colour_hist_workloads;
  localparam int W = 640, H = 480, CPP = 4;

  logic clk = 0, rst_n = 0;
  always #10 clk = ~clk;
  logic       cam_valid = 0, cam_sof = 0;
  logic [7:0] cam_data = 0;
  logic       rdy [3];
  int         ck [3], fl [3], fr [3];

  hist_config_checker #(.MODE(vision_pkg::HIST_RGB), .N_BITS(8), .W(W), .H(H)) c_rgb256 (
    .clk, .rst_n, .cam_valid, .cam_sof, .cam_data, .ready(rdy[0]), .checks(ck[0]), .failures(fl[0]), .frames(fr[0]));
  hist_config_checker #(.MODE(vision_pkg::HIST_RGB), .N_BITS(3), .W(W), .H(H)) c_rgb8 (
    .clk, .rst_n, .cam_valid, .cam_sof, .cam_data, .ready(rdy[1]), .checks(ck[1]), .failures(fl[1]), .frames(fr[1]));
  hist_config_checker #(.MODE(vision_pkg::HIST_3D), .N_BITS(3), .W(W), .H(H)) c_3d512 (
    .clk, .rst_n, .cam_valid, .cam_sof, .cam_data, .ready(rdy[2]), .checks(ck[2]), .failures(fl[2]), .frames(fr[2]));

  int checks = 0, failures = 0;

  task automatic finish();
    checks += ck[0] + ck[1] + ck[2];
    failures += fl[0] + fl[1] + fl[2];
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    finish();
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (rdy[0] && rdy[1] && rdy[2]);
    @(negedge clk);
    for (int f = 0; f < 2; f++)
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          cam_valid = 1;
          cam_sof   = (x == 0 && y == 0);
          cam_data  = (f == 0) ? 8'($urandom) : 8'((x / 3 + y / 2) % 256);
          @(negedge clk);
          cam_valid = 0;
          cam_sof   = 0;
          repeat (CPP - 1) @(negedge clk);
        end
    wait (fr[0] == 2 && fr[1] == 2 && fr[2] == 2);
    repeat (5) @(posedge clk);
    for (int i = 0; i < 3; i++) begin
      checks++;
      if (fr[i] != 2) failures++;
    end
    finish();
  end
endmodule
