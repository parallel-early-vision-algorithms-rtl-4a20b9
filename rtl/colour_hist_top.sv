// colour_hist_top: colour histograms of a raw Bayer camera stream.
//
// A CMOS camera delivers 640 x 480 frames as a serial stream of 8-bit Bayer
// samples. This block turns every frame into colour histograms while the
// frame is still arriving, so that only the histograms (tens of bytes)
// leave the FPGA instead of the 300 kB image. The stages run concurrently:
//
//   pixel_counter  tags each sample with its row and column
//   address_gen    writes it into one of four line Block RAMs by Bayer site
//   line_ram x4    G11, R12, B21, G22 planes; a 2x2 tile is read in one cycle
//   bayer_interp   turns the tile into four RGB pixels
//   bin_calc x4    bin numbers of each pixel (n MSBs per colour)
//   bin_buffer     one per histogram; serialises four bins per tile
//   hist_unit      one per histogram; ping-pong RAMs with the bin counter
//   readout_ctrl   swaps the banks at frame end and streams the finished
//                  histograms out towards the SRAM (out_* handshake)
//
// MODE selects three separate 2^n-bin histograms (HIST_RGB: red, green and
// blue) or one 2^(3n)-bin 3-D histogram (HIST_3D). N_BITS is n.
//
// Timing: with the default pipeline, frame_done pulses 14 clock cycles
// after the last pixel of a frame is presented on cam_valid; the finished
// histograms are then read out, one bin every two cycles while out_ready is
// high. Samples may arrive at most one every two clocks (the camera gives
// one every four at 12.5 MHz pixel rate and 50 MHz clock). ready is low for
// the first 2^(bin address bits) cycles after reset while the histogram
// RAMs are cleared; pixels counted then are lost.
//
// The stage structure, the 2x2 interpolation, the bin-number formulas, the
// four line RAMs, the double-buffered histogram and the 14-cycle latency
// follow the specification; the stream handshakes, the start-of-frame
// input and the split of work between pipeline registers are this design's.
module colour_hist_top #(
  parameter vision_pkg::hist_mode_e  MODE      = vision_pkg::HIST_RGB,
  parameter int unsigned N_BITS    = vision_pkg::BIN_BITS,
  parameter int unsigned IMG_W     = vision_pkg::IMG_W,
  parameter int unsigned IMG_H     = vision_pkg::IMG_H,
  parameter int unsigned COUNT_W   = vision_pkg::COUNT_W,
  parameter int unsigned BUF_DEPTH = 4,
  localparam int unsigned NUM_HIST = (MODE == vision_pkg::HIST_RGB) ? 3 : 1,
  localparam int unsigned HADDR_W  = (MODE == vision_pkg::HIST_RGB) ? N_BITS : 3 * N_BITS
) (
  input  logic               clk,
  input  logic               rst_n,
  // camera stream
  input  logic               cam_valid,
  input  logic               cam_sof,
  input  logic [vision_pkg::PIX_W-1:0]   cam_data,
  output logic               ready,
  // finished histograms, towards the SRAM
  output logic               out_valid,
  input  logic               out_ready,
  output logic [1:0]         out_hist,
  output logic [HADDR_W-1:0] out_bin,
  output logic [COUNT_W-1:0] out_count,
  output logic               out_last,
  // status
  output logic               frame_done,
  output logic               wbank,
  output logic               buf_overflow,
  output logic               readout_overrun,
  output logic               fwd_event
);

  localparam int unsigned RW  = $clog2(IMG_H);
  localparam int unsigned CW  = $clog2(IMG_W);
  localparam int unsigned LAW = $clog2(vision_pkg::LINE_RAM_DEPTH);

  // ---------------------------------------------------------------- front end
  logic             pix_valid, pix_last;
  logic [RW-1:0]    pix_row;
  logic [CW-1:0]    pix_col;
  logic [vision_pkg::PIX_W-1:0] pix_data;

  pixel_counter #(.IMG_W(IMG_W), .IMG_H(IMG_H), .PIX_W(vision_pkg::PIX_W)) u_pixel_counter (
    .clk, .rst_n, .cam_valid, .cam_sof, .cam_data,
    .pix_valid, .pix_row, .pix_col, .pix_data, .pix_last
  );

  logic [3:0]       ram_we;
  logic [LAW-1:0]   ram_waddr, win_addr;
  logic [vision_pkg::PIX_W-1:0] ram_wdata;
  logic             win_rd, win_last;

  address_gen #(.IMG_W(IMG_W), .IMG_H(IMG_H), .PIX_W(vision_pkg::PIX_W),
                .RAM_DEPTH(vision_pkg::LINE_RAM_DEPTH)) u_address_gen (
    .clk, .rst_n, .pix_valid, .pix_row, .pix_col, .pix_data, .pix_last,
    .ram_we, .ram_waddr, .ram_wdata, .win_rd, .win_addr, .win_last
  );

  logic [vision_pkg::PIX_W-1:0] ram_rdata [4];

  for (genvar i = 0; i < 4; i++) begin : g_line_ram
    line_ram #(.DEPTH(vision_pkg::LINE_RAM_DEPTH), .DATA_W(vision_pkg::PIX_W)) u_line_ram (
      .clk,
      .we   (ram_we[i]),
      .waddr(ram_waddr),
      .wdata(ram_wdata),
      .re   (win_rd),
      .raddr(win_addr),
      .rdata(ram_rdata[i])
    );
  end

  // The tile leaves the line RAMs two cycles after the read request.
  logic [1:0] win_valid_d, win_last_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      win_valid_d <= '0;
      win_last_d  <= '0;
    end else begin
      win_valid_d <= {win_valid_d[0], win_rd};
      win_last_d  <= {win_last_d[0], win_rd && win_last};
    end
  end

  vision_pkg::bayer_win_t tile;
  assign tile = '{g11: ram_rdata[0], r12: ram_rdata[1],
                  b21: ram_rdata[2], g22: ram_rdata[3]};

  logic px_valid, px_last;
  vision_pkg::rgb_t px [4];

  bayer_interp u_bayer_interp (
    .clk, .rst_n,
    .in_valid (win_valid_d[1]),
    .in_win   (tile),
    .in_last  (win_last_d[1]),
    .out_valid(px_valid),
    .out_px   (px),
    .out_last (px_last)
  );

  // ------------------------------------------------------------ bin numbers
  logic                bins_valid [4];
  logic                bins_last  [4];
  logic [N_BITS-1:0]   r_bin [4], g_bin [4], b_bin [4];
  logic [3*N_BITS-1:0] bin3d [4];

  for (genvar p = 0; p < 4; p++) begin : g_bin_calc
    bin_calc #(.N_BITS(N_BITS)) u_bin_calc (
      .clk, .rst_n,
      .in_valid (px_valid),
      .in_px    (px[p]),
      .in_last  (px_last),
      .out_valid(bins_valid[p]),
      .r_bin    (r_bin[p]),
      .g_bin    (g_bin[p]),
      .b_bin    (b_bin[p]),
      .bin3d    (bin3d[p]),
      .out_last (bins_last[p])
    );
  end

  // ------------------------------------------------- buffers and histograms
  logic [HADDR_W-1:0] grp    [NUM_HIST][4];
  logic               inc_valid [NUM_HIST];
  logic [HADDR_W-1:0] inc_bin   [NUM_HIST];
  logic               inc_last  [NUM_HIST];
  logic               ovf       [NUM_HIST];
  logic               done      [NUM_HIST];
  logic               busy      [NUM_HIST];
  logic               fwd       [NUM_HIST];
  logic               rd_en     [NUM_HIST];
  logic [HADDR_W-1:0] rd_addr;
  logic [COUNT_W-1:0] rd_data   [NUM_HIST];

  always_comb begin
    for (int p = 0; p < 4; p++) begin
      if (MODE == vision_pkg::HIST_RGB) begin
        grp[0][p]            = HADDR_W'(r_bin[p]);
        grp[1 % NUM_HIST][p] = HADDR_W'(g_bin[p]);
        grp[2 % NUM_HIST][p] = HADDR_W'(b_bin[p]);
      end else begin
        grp[0][p] = HADDR_W'(bin3d[p]);
      end
    end
  end

  for (genvar h = 0; h < NUM_HIST; h++) begin : g_hist
    logic [$clog2(BUF_DEPTH):0] level;

    bin_buffer #(.BIN_W(HADDR_W), .DEPTH(BUF_DEPTH)) u_bin_buffer (
      .clk, .rst_n,
      .in_valid (bins_valid[0]),
      .in_bins  (grp[h]),
      .in_last  (bins_last[0]),
      .out_valid(inc_valid[h]),
      .out_bin  (inc_bin[h]),
      .out_last (inc_last[h]),
      .overflow (ovf[h]),
      .level    (level)
    );

    hist_unit #(.ADDR_W(HADDR_W), .DATA_W(COUNT_W)) u_hist_unit (
      .clk, .rst_n,
      .wbank,
      .inc_valid(inc_valid[h]),
      .inc_bin  (inc_bin[h]),
      .inc_last (inc_last[h]),
      .done     (done[h]),
      .rd_en    (rd_en[h]),
      .rd_addr  (rd_addr),
      .rd_data  (rd_data[h]),
      .busy     (busy[h]),
      .fwd      (fwd[h])
    );
  end

  // The histograms run in lock step; combine their status.
  always_comb begin
    frame_done   = 1'b1;
    ready        = 1'b1;
    buf_overflow = 1'b0;
    fwd_event    = 1'b0;
    for (int h = 0; h < NUM_HIST; h++) begin
      frame_done   &= done[h];
      ready        &= !busy[h];
      buf_overflow |= ovf[h];
      fwd_event    |= fwd[h];
    end
  end

  readout_ctrl #(.NUM_HIST(NUM_HIST), .ADDR_W(HADDR_W), .DATA_W(COUNT_W)) u_readout_ctrl (
    .clk, .rst_n,
    .frame_done,
    .wbank,
    .rd_en,
    .rd_addr,
    .rd_data,
    .out_valid,
    .out_ready,
    .out_hist,
    .out_bin,
    .out_count,
    .out_last,
    .busy     (),
    .overrun  (readout_overrun)
  );

endmodule
