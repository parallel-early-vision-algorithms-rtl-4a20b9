// bayer_interp: 2x2 Bayer interpolation of one tile into four RGB pixels.
//
// Each tile G11 R12 / B21 G22 holds one red, one blue and two green samples.
// The single red and blue samples are copied to all four pixels; the green
// sample is kept where it was measured and the mean of the two greens is
// used at the red and blue sites:
//   px[0] (G11 site) = (R12, G11,             B21)
//   px[1] (R12 site) = (R12, (G11 + G22) / 2, B21)
//   px[2] (B21 site) = (R12, (G11 + G22) / 2, B21)
//   px[3] (G22 site) = (R12, G22,             B21)
// The mean is rounded down (the rounding is this design's choice).
//
// Interface: in_valid/in_win/in_last; out_valid/out_px/out_last.
// Timing: one register stage, results one cycle after the input.
module bayer_interp
  import vision_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  bayer_win_t in_win,
  input  logic       in_last,
  output logic       out_valid,
  output rgb_t       out_px [4],
  output logic       out_last
);

  logic [PIX_W:0]   g_sum;
  logic [PIX_W-1:0] g_avg;
  rgb_t             px [4];

  always_comb begin
    g_sum = {1'b0, in_win.g11} + {1'b0, in_win.g22};
    g_avg = g_sum[PIX_W:1];
    px[0] = '{r: in_win.r12, g: in_win.g11, b: in_win.b21};
    px[1] = '{r: in_win.r12, g: g_avg,      b: in_win.b21};
    px[2] = '{r: in_win.r12, g: g_avg,      b: in_win.b21};
    px[3] = '{r: in_win.r12, g: in_win.g22, b: in_win.b21};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      for (int i = 0; i < 4; i++) out_px[i] <= '0;
    end else begin
      out_valid <= in_valid;
      out_last  <= in_valid && in_last;
      if (in_valid) out_px <= px;
    end
  end

endmodule
