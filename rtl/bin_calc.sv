// bin_calc: histogram bin numbers of one RGB pixel.
//
// With 2^n equal bins per colour, the n most significant bits of a colour
// component are its bin number. For the separate RGB histograms each
// component gives its own bin (r_bin, g_bin, b_bin). For the 3-D histogram
// the three bin numbers are concatenated into one 3n-bit bin number, red in
// the top n bits, then green, then blue in the low n bits. Both forms are
// produced; the histogram type chosen at the top decides which is used.
//
// Interface: in_valid/in_px/in_last; out_valid, r_bin, g_bin, b_bin, bin3d,
// out_last.
// Timing: one register stage, results one cycle after the input.
module bin_calc
  import vision_pkg::*;
#(
  parameter int unsigned N_BITS = vision_pkg::BIN_BITS  // n, 1..8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  rgb_t                  in_px,
  input  logic                  in_last,
  output logic                  out_valid,
  output logic [N_BITS-1:0]     r_bin,
  output logic [N_BITS-1:0]     g_bin,
  output logic [N_BITS-1:0]     b_bin,
  output logic [3*N_BITS-1:0]   bin3d,
  output logic                  out_last
);

  initial assert (N_BITS >= 1 && N_BITS <= PIX_W)
    else $error("bin_calc: N_BITS must be 1..%0d", PIX_W);

  logic [N_BITS-1:0] r_n, g_n, b_n;

  always_comb begin
    r_n = in_px.r[PIX_W-1 -: N_BITS];
    g_n = in_px.g[PIX_W-1 -: N_BITS];
    b_n = in_px.b[PIX_W-1 -: N_BITS];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      r_bin     <= '0;
      g_bin     <= '0;
      b_bin     <= '0;
      bin3d     <= '0;
    end else begin
      out_valid <= in_valid;
      out_last  <= in_valid && in_last;
      if (in_valid) begin
        r_bin <= r_n;
        g_bin <= g_n;
        b_bin <= b_n;
        bin3d <= {r_n, g_n, b_n};
      end
    end
  end

endmodule
