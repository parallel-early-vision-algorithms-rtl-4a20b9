// address_gen: spreads the Bayer stream over four line Block RAMs.
//
// The raw image is a Bayer mosaic whose 2x2 tiles read
//   G11 R12      (even line: G at even column, R at odd column)
//   B21 G22      (odd line:  B at even column, G at odd column)
// Each of the four colour sites of a tile goes to its own Block RAM, at the
// address col/2, so that the four pixels of a tile sit at the same address
// in four RAMs and can be read in one cycle. RAM 0 holds G11, RAM 1 R12,
// RAM 2 B21 and RAM 3 G22. When the G22 pixel of a tile has been written the
// tile is complete, and a read of all four RAMs at its address is requested.
// Tiles do not overlap: each produces four output pixels.
//
// Interface: tagged pixels from pixel_counter in; four write enables, a
// shared write address and data, and a window read request (win_rd,
// win_addr, win_last) out.
// Timing: the write port is driven combinationally from the registered
// pixel; the read request follows one cycle later, once G22 is in its RAM.
module address_gen #(
  parameter int unsigned IMG_W      = vision_pkg::IMG_W,
  parameter int unsigned IMG_H      = vision_pkg::IMG_H,
  parameter int unsigned PIX_W      = vision_pkg::PIX_W,
  parameter int unsigned RAM_DEPTH  = vision_pkg::LINE_RAM_DEPTH
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         pix_valid,
  input  logic [$clog2(IMG_H)-1:0]     pix_row,
  input  logic [$clog2(IMG_W)-1:0]     pix_col,
  input  logic [PIX_W-1:0]             pix_data,
  input  logic                         pix_last,
  output logic [3:0]                   ram_we,
  output logic [$clog2(RAM_DEPTH)-1:0] ram_waddr,
  output logic [PIX_W-1:0]             ram_wdata,
  output logic                         win_rd,
  output logic [$clog2(RAM_DEPTH)-1:0] win_addr,
  output logic                         win_last
);

  localparam int unsigned AW = $clog2(RAM_DEPTH);

  // A line's tiles must fit in one Block RAM.
  initial assert (IMG_W / 2 <= RAM_DEPTH)
    else $error("address_gen: IMG_W/2 exceeds the line RAM depth");

  logic [1:0] site;  // {row parity, column parity}: 0 G11, 1 R12, 2 B21, 3 G22

  always_comb begin
    site      = {pix_row[0], pix_col[0]};
    ram_waddr = AW'(pix_col >> 1);
    ram_wdata = pix_data;
    ram_we    = '0;
    if (pix_valid) ram_we[site] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      win_rd   <= 1'b0;
      win_addr <= '0;
      win_last <= 1'b0;
    end else begin
      win_rd   <= pix_valid && (site == 2'd3);
      win_addr <= ram_waddr;
      win_last <= pix_valid && pix_last;
    end
  end

endmodule
