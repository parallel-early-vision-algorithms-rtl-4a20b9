// pixel_counter: tags each camera pixel with its row and column.
//
// The camera sends one 8-bit pixel per cam_valid strobe, line after line.
// Two counters hold the position of the next pixel; they wrap at the end of
// a line and of a frame. cam_sof, when set with a pixel, marks it as the
// first pixel of a frame and re-aligns the counters (the start-of-frame input
// is this design's own choice; the camera's sync signals are not specified).
//
// Interface: cam_valid/cam_sof/cam_data in; pix_valid, pix_row, pix_col,
// pix_data and pix_last (last pixel of the frame) out.
// Timing: outputs are registered, one cycle after the input strobe.
module pixel_counter #(
  parameter int unsigned IMG_W = vision_pkg::IMG_W,
  parameter int unsigned IMG_H = vision_pkg::IMG_H,
  parameter int unsigned PIX_W = vision_pkg::PIX_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     cam_valid,
  input  logic                     cam_sof,
  input  logic [PIX_W-1:0]         cam_data,
  output logic                     pix_valid,
  output logic [$clog2(IMG_H)-1:0] pix_row,
  output logic [$clog2(IMG_W)-1:0] pix_col,
  output logic [PIX_W-1:0]         pix_data,
  output logic                     pix_last
);

  localparam int unsigned RW = $clog2(IMG_H);
  localparam int unsigned CW = $clog2(IMG_W);

  logic [RW-1:0] row_cnt, cur_row;
  logic [CW-1:0] col_cnt, cur_col;
  logic          end_of_line, end_of_frame;

  always_comb begin
    cur_row      = cam_sof ? '0 : row_cnt;
    cur_col      = cam_sof ? '0 : col_cnt;
    end_of_line  = (cur_col == CW'(IMG_W - 1));
    end_of_frame = end_of_line && (cur_row == RW'(IMG_H - 1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row_cnt   <= '0;
      col_cnt   <= '0;
      pix_valid <= 1'b0;
      pix_row   <= '0;
      pix_col   <= '0;
      pix_data  <= '0;
      pix_last  <= 1'b0;
    end else begin
      pix_valid <= cam_valid;
      if (cam_valid) begin
        pix_row  <= cur_row;
        pix_col  <= cur_col;
        pix_data <= cam_data;
        pix_last <= end_of_frame;
        if (end_of_line) begin
          col_cnt <= '0;
          row_cnt <= end_of_frame ? '0 : cur_row + RW'(1);
        end else begin
          col_cnt <= cur_col + CW'(1);
          row_cnt <= cur_row;
        end
      end
    end
  end

endmodule
