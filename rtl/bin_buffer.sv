// bin_buffer: queues the four bin numbers of a tile for the bin counter.
//
// A tile yields four bin numbers (per colour) in one cycle, but a histogram
// RAM takes one increment per cycle. The buffer is a small FIFO of four-bin
// groups that hands the bins out one per cycle, the first pixel of a group
// first. A tile arrives at most every other camera pixel, i.e. every eight
// clocks at 12.5 Mpixel/s and 50 MHz, while a group drains in four, so the
// FIFO normally holds at most one group; the extra depth absorbs bursts.
// A group that arrives when the FIFO is full is dropped and flagged on
// overflow (the FIFO and its overflow policy are this design's own).
// out_last marks the last bin of a group pushed with in_last.
//
// Interface: in_valid/in_bins[4]/in_last; out_valid/out_bin/out_last;
// overflow (one-cycle pulse); level (groups held).
// Timing: a group pushed in cycle t gives its bins in cycles t+2 .. t+5
// (registered output).
module bin_buffer #(
  parameter int unsigned BIN_W = 4,
  parameter int unsigned DEPTH = 4   // groups of four bins, a power of two
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic [BIN_W-1:0]         in_bins [4],
  input  logic                     in_last,
  output logic                     out_valid,
  output logic [BIN_W-1:0]         out_bin,
  output logic                     out_last,
  output logic                     overflow,
  output logic [$clog2(DEPTH):0]   level
);

  localparam int unsigned PW = $clog2(DEPTH);

  typedef struct packed {
    logic [3:0][BIN_W-1:0] bin_nums;
    logic                  last;
  } group_t;

  group_t        fifo [DEPTH];
  logic [PW-1:0] rd_ptr, wr_ptr;
  logic [PW:0]   count;
  logic [1:0]    idx;
  logic          push, pop;
  group_t        head;

  assign head = fifo[rd_ptr];
  assign push = in_valid && (count != (PW+1)'(DEPTH));
  assign pop  = (count != '0) && (idx == 2'd3);
  assign level = count;

  always_ff @(posedge clk) begin
    if (push) begin
      for (int i = 0; i < 4; i++) fifo[wr_ptr].bin_nums[i] <= in_bins[i];
      fifo[wr_ptr].last <= in_last;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr    <= '0;
      wr_ptr    <= '0;
      count     <= '0;
      idx       <= '0;
      out_valid <= 1'b0;
      out_bin   <= '0;
      out_last  <= 1'b0;
      overflow  <= 1'b0;
    end else begin
      overflow <= in_valid && !push;
      if (push) wr_ptr <= wr_ptr + PW'(1);
      if (pop)  rd_ptr <= rd_ptr + PW'(1);
      count <= count + (PW+1)'(push) - (PW+1)'(pop);
      out_valid <= (count != '0);
      out_last  <= (count != '0) && (idx == 2'd3) && head.last;
      if (count != '0) begin
        out_bin <= head.bin_nums[idx];
        idx     <= idx + 2'd1;
      end
    end
  end

endmodule
