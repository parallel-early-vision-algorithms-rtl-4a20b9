// readout_ctrl: swaps the histogram banks at frame end and copies the
// finished histograms out towards the board SRAM.
//
// On frame_done the write and read banks of every hist_unit swap (wbank
// toggles) and the controller walks the new read bank: histogram 0 bin 0,
// bin 1, ..., then histogram 1, and so on. For each bin it reads the count
// (which the hist_unit clears as it is read), holds it on the output with
// its histogram index and bin number until out_ready accepts it, then moves
// on. out_last marks the final bin of a frame. In the separate-RGB mode the
// histograms are red (0), green (1) and blue (2); in 3-D mode there is one.
//
// If a frame ends before the previous read-out is complete, the banks are
// not swapped and overrun pulses; the write bank then keeps counting, so the
// next histogram covers both frames. The streaming protocol, the order and
// the overrun policy are this design's own; the SRAM itself is off chip.
//
// Interface: frame_done in; wbank out to the hist_units; rd_en[h]/rd_addr
// out and rd_data[h] in (one-cycle read); out_valid/out_ready handshake with
// out_hist, out_bin, out_count, out_last; busy; overrun.
// Timing: one bin every two cycles while out_ready stays high.
module readout_ctrl #(
  parameter int unsigned NUM_HIST = 3,
  parameter int unsigned ADDR_W   = vision_pkg::BIN_BITS,
  parameter int unsigned DATA_W   = vision_pkg::COUNT_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              frame_done,
  output logic              wbank,
  output logic              rd_en [NUM_HIST],
  output logic [ADDR_W-1:0] rd_addr,
  input  logic [DATA_W-1:0] rd_data [NUM_HIST],
  output logic              out_valid,
  input  logic              out_ready,
  output logic [1:0]        out_hist,
  output logic [ADDR_W-1:0] out_bin,
  output logic [DATA_W-1:0] out_count,
  output logic              out_last,
  output logic              busy,
  output logic              overrun
);

  typedef enum logic [1:0] {IDLE, READ, CAPT, HOLD} state_e;

  state_e      state;
  logic [1:0]  sel;
  logic        last_bin;

  assign busy     = (state != IDLE);
  assign last_bin = (rd_addr == '1) && (sel == 2'(NUM_HIST - 1));

  always_comb begin
    for (int h = 0; h < NUM_HIST; h++)
      rd_en[h] = (state == READ) && (sel == 2'(h));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= IDLE;
      wbank     <= 1'b0;
      sel       <= '0;
      rd_addr   <= '0;
      out_valid <= 1'b0;
      out_hist  <= '0;
      out_bin   <= '0;
      out_count <= '0;
      out_last  <= 1'b0;
      overrun   <= 1'b0;
    end else begin
      overrun <= frame_done && (state != IDLE);
      unique case (state)
        IDLE: if (frame_done) begin
          wbank   <= ~wbank;
          sel     <= '0;
          rd_addr <= '0;
          state   <= READ;
        end
        READ: state <= CAPT;
        CAPT: begin
          out_valid <= 1'b1;
          out_hist  <= sel;
          out_bin   <= rd_addr;
          out_count <= rd_data[sel];
          out_last  <= last_bin;
          state     <= HOLD;
        end
        HOLD: if (out_ready) begin
          out_valid <= 1'b0;
          out_last  <= 1'b0;
          if (last_bin) begin
            state <= IDLE;
          end else begin
            if (rd_addr == '1) sel <= sel + 2'd1;
            rd_addr <= rd_addr + ADDR_W'(1);
            state   <= READ;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  // The held bin must stay stable until it is accepted.
  property p_hold_stable;
    @(posedge clk) disable iff (!rst_n)
      out_valid && !out_ready |=> out_valid && $stable(out_count) && $stable(out_bin);
  endproperty
  assert property (p_hold_stable);

endmodule
