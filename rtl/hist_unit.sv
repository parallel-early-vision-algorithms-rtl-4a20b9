// hist_unit: ping-pong histogram memory with its bin counter.
//
// Two histogram RAMs take turns. The write bank (selected by wbank) counts
// the pixels of the frame being received: each bin number on inc_bin adds
// one to the count stored at that address. The read bank holds the
// histogram of the previous frame and is read out through rd_en/rd_addr;
// every count read is cleared in the same cycle, so the bank is empty again
// when it next becomes the write bank. After reset both banks are cleared
// (busy is high for 2^ADDR_W cycles; increments are ignored then).
//
// The counter is a three-stage read-modify-write pipeline that accepts one
// bin per cycle:
//   s0  the bin number addresses the write bank
//   s1  the old count arrives; one is added
//   s2  the new count is written back
// A bin that is still in s2, or was written in the cycle before, is not yet
// in the value read, so its new count is forwarded instead (fwd pulses when
// this happens). done pulses the cycle after the bin marked inc_last has
// been written.
//
// The two banks and the counter follow the specification; the pipeline,
// forwarding, clear-on-read and reset clearing are this design's own.
//
// Interface: wbank (must only change while no increment is in flight);
// inc_valid/inc_bin/inc_last; done; rd_en/rd_addr with rd_data one cycle
// later; busy; fwd.
module hist_unit #(
  parameter int unsigned ADDR_W = vision_pkg::BIN_BITS,
  parameter int unsigned DATA_W = vision_pkg::COUNT_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              wbank,
  input  logic              inc_valid,
  input  logic [ADDR_W-1:0] inc_bin,
  input  logic              inc_last,
  output logic              done,
  input  logic              rd_en,
  input  logic [ADDR_W-1:0] rd_addr,
  output logic [DATA_W-1:0] rd_data,
  output logic              busy,
  output logic              fwd
);

  // Bank ports.
  logic              we    [2];
  logic [ADDR_W-1:0] waddr [2];
  logic [DATA_W-1:0] wdata [2];
  logic [ADDR_W-1:0] raddr [2];
  logic [DATA_W-1:0] rdata [2];

  for (genvar b = 0; b < 2; b++) begin : g_bank
    hist_ram #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_ram (
      .clk  (clk),
      .we   (we[b]),
      .waddr(waddr[b]),
      .wdata(wdata[b]),
      .raddr(raddr[b]),
      .rdata(rdata[b])
    );
  end

  // Reset clearing.
  logic [ADDR_W-1:0] init_addr;

  // Counter pipeline.
  logic              s1_valid, s1_last;
  logic [ADDR_W-1:0] s1_bin;
  logic              s2_valid, s2_last;
  logic [ADDR_W-1:0] s2_bin;
  logic [DATA_W-1:0] s2_val;
  logic              s3_valid;
  logic [ADDR_W-1:0] s3_bin;
  logic [DATA_W-1:0] s3_val;
  logic [DATA_W-1:0] old_val;
  logic              fwd_now;
  logic              inc_go;

  assign inc_go = inc_valid && !busy;

  always_comb begin
    for (int b = 0; b < 2; b++) begin
      if (busy) begin
        we[b]    = 1'b1;
        waddr[b] = init_addr;
        wdata[b] = '0;
        raddr[b] = init_addr;
      end else if (wbank == b[0]) begin
        we[b]    = s2_valid;
        waddr[b] = s2_bin;
        wdata[b] = s2_val;
        raddr[b] = inc_bin;
      end else begin
        we[b]    = rd_en;
        waddr[b] = rd_addr;
        wdata[b] = '0;
        raddr[b] = rd_addr;
      end
    end
  end

  assign rd_data = rdata[~wbank];

  always_comb begin
    fwd_now = 1'b1;
    if (s2_valid && s2_bin == s1_bin)      old_val = s2_val;
    else if (s3_valid && s3_bin == s1_bin) old_val = s3_val;
    else begin
      old_val = rdata[wbank];
      fwd_now = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b1;
      init_addr <= '0;
      s1_valid  <= 1'b0;
      s1_last   <= 1'b0;
      s1_bin    <= '0;
      s2_valid  <= 1'b0;
      s2_last   <= 1'b0;
      s2_bin    <= '0;
      s2_val    <= '0;
      s3_valid  <= 1'b0;
      s3_bin    <= '0;
      s3_val    <= '0;
      done      <= 1'b0;
      fwd       <= 1'b0;
    end else begin
      if (busy) begin
        init_addr <= init_addr + ADDR_W'(1);
        if (init_addr == '1) busy <= 1'b0;
      end
      s1_valid <= inc_go;
      s1_last  <= inc_go && inc_last;
      s1_bin   <= inc_bin;
      s2_valid <= s1_valid;
      s2_last  <= s1_valid && s1_last;
      s2_bin   <= s1_bin;
      s2_val   <= old_val + DATA_W'(1);
      s3_valid <= s2_valid;
      s3_bin   <= s2_bin;
      s3_val   <= s2_val;
      done     <= s2_valid && s2_last;
      fwd      <= s1_valid && fwd_now;
    end
  end

  // The banks may only swap while no increment is in flight.
  logic wbank_q;
  always_ff @(posedge clk) begin
    wbank_q <= wbank;
    if (rst_n && !busy && wbank != wbank_q)
      assert (!s1_valid && !s2_valid)
        else $error("hist_unit: bank swapped with increments in flight");
  end

endmodule
