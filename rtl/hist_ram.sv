// hist_ram: on-chip RAM holding the bin counts of one histogram bank.
//
// A simple dual-port RAM indexed by bin number: one synchronous write port
// and one synchronous read port with a one-cycle read. A read of the
// address being written in the same cycle returns the old count; the bin
// counter in hist_unit forwards around this.
//
// Interface: we/waddr/wdata write port; raddr read port, rdata one cycle
// later (read every cycle).
module hist_ram #(
  parameter int unsigned ADDR_W = vision_pkg::BIN_BITS,
  parameter int unsigned DATA_W = vision_pkg::COUNT_W
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [DATA_W-1:0] wdata,
  input  logic [ADDR_W-1:0] raddr,
  output logic [DATA_W-1:0] rdata
);

  logic [DATA_W-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
