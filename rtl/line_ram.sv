// line_ram: one 512 x 8 line Block RAM of the Bayer front end.
//
// A simple dual-port RAM: one synchronous write port and one synchronous
// read port. The read takes two cycles: the RAM array is read on the first
// clock edge and the data passes the Block RAM's output register on the
// second. The output register is this design's choice; the depth and width
// follow the 512-byte Block RAMs of the target FPGA.
//
// Interface: we/waddr/wdata write port; re/raddr read port, rdata valid two
// cycles after re. A read of the address being written returns the old data.
module line_ram #(
  parameter int unsigned DEPTH  = vision_pkg::LINE_RAM_DEPTH,
  parameter int unsigned DATA_W = vision_pkg::PIX_W
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [DATA_W-1:0]        wdata,
  input  logic                     re,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [DATA_W-1:0]        rdata
);

  logic [DATA_W-1:0] mem [DEPTH];
  logic [DATA_W-1:0] rd_q;

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rd_q <= mem[raddr];
    rdata <= rd_q;
  end

endmodule
