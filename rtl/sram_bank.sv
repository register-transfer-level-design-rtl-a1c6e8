// sram_bank: one bank of the RAM-based transpose memory, a synchronous
// single-port RAM.
//
// One access per clock: with ce and we high the word wdata is written at addr;
// with ce high and we low the word at addr appears on rdata after the next
// clock edge (one cycle read latency) and stays there until the next read.
// Four of these banks make up the transpose buffer. Depth and width are
// parameters; the default of 256 words of 16 bits holds one quarter of a
// 32x32 TU. The array is written as a plain memory so that synthesis can map
// it to a RAM macro or block RAM; its contents are not reset. The use of
// synchronous RAM banks follows the source design; the single port, the read
// latency and the depth are this design's choice.
module sram_bank #(
  parameter int unsigned DATA_W = 16,
  parameter int unsigned DEPTH  = 256,
  parameter int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              ce,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,
  input  logic [DATA_W-1:0] wdata,
  output logic [DATA_W-1:0] rdata
);

  logic [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (ce) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

endmodule
