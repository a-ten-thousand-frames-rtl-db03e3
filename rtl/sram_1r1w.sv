// sram_1r1w: one frame memory of the zero suppression output buffer.
//
// DEPTH words of LANES x LANE_W bits with one write port and one read port,
// both synchronous to clk. Each lane has its own write enable, so a word can
// be filled half by half. A read returns the word on rdata one clock after
// re is high; rdata holds its value otherwise. Two of these form the
// ping-pong buffer: one is filled with the current frame while the other is
// read out. The memory has no reset; the write controller never lets a word
// be read before it has been written in the same frame. The sensor uses two
// SRAMs; the 570 x 32-bit organisation is this design's choice.
module sram_1r1w #(
  parameter int unsigned DEPTH  = 570,
  parameter int unsigned LANES  = 2,
  parameter int unsigned LANE_W = 16,
  parameter int unsigned AW     = $clog2(DEPTH)
) (
  input  logic                       clk,
  input  logic [LANES-1:0]           we,
  input  logic [AW-1:0]              waddr,
  input  logic [LANES*LANE_W-1:0]    wdata,
  input  logic                       re,
  input  logic [AW-1:0]              raddr,
  output logic [LANES*LANE_W-1:0]    rdata
);
  logic [LANES*LANE_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    for (int l = 0; l < LANES; l++)
      if (we[l]) mem[waddr][l*LANE_W +: LANE_W] <= wdata[l*LANE_W +: LANE_W];
    if (re) rdata <= mem[raddr];
  end

  always_ff @(posedge clk) begin
    assert (!(|we) || waddr < AW'(DEPTH)) else $error("write beyond memory");
    assert (!re || raddr < AW'(DEPTH)) else $error("read beyond memory");
  end
endmodule
