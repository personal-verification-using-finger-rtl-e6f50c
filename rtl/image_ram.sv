// image_ram: the shared image buffer of the preprocessing core.
//
// 2^ADDR_W words of DATA_W bits (default 262,144 x 8 bits, the buffer size
// of the design). Input images, intermediate results and output images all
// live here, in regions of W*H pixels stored row by row (address =
// base + y*W + x). An 8-bit word holds a grey pixel or a binary pixel coded
// 0/255.
//
// Interface: one write port and one read port, both synchronous to clk.
// rdata shows the word at raddr one cycle after raddr is presented. A write
// and a read of the same address in the same cycle return the old word.
// The one-write/one-read port arrangement is this implementation's choice;
// the size and width are the design's.
module image_ram #(
  parameter int ADDR_W = 18,
  parameter int DATA_W = 8
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
