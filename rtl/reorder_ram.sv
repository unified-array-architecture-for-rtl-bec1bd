// reorder_ram: two-bank block buffer used as RAM1 and RAM2 of the processing
// stage.
//
// Each bank holds one block of DEPTH words. While one bank is written with the
// block arriving now, the other bank is read in a different order, so a block
// can be read back, e.g., in reverse for the DCT recursion of x(n), which runs
// from n = N-1 down to 0 while the samples arrive from n = 0 up. Write is
// synchronous (we/wbank/waddr/wdata at the clock edge); read is asynchronous
// (rdata follows rbank/raddr in the same cycle), as in a small register-file
// memory. Contents are not reset. Reading a word in the cycle it is written
// returns the old word. The two-bank organisation and the sizes are this
// design's choices; the architecture names the two memories without sizes.
module reorder_ram #(
  parameter int W     = 16,
  parameter int DEPTH = 8
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic                     wbank,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [W-1:0]             wdata,
  input  logic                     rbank,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [W-1:0]             rdata
);
  logic [W-1:0] mem [2][DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[wbank][waddr] <= wdata;
  end

  assign rdata = mem[rbank][raddr];
endmodule
