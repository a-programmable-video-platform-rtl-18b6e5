// data_link_mem: the shared memory of one data link of the data network.
//
// A simple dual-port RAM: the source cluster writes, the target cluster reads.
// BYTES = 2048 is the size chosen for the 720p platform (1.5 KB of double-buffered
// residual/reconstruction data per macroblock plus about 25% margin). The memory is
// split into two regions by the top address bit for double buffering: the source
// fills one region while the target drains the other, and the handover is signalled
// through a control-network FIFO (not by this memory). 32-bit words and a
// one-cycle synchronous read are this design's choices.
module data_link_mem #(
  parameter int BYTES = 2048,
  parameter int W     = 32,
  localparam int WORDS = BYTES / (W/8),
  localparam int AW    = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [W-1:0]  wr_data,
  input  logic [AW-1:0] rd_addr,
  output logic [W-1:0]  rd_data
);
  logic [W-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    rd_data <= mem[rd_addr];
  end
endmodule
