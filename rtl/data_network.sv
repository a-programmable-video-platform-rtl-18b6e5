// data_network: the shared-memory data network between PE clusters.
//
// One data_link_mem for each ordered pair of clusters (source s, target d). A
// cluster addresses a link by a base address: on its write port, byte address
// bits above the link size select the target PID; on its read port they select
// the source PID. So WRITE(base, ...) by s and READ(base', ...) by d meet in the
// same memory when base = d*LINK_BYTES and base' = s*LINK_BYTES. The low bits are
// the byte offset inside the link (word aligned). Reads return one cycle later
// with rd_valid. Addressing to the own PID writes nothing and reads zero.
// The address map is this design's choice; the rest follows the description of
// one shared memory per link identified by its base address.
module data_network #(
  parameter int N_PE       = 4,
  parameter int LINK_BYTES = 2048,
  localparam int PW = (N_PE > 1) ? $clog2(N_PE) : 1,
  localparam int OW = $clog2(LINK_BYTES),        // byte-offset bits
  localparam int AW = OW - 2                     // word-address bits
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [N_PE-1:0]   wr_en,
  input  logic [31:0]       wr_addr [N_PE],
  input  logic [31:0]       wr_data [N_PE],
  input  logic [N_PE-1:0]   rd_en,
  input  logic [31:0]       rd_addr [N_PE],
  output logic [31:0]       rd_data [N_PE],
  output logic [N_PE-1:0]   rd_valid
);
  logic [31:0]   m_rdata [N_PE][N_PE];   // [src][dst]
  logic [PW-1:0] rd_src_q [N_PE];

  for (genvar s = 0; s < N_PE; s++) begin : g_src
    for (genvar d = 0; d < N_PE; d++) begin : g_dst
      if (s != d) begin : g_link
        wire we = wr_en[s] && (wr_addr[s][OW+PW-1:OW] == PW'(d));
        data_link_mem #(.BYTES(LINK_BYTES), .W(32)) u_mem (
          .clk,
          .wr_en(we), .wr_addr(wr_addr[s][OW-1:2]), .wr_data(wr_data[s]),
          .rd_addr(rd_addr[d][OW-1:2]), .rd_data(m_rdata[s][d]));
      end else begin : g_self
        assign m_rdata[s][d] = '0;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_valid <= '0;
      for (int d = 0; d < N_PE; d++) rd_src_q[d] <= '0;
    end else begin
      rd_valid <= rd_en;
      for (int d = 0; d < N_PE; d++) rd_src_q[d] <= rd_addr[d][OW+PW-1:OW];
    end
  end

  always_comb begin
    for (int d = 0; d < N_PE; d++) rd_data[d] = m_rdata[rd_src_q[d]][d];
  end
endmodule
