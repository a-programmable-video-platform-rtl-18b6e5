// ctx_mem_model: behavioural model of the external context memory (testbench only).
// Word-addressed, WORDS deep. A request is granted when the pseudo-random stall
// pattern allows (about one cycle in three is stalled); read data comes back
// LAT cycles after the grant with mem_rvalid. Writes take effect at the grant.
module ctx_mem_model #(
  parameter int WORDS = 1024,
  parameter int LAT   = 2
) (
  input  logic        clk,
  input  logic        mem_req,
  input  logic        mem_we,
  input  logic [31:0] mem_addr,
  input  logic [31:0] mem_wdata,
  output logic        mem_gnt,
  output logic        mem_rvalid,
  output logic [31:0] mem_rdata
);
  logic [31:0] mem [WORDS];
  logic [LAT-1:0] pv;
  logic [31:0]    pd [LAT];
  logic [3:0]     lfsr = 4'b1001;
  int reads = 0, writes = 0;

  assign mem_gnt    = mem_req && (lfsr[1:0] != 2'b00);
  assign mem_rvalid = pv[LAT-1];
  assign mem_rdata  = pd[LAT-1];

  initial for (int i = 0; i < WORDS; i++) mem[i] = 32'hDEAD_0000 + i;

  always_ff @(posedge clk) begin
    lfsr <= {lfsr[2:0], lfsr[3] ^ lfsr[2]};
    pv[0] <= mem_gnt && !mem_we;
    pd[0] <= mem[mem_addr % WORDS];
    for (int i = 1; i < LAT; i++) begin pv[i] <= pv[i-1]; pd[i] <= pd[i-1]; end
    if (mem_gnt && mem_we) begin mem[mem_addr % WORDS] <= mem_wdata; writes++; end
    if (mem_gnt && !mem_we) reads++;
  end
endmodule
