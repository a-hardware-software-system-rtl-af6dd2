// sram_bank_model: behavioural model of one external SRAM bank together
// with its memory controller, as seen by the kernel: a 32-bit wide,
// 2**AW-word memory that returns the word for a read request on the LAT-th
// clock edge after the edge that samples the request. Testbenches fill
// `mem` directly, standing in for the host's DMA transfers.
module sram_bank_model #(
  parameter int unsigned AW  = 19,
  parameter int unsigned LAT = 2
) (
  input  logic          clk,
  input  logic          rd,
  input  logic [AW-1:0] addr,
  output logic [31:0]   rdata
);

  logic [31:0] mem [2**AW];
  logic [31:0] d_q [LAT];
  int          n_reads = 0;

  always_ff @(posedge clk) begin
    if (rd) n_reads <= n_reads + 1;
    d_q[0] <= rd ? mem[addr] : 32'hDEAD_BEEF;
    for (int i = 1; i < LAT; i++) d_q[i] <= d_q[i-1];
  end

  assign rdata = d_q[LAT-1];

endmodule
