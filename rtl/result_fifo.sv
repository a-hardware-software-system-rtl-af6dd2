// result_fifo: result buffer and sequential DRAM writer.
//
// Completed time-step results (one complex single precision value each)
// are pushed in; they leave as DRAM write requests at consecutive result
// addresses starting from the base loaded by `load`. The DRAM side is a
// valid/ready handshake, so a busy memory controller holds results here.
// The kernel reserves an entry before it starts a time step (see sr_ctrl),
// so the FIFO cannot overflow. `pop` marks each accepted write. Storing
// results sequentially in DRAM follows the kernel's description; the
// buffer, its depth and the handshake are this design's choices.
module result_fifo
  import sr_pkg::*;
#(
  parameter int unsigned DEPTH = 16,
  localparam int unsigned PW   = $clog2(DEPTH)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               load,
  input  logic [DRAM_AW-1:0] base,
  input  logic               push,
  input  cplx_t              din,
  // DRAM write port
  output logic               dram_wr_valid,
  input  logic               dram_wr_ready,
  output logic [DRAM_AW-1:0] dram_wr_addr,
  output cplx_t              dram_wr_data,
  output logic               pop
);

  cplx_t       mem [DEPTH];
  logic [PW:0] rd_q, wr_q, count;

  assign count         = wr_q - rd_q;
  assign dram_wr_valid = (count != 0);
  assign dram_wr_data  = mem[rd_q[PW-1:0]];
  assign pop           = dram_wr_valid && dram_wr_ready;

  always_ff @(posedge clk) begin
    if (push) mem[wr_q[PW-1:0]] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q         <= '0;
      wr_q         <= '0;
      dram_wr_addr <= '0;
    end else begin
      if (push) wr_q <= wr_q + 1'b1;
      if (pop) begin
        rd_q         <= rd_q + 1'b1;
        dram_wr_addr <= dram_wr_addr + 1'b1;
      end
      if (load) dram_wr_addr <= base;
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    push |-> (count < (PW+1)'(DEPTH)) || pop);
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    dram_wr_valid && !dram_wr_ready |=> dram_wr_valid && $stable(dram_wr_addr) && $stable(dram_wr_data));

endmodule
