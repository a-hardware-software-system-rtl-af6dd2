// dp_bram: dual ported on-chip RAM holding a beam's weights or offsets.
//
// Port A is the kernel's read port; port B is the host's read/write port,
// through which software loads the table before a pass and may read it
// back. Both ports read synchronously with one cycle of latency, as block
// RAM does. The kernel only reads and the host only writes between
// passes, so no write collision policy is needed. Dual porting (one port
// for the kernel, one for the host bus) follows the kernel's description;
// the port timing is the usual block RAM behaviour. The contents are not
// reset: software must load every entry it uses.
module dp_bram #(
  parameter int unsigned W     = 64,
  parameter int unsigned DEPTH = 512,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  // Port A: kernel, read only
  input  logic          a_en,
  input  logic [AW-1:0] a_addr,
  output logic [W-1:0]  a_rdata,
  // Port B: host, read/write
  input  logic          b_en,
  input  logic          b_we,
  input  logic [AW-1:0] b_addr,
  input  logic [W-1:0]  b_wdata,
  output logic [W-1:0]  b_rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_en) a_rdata <= mem[a_addr];
  end

  always_ff @(posedge clk) begin
    if (b_en) begin
      if (b_we) mem[b_addr] <= b_wdata;
      b_rdata <= mem[b_addr];
    end
  end

endmodule
