// sr_regs: control and status words of the signal reconstruction kernel.
//
// Software reaches these words through the host bus with single-word reads
// and writes (one cycle, read data registered). Writing CTRL bit 1 emits a
// one-cycle soft_reset pulse, which clears the kernel before a pass;
// writing CTRL bit 0 emits a one-cycle start pulse. STATUS reports done
// (sticky, set when the kernel finishes, cleared by start or soft reset)
// and busy. The other words hold the pass configuration: sensor count,
// number of time steps, SRAM partition size and the DRAM address of the
// first result. The reset / load / start sequence of a pass and the use of
// small control words follow the kernel's description; the register map
// (see sr_pkg) is this design's own.
module sr_regs
  import sr_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  // Host control bus
  input  logic               reg_wr,
  input  logic               reg_rd,
  input  logic [2:0]         reg_addr,
  input  logic [31:0]        reg_wdata,
  output logic [31:0]        reg_rdata,
  // Kernel side
  output logic               start,
  output logic               soft_reset,
  output logic [10:0]        cfg_sensors,
  output logic [SRAM_AW:0]   cfg_steps,
  output logic [SRAM_AW-1:0] cfg_part,
  output logic [DRAM_AW-1:0] cfg_resbase,
  input  logic               done_pulse,
  input  logic               busy
);

  logic done_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      start       <= 1'b0;
      soft_reset  <= 1'b0;
      cfg_sensors <= '0;
      cfg_steps   <= '0;
      cfg_part    <= '0;
      cfg_resbase <= '0;
      done_q      <= 1'b0;
      reg_rdata   <= '0;
    end else begin
      start      <= 1'b0;
      soft_reset <= 1'b0;
      if (done_pulse) done_q <= 1'b1;
      if (reg_wr) begin
        unique case (reg_addr)
          REG_CTRL: begin
            start      <= reg_wdata[0];
            soft_reset <= reg_wdata[1];
            if (reg_wdata[0] || reg_wdata[1]) done_q <= 1'b0;
          end
          REG_SENSORS:  cfg_sensors <= reg_wdata[10:0];
          REG_STEPS:    cfg_steps   <= reg_wdata[SRAM_AW:0];
          REG_PARTSIZE: cfg_part    <= reg_wdata[SRAM_AW-1:0];
          REG_RESBASE:  cfg_resbase <= reg_wdata[DRAM_AW-1:0];
          default: ;
        endcase
      end
      if (reg_rd) begin
        unique case (reg_addr)
          REG_STATUS:   reg_rdata <= {30'd0, busy, done_q};
          REG_SENSORS:  reg_rdata <= 32'(cfg_sensors);
          REG_STEPS:    reg_rdata <= 32'(cfg_steps);
          REG_PARTSIZE: reg_rdata <= 32'(cfg_part);
          REG_RESBASE:  reg_rdata <= 32'(cfg_resbase);
          default:      reg_rdata <= '0;
        endcase
      end
    end
  end

  a_no_rw_collision: assert property (@(posedge clk) disable iff (!rst_n) !(reg_wr && reg_rd));

endmodule
