// sigrec_top: signal reconstruction kernel of a hybrid adaptive beamformer.
//
// For one beam direction it computes, for every time step t of a pass,
//     y(t) = sum over sensors s of  w[s] * x_s(t + d[s])
// in complex IEEE-754 single precision, where w[s] is the sensor's complex
// weight and d[s] its beam offset in samples. Software computes the weights
// (weight adaptation) and loads them, the offsets and the sensor samples;
// this kernel only applies them.
//
// Memories. Sensor samples sit in four external SRAM banks, one 32-bit
// word per bank per cycle: bank 0 real and bank 1 imaginary parts of the
// even numbered sensors, banks 2 and 3 the same for the odd numbered
// sensors. Each pair of sensors (2j, 2j+1) owns partition j of its banks,
// cfg_part words long at word j * cfg_part. On chip, four dual ported
// blockRAMs hold the complex weights of the even and of the odd sensors
// and the 16-bit beam offsets of the even and of the odd sensors, one
// entry per sensor pair, for up to MAX_SENSORS sensors. Results go to DRAM
// at consecutive addresses.
//
// Pipeline. sr_ctrl issues one sensor pair per cycle (a time step takes
// sensors/2 cycles), forms the SRAM addresses in three stages and reads
// the weights so they meet the samples; sr_datapath multiplies, reduces
// and accumulates; result_fifo writes each step's sum to DRAM.
//
// Host interface. Control words (sr_regs) are written and read on the
// reg_* bus; the four blockRAMs are reached on the bram_* bus, selected by
// bram_sel (0 even weights, 1 odd weights, 2 even offsets, 3 odd offsets;
// weights as {re, im}, offsets in the low 16 bits). A pass is: soft reset,
// load blockRAMs and configuration, start, wait for done (STATUS bit 0 or
// the done output).
//
// Timing. From the start of a pass the first SRAM read leaves 4 cycles
// later; each pair's data enters the floating point pipeline SRAM_LAT
// cycles after its read, and a step's result is pushed MUL_STAGES +
// 2*ADD_STAGES + 1 cycles after its last pair enters. Steady state is one
// result every ceil(sensors/2) cycles, unless DRAM back-pressure stalls it.
//
// The memory organisation, the datapath structure and the address formula
// follow the kernel's description. The host bus, the register map, the
// SRAM/DRAM handshakes, latencies and the result FIFO are this design's
// choices; the vendor's SRAM/DRAM controllers and on-chip network sit
// outside this module.
module sigrec_top
  import sr_pkg::*;
#(
  parameter int unsigned MAX_SENSORS = 1024,
  parameter int unsigned SRAM_LAT    = 2,
  parameter int unsigned MUL_STAGES  = 2,
  parameter int unsigned ADD_STAGES  = 2,
  parameter int unsigned FIFO_DEPTH  = 16,
  localparam int unsigned PAW        = $clog2(MAX_SENSORS / 2),
  localparam int unsigned SW         = $clog2(MAX_SENSORS) + 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // Host control words
  input  logic               reg_wr,
  input  logic               reg_rd,
  input  logic [2:0]         reg_addr,
  input  logic [31:0]        reg_wdata,
  output logic [31:0]        reg_rdata,
  // Host access to the blockRAMs
  input  logic               bram_en,
  input  logic               bram_we,
  input  logic [1:0]         bram_sel,
  input  logic [PAW-1:0]     bram_addr,
  input  logic [63:0]        bram_wdata,
  output logic [63:0]        bram_rdata,
  // Four SRAM banks: read request, data SRAM_LAT cycles later
  output logic [3:0]         sram_rd,
  output logic [SRAM_AW-1:0] sram_addr [4],
  input  f32_t               sram_rdata [4],
  // DRAM result writes
  output logic               dram_wr_valid,
  input  logic               dram_wr_ready,
  output logic [DRAM_AW-1:0] dram_wr_addr,
  output cplx_t              dram_wr_data,
  // Status
  output logic               busy,
  output logic               done,
  output logic               stall
);

  // ---------------------------------------------------------------- reset
  logic soft_reset, krst_n;
  logic start, done_pulse;
  logic [SW-1:0]      cfg_sensors;
  logic [10:0]        cfg_sensors_r;
  logic [SRAM_AW:0]   cfg_steps;
  logic [SRAM_AW-1:0] cfg_part;
  logic [DRAM_AW-1:0] cfg_resbase;

  // soft_reset is a registered pulse, so the derived reset is glitch free
  assign krst_n = rst_n && !soft_reset;

  sr_regs u_regs (
    .clk, .rst_n,
    .reg_wr, .reg_rd, .reg_addr, .reg_wdata, .reg_rdata,
    .start, .soft_reset,
    .cfg_sensors(cfg_sensors_r), .cfg_steps, .cfg_part, .cfg_resbase,
    .done_pulse, .busy
  );
  assign cfg_sensors = SW'(cfg_sensors_r);
  assign done        = done_pulse;

  // ------------------------------------------------------------ blockRAMs
  logic               idx_rd, wt_rd;
  logic [PAW-1:0]     idx_addr, wt_addr;
  logic [63:0]        wt_even_q, wt_odd_q;
  logic [63:0]        hrd [4];
  logic [1:0]         sel_q;

  dp_bram #(.W(64), .DEPTH(MAX_SENSORS / 2)) u_bram0_wt_even (
    .clk, .a_en(wt_rd), .a_addr(wt_addr), .a_rdata(wt_even_q),
    .b_en(bram_en && bram_sel == 2'd0), .b_we(bram_we), .b_addr(bram_addr),
    .b_wdata(bram_wdata), .b_rdata(hrd[0]));
  dp_bram #(.W(64), .DEPTH(MAX_SENSORS / 2)) u_bram1_wt_odd (
    .clk, .a_en(wt_rd), .a_addr(wt_addr), .a_rdata(wt_odd_q),
    .b_en(bram_en && bram_sel == 2'd1), .b_we(bram_we), .b_addr(bram_addr),
    .b_wdata(bram_wdata), .b_rdata(hrd[1]));

  logic [IDX_W-1:0] idx_even, idx_odd, hrd2, hrd3;

  dp_bram #(.W(IDX_W), .DEPTH(MAX_SENSORS / 2)) u_bram2_idx_even (
    .clk, .a_en(idx_rd), .a_addr(idx_addr), .a_rdata(idx_even),
    .b_en(bram_en && bram_sel == 2'd2), .b_we(bram_we), .b_addr(bram_addr),
    .b_wdata(bram_wdata[IDX_W-1:0]), .b_rdata(hrd2));
  dp_bram #(.W(IDX_W), .DEPTH(MAX_SENSORS / 2)) u_bram3_idx_odd (
    .clk, .a_en(idx_rd), .a_addr(idx_addr), .a_rdata(idx_odd),
    .b_en(bram_en && bram_sel == 2'd3), .b_we(bram_we), .b_addr(bram_addr),
    .b_wdata(bram_wdata[IDX_W-1:0]), .b_rdata(hrd3));

  assign hrd[2] = 64'(hrd2);
  assign hrd[3] = 64'(hrd3);

  always_ff @(posedge clk) if (bram_en) sel_q <= bram_sel;
  assign bram_rdata = hrd[sel_q];

  // ----------------------------------------------------- control, address
  logic               sram_req;
  logic [SRAM_AW-1:0] sram_addr_even, sram_addr_odd;
  logic               dp_valid, dp_first, dp_last, res_pop;

  sr_ctrl #(.MAX_SENSORS(MAX_SENSORS), .SRAM_LAT(SRAM_LAT), .FIFO_DEPTH(FIFO_DEPTH)) u_ctrl (
    .clk, .rst_n(krst_n), .start,
    .cfg_sensors, .cfg_steps, .cfg_part,
    .idx_rd, .idx_addr, .idx_even, .idx_odd,
    .sram_rd(sram_req), .sram_addr_even, .sram_addr_odd,
    .wt_rd, .wt_addr,
    .dp_valid, .dp_first, .dp_last,
    .res_pop, .busy, .done(done_pulse), .stall
  );

  assign sram_rd      = {4{sram_req}};
  assign sram_addr[0] = sram_addr_even;
  assign sram_addr[1] = sram_addr_even;
  assign sram_addr[2] = sram_addr_odd;
  assign sram_addr[3] = sram_addr_odd;

  // --------------------------------------------------------- datapath
  cplx_t x_even, x_odd, res;
  logic  res_valid;

  assign x_even = '{re: sram_rdata[0], im: sram_rdata[1]};
  assign x_odd  = '{re: sram_rdata[2], im: sram_rdata[3]};

  sr_datapath #(.MUL_STAGES(MUL_STAGES), .ADD_STAGES(ADD_STAGES)) u_dp (
    .clk, .rst_n(krst_n),
    .in_valid(dp_valid), .in_first(dp_first), .in_last(dp_last),
    .x_even, .w_even(wt_even_q), .x_odd, .w_odd(wt_odd_q),
    .out_valid(res_valid), .out_y(res)
  );

  // ------------------------------------------------------------ results
  result_fifo #(.DEPTH(FIFO_DEPTH)) u_res (
    .clk, .rst_n(krst_n),
    .load(start), .base(cfg_resbase),
    .push(res_valid), .din(res),
    .dram_wr_valid, .dram_wr_ready, .dram_wr_addr, .dram_wr_data,
    .pop(res_pop)
  );

endmodule
