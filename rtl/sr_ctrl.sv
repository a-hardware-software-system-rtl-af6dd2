// sr_ctrl: control and addressing logic of the signal reconstruction kernel.
//
// A small state machine (IDLE, RUN, DRAIN) and three counters walk one
// hardware pass: for every time step t, and within it for every pair j of
// sensors (even sensor 2j in SRAM banks 0/1, odd sensor 2j+1 in banks 2/3),
// it issues one read to all four SRAM banks. The sample data of sensor
// pair j occupies partition j of its banks, starting at j * cfg_part, so
// the address of sensor s at step t is
//     partition offset + beam offset of s + t.
// The partition offset is kept as a running sum rather than a product.
// The address is formed by a three-stage pipeline: stage 1 reads the two
// beam offsets from the offset blockRAMs and adds the partition offset to
// t, stage 2 adds the beam offsets, stage 3 drives the SRAM address pins.
// The weights are read so that they arrive together with the SRAM data;
// dp_valid/dp_first/dp_last then mark a sensor pair entering the
// floating point pipeline, first and last of its time step.
//
// Each time step produces one result. Before the first pair of a step is
// issued, a slot of the result FIFO is reserved; if all FIFO_DEPTH slots
// are taken (the DRAM is not accepting writes), issue stalls at the step
// boundary. After the last step the pass drains until every result has
// been written, then pulses done.
//
// The state machine, the counters, the address formula and the
// three-stage address pipeline follow the kernel's description. The SRAM
// read latency, the slot reservation and the running-sum partition offset
// are this design's choices. An odd sensor count is rounded up to whole
// pairs; software pads the extra partition with zeros.
module sr_ctrl
  import sr_pkg::*;
#(
  parameter int unsigned MAX_SENSORS = 1024,
  parameter int unsigned SRAM_LAT    = 2,
  parameter int unsigned FIFO_DEPTH  = 16,
  localparam int unsigned PAW        = $clog2(MAX_SENSORS / 2),
  localparam int unsigned SW         = $clog2(MAX_SENSORS) + 1,
  localparam int unsigned CW         = $clog2(FIFO_DEPTH) + 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [SW-1:0]      cfg_sensors,
  input  logic [SRAM_AW:0]   cfg_steps,
  input  logic [SRAM_AW-1:0] cfg_part,
  // Beam offset blockRAMs (even, odd), one cycle read latency
  output logic               idx_rd,
  output logic [PAW-1:0]     idx_addr,
  input  logic [IDX_W-1:0]   idx_even,
  input  logic [IDX_W-1:0]   idx_odd,
  // SRAM read request: banks 0/1 use addr_even, banks 2/3 addr_odd
  output logic               sram_rd,
  output logic [SRAM_AW-1:0] sram_addr_even,
  output logic [SRAM_AW-1:0] sram_addr_odd,
  // Weight blockRAMs (even, odd), one cycle read latency
  output logic               wt_rd,
  output logic [PAW-1:0]     wt_addr,
  // Pair entering the floating point pipeline, aligned with SRAM data
  output logic               dp_valid,
  output logic               dp_first,
  output logic               dp_last,
  // Result FIFO handshake
  input  logic               res_pop,
  output logic               busy,
  output logic               done,
  output logic               stall
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN} state_t;

  state_t             state_q;
  logic [PAW-1:0]     j_q;
  logic [PAW:0]       pairs_q;
  logic [SRAM_AW:0]   t_q, steps_q;
  logic [SRAM_AW-1:0] poff_q, part_q;
  logic [CW-1:0]      outst_q;

  logic issue, step_open, last_pair;

  assign last_pair = ({1'b0, j_q} == pairs_q - 1'b1);
  assign step_open = (j_q == '0);
  assign stall     = (state_q == S_RUN) && step_open && (outst_q >= CW'(FIFO_DEPTH));
  assign issue     = (state_q == S_RUN) && !stall;
  assign busy      = (state_q != S_IDLE);

  // Stage 1: read the beam offsets, partition offset + step
  assign idx_rd   = issue;
  assign idx_addr = j_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      j_q     <= '0;
      t_q     <= '0;
      poff_q  <= '0;
      pairs_q <= '0;
      steps_q <= '0;
      part_q  <= '0;
      outst_q <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      outst_q <= outst_q + CW'(issue && step_open) - CW'(res_pop);
      unique case (state_q)
        S_IDLE: if (start) begin
          j_q     <= '0;
          t_q     <= '0;
          poff_q  <= '0;
          pairs_q <= (PAW+1)'((cfg_sensors + 1'b1) >> 1);
          steps_q <= cfg_steps;
          part_q  <= cfg_part;
          if (cfg_sensors == '0 || cfg_steps == '0) done <= 1'b1;
          else                                      state_q <= S_RUN;
        end
        S_RUN: if (issue) begin
          if (last_pair) begin
            j_q    <= '0;
            poff_q <= '0;
            t_q    <= t_q + 1'b1;
            if (t_q == steps_q - 1'b1) state_q <= S_DRAIN;
          end else begin
            j_q    <= j_q + 1'b1;
            poff_q <= poff_q + part_q;
          end
        end
        S_DRAIN: if (outst_q == '0) begin
          state_q <= S_IDLE;
          done    <= 1'b1;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // Address pipeline
  logic               a_v, b_v, c_v;
  logic [SRAM_AW-1:0] a_base, b_ae, b_ao;
  logic [PAW+1:0]     a_tag, b_tag, c_tag;   // {first, last, j}

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_v <= 1'b0;
      b_v <= 1'b0;
      c_v <= 1'b0;
    end else begin
      a_v <= issue;
      b_v <= a_v;
      c_v <= b_v;
    end
  end

  always_ff @(posedge clk) begin
    // stage 1
    a_base <= poff_q + t_q[SRAM_AW-1:0];
    a_tag  <= {step_open, last_pair, j_q};
    // stage 2
    b_ae   <= a_base + SRAM_AW'(idx_even);
    b_ao   <= a_base + SRAM_AW'(idx_odd);
    b_tag  <= a_tag;
    // stage 3
    sram_addr_even <= b_ae;
    sram_addr_odd  <= b_ao;
    c_tag          <= b_tag;
  end

  assign sram_rd = c_v;

  // Weights: read SRAM_LAT - 1 cycles after the SRAM request
  logic [PAW-1:0] c_j;
  assign c_j = c_tag[PAW-1:0];

  sr_pipe #(.W(PAW), .STAGES(SRAM_LAT - 1)) u_wt_dly (
    .clk, .rst_n, .in_valid(c_v), .in_data(c_j), .out_valid(wt_rd), .out_data(wt_addr));

  // Pair tags: valid when the SRAM data is
  logic [1:0] dp_tag;
  sr_pipe #(.W(2), .STAGES(SRAM_LAT)) u_dp_dly (
    .clk, .rst_n, .in_valid(c_v), .in_data(c_tag[PAW+1:PAW]), .out_valid(dp_valid), .out_data(dp_tag));
  assign {dp_first, dp_last} = dp_tag;

  a_no_start_while_busy: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) res_pop |-> outst_q != '0);

endmodule
