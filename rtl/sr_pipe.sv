// sr_pipe: a chain of STAGES registers carrying a data word and its valid
// bit. STAGES = 0 is a plain wire. The floating point units use it to give
// their combinational cores a configurable latency, which synthesis can
// retime into the core. Reset clears only the valid bits.
module sr_pipe #(
  parameter int unsigned W      = 32,
  parameter int unsigned STAGES = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  output logic [W-1:0] out_data
);

  if (STAGES == 0) begin : g_wire
    assign out_valid = in_valid;
    assign out_data  = in_data;
  end else begin : g_regs
    logic [STAGES-1:0] v_q;
    logic [W-1:0]      d_q [STAGES];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) v_q <= '0;
      else begin
        v_q[0] <= in_valid;
        for (int i = 1; i < STAGES; i++) v_q[i] <= v_q[i-1];
      end
    end

    always_ff @(posedge clk) begin
      d_q[0] <= in_data;
      for (int i = 1; i < STAGES; i++) d_q[i] <= d_q[i-1];
    end

    assign out_valid = v_q[STAGES-1];
    assign out_data  = d_q[STAGES-1];
  end

endmodule
