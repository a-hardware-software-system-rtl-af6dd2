// sr_datapath: floating point pipeline of the signal reconstruction kernel.
//
// Each cycle it may take one sample/weight pair of an even numbered sensor
// and one of the odd numbered sensor beside it. Two complex multipliers
// weight the samples, a pair of "reduce" adders sums the two complex
// products, and a pair of "accumulate" adders sums the reduced values over
// all sensor pairs of one time step. The first pair of a step (in_first)
// restarts the accumulation; the last pair (in_last) makes the completed
// sum appear on out_valid/out_y one cycle after it leaves the reduce adder.
// The multiply / reduce / accumulate structure follows the kernel's
// description. The accumulate adder is combinational so that its feedback
// loop closes in one cycle and a new pair can enter every cycle; that and
// the stage counts are this design's choices.
//
// Latency from in_valid to out_valid (for the last pair of a step):
// MUL_STAGES + 2*ADD_STAGES + 1 cycles. Summation order per step is
// ((p0 + p1) + (p2 + p3)) + ... with p2j the even sensor's product.
module sr_datapath
  import sr_pkg::*;
#(
  parameter int unsigned MUL_STAGES = 2,
  parameter int unsigned ADD_STAGES = 2
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  logic  in_first,
  input  logic  in_last,
  input  cplx_t x_even,
  input  cplx_t w_even,
  input  cplx_t x_odd,
  input  cplx_t w_odd,
  output logic  out_valid,
  output cplx_t out_y
);

  localparam int unsigned CM_LAT = MUL_STAGES + ADD_STAGES;

  cplx_t      p_even, p_odd, r;
  logic       pv_even, pv_odd, rv_re, rv_im;
  logic [1:0] tag_cm, tag_r;
  logic       tv_cm, tv_r;

  // Complex multiply
  cplx_mul #(.MUL_STAGES(MUL_STAGES), .ADD_STAGES(ADD_STAGES)) u_cm_even (
    .clk, .rst_n, .in_valid, .x(x_even), .w(w_even), .out_valid(pv_even), .p(p_even));
  cplx_mul #(.MUL_STAGES(MUL_STAGES), .ADD_STAGES(ADD_STAGES)) u_cm_odd (
    .clk, .rst_n, .in_valid, .x(x_odd), .w(w_odd), .out_valid(pv_odd), .p(p_odd));

  // Step boundary tags travel beside the data
  sr_pipe #(.W(2), .STAGES(CM_LAT)) u_tag_cm (
    .clk, .rst_n, .in_valid, .in_data({in_first, in_last}), .out_valid(tv_cm), .out_data(tag_cm));

  // Reduce
  fp_add #(.STAGES(ADD_STAGES)) u_red_re (
    .clk, .rst_n, .in_valid(pv_even), .a(p_even.re), .b(p_odd.re), .out_valid(rv_re), .y(r.re));
  fp_add #(.STAGES(ADD_STAGES)) u_red_im (
    .clk, .rst_n, .in_valid(pv_even), .a(p_even.im), .b(p_odd.im), .out_valid(rv_im), .y(r.im));

  sr_pipe #(.W(2), .STAGES(ADD_STAGES)) u_tag_r (
    .clk, .rst_n, .in_valid(tv_cm), .in_data(tag_cm), .out_valid(tv_r), .out_data(tag_r));

  // Accumulate
  cplx_t acc_q, acc_sum;
  logic  acc_v_re, acc_v_im;

  fp_add #(.STAGES(0)) u_acc_re (
    .clk, .rst_n, .in_valid(rv_re), .a(acc_q.re), .b(r.re), .out_valid(acc_v_re), .y(acc_sum.re));
  fp_add #(.STAGES(0)) u_acc_im (
    .clk, .rst_n, .in_valid(rv_im), .a(acc_q.im), .b(r.im), .out_valid(acc_v_im), .y(acc_sum.im));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q     <= '0;
      out_valid <= 1'b0;
      out_y     <= '0;
    end else begin
      out_valid <= 1'b0;
      if (acc_v_re) begin
        acc_q <= tag_r[1] ? r : acc_sum;
        if (tag_r[0]) begin
          out_valid <= 1'b1;
          out_y     <= tag_r[1] ? r : acc_sum;
        end
      end
    end
  end

  a_pairs_in_step: assert property (@(posedge clk) disable iff (!rst_n)
    (pv_even == pv_odd) && (pv_even == tv_cm) && (rv_re == rv_im) && (rv_re == tv_r) && (acc_v_re == acc_v_im));

endmodule
