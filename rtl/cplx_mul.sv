// cplx_mul: complex single precision multiplier, p = x * w.
//
// Four real multipliers form xr*wr, xi*wi, xr*wi and xi*wr; two adders then
// give p.re = xr*wr - xi*wi (the second product's sign bit is inverted,
// which is exact) and p.im = xr*wi + xi*wr. This four-multiplier,
// two-adder structure is the one described for the kernel. One product is
// accepted per cycle; latency is MUL_STAGES + ADD_STAGES cycles.
module cplx_mul
  import sr_pkg::*;
#(
  parameter int unsigned MUL_STAGES = 2,
  parameter int unsigned ADD_STAGES = 2
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  cplx_t x,
  input  cplx_t w,
  output logic  out_valid,
  output cplx_t p
);

  f32_t       rr, ii, ri, ir;
  logic [3:0] mv;
  logic [1:0] av;

  fp_mul #(.STAGES(MUL_STAGES)) u_mul_rr (.clk, .rst_n, .in_valid, .a(x.re), .b(w.re), .out_valid(mv[0]), .y(rr));
  fp_mul #(.STAGES(MUL_STAGES)) u_mul_ii (.clk, .rst_n, .in_valid, .a(x.im), .b(w.im), .out_valid(mv[1]), .y(ii));
  fp_mul #(.STAGES(MUL_STAGES)) u_mul_ri (.clk, .rst_n, .in_valid, .a(x.re), .b(w.im), .out_valid(mv[2]), .y(ri));
  fp_mul #(.STAGES(MUL_STAGES)) u_mul_ir (.clk, .rst_n, .in_valid, .a(x.im), .b(w.re), .out_valid(mv[3]), .y(ir));

  fp_add #(.STAGES(ADD_STAGES)) u_add_re (
    .clk, .rst_n, .in_valid(mv[0]), .a(rr), .b({~ii[31], ii[30:0]}), .out_valid(av[0]), .y(p.re));
  fp_add #(.STAGES(ADD_STAGES)) u_add_im (
    .clk, .rst_n, .in_valid(mv[2]), .a(ri), .b(ir), .out_valid(av[1]), .y(p.im));

  assign out_valid = av[0];

  // All four multipliers and both adders run in lock step
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
    (mv[0] == mv[1]) && (mv[0] == mv[2]) && (mv[0] == mv[3]) && (av[0] == av[1]));

endmodule
