// fp_mul: IEEE-754 single precision multiplier.
//
// One product is accepted every cycle and appears STAGES cycles later with
// its valid bit. The core is combinational: the 24x24-bit significand
// product is normalised by at most one place, rounded to nearest with ties
// to even and packed. Subnormal inputs and results are flushed to signed
// zero (the usual simplification of FPGA floating point cores); overflow
// gives a signed infinity, NaN inputs and infinity times zero give a quiet
// NaN. The kernel's use of single precision at every stage follows the
// design description; the latency and the flush-to-zero policy are this
// design's own choices, since the original used a vendor-generated core.
module fp_mul
  import sr_pkg::*;
#(
  parameter int unsigned STAGES = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  f32_t a,
  input  f32_t b,
  output logic out_valid,
  output f32_t y
);

  f32_t y_c;

  always_comb begin
    logic        s;
    logic [47:0] prod;
    logic [9:0]  e;          // signed biased exponent, room for under/overflow
    logic [23:0] m;          // significand incl. hidden bit, before rounding
    logic        g, st;
    logic [24:0] mr;

    s    = a[31] ^ b[31];
    prod = {1'b1, a[22:0]} * {1'b1, b[22:0]};
    e    = {2'b00, a[30:23]} + {2'b00, b[30:23]} - 10'd127;
    if (prod[47]) begin
      m  = prod[47:24];
      g  = prod[23];
      st = |prod[22:0];
      e  = e + 10'd1;
    end else begin
      m  = prod[46:23];
      g  = prod[22];
      st = |prod[21:0];
    end
    mr = {1'b0, m} + {24'd0, g & (st | m[0])};
    if (mr[24]) begin
      mr = mr >> 1;
      e  = e + 10'd1;
    end

    if (f32_is_nan(a) || f32_is_nan(b) ||
        (f32_is_inf(a) && f32_is_zero(b)) || (f32_is_zero(a) && f32_is_inf(b)))
      y_c = F32_QNAN;
    else if (f32_is_inf(a) || f32_is_inf(b))
      y_c = {s, 8'hFF, 23'd0};
    else if (f32_is_zero(a) || f32_is_zero(b))
      y_c = {s, 31'd0};
    else if ($signed(e) >= 10'sd255)
      y_c = {s, 8'hFF, 23'd0};
    else if ($signed(e) <= 10'sd0)
      y_c = {s, 31'd0};
    else
      y_c = {s, e[7:0], mr[22:0]};
  end

  sr_pipe #(.W(32), .STAGES(STAGES)) u_pipe (
    .clk, .rst_n,
    .in_valid (in_valid),
    .in_data  (y_c),
    .out_valid(out_valid),
    .out_data (y)
  );

endmodule
