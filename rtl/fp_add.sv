// fp_add: IEEE-754 single precision adder.
//
// One sum is accepted every cycle and appears STAGES cycles later with its
// valid bit; STAGES = 0 gives a purely combinational adder, which the
// accumulators use to close their feedback loop in a single cycle.
// The larger-magnitude operand is chosen, the smaller significand is
// aligned with 26 extra bits plus a sticky bit, the two are added or
// subtracted, the result is normalised by a leading-zero count and rounded
// to nearest with ties to even. Subnormal operands and results are flushed
// to signed zero, overflow gives infinity, NaN or (+inf)+(-inf) gives a
// quiet NaN, and an exact cancellation gives +0. A subtraction is an
// addition with the second operand's sign bit inverted by the user.
// Single precision follows the design description; latency and the
// flush-to-zero policy are this design's choices.
module fp_add
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

  localparam int unsigned XB = 26;          // extra alignment bits
  localparam int unsigned MW = 24 + XB;     // aligned significand width

  f32_t y_c;

  always_comb begin
    f32_t          x, z;                     // |x| >= |z|
    logic [7:0]    d;
    logic [MW-1:0] mx, mz, mz_sh;
    logic          lost;
    logic [MW:0]   sum;
    int unsigned   lz;
    logic [MW:0]   norm;
    logic [9:0]    e;
    logic [23:0]   m;
    logic          g, st;
    logic [24:0]   mr;

    if (a[30:0] >= b[30:0]) begin x = a; z = b; end
    else                    begin x = b; z = a; end

    d     = x[30:23] - z[30:23];
    mx    = {1'b1, x[22:0], {XB{1'b0}}};
    mz    = {1'b1, z[22:0], {XB{1'b0}}};
    lost  = 1'b0;
    mz_sh = mz;
    if (d >= 8'(MW)) begin
      mz_sh = '0;
      lost  = 1'b1;
    end else begin
      for (int i = 0; i < MW; i++)
        if (i < int'(d) && mz[i]) lost = 1'b1;
      mz_sh = mz >> d;
    end
    mz_sh[0] = mz_sh[0] | lost;

    if (x[31] == z[31]) sum = {1'b0, mx} + {1'b0, mz_sh};
    else                sum = {1'b0, mx} - {1'b0, mz_sh};

    lz = MW + 1;
    for (int i = 0; i <= MW; i++)
      if (sum[i]) lz = MW - i;
    norm = sum << lz;

    e  = {2'b00, x[30:23]} + 10'd1 - 10'(lz);
    m  = norm[MW:MW-23];
    g  = norm[MW-24];
    st = |norm[MW-25:0];
    mr = {1'b0, m} + {24'd0, g & (st | m[0])};
    if (mr[24]) begin
      mr = mr >> 1;
      e  = e + 10'd1;
    end

    if (f32_is_nan(a) || f32_is_nan(b) ||
        (f32_is_inf(a) && f32_is_inf(b) && (a[31] != b[31])))
      y_c = F32_QNAN;
    else if (f32_is_inf(a))
      y_c = a;
    else if (f32_is_inf(b))
      y_c = b;
    else if (f32_is_zero(a) && f32_is_zero(b))
      y_c = {a[31] & b[31], 31'd0};
    else if (f32_is_zero(z))
      y_c = x;
    else if (sum == '0)
      y_c = 32'd0;
    else if ($signed(e) >= 10'sd255)
      y_c = {x[31], 8'hFF, 23'd0};
    else if ($signed(e) <= 10'sd0)
      y_c = {x[31], 31'd0};
    else
      y_c = {x[31], e[7:0], mr[22:0]};
  end

  sr_pipe #(.W(32), .STAGES(STAGES)) u_pipe (
    .clk, .rst_n,
    .in_valid (in_valid),
    .in_data  (y_c),
    .out_valid(out_valid),
    .out_data (y)
  );

endmodule
