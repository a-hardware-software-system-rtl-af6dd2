// tb_fp_add: self-checking test of the single precision add unit.
//
// Streams operand pairs through fp_add at its default latency, mostly one
// per cycle with random idle cycles, and compares every result with the
// double precision reference of tb_fp_pkg. Checks that each result appears
// exactly STAGES cycles after its operands. Operands cover random normals
// over a wide exponent range, zeros, infinities, NaN, subnormals,
// overflow, underflow and near or exact cancellation.
module tb_fp_add;
  import tb_fp_pkg::*;

  localparam int unsigned STAGES = 2;

  typedef struct {
    logic [31:0] a, b, e;
    int          t;
  } item_t;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        in_valid = 1'b0;
  logic [31:0] a = '0, b = '0;
  logic        out_valid;
  logic [31:0] y;
  int          checks = 0, failures = 0;
  int          cycle = 0;
  item_t       q [$];

  fp_add u_dut (.clk, .rst_n, .in_valid, .a, .b, .out_valid, .y);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    item_t it;
    checks++;
    if (q.size() == 0) begin
      failures++;
      $display("FAIL: unexpected result %h", y);
    end else begin
      it = q.pop_front();
      if (!same(y, it.e)) begin
        failures++;
        if (failures < 10) $display("FAIL: %h add %h gave %h, expected %h", it.a, it.b, y, it.e);
      end
      if (cycle - it.t != STAGES) begin
        failures++;
        $display("FAIL: latency %0d expected %0d", cycle - it.t, STAGES);
      end
    end
  end

  // present one pair at a negative edge; it is taken at the next rising edge
  task automatic put(logic [31:0] x, logic [31:0] z);
    item_t it;
    a = x; b = z; in_valid = 1'b1;
    it.a = x; it.b = z; it.e = ref_add(x, z); it.t = cycle;
    q.push_back(it);
    @(negedge clk);
  endtask

  initial begin
    logic [31:0] x, z;
    int          ex;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // special values
    put(32'h0000_0000, 32'h3F80_0000);
    put(32'h8000_0000, 32'h8000_0000);
    put(32'h3F80_0000, 32'hBF80_0000);
    put(32'h7F80_0000, 32'h3F80_0000);
    put(32'h7F80_0000, 32'hFF80_0000);
    put(32'h7F80_0000, 32'h0000_0000);
    put(32'h7FC0_0000, 32'h3F80_0000);
    put(32'h0000_0123, 32'h3F80_0000);
    put(32'h7F00_0000, 32'h7F00_0000);
    put(32'h0100_0000, 32'h0100_0000);
    put(32'h0080_0001, 32'h8080_0000);
    put(32'h3FC0_0000, 32'h3400_0000);
    put(32'h4B00_0001, 32'h3F00_0000);
    for (int i = 0; i < 4000; i++) begin
      x  = rand_f(60, 190);
      ex = int'(x[30:23]);
      case ($urandom % 4)
        0: z = rand_f(60, 190);
        1: z = rand_f(ex - 30, ex + 2);
        2: z = {~x[31], x[30:23], x[22:4], 4'($urandom)};
        default: z = {1'($urandom), x[30:23], 23'($urandom)};
      endcase
      put(x, z);
      if ($urandom % 8 == 0) begin in_valid = 1'b0; @(negedge clk); end
    end
    in_valid = 1'b0;
    repeat (STAGES + 4) @(negedge clk);
    if (q.size() != 0) begin
      failures++;
      $display("FAIL: %0d results missing", q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
