// tb_cplx_mul: self-checking test of the complex single precision multiplier.
//
// Streams random complex sample/weight pairs (with idle gaps and a few
// special values) through cplx_mul and compares each product, bit for bit,
// with a reference built from correctly rounded single precision products
// and sums: re = xr*wr - xi*wi, im = xr*wi + xi*wr. Checks the latency of
// MUL_STAGES + ADD_STAGES cycles.
module tb_cplx_mul;
  import tb_fp_pkg::*;
  import sr_pkg::*;

  localparam int unsigned LAT = 4;

  typedef struct {
    logic [63:0] x, w, e;
    int          t;
  } item_t;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  logic  in_valid = 1'b0;
  cplx_t x = '0, w = '0;
  logic  out_valid;
  cplx_t p;
  int    checks = 0, failures = 0;
  int    cycle = 0;
  item_t q [$];

  cplx_mul u_dut (.clk, .rst_n, .in_valid, .x, .w, .out_valid, .p);

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
      $display("FAIL: unexpected product");
    end else begin
      it = q.pop_front();
      if (!csame(p, it.e)) begin
        failures++;
        if (failures < 10) $display("FAIL: %h * %h gave %h expected %h", it.x, it.w, p, it.e);
      end
      if (cycle - it.t != LAT) begin
        failures++;
        $display("FAIL: latency %0d", cycle - it.t);
      end
    end
  end

  task automatic put(logic [63:0] xv, logic [63:0] wv);
    item_t it;
    x = xv; w = wv; in_valid = 1'b1;
    it.x = xv; it.w = wv; it.e = ref_cmul(xv, wv); it.t = cycle;
    q.push_back(it);
    @(negedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    put({32'h3F80_0000, 32'h0000_0000}, {32'h0000_0000, 32'h3F80_0000});  // 1 * i
    put({32'h4000_0000, 32'h4040_0000}, {32'h4080_0000, 32'hC0A0_0000});  // (2+3i)(4-5i) = 23+2i
    put({32'h3F80_0000, 32'h3F80_0000}, {32'h3F80_0000, 32'hBF80_0000});  // (1+i)(1-i) = 2
    for (int i = 0; i < 3000; i++) begin
      put(rand_c(100, 150), rand_c(100, 150));
      if ($urandom % 6 == 0) begin in_valid = 1'b0; @(negedge clk); end
    end
    in_valid = 1'b0;
    repeat (LAT + 4) @(negedge clk);
    if (q.size() != 0) begin
      failures++;
      $display("FAIL: %0d products missing", q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
