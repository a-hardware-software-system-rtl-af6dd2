// tb_sr_datapath: self-checking test of the multiply / reduce / accumulate
// pipeline.
//
// Feeds time steps of 1 to 8 sensor pairs, back to back or with idle
// cycles between pairs, with random complex samples and weights. For each
// step the reference is acc = (xe0*we0 + xo0*wo0), then acc += (xe_j*we_j
// + xo_j*wo_j) for each further pair, every operation correctly rounded in
// single precision, which is the order the pipeline sums in. Each result
// must match bit for bit and appear MUL_STAGES + 2*ADD_STAGES + 1 = 7
// cycles after the step's last pair. Steps of a single pair check that
// the first/last flags restart the accumulator.
module tb_sr_datapath;
  import tb_fp_pkg::*;
  import sr_pkg::*;

  localparam int unsigned LAT = 7;

  typedef struct {
    logic [63:0] e;
    int          t;
  } item_t;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  logic  in_valid = 1'b0, in_first = 1'b0, in_last = 1'b0;
  cplx_t x_even = '0, w_even = '0, x_odd = '0, w_odd = '0;
  logic  out_valid;
  cplx_t out_y;
  int    checks = 0, failures = 0;
  int    cycle = 0;
  item_t q [$];

  sr_datapath u_dut (.clk, .rst_n, .in_valid, .in_first, .in_last,
                     .x_even, .w_even, .x_odd, .w_odd, .out_valid, .out_y);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    item_t it;
    checks++;
    if (q.size() == 0) begin
      failures++;
      $display("FAIL: unexpected result");
    end else begin
      it = q.pop_front();
      if (!csame(out_y, it.e)) begin
        failures++;
        if (failures < 10) $display("FAIL: step result %h expected %h", out_y, it.e);
      end
      if (cycle - it.t != LAT) begin
        failures++;
        $display("FAIL: latency %0d expected %0d", cycle - it.t, LAT);
      end
    end
  end

  task automatic step(int pairs, bit gaps);
    logic [63:0] acc, r;
    item_t       it;
    for (int j = 0; j < pairs; j++) begin
      x_even = rand_c(110, 140); w_even = rand_c(110, 140);
      x_odd  = rand_c(110, 140); w_odd  = rand_c(110, 140);
      in_valid = 1'b1; in_first = (j == 0); in_last = (j == pairs - 1);
      r   = ref_cadd(ref_cmul(x_even, w_even), ref_cmul(x_odd, w_odd));
      acc = (j == 0) ? r : ref_cadd(acc, r);
      if (j == pairs - 1) begin
        it.e = acc; it.t = cycle;
        q.push_back(it);
      end
      @(negedge clk);
      if (gaps && ($urandom % 3 == 0)) begin
        in_valid = 1'b0;
        x_even = rand_c(110, 140);   // garbage while idle must be ignored
        repeat (1 + $urandom % 3) @(negedge clk);
      end
    end
    in_valid = 1'b0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int i = 0; i < 400; i++) step(1 + int'($urandom % 8), 1'b0);
    for (int i = 0; i < 100; i++) step(1, 1'b0);
    for (int i = 0; i < 300; i++) step(1 + int'($urandom % 8), 1'b1);
    repeat (LAT + 4) @(negedge clk);
    if (q.size() != 0) begin
      failures++;
      $display("FAIL: %0d results missing", q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
