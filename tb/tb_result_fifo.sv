// tb_result_fifo: self-checking test of the result buffer and DRAM writer.
//
// Pushes random complex results at random times, never more than DEPTH
// outstanding (as the kernel guarantees), while the DRAM side accepts with
// a random ready. Every DRAM write must carry the next result in order at
// the next address counting up from the loaded base, and valid, address
// and data must hold while ready is low. A second run reloads a new base.
module tb_result_fifo;
  import sr_pkg::*;

  localparam int unsigned DEPTH = 16;

  logic               clk = 1'b0, rst_n = 1'b0;
  logic               load = 1'b0, push = 1'b0;
  logic [DRAM_AW-1:0] base = '0;
  cplx_t              din = '0;
  logic               dram_wr_valid, dram_wr_ready = 1'b0, pop;
  logic [DRAM_AW-1:0] dram_wr_addr;
  cplx_t              dram_wr_data;
  int                 checks = 0, failures = 0;
  int                 outstanding = 0, n_full = 0;
  logic [63:0]        q [$];
  logic [DRAM_AW-1:0] next_addr;
  int                 ready_pct = 50;

  result_fifo u_dut (.clk, .rst_n, .load, .base, .push, .din,
    .dram_wr_valid, .dram_wr_ready, .dram_wr_addr, .dram_wr_data, .pop);

  always #5 clk = ~clk;

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (dram_wr_valid && dram_wr_ready) begin
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL: write with nothing pushed");
      end else if (dram_wr_data !== q[0] || dram_wr_addr !== next_addr) begin
        failures++;
        if (failures < 10) $display("FAIL: write %h @%h expected %h @%h",
                                    dram_wr_data, dram_wr_addr, q[0], next_addr);
      end
      if (q.size() != 0) void'(q.pop_front());
      next_addr <= next_addr + 1'b1;
    end
    if (pop != (dram_wr_valid && dram_wr_ready)) begin
      failures++;
      $display("FAIL: pop does not mark the accepted write");
    end
  end

  always @(negedge clk) dram_wr_ready = ($urandom % 100) < ready_pct;

  task automatic run(int n, logic [DRAM_AW-1:0] b);
    base = b; load = 1'b1;
    @(negedge clk);
    load = 1'b0;
    next_addr = b;
    for (int i = 0; i < n; i++) begin
      while (outstanding >= DEPTH) begin
        n_full++;
        push = 1'b0;
        @(negedge clk);
        outstanding = q.size();
      end
      push = ($urandom % 3) != 0;
      din  = {$urandom, $urandom};
      if (push) begin
        q.push_back(din);
        outstanding++;
      end else i--;
      @(negedge clk);
      outstanding = q.size();
    end
    push = 1'b0;
    while (q.size() != 0) @(negedge clk);
    @(negedge clk);
    checks++;
    if (dram_wr_valid) begin
      failures++;
      $display("FAIL: valid with empty buffer");
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    ready_pct = 60;
    run(2000, 24'h00_1000);
    ready_pct = 15;           // slow memory: buffer fills
    run(500, 24'hAB_0000);
    if (n_full == 0) begin
      failures++;
      $display("FAIL: buffer never filled");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
