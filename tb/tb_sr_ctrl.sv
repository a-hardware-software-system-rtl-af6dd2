// tb_sr_ctrl: self-checking test of the kernel's control and addressing.
//
// Beam offset blockRAMs are modelled with random contents. For several
// pass configurations (sensor counts 2 to 64, an odd one among them, and
// different partition sizes) the test predicts, for every time step t and
// sensor pair j, the SRAM addresses j*part + offset + t of the even and
// the odd sensor and checks them in order. It also checks that the weight
// read for pair j leaves SRAM_LAT-1 cycles after its SRAM read, that the
// pair reaches the datapath (dp_valid, first/last of step) SRAM_LAT cycles
// after it, that the first read is sampled on the 4th clock edge after start, that reads run one per cycle
// when nothing stalls, that a slow result path stalls issue without ever
// holding more than FIFO_DEPTH results, and that done pulses once, after
// the last result has left.
module tb_sr_ctrl;
  import sr_pkg::*;

  localparam int unsigned SRAM_LAT = 2, FIFO_DEPTH = 16, PAW = 9, DP_LAT = 7;

  typedef struct {
    logic [SRAM_AW-1:0] ae, ao;
    int                 j;
    bit                 first, last;
  } req_t;

  logic               clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [10:0]        cfg_sensors = '0;
  logic [SRAM_AW:0]   cfg_steps = '0;
  logic [SRAM_AW-1:0] cfg_part = '0;
  logic               idx_rd, sram_rd, wt_rd, dp_valid, dp_first, dp_last;
  logic [PAW-1:0]     idx_addr, wt_addr;
  logic [IDX_W-1:0]   idx_even, idx_odd;
  logic [SRAM_AW-1:0] sram_addr_even, sram_addr_odd;
  logic               res_pop = 1'b0, busy, done, stall;

  logic [IDX_W-1:0]   off_e [512], off_o [512];
  int                 checks = 0, failures = 0, cycle = 0;
  req_t               exp_q [$];
  req_t               wt_q [$], dp_q [$];
  int                 wt_t [$], dp_t [$];
  int                 res_t [$];       // cycle at which a result enters the FIFO model
  int                 fifo = 0, max_fifo = 0, n_done = 0, n_stall = 0, n_rd = 0;
  int                 first_rd = -1, last_rd = -1, start_cycle = 0;
  int                 ready_pct = 100;

  sr_ctrl u_dut (
    .clk, .rst_n, .start, .cfg_sensors, .cfg_steps, .cfg_part,
    .idx_rd, .idx_addr, .idx_even, .idx_odd,
    .sram_rd, .sram_addr_even, .sram_addr_odd, .wt_rd, .wt_addr,
    .dp_valid, .dp_first, .dp_last, .res_pop, .busy, .done, .stall);

  always #5 clk = ~clk;

  // beam offset blockRAMs, one cycle read latency
  always @(posedge clk) if (idx_rd) begin
    idx_even <= off_e[idx_addr];
    idx_odd  <= off_o[idx_addr];
  end

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string m);
    failures++;
    if (failures < 15) $display("FAIL at cycle %0d: %s", cycle, m);
  endtask

  always @(posedge clk) if (rst_n) begin
    cycle <= cycle + 1;
    if (stall) n_stall++;
    if (done) n_done++;
    if (sram_rd) begin
      req_t e;
      checks++;
      n_rd++;
      if (first_rd < 0) first_rd = cycle;
      last_rd = cycle;
      if (exp_q.size() == 0) fail("unexpected SRAM read");
      else begin
        e = exp_q.pop_front();
        if (sram_addr_even !== e.ae || sram_addr_odd !== e.ao)
          fail($sformatf("SRAM address %h/%h expected %h/%h", sram_addr_even, sram_addr_odd, e.ae, e.ao));
        wt_q.push_back(e); wt_t.push_back(cycle);
        dp_q.push_back(e); dp_t.push_back(cycle);
      end
    end
    if (wt_rd) begin
      checks++;
      if (wt_q.size() == 0) fail("unexpected weight read");
      else begin
        req_t e; int t;
        e = wt_q.pop_front(); t = wt_t.pop_front();
        if (int'(wt_addr) != e.j) fail($sformatf("weight address %0d expected %0d", wt_addr, e.j));
        if (cycle - t != SRAM_LAT - 1) fail("weight read timing");
      end
    end
    if (dp_valid) begin
      checks++;
      if (dp_q.size() == 0) fail("unexpected datapath valid");
      else begin
        req_t e; int t;
        e = dp_q.pop_front(); t = dp_t.pop_front();
        if (dp_first != e.first || dp_last != e.last) fail("first/last tags");
        if (cycle - t != SRAM_LAT) fail("datapath valid timing");
        if (dp_last) res_t.push_back(cycle + DP_LAT);
      end
    end
    // result FIFO model: results arrive DP_LAT cycles after the last pair
    while (res_t.size() != 0 && res_t[0] <= cycle) begin
      void'(res_t.pop_front());
      fifo++;
    end
    if (res_pop) fifo--;
    if (fifo > max_fifo) max_fifo = fifo;
    if (fifo > FIFO_DEPTH) fail("result FIFO overflow");
  end

  always @(negedge clk) res_pop = (fifo > 0) && (($urandom % 100) < ready_pct);

  task automatic pass(int sensors, int steps, int part, int pct);
    int pairs, t0;
    pairs = (sensors + 1) / 2;
    ready_pct = pct;
    for (int j = 0; j < 512; j++) begin
      off_e[j] = IDX_W'($urandom % 200);
      off_o[j] = IDX_W'($urandom % 200);
    end
    for (int t = 0; t < steps; t++)
      for (int j = 0; j < pairs; j++) begin
        req_t r;
        r.ae = SRAM_AW'(j * part + int'(off_e[j]) + t);
        r.ao = SRAM_AW'(j * part + int'(off_o[j]) + t);
        r.j = j; r.first = (j == 0); r.last = (j == pairs - 1);
        exp_q.push_back(r);
      end
    cfg_sensors = 11'(sensors); cfg_steps = (SRAM_AW+1)'(steps); cfg_part = SRAM_AW'(part);
    first_rd = -1; n_rd = 0; n_done = 0; n_stall = 0;
    start = 1'b1;
    @(posedge clk);
    start_cycle = cycle;
    @(negedge clk);
    start = 1'b0;
    t0 = 0;
    while (!done && t0 < 200000) begin @(negedge clk); t0++; end
    @(negedge clk);
    checks++;
    if (exp_q.size() != 0) fail($sformatf("%0d SRAM reads missing", exp_q.size()));
    checks++;
    if (n_done != 1 || busy) fail("done pulse / busy");
    checks++;
    if (fifo != 0 || res_t.size() != 0) fail("done before all results were written");
    checks++;
    if (first_rd - start_cycle != 4) fail($sformatf("first read %0d cycles after start", first_rd - start_cycle));
    if (pct == 100) begin
      checks++;
      if (last_rd - first_rd + 1 != steps * pairs || n_stall != 0)
        fail($sformatf("reads took %0d cycles for %0d pairs", last_rd - first_rd + 1, steps * pairs));
    end else begin
      checks++;
      if (n_stall == 0) fail("slow result path never stalled issue");
    end
    $display("pass sensors=%0d steps=%0d: %0d reads, %0d stall cycles, max FIFO %0d",
             sensors, steps, n_rd, n_stall, max_fifo);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    pass(8, 20, 1000, 100);
    pass(2, 60, 300, 100);
    pass(7, 10, 500, 100);
    pass(64, 30, 16384, 100);
    pass(2, 200, 4000, 10);
    pass(6, 100, 4000, 20);
    checks++;
    if (max_fifo != FIFO_DEPTH) fail("FIFO never filled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
