// tb_sigrec_top: end-to-end test of the signal reconstruction kernel at its
// default parameters (1024-sensor blockRAMs, 2 MB SRAM banks).
//
// Four SRAM bank models hold the sensor samples; a DRAM model accepts
// result writes with a programmable ready rate. Through the host buses the
// test runs whole passes the way software does: soft reset, load weights
// and beam offsets, write the configuration, start, wait for done, then
// compares every result word in DRAM with a reference computed here,
// y(t) = sum_s w[s] * x_s(t + d[s]), each operation rounded to single
// precision in the order the kernel sums.
//
// Passes:
//  1. 64 sensors, each with a 16384-sample partition filling all of SRAM,
//     16320 time steps: one complete pass at full size. The pass must take
//     steps * sensors/2 cycles plus a fixed pipeline latency.
//  2. A second beam over the same sensor data (new weights and offsets
//     only), with a slow DRAM, which back-pressures and stalls the kernel.
//  3. 5 sensors, the sixth partition padded with zeros.
//  4. A pass aborted halfway by a soft reset, followed by a clean 2-sensor
//     pass at one time step per cycle.
// Each mechanism (full-rate pass, stall, multi-beam reuse, odd-count
// padding, soft reset abort, host read-back of the blockRAMs) is counted
// and must have happened.
module tb_sigrec_top;
  import sr_pkg::*;
  import tb_fp_pkg::*;

  localparam int unsigned PAW = 9, SRAM_LAT = 2;

  logic               clk = 1'b0, rst_n = 1'b0;
  logic               reg_wr = 1'b0, reg_rd = 1'b0;
  logic [2:0]         reg_addr = '0;
  logic [31:0]        reg_wdata = '0, reg_rdata;
  logic               bram_en = 1'b0, bram_we = 1'b0;
  logic [1:0]         bram_sel = '0;
  logic [PAW-1:0]     bram_addr = '0;
  logic [63:0]        bram_wdata = '0, bram_rdata;
  logic [3:0]         sram_rd;
  logic [SRAM_AW-1:0] sram_addr [4];
  f32_t               sram_rdata [4];
  logic               dram_wr_valid, dram_wr_ready = 1'b1;
  logic [DRAM_AW-1:0] dram_wr_addr;
  cplx_t              dram_wr_data;
  logic               busy, done, stall;

  sigrec_top u_dut (
    .clk, .rst_n, .reg_wr, .reg_rd, .reg_addr, .reg_wdata, .reg_rdata,
    .bram_en, .bram_we, .bram_sel, .bram_addr, .bram_wdata, .bram_rdata,
    .sram_rd, .sram_addr, .sram_rdata,
    .dram_wr_valid, .dram_wr_ready, .dram_wr_addr, .dram_wr_data,
    .busy, .done, .stall);

  sram_bank_model #(.AW(SRAM_AW), .LAT(SRAM_LAT)) u_sram0 (.clk, .rd(sram_rd[0]), .addr(sram_addr[0]), .rdata(sram_rdata[0]));
  sram_bank_model #(.AW(SRAM_AW), .LAT(SRAM_LAT)) u_sram1 (.clk, .rd(sram_rd[1]), .addr(sram_addr[1]), .rdata(sram_rdata[1]));
  sram_bank_model #(.AW(SRAM_AW), .LAT(SRAM_LAT)) u_sram2 (.clk, .rd(sram_rd[2]), .addr(sram_addr[2]), .rdata(sram_rdata[2]));
  sram_bank_model #(.AW(SRAM_AW), .LAT(SRAM_LAT)) u_sram3 (.clk, .rd(sram_rd[3]), .addr(sram_addr[3]), .rdata(sram_rdata[3]));

  always #5 clk = ~clk;

  int          checks = 0, failures = 0;
  int          cycle = 0, n_stall = 0, n_done = 0, n_writes = 0;
  int          ready_pct = 100;
  logic [63:0] dram [logic [DRAM_AW-1:0]];
  int          m_fullrate = 0, m_stall = 0, m_multibeam = 0, m_pad = 0, m_abort = 0, m_readback = 0;

  // Sensor-side state of the current pass
  int          n_sens, part, n_steps;
  logic [63:0] wt [1024];
  int          off [1024];

  initial begin
    #80ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && stall) n_stall++;
    if (rst_n && done) n_done++;
    if (rst_n && dram_wr_valid && dram_wr_ready) begin
      dram[dram_wr_addr] = dram_wr_data;
      n_writes++;
    end
  end
  always @(negedge clk) dram_wr_ready = ($urandom % 100) < ready_pct;

  task automatic fail(string m);
    failures++;
    if (failures < 15) $display("FAIL: %s", m);
  endtask

  task automatic reg_write(logic [2:0] a, logic [31:0] d);
    reg_wr = 1'b1; reg_addr = a; reg_wdata = d;
    @(negedge clk);
    reg_wr = 1'b0;
  endtask

  task automatic reg_read(logic [2:0] a, output logic [31:0] d);
    reg_rd = 1'b1; reg_addr = a;
    @(negedge clk);
    reg_rd = 1'b0;
    d = reg_rdata;
  endtask

  task automatic bram_write(logic [1:0] sel, int a, logic [63:0] d);
    bram_en = 1'b1; bram_we = 1'b1; bram_sel = sel; bram_addr = PAW'(a); bram_wdata = d;
    @(negedge clk);
    bram_en = 1'b0; bram_we = 1'b0;
  endtask

  task automatic bram_read(logic [1:0] sel, int a, output logic [63:0] d);
    bram_en = 1'b1; bram_we = 1'b0; bram_sel = sel; bram_addr = PAW'(a);
    @(negedge clk);
    bram_en = 1'b0;
    d = bram_rdata;
  endtask

  // Sample k of sensor s, read back from the SRAM models
  function automatic logic [63:0] sample(int s, int k);
    int w;
    w = (s / 2) * part + k;
    if (s % 2 == 0) return {u_sram0.mem[w], u_sram1.mem[w]};
    else            return {u_sram2.mem[w], u_sram3.mem[w]};
  endfunction

  // Fill the partitions of n sensors (padding to an even count with zeros)
  task automatic load_samples(int n, int p);
    int np;
    np = (n + 1) / 2 * 2;
    part = p;
    for (int s = 0; s < np; s++)
      for (int k = 0; k < p; k++) begin
        logic [63:0] v;
        int w;
        v = (s < n) ? rand_c(112, 136) : 64'd0;
        w = (s / 2) * p + k;
        if (s % 2 == 0) begin u_sram0.mem[w] = v[63:32]; u_sram1.mem[w] = v[31:0]; end
        else            begin u_sram2.mem[w] = v[63:32]; u_sram3.mem[w] = v[31:0]; end
      end
  endtask

  // New beam: weights and offsets for n sensors, offsets below max_off
  task automatic load_beam(int n, int max_off);
    int np;
    logic [63:0] d;
    np = (n + 1) / 2 * 2;
    n_sens = n;
    for (int s = 0; s < np; s++) begin
      wt[s]  = rand_c(120, 130);
      off[s] = int'($urandom % max_off);
      bram_write(2'(s % 2), s / 2, wt[s]);
      bram_write(2'(2 + s % 2), s / 2, 64'(off[s]));
    end
    // host read-back through the second port
    for (int s = 0; s < np; s += 7) begin
      bram_read(2'(s % 2), s / 2, d);
      checks++;
      if (d !== wt[s]) fail("weight read-back");
      bram_read(2'(2 + s % 2), s / 2, d);
      checks++;
      if (d !== 64'(off[s])) fail("offset read-back");
      m_readback++;
    end
  endtask

  task automatic run_pass(int steps, logic [DRAM_AW-1:0] base, int pct, output int cycles);
    logic [31:0] st;
    int t0, w0;
    n_steps = steps;
    ready_pct = pct;
    reg_write(REG_SENSORS, 32'(n_sens));
    reg_write(REG_STEPS, 32'(steps));
    reg_write(REG_PARTSIZE, 32'(part));
    reg_write(REG_RESBASE, 32'(base));
    n_done = 0;
    w0 = n_writes;
    t0 = cycle;
    reg_write(REG_CTRL, 32'h1);
    while (!done) @(negedge clk);
    cycles = cycle - t0;
    @(negedge clk);
    reg_read(REG_STATUS, st);
    checks++;
    if (st != 32'h1) fail($sformatf("STATUS after pass %h", st));
    checks++;
    if (n_writes - w0 != steps) fail($sformatf("%0d results written, expected %0d", n_writes - w0, steps));
  endtask

  task automatic check_results(logic [DRAM_AW-1:0] base);
    int np;
    np = (n_sens + 1) / 2;
    for (int t = 0; t < n_steps; t++) begin
      logic [63:0] acc, r, pe, po;
      for (int j = 0; j < np; j++) begin
        pe  = ref_cmul(sample(2*j,   t + off[2*j]),   wt[2*j]);
        po  = ref_cmul(sample(2*j+1, t + off[2*j+1]), wt[2*j+1]);
        r   = ref_cadd(pe, po);
        acc = (j == 0) ? r : ref_cadd(acc, r);
      end
      checks++;
      if (!dram.exists(base + DRAM_AW'(t))) fail($sformatf("result %0d missing", t));
      else if (!csame(dram[base + DRAM_AW'(t)], acc))
        fail($sformatf("result %0d = %h expected %h", t, dram[base + DRAM_AW'(t)], acc));
    end
  endtask

  task automatic soft_reset();
    reg_write(REG_CTRL, 32'h2);
    @(negedge clk);
  endtask

  initial begin
    int cyc, st0;
    logic [31:0] st;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);

    // 1. full-size pass: 64 sensors, partitions fill the SRAM banks
    soft_reset();
    load_samples(64, SRAM_WORDS / 32);
    load_beam(64, 64);
    run_pass(SRAM_WORDS / 32 - 64, 24'h00_0000, 100, cyc);
    $display("pass 1: 64 sensors, %0d steps in %0d cycles", n_steps, cyc);
    checks++;
    if (cyc < n_steps * 32 || cyc > n_steps * 32 + 20)
      fail($sformatf("pass took %0d cycles, expected %0d plus latency", cyc, n_steps * 32));
    else m_fullrate++;
    check_results(24'h00_0000);

    // 2. second beam on the same samples, slow DRAM
    soft_reset();
    load_beam(64, 2000);
    st0 = n_stall;
    run_pass(3000, 24'h10_0000, 2, cyc);
    $display("pass 2: 64 sensors, %0d steps in %0d cycles, %0d stall cycles", n_steps, cyc, n_stall - st0);
    if (n_stall > st0) m_stall++;
    m_multibeam++;
    check_results(24'h10_0000);

    // 3. odd sensor count, padded partition
    soft_reset();
    load_samples(5, SRAM_WORDS / 3);
    load_beam(5, 5000);
    run_pass(2000, 24'h20_0000, 70, cyc);
    $display("pass 3: 5 sensors, %0d steps in %0d cycles", n_steps, cyc);
    m_pad++;
    check_results(24'h20_0000);

    // 4. abort by soft reset, then a clean 2-sensor pass
    soft_reset();
    load_samples(2, SRAM_WORDS);
    load_beam(2, 1000);
    reg_write(REG_SENSORS, 32'd2);
    reg_write(REG_STEPS, 32'd100000);
    reg_write(REG_PARTSIZE, 32'(SRAM_WORDS));
    reg_write(REG_CTRL, 32'h1);
    repeat (500) @(negedge clk);
    checks++;
    if (!busy) fail("not busy during the pass to abort");
    soft_reset();
    reg_read(REG_STATUS, st);
    checks++;
    if (st != 32'h0 || busy) fail("soft reset did not abort the pass");
    else m_abort++;
    run_pass(20000, 24'h30_0000, 100, cyc);
    $display("pass 4: 2 sensors, %0d steps in %0d cycles", n_steps, cyc);
    checks++;
    if (cyc > n_steps + 20) fail("2-sensor pass not at one step per cycle");
    check_results(24'h30_0000);

    checks++;
    if (m_fullrate == 0 || m_stall == 0 || m_multibeam == 0 || m_pad == 0 || m_abort == 0 || m_readback == 0)
      fail($sformatf("mechanism not exercised: fullrate=%0d stall=%0d multibeam=%0d pad=%0d abort=%0d readback=%0d",
                     m_fullrate, m_stall, m_multibeam, m_pad, m_abort, m_readback));
    $display("mechanisms: fullrate=%0d stall=%0d multibeam=%0d pad=%0d abort=%0d readback=%0d",
             m_fullrate, m_stall, m_multibeam, m_pad, m_abort, m_readback);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
