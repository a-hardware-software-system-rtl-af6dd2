// tb_workloads: the kernel's share of the benchmark experiments, run at the
// default parameters for every sensor-array size the experiments use.
//
// The experiments vary the sensor count (4, 8, 16, 32, 64), the number of
// beams formed from one buffer of sensor data, and the software-side weight
// update settings. For the kernel a buffer is what fits in SRAM: with N
// sensors each sensor pair owns a 2^20/N-word partition of the banks, so a
// buffer holds 2^20/N samples per sensor, and the kernel must spend N/2
// cycles per time step. For each size this test
//   - fills all four SRAM banks with a buffer of random samples,
//   - forms two beams from it (weights and offsets reloaded, samples kept),
//   - loads a second buffer and forms one beam with new weights, as after a
//     weight update,
// with the DRAM always ready. Each pass covers the whole partition minus the
// largest beam offset. Every result word is compared with a reference
// computed here in the kernel's summation order, each operation rounded to
// single precision, and every pass must take steps * N/2 cycles plus at
// most 20 cycles of latency. The SRAM and DRAM are simple models; the test
// talks to the kernel only through its host buses, as software would.
module tb_workloads;
  import sr_pkg::*;
  import tb_fp_pkg::*;

  localparam int unsigned PAW = 9, SRAM_LAT = 2, MAX_OFF = 64;

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
  logic               dram_wr_valid;
  logic               dram_wr_ready = 1'b1;
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
  int          cycle = 0, n_writes = 0, n_stall = 0;
  logic [63:0] dram [logic [DRAM_AW-1:0]];

  int          n_sens, part, n_steps;
  logic [63:0] wt [1024];
  int          off [1024];

  // Watchdog: all passes together need about 8 million cycles
  initial begin
    repeat (30_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && stall) n_stall++;
    if (rst_n && dram_wr_valid && dram_wr_ready) begin
      dram[dram_wr_addr] = dram_wr_data;
      n_writes++;
    end
  end

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

  function automatic logic [63:0] sample(int s, int k);
    int w;
    w = (s / 2) * part + k;
    if (s % 2 == 0) return {u_sram0.mem[w], u_sram1.mem[w]};
    else            return {u_sram2.mem[w], u_sram3.mem[w]};
  endfunction

  // A new buffer: every word of every bank gets a random sample
  task automatic load_buffer(int n);
    n_sens = n;
    part   = int'(SRAM_WORDS) / (n / 2);
    for (int w = 0; w < int'(SRAM_WORDS); w++) begin
      logic [63:0] ve, vo;
      ve = rand_c(112, 136);
      vo = rand_c(112, 136);
      u_sram0.mem[w] = ve[63:32]; u_sram1.mem[w] = ve[31:0];
      u_sram2.mem[w] = vo[63:32]; u_sram3.mem[w] = vo[31:0];
    end
  endtask

  task automatic load_beam();
    for (int s = 0; s < n_sens; s++) begin
      wt[s]  = rand_c(120, 130);
      off[s] = int'($urandom % MAX_OFF);
      bram_write(2'(s % 2), s / 2, wt[s]);
      bram_write(2'(2 + s % 2), s / 2, 64'(off[s]));
    end
  endtask

  task automatic run_pass(logic [DRAM_AW-1:0] base);
    logic [31:0] st;
    int t0, w0, cyc;
    n_steps = part - int'(MAX_OFF);
    reg_write(REG_CTRL, 32'h2);
    reg_write(REG_SENSORS, 32'(n_sens));
    reg_write(REG_STEPS, 32'(n_steps));
    reg_write(REG_PARTSIZE, 32'(part));
    reg_write(REG_RESBASE, 32'(base));
    w0 = n_writes;
    t0 = cycle;
    reg_write(REG_CTRL, 32'h1);
    while (!done) @(negedge clk);
    cyc = cycle - t0;
    @(negedge clk);
    reg_read(REG_STATUS, st);
    $display("%0d sensors: %0d steps in %0d cycles", n_sens, n_steps, cyc);
    checks++;
    if (st != 32'h1) fail($sformatf("STATUS after pass %h", st));
    checks++;
    if (n_writes - w0 != n_steps) fail($sformatf("%0d results written, expected %0d", n_writes - w0, n_steps));
    checks++;
    if (cyc < n_steps * n_sens / 2 || cyc > n_steps * n_sens / 2 + 20)
      fail($sformatf("pass took %0d cycles, expected %0d plus latency", cyc, n_steps * n_sens / 2));
  endtask

  task automatic check_results(logic [DRAM_AW-1:0] base);
    for (int t = 0; t < n_steps; t++) begin
      logic [63:0] acc, r, pe, po;
      for (int j = 0; j < n_sens / 2; j++) begin
        pe  = ref_cmul(sample(2*j,   t + off[2*j]),   wt[2*j]);
        po  = ref_cmul(sample(2*j+1, t + off[2*j+1]), wt[2*j+1]);
        r   = ref_cadd(pe, po);
        acc = (j == 0) ? r : ref_cadd(acc, r);
      end
      checks++;
      if (!dram.exists(base + DRAM_AW'(t))) fail($sformatf("result %0d missing", t));
      else if (!csame(dram[base + DRAM_AW'(t)], acc))
        fail($sformatf("%0d sensors: result %0d = %h expected %h", n_sens, t, dram[base + DRAM_AW'(t)], acc));
    end
  endtask

  initial begin
    int sizes [5] = '{4, 8, 16, 32, 64};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);

    foreach (sizes[i]) begin
      load_buffer(sizes[i]);
      for (int b = 0; b < 2; b++) begin
        load_beam();
        run_pass(DRAM_AW'(b) << 20);
        check_results(DRAM_AW'(b) << 20);
      end
      load_buffer(sizes[i]);
      load_beam();
      run_pass(24'h20_0000);
      check_results(24'h20_0000);
    end

    checks++;
    if (n_stall != 0) fail($sformatf("%0d stall cycles with the DRAM always ready", n_stall));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
