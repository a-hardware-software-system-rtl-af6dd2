// tb_sr_regs: self-checking test of the kernel's control and status words.
//
// Writes random configuration words and reads them back (read data one
// cycle after the request), checks that the configuration outputs follow,
// that CTRL writes give single-cycle start and soft reset pulses, that
// done is sticky until the next start or soft reset, that busy shows in
// STATUS, and that unused addresses read as zero.
module tb_sr_regs;
  import sr_pkg::*;

  logic               clk = 1'b0, rst_n = 1'b0;
  logic               reg_wr = 1'b0, reg_rd = 1'b0;
  logic [2:0]         reg_addr = '0;
  logic [31:0]        reg_wdata = '0, reg_rdata;
  logic               start, soft_reset;
  logic [10:0]        cfg_sensors;
  logic [SRAM_AW:0]   cfg_steps;
  logic [SRAM_AW-1:0] cfg_part;
  logic [DRAM_AW-1:0] cfg_resbase;
  logic               done_pulse = 1'b0, busy = 1'b0;
  int                 checks = 0, failures = 0;
  int                 n_start = 0, n_sreset = 0;

  sr_regs u_dut (.clk, .rst_n, .reg_wr, .reg_rd, .reg_addr, .reg_wdata, .reg_rdata,
                 .start, .soft_reset, .cfg_sensors, .cfg_steps, .cfg_part, .cfg_resbase,
                 .done_pulse, .busy);

  always #5 clk = ~clk;
  always @(negedge clk) begin
    if (start) n_start++;
    if (soft_reset) n_sreset++;
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL: %s got %h expected %h", what, got, exp);
    end
  endtask

  task automatic wr(logic [2:0] a, logic [31:0] d);
    reg_wr = 1'b1; reg_addr = a; reg_wdata = d;
    @(negedge clk);
    reg_wr = 1'b0;
  endtask

  task automatic rd(logic [2:0] a, output logic [31:0] d);
    reg_rd = 1'b1; reg_addr = a;
    @(negedge clk);
    reg_rd = 1'b0;
    d = reg_rdata;
  endtask

  initial begin
    logic [31:0] d, s, n, p, b;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int i = 0; i < 200; i++) begin
      s = 32'($urandom % 1025); n = 32'($urandom % (1 << 20)); p = 32'($urandom % (1 << 19));
      b = 32'($urandom % (1 << 24));
      wr(REG_SENSORS, s); wr(REG_STEPS, n); wr(REG_PARTSIZE, p); wr(REG_RESBASE, b);
      rd(REG_SENSORS, d);  check("sensors", d, s);
      rd(REG_STEPS, d);    check("steps", d, n);
      rd(REG_PARTSIZE, d); check("partsize", d, p);
      rd(REG_RESBASE, d);  check("resbase", d, b);
      check("cfg_sensors out", 32'(cfg_sensors), s);
      check("cfg_steps out", 32'(cfg_steps), n);
      check("cfg_part out", 32'(cfg_part), p);
      check("cfg_resbase out", 32'(cfg_resbase), b);
    end
    rd(3'd7, d); check("unused address", d, 0);
    // start pulse lasts one cycle
    wr(REG_CTRL, 32'h1);
    #1 check("start count", 32'(n_start), 1);
    @(negedge clk);
    #1 check("start single pulse", 32'(n_start), 1);
    busy = 1'b1;
    rd(REG_STATUS, d); check("status busy", d, 32'h2);
    // done pulse is sticky
    done_pulse = 1'b1; busy = 1'b0;
    @(negedge clk);
    done_pulse = 1'b0;
    repeat (3) @(negedge clk);
    rd(REG_STATUS, d); check("status done sticky", d, 32'h1);
    // soft reset clears done
    wr(REG_CTRL, 32'h2);
    #1 check("soft reset count", 32'(n_sreset), 1);
    rd(REG_STATUS, d); check("status after soft reset", d, 32'h0);
    // start clears done too
    done_pulse = 1'b1; @(negedge clk); done_pulse = 1'b0;
    rd(REG_STATUS, d); check("status done", d, 32'h1);
    wr(REG_CTRL, 32'h1);
    rd(REG_STATUS, d); check("status after start", d, 32'h0);
    #1 check("start count 2", 32'(n_start), 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
