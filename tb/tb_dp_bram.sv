// tb_dp_bram: self-checking test of the dual ported blockRAM.
//
// Fills every entry of a 64-bit x 512 RAM through the host port, reads it
// back through both ports in random order, rewrites random entries while
// the kernel port reads others, and compares every read, one cycle after
// its request, with a model array. Also checks that a port whose enable is
// low keeps its last read data.
module tb_dp_bram;

  localparam int unsigned W = 64, DEPTH = 512, AW = 9;

  logic          clk = 1'b0;
  logic          a_en = 1'b0, b_en = 1'b0, b_we = 1'b0;
  logic [AW-1:0] a_addr = '0, b_addr = '0;
  logic [W-1:0]  b_wdata = '0, a_rdata, b_rdata;
  logic [W-1:0]  model [DEPTH];
  int            checks = 0, failures = 0;

  dp_bram u_dut (.clk, .a_en, .a_addr, .a_rdata,
                                        .b_en, .b_we, .b_addr, .b_wdata, .b_rdata);

  always #5 clk = ~clk;

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [W-1:0] got, logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL: %s got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    logic [AW-1:0] ra, rb;
    logic [W-1:0]  held;
    @(negedge clk);
    for (int i = 0; i < DEPTH; i++) begin
      model[i] = {$urandom, $urandom};
      b_en = 1'b1; b_we = 1'b1; b_addr = AW'(i); b_wdata = model[i];
      @(negedge clk);
    end
    b_we = 1'b0;
    for (int i = 0; i < 2000; i++) begin
      ra = AW'($urandom); rb = AW'($urandom);
      a_en = 1'b1; a_addr = ra;
      b_en = 1'b1; b_addr = rb;
      @(negedge clk);
      check("port A read", a_rdata, model[ra]);
      check("port B read", b_rdata, model[rb]);
    end
    // writes on B while A reads a different entry
    for (int i = 0; i < 2000; i++) begin
      ra = AW'($urandom);
      do rb = AW'($urandom); while (rb == ra);
      a_en = 1'b1; a_addr = ra;
      b_en = 1'b1; b_we = 1'b1; b_addr = rb; b_wdata = {$urandom, $urandom};
      @(negedge clk);
      check("port A read during write", a_rdata, model[ra]);
      model[rb] = b_wdata;
      b_we = 1'b0;
      a_addr = rb; b_en = 1'b0;
      @(negedge clk);
      check("port A read after write", a_rdata, model[rb]);
    end
    // disabled port holds its data
    held = a_rdata;
    a_en = 1'b0; a_addr = a_addr + 1'b1;
    @(negedge clk);
    check("port A hold", a_rdata, held);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
