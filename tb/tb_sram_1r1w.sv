// tb_sram_1r1w: checks the frame memory (570 x 32 bits, two 16-bit lanes)
// against a model array: random writes with lane enables, random reads with
// one clock of latency, reads that do not change rdata while re is low, and
// a read of a word written in the same clock returning the old contents.
module tb_sram_1r1w;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int D = 570;
  logic clk = 1'b0;
  logic [1:0] we = '0;
  logic [9:0] waddr = '0, raddr = '0;
  logic [31:0] wdata = '0, rdata;
  logic re = 1'b0;

  sram_1r1w #(.DEPTH(D)) dut (.clk, .we, .waddr, .wdata, .re, .raddr, .rdata);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  logic [31:0] model [D];

  initial begin
    logic [31:0] exp_q, held;
    // fill
    for (int a = 0; a < D; a++) begin
      @(negedge clk);
      we = 2'b11; waddr = 10'(a); wdata = $urandom; model[a] = wdata;
    end
    @(negedge clk) we = 0;
    for (int it = 0; it < 5000; it++) begin
      @(negedge clk);
      we = 2'($urandom); waddr = 10'($urandom_range(0, D - 1)); wdata = $urandom;
      re = $urandom_range(0, 2) != 0;
      raddr = ($urandom_range(0, 4) == 0) ? waddr : 10'($urandom_range(0, D - 1));
      exp_q = model[raddr];
      held = rdata;
      if (we[0]) model[waddr][15:0] = wdata[15:0];
      if (we[1]) model[waddr][31:16] = wdata[31:16];
      @(posedge clk);
      #1;
      if (re) check(rdata == exp_q, $sformatf("read %0d got %h exp %h", raddr, rdata, exp_q));
      else    check(rdata == held, "rdata held");
    end
    @(negedge clk) we = 0;
    for (int a = 0; a < D; a++) begin
      @(negedge clk) re = 1; raddr = 10'(a);
      @(posedge clk) #1 check(rdata == model[a], $sformatf("final %0d", a));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #500us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
