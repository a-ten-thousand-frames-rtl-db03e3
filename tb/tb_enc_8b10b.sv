// tb_enc_8b10b: checks the 8b/10b encoder.
//  - known symbols from the code tables (D0.0, D21.5, D10.2, D23.7, D17.7,
//    D11.7, D3.3, K28.5, K28.0, K28.7, K27.7) from both disparities
//  - all 256 data bytes from both disparities: each symbol has 4, 5 or 6
//    ones, unbalanced symbols have the sign the disparity demands, the
//    reported disparity follows, and the 256 symbols are all different
//  - a long random stream of data and control bytes: the running disparity
//    stays within +-1, no more than five equal bits follow each other, and
//    the comma sequences 0011111 / 1100000 appear only inside K28.x symbols
module tb_enc_8b10b;
  timeunit 1ns;
  timeprecision 1ps;

  logic clk = 1'b0, rst_n = 1'b1, valid = 1'b0, k = 1'b0;
  logic [7:0] data = '0;
  logic sym_valid, rd;
  logic [9:0] symbol;

  enc_8b10b dut (.clk, .rst_n, .valid, .data, .k, .sym_valid, .symbol, .rd);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  // encode one byte starting from disparity r (0: -1, 1: +1)
  task automatic enc(logic [7:0] d, logic kk, logic r, output logic [9:0] s, output logic r_out);
    // force the starting disparity through reset or a priming symbol
    if (rd != r) begin
      @(negedge clk) valid = 1; data = 8'h20; k = 0;   // D0.1 flips the disparity
      @(negedge clk) valid = 0;
    end
    check(rd == r, "starting disparity");
    @(negedge clk) valid = 1; data = d; k = kk;
    @(negedge clk) valid = 0;
    check(sym_valid, "symbol valid one clock later");
    s = symbol; r_out = rd;
  endtask

  task automatic known(logic [7:0] d, logic kk, logic [9:0] minus, logic [9:0] plus, string name);
    logic [9:0] s;
    logic r;
    enc(d, kk, 1'b0, s, r);
    check(s == minus, $sformatf("%s RD- got %b exp %b", name, s, minus));
    enc(d, kk, 1'b1, s, r);
    check(s == plus, $sformatf("%s RD+ got %b exp %b", name, s, plus));
  endtask

  initial begin
    logic [9:0] s;
    logic r;
    logic [9:0] seen [256];
    int ones, run, last_bit, cur_rd;
    logic [19:0] win;
    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    check(rd == 1'b0, "reset disparity -1");
    known(8'h00, 0, 10'b100111_0100, 10'b011000_1011, "D0.0");
    known(8'hB5, 0, 10'b101010_1010, 10'b101010_1010, "D21.5");
    known(8'h4A, 0, 10'b010101_0101, 10'b010101_0101, "D10.2");
    known(8'hF7, 0, 10'b111010_0001, 10'b000101_1110, "D23.7");
    known(8'hF1, 0, 10'b100011_0111, 10'b100011_0001, "D17.7");
    known(8'hEB, 0, 10'b110100_1110, 10'b110100_1000, "D11.7");
    known(8'h63, 0, 10'b110001_1100, 10'b110001_0011, "D3.3");
    known(8'hBC, 1, 10'b001111_1010, 10'b110000_0101, "K28.5");
    known(8'h1C, 1, 10'b001111_0100, 10'b110000_1011, "K28.0");
    known(8'hFC, 1, 10'b001111_1000, 10'b110000_0111, "K28.7");
    known(8'hFB, 1, 10'b110110_1000, 10'b001001_0111, "K27.7");
    // all data bytes
    for (int p = 0; p < 2; p++) begin
      for (int d = 0; d < 256; d++) begin
        enc(8'(d), 0, 1'(p), s, r);
        ones = $countones(s);
        check(ones >= 4 && ones <= 6, $sformatf("D%0d weight", d));
        if (p == 0) check(ones != 4, $sformatf("D%0d negative from RD-", d));
        else        check(ones != 6, $sformatf("D%0d positive from RD+", d));
        check(r == ((ones == 5) ? 1'(p) : ~1'(p)), $sformatf("D%0d new disparity", d));
        seen[d] = s;
      end
      for (int a = 0; a < 256; a++)
        for (int b = a + 1; b < 256; b++)
          if (seen[a] == seen[b]) check(0, $sformatf("D%0d and D%0d share a symbol", a, b));
      checks++;
    end
    // random stream
    cur_rd = rd ? 1 : -1; run = 0; last_bit = -1; win = '0;
    for (int i = 0; i < 20000; i++) begin
      logic kk;
      logic [7:0] d;
      int disp;
      kk = ($urandom_range(0, 19) == 0);
      d = kk ? 8'hBC : 8'($urandom);
      @(negedge clk) valid = 1; data = d; k = kk;
      @(negedge clk) valid = 0;
      disp = 2 * $countones(symbol) - 10;
      check(disp == 0 || disp == -2 * cur_rd, "stream disparity");
      if (disp != 0) cur_rd = -cur_rd;
      check((rd ? 1 : -1) == cur_rd, "reported disparity");
      for (int b = 9; b >= 0; b--) begin
        if (int'(symbol[b]) == last_bit) run++; else begin run = 1; last_bit = symbol[b]; end
        if (run > 5) check(0, "run length over five");
        win = {win[18:0], symbol[b]};
        if (!kk && i > 0 && b > 0 && (win[6:0] == 7'b0011111 || win[6:0] == 7'b1100000))
          check(0, $sformatf("comma inside data at byte %0d", i));
      end
      if (kk) check(symbol[9:3] == 7'b0011111 || symbol[9:3] == 7'b1100000, "comma in K28.5");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
