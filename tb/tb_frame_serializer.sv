// tb_frame_serializer: checks the two-line frame transmission with frames of
// 24 word slots and a 16-word memory. Each frame gets a random length (0 to
// the full memory), overflow flag and frame number and new memory contents;
// the bits on both lines are collected and compared with the expected
// header, frame number, length word, data, trailer and zero padding. Frames
// follow back to back (start right at the end of the previous one) and also
// with gaps; every fourth frame uses the single-line format (line 1 low,
// 16-bit words in order). mkd must be high exactly during the header slot,
// and the lines must be low while idle.
module tb_frame_serializer;
  timeunit 1ns;
  timeprecision 1ps;
  import m26_pkg::*;

  localparam int FW = 24, MD = 16;
  logic clk = 1'b0, rst_n = 1'b1, start = 1'b0, mem_ovf = 1'b0;
  logic [5:0] len = '0;
  logic one_line = 1'b0;
  logic [31:0] frame_no = '0, rdata, cur_word;
  logic re, mkd, active;
  logic [3:0] raddr, bitpos;
  logic [1:0] sdata;

  frame_serializer #(.FRAME_WORDS(FW), .MEM_DEPTH(MD)) dut (
    .clk, .rst_n, .start, .len, .mem_ovf, .frame_no, .one_line, .re, .raddr, .rdata,
    .sdata, .mkd, .active, .cur_word, .bitpos
  );

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  logic [31:0] mem [MD];
  always @(posedge clk) if (re) rdata <= mem[raddr];

  initial begin
    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(negedge clk);
    for (int f = 0; f < 30; f++) begin
      logic [15:0] e0[FW], e1[FW], g0[FW], g1[FW];
      int l, n16;
      bit o, one;
      one = (f % 4 == 1);
      n16 = (f % 5 == 0) ? (one ? MD : 2 * MD) : $urandom_range(0, one ? MD : 2 * MD);
      l = one ? n16 : (n16 + 1) / 2;
      o = $urandom_range(0, 1);
      for (int a = 0; a < MD; a++) mem[a] = $urandom;
      frame_no = $urandom;
      for (int s = 0; s < FW; s++) begin e0[s] = 0; e1[s] = 0; end
      if (!one) begin
        e0[0] = 16'h5555; e1[0] = 16'h5555;
        e0[1] = frame_no[15:0]; e1[1] = frame_no[31:16];
        e0[2] = {o, 5'b0, 10'(l)}; e1[2] = e0[2];
        for (int k = 0; k < l; k++) begin e0[3 + k] = mem[k][15:0]; e1[3 + k] = mem[k][31:16]; end
        e0[3 + l] = 16'hAAAA; e1[3 + l] = 16'hAAAA;
      end else begin
        e0[0] = 16'h5555;
        e0[1] = frame_no[15:0]; e0[2] = frame_no[31:16];
        e0[3] = {o, 5'b0, 10'(l)};
        for (int k = 0; k < l; k++) e0[4 + k] = (k % 2 == 1) ? mem[k / 2][31:16] : mem[k / 2][15:0];
        e0[4 + l] = 16'hAAAA;
      end
      // start pulse
      start = 1'b1; len = 6'(n16); mem_ovf = o; one_line = one;
      @(negedge clk) start = 1'b0; len = '0; frame_no = '0; mem_ovf = 0; one_line = 0;
      for (int b = 0; b < FW * 16; b++) begin
        g0[b / 16] = {g0[b / 16][14:0], sdata[0]};
        g1[b / 16] = {g1[b / 16][14:0], sdata[1]};
        check(mkd == (b < 16), "mkd during the header");
        check(active, "active during the frame");
        if (b % 16 == 0) check(cur_word == {e1[b / 16], e0[b / 16]}, "cur_word");
        if (b != FW * 16 - 1) @(negedge clk);
      end
      for (int s = 0; s < FW; s++)
        check(g0[s] == e0[s] && g1[s] == e1[s],
              $sformatf("frame %0d slot %0d got %h %h exp %h %h", f, s, g1[s], g0[s], e1[s], e0[s]));
      if (f % 3 == 2) begin
        @(negedge clk);
        repeat (7) begin
          check(!active && sdata == 2'b00 && !mkd, "idle after the frame");
          @(negedge clk);
        end
      end
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
