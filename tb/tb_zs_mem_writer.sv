// tb_zs_mem_writer: checks the memory writer with a 20-word memory (room for
// 40 16-bit words) and frames of 12 rows, one row record every 16 clocks.
// The write port is applied to a model of the two memories. At each swap the
// filled memory must hold the row headers and string words of the non-empty
// rows in order, two per memory word and a zero upper half after an odd
// count; rows that do not fit must be dropped with the overflow flag; the
// length (in 16-bit words), frame number and memory selection must match;
// every fourth frame uses the single-line capacity of 20 words; the swap must
// come a fixed 12 clocks after the last row record whatever that row holds.
module tb_zs_mem_writer;
  timeunit 1ns;
  timeprecision 1ps;
  import m26_pkg::*;

  localparam int NO = 9, MD = 20, NR = 12;
  logic clk = 1'b0, rst_n = 1'b1, in_valid = 1'b0;
  zs_state_t [NO-1:0] row_states;
  logic [NST_W-1:0] row_n;
  logic row_ovf, row_last;
  logic [ROW_W-1:0] row_idx;
  logic wsel, swap, swap_ovf;
  logic [1:0] we;
  logic [4:0] waddr;
  logic [31:0] wdata, swap_frame;
  logic [5:0] swap_len;
  logic one_line = 1'b0;

  zs_mem_writer #(.MEM_DEPTH(MD)) dut (
    .clk, .rst_n, .in_valid, .row_states, .row_n, .row_ovf, .row_idx, .row_last,
    .one_line, .wsel, .we, .waddr, .wdata, .swap, .swap_len, .swap_ovf, .swap_frame
  );

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  logic [31:0] mem [2][MD];
  longint cyc = 0, t_last = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (we[0]) mem[wsel][waddr][15:0]  <= wdata[15:0];
    if (we[1]) mem[wsel][waddr][31:16] <= wdata[31:16];
  end

  logic [15:0] exp_items[$];
  bit exp_ovf;
  int frame, n_swaps, n_ovf_frames, n_skipped;
  logic wsel_before;

  always @(posedge clk) begin
    if (rst_n && swap) begin
      int len;
      len = (exp_items.size() + 1) / 2;
      check(swap_len == 6'(exp_items.size()), $sformatf("len %0d exp %0d", swap_len, exp_items.size()));
      check(cyc - t_last == 12, $sformatf("swap %0d clocks after last row", cyc - t_last));
      check(swap_ovf == exp_ovf, "memory overflow flag");
      check(swap_frame == 32'(frame), "frame number");
      check(wsel != wsel_before, "writer moved to the other memory");
      for (int k = 0; k < len; k++) begin
        logic [31:0] e;
        e[15:0]  = exp_items[2 * k];
        e[31:16] = (2 * k + 1 < exp_items.size()) ? exp_items[2 * k + 1] : 16'h0;
        check(mem[!wsel][k] == e, $sformatf("frame %0d word %0d got %h exp %h", frame, k, mem[!wsel][k], e));
      end
      n_swaps++;
      n_ovf_frames += exp_ovf;
    end
  end

  initial begin
    #1 rst_n = 1'b0;
    row_states = '0; row_n = '0; row_ovf = 0; row_last = 0; row_idx = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (frame = 0; frame < 40; frame++) begin
      exp_items = {}; exp_ovf = 0;
      one_line = (frame % 4 == 3);
      wsel_before = wsel;
      for (int r = 0; r < NR; r++) begin
        int n;
        bit o;
        @(negedge clk);
        n = ($urandom_range(0, 2) == 0) ? 0 : $urandom_range(1, (frame % 3 == 0) ? 9 : 3);
        o = ($urandom_range(0, 7) == 0);
        row_n = NST_W'(n); row_ovf = o; row_idx = ROW_W'(r); row_last = (r == NR - 1);
        for (int i = 0; i < NO; i++) begin
          row_states[i].valid = (i < n);
          row_states[i].col = 11'($urandom);
          row_states[i].len_m1 = 2'($urandom);
        end
        in_valid = 1'b1;
        if (n > 0 || o) begin
          if (exp_items.size() + 1 + n <= (one_line ? MD : 2 * MD)) begin
            exp_items.push_back({o, 4'(n), 1'b0, 10'(r)});
            for (int i = 0; i < n; i++)
              exp_items.push_back({3'b000, row_states[i].col, row_states[i].len_m1});
          end else exp_ovf = 1;
        end else n_skipped++;
        @(posedge clk) t_last = cyc;
        @(negedge clk) in_valid = 1'b0;
        repeat (14) @(negedge clk);
      end
      if (frame == 39) repeat (20) @(negedge clk);
    end
    check(n_swaps == 40, "one swap per frame");
    check(n_ovf_frames > 3 && n_ovf_frames < 37, "frames with and without overflow");
    check(n_skipped > 10, "empty rows");
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
