// tb_rolling_shutter_ctrl: checks the row sequencer with 6 rows of 16 clocks.
// For each row period it checks that every phase strobe fires exactly once
// (clamp for two clocks) at its offset from the start of the row, that rows
// follow in order and wrap after the last one, that row_done reports the row
// just decided with the last-row flag, that frame_start comes every
// N_ROWS x ROW_CYCLES clocks and frame_cnt counts frames, and that nothing
// moves while run is low.
module tb_rolling_shutter_ctrl;
  timeunit 1ns;
  timeprecision 1ps;
  import m26_pkg::*;

  localparam int NR = 6, RC = 16;
  logic clk = 1'b0, rst_n = 1'b1, run = 1'b0;
  logic [ROW_W-1:0] row_addr, done_row;
  logic row_sel, clamp, sig_s, ref_s, latch, row_done, done_last, frame_start;
  logic [31:0] frame_cnt;

  rolling_shutter_ctrl #(.N_ROWS(NR), .ROW_CYCLES(RC)) dut (
    .clk, .rst_n, .run, .row_addr, .row_sel, .clamp, .disc_sig_s(sig_s),
    .disc_ref_s(ref_s), .disc_latch(latch), .row_done, .done_row, .done_last,
    .frame_start, .frame_cnt
  );

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  initial begin
    int t, last_fs, exp_row, nfs;
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (3) @(negedge clk);
    check(!row_sel && !clamp && !sig_s && !latch, "idle before run");
    run = 1'b1;       // active from the next clock edge
    last_fs = -1; exp_row = 0; nfs = 0;
    for (int p = 0; p < 3 * NR; p++) begin
      for (int c = 0; c < RC; c++) begin
        @(negedge clk);
        t = p * RC + c;
        check(row_sel && row_addr == ROW_W'(p % NR), $sformatf("row %0d at period %0d", row_addr, p));
        check(sig_s == (c == 2), $sformatf("sig_s at %0d", c));
        check(clamp == (c == 4 || c == 5), $sformatf("clamp at %0d", c));
        check(ref_s == (c == 8), $sformatf("ref_s at %0d", c));
        check(latch == (c == 12), $sformatf("latch at %0d", c));
        check(frame_start == (c == 0 && p % NR == 0), "frame_start");
        if (frame_start) begin
          if (last_fs >= 0) check(t - last_fs == NR * RC, "frame period");
          check(frame_cnt == 32'(p / NR), "frame counter");
          last_fs = t; nfs++;
        end
        check(row_done == (c == 13), $sformatf("row_done at %0d", c));
        if (row_done) begin
          check(done_row == ROW_W'(p % NR), "done_row");
          check(done_last == (p % NR == NR - 1), "done_last");
        end
      end
    end
    check(nfs == 3, "three frames");
    // hold
    run = 1'b0;
    @(negedge clk);
    begin
      logic [ROW_W-1:0] r;
      r = row_addr;
      repeat (40) begin
        @(negedge clk);
        check(row_addr == r && !latch && !row_sel, "hold while run is low");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
