// tb_zs_row_mux: checks the row packer with 18 blocks of 6 strings. Random
// block results (from empty to all slots used, with block overflow flags)
// are packed by a reference into absolute column addresses in block order,
// at most nine, with the overflow rule; the record, count, row number and
// last-row flag must match one clock later.
module tb_zs_row_mux;
  timeunit 1ns;
  timeprecision 1ps;
  import m26_pkg::*;

  localparam int NB = 18, NS = 6, NO = 9, BC = 64;
  logic clk = 1'b0, rst_n = 1'b1, in_valid = 1'b0;
  zs_state_t [NB-1:0][NS-1:0] bank_states;
  logic [NB-1:0] bank_ovf;
  logic [ROW_W-1:0] in_row, row_idx;
  logic in_last, out_valid, row_ovf, row_last;
  zs_state_t [NO-1:0] row_states;
  logic [NST_W-1:0] row_n;

  zs_row_mux dut (
    .clk, .rst_n, .in_valid, .bank_states, .bank_ovf, .in_row, .in_last,
    .out_valid, .row_states, .row_n, .row_ovf, .row_idx, .row_last
  );

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  int n_full, n_ovf;
  initial begin
    #1 rst_n = 1'b0;
    bank_states = '0; bank_ovf = '0; in_row = '0; in_last = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 3000; it++) begin
      zs_state_t e[NO];
      int n, p;
      bit eo;
      @(negedge clk);
      p = $urandom_range(0, 40);
      for (int b = 0; b < NB; b++) begin
        int k;
        k = ($urandom_range(0, 99) < p) ? $urandom_range(1, NS) : 0;
        for (int s = 0; s < NS; s++) begin
          bank_states[b][s].valid  = (s < k);
          bank_states[b][s].col    = 11'($urandom_range(0, BC - 1));
          bank_states[b][s].len_m1 = 2'($urandom);
        end
        bank_ovf[b] = (k == NS) && ($urandom_range(0, 3) == 0);
      end
      in_row = ROW_W'($urandom_range(0, 575));
      in_last = ($urandom_range(0, 9) == 0);
      in_valid = 1'b1;
      // reference
      n = 0; eo = |bank_ovf;
      for (int i = 0; i < NO; i++) e[i] = '0;
      for (int b = 0; b < NB; b++)
        for (int s = 0; s < NS; s++)
          if (bank_states[b][s].valid) begin
            if (n < NO) begin
              e[n].valid = 1;
              e[n].col = 11'(b * BC + int'(bank_states[b][s].col));
              e[n].len_m1 = bank_states[b][s].len_m1;
              n++;
            end else eo = 1;
          end
      @(negedge clk);
      in_valid = 1'b0;
      check(out_valid, "valid after one clock");
      for (int i = 0; i < NO; i++)
        check(row_states[i] == e[i], $sformatf("slot %0d got %b exp %b", i, row_states[i], e[i]));
      check(row_n == NST_W'(n), $sformatf("count %0d exp %0d", row_n, n));
      check(row_ovf == eo, "overflow");
      check(row_idx == in_row && row_last == in_last, "tag");
      n_full += (n == NO);
      n_ovf += eo;
    end
    check(n_full > 50 && n_ovf > 50, "full and overflowing rows seen");
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
