// tb_zs_bank_scanner: checks one 64-column block scanner against a reference
// that first lists the maximal runs of hit pixels, then cuts each run into
// pieces of at most four and keeps the first six. Patterns: empty, full,
// hand-made strings at the block edges and of length 4, 5, 8 and 9, and
// random rows from sparse to dense. Also checks the one-clock latency, that
// the tag follows the row and that rows can follow on every clock.
module tb_zs_bank_scanner;
  timeunit 1ns;
  timeprecision 1ps;
  import m26_pkg::*;

  localparam int BC = 64, NS = 6;
  logic clk = 1'b0, rst_n = 1'b1, in_valid = 1'b0;
  logic [BC-1:0] hits;
  logic [10:0] in_tag, out_tag;
  logic out_valid, ovf;
  zs_state_t [NS-1:0] states;

  zs_bank_scanner #(.BANK_COLS(BC)) dut (
    .clk, .rst_n, .in_valid, .hits, .in_tag, .out_valid, .states, .ovf, .out_tag
  );

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  // reference: expected strings and overflow
  function automatic void ref_scan(logic [BC-1:0] h, ref zs_state_t e[NS], ref bit eo);
    int rs[$], rl[$], n;
    int c;
    c = 0;
    while (c < BC) begin
      if (h[c]) begin
        int e2;
        e2 = c;
        while (e2 < BC && h[e2]) e2++;
        rs.push_back(c); rl.push_back(e2 - c);
        c = e2;
      end else c++;
    end
    for (int i = 0; i < NS; i++) e[i] = '0;
    n = 0; eo = 0;
    foreach (rs[i]) begin
      for (int s = rs[i]; s < rs[i] + rl[i]; s += 4) begin
        int l;
        l = rs[i] + rl[i] - s;
        if (l > 4) l = 4;
        if (n < NS) begin
          e[n].valid = 1; e[n].col = 11'(s); e[n].len_m1 = 2'(l - 1);
          n++;
        end else eo = 1;
      end
    end
  endfunction

  logic [BC-1:0] q_h[$];
  logic [10:0]   q_t[$];
  int n_ovf, n_split;

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      zs_state_t e[NS];
      bit eo;
      logic [BC-1:0] h;
      h = q_h.pop_front();
      ref_scan(h, e, eo);
      for (int i = 0; i < NS; i++)
        check(states[i] == e[i], $sformatf("hits %h string %0d: got %b exp %b", h, i, states[i], e[i]));
      check(ovf == eo, $sformatf("hits %h overflow", h));
      check(out_tag == q_t.pop_front(), "tag");
      n_ovf += eo;
    end
  end

  task automatic send(logic [BC-1:0] h);
    @(negedge clk);
    in_valid = 1'b1; hits = h; in_tag = 11'($urandom);
    q_h.push_back(h); q_t.push_back(in_tag);
  endtask

  initial begin
    logic [BC-1:0] h;
    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    send('0);
    send('1);
    send(64'h8000_0000_0000_0001);
    send(64'h0000_0000_0000_000F);
    send(64'h0000_0000_0000_001F);
    send(64'hF000_0000_0000_00FF);
    send(64'h0000_0000_0001_FF00);
    send(64'h5555_5555_5555_5555);
    send(64'h0000_0000_0000_0155);
    for (int i = 0; i < 2000; i++) begin
      int d;
      d = $urandom_range(1, 12);
      for (int c = 0; c < BC; c++) h[c] = ($urandom_range(0, 15) < d);
      send(h);
      if ($urandom_range(0, 3) == 0) begin @(negedge clk) in_valid = 1'b0; end
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (3) @(negedge clk);
    check(q_h.size() == 0, "every row answered");
    check(n_ovf > 10, "overflow cases seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
