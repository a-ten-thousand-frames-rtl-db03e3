// tb_mimosa26: end-to-end test of the sensor's digital chain at its default
// size (576 rows x 1152 columns, 80 MHz clock modelled as 10 ns).
//
// A pixel model drives the column voltages: each column has its own offset,
// and a hit pixel adds a signal above its group's threshold until the
// in-pixel clamp of its row; a few pixels carry signals just below the
// threshold. The test configures the chip through JTAG and runs three
// phases, each after a chip reset:
//   A  normal readout of frames 0..3: sparse noise, strings longer than four
//      pixels, strings crossing block edges (frame 0), too many strings in a
//      block and in a row (frame 1), more data than the memory holds
//      (frame 2); 8b/10b output enabled
//   B  zero suppression fed from the JTAG pattern register
//   C  discriminators isolated from the array, driven by the test voltage
//   D  normal readout of frames 0..1 with the single-line output
// Every frame sent on the two serial lines is captured and compared word by
// word with a reference computed here from the hit pattern. It also checks
// the frame period (576 x 16 clocks), the 8b/10b symbols (disparity, commas,
// frame headers) and counts how often each mechanism happened.
module tb_mimosa26;
  timeunit 1ns;
  timeprecision 1ps;
  import m26_pkg::*;

  localparam int NR = 576, NC = 1152, NG = 4, BC = 64, RC = 16, MD = 570;
  localparam int FW = NR * RC / 16;
  localparam int CAP = 2 * MD;

  logic clk = 1'b0, rst_n = 1'b1;
  logic tck = 1'b0, trst_n = 1'b0, tms = 1'b1, tdi = 1'b0;
  logic tdo;
  logic [ROW_W-1:0] row_addr;
  logic row_sel, clamp;
  logic [NC-1:0][SIG_W-1:0] col_v;
  logic [7:0][THR_W-1:0] dac;
  logic [1:0] sdata;
  logic mkd;
  logic [9:0] enc_symbol;
  logic enc_valid;

  mimosa26 dut (
    .clk, .rst_n, .tck, .trst_n, .tms, .tdi, .tdo, .row_addr, .row_sel, .clamp,
    .col_v, .dac, .sdata, .mkd, .enc_symbol, .enc_valid
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  // ------------------------------------------------------------ settings
  localparam logic [7:0] THR [NG] = '{8'd20, 8'd30, 8'd40, 8'd50};
  localparam logic [7:0] TEST_LEVEL = 8'd35;   // above groups 0,1 only
  int mode;        // 0 normal, 1 pattern, 2 isolate
  bit one;         // single-line output
  logic [NC-1:0] pat;

  // ------------------------------------------------------------ stimulus
  function automatic int unsigned hsh(int f, int r, int c);
    int unsigned h;
    h = (f * 7919 + r * 1297 + c * 3) * 32'd2654435761;
    return h ^ (h >> 13);
  endfunction

  // hit pattern of row r in frame f (normal mode)
  function automatic logic [NC-1:0] gen_row(int f, int r);
    logic [NC-1:0] h;
    h = '0;
    for (int c = 0; c < NC; c++) if (hsh(f, r, c) % 3001 == 0) h[c] = 1'b1;
    if (f == 0 && r % 16 == 3) begin
      for (int c = 10; c <= 12; c++) h[c] = 1'b1;     // string of 3
      for (int c = 62; c <= 66; c++) h[c] = 1'b1;     // crosses blocks 0/1
      for (int c = 200; c <= 208; c++) h[c] = 1'b1;   // 9 pixels: 4+4+1
    end
    if (f == 1 && r % 32 == 7)
      for (int c = 128; c < 144; c += 2) h[c] = 1'b1; // 8 strings in block 2
    if (f == 1 && r % 32 == 9)
      for (int c = 0; c < NC; c += 96) h[c] = 1'b1;   // 12 strings in a row
    if (f == 2 && r < 200)
      for (int c = 5; c < NC; c += 110) h[c] = 1'b1;  // 11 per row: fills memory
    return h;
  endfunction

  function automatic int grp(int c);
    return c / (NC / NG);
  endfunction

  // rolling frame index seen by the pixel model
  int pf;
  logic [ROW_W-1:0] prev_row;
  logic clamped;
  logic [NC-1:0] cur_hits;
  always_ff @(posedge clk) begin
    prev_row <= row_addr;
    if (!rst_n) begin
      pf <= 0; clamped <= 1'b0;
    end else begin
      if (row_sel && row_addr != prev_row) begin
        clamped <= 1'b0;
        if (row_addr == '0) pf <= pf + 1;
      end else if (clamp) clamped <= 1'b1;
    end
  end
  always_comb cur_hits = gen_row(pf, int'(row_addr));
  always_comb begin
    for (int c = 0; c < NC; c++) begin
      int base, amp;
      base = 40 + (c * 37) % 50;
      amp  = 0;
      if (cur_hits[c]) amp = int'(THR[grp(c)]) + 6;
      else if (hsh(pf, int'(row_addr), c) % 97 == 1) amp = int'(THR[grp(c)]) - 5;
      col_v[c] = SIG_W'(base + (clamped ? 0 : amp));
    end
  end

  // ------------------------------------------------------------ reference
  int n_long, n_cross, n_bank_ovf, n_row_ovf, n_mem_ovf, n_skip, n_rows_stored;

  function automatic logic [NC-1:0] row_hits(int f, int r);
    logic [NC-1:0] h;
    if (mode == 1) return pat;
    if (mode == 2) begin
      for (int c = 0; c < NC; c++) h[c] = TEST_LEVEL > THR[grp(c)];
      return h;
    end
    return gen_row(f, r);
  endfunction

  // expected 16-bit words of one row, empty if the row is skipped
  function automatic void ref_row(logic [NC-1:0] h, int r, ref logic [15:0] items[$],
                                  input bit count);
    int cnt, nb, c, e;
    bit ovf, bovf;
    logic [15:0] st[$];
    cnt = 0; ovf = 0; st = {};
    for (int b = 0; b < NC / BC; b++) begin
      nb = 0; bovf = 0;
      c = b * BC;
      while (c < (b + 1) * BC) begin
        if (h[c]) begin
          e = c;
          while (e < (b + 1) * BC && h[e]) e++;
          if (count && e - c > 4) n_long++;
          if (count && e == (b + 1) * BC && e < NC && h[e]) n_cross++;
          for (int s = c; s < e; s += 4) begin
            int l;
            l = (e - s > 4) ? 4 : e - s;
            if (nb < 6) begin
              nb++;
              if (cnt < 9) begin
                st.push_back({3'b000, 11'(s), 2'(l - 1)});
                cnt++;
              end else ovf = 1;
            end else bovf = 1;
          end
          c = e;
        end else c++;
      end
      if (bovf) begin
        ovf = 1;
        if (count) n_bank_ovf++;
      end
    end
    if (count && cnt == 9 && ovf) n_row_ovf++;
    items = {};
    if (cnt > 0 || ovf) begin
      items.push_back({ovf, 4'(cnt), 1'b0, 10'(r)});
      foreach (st[i]) items.push_back(st[i]);
    end
  endfunction

  // expected line words of frame f: w0 (line 0), w1 (line 1)
  function automatic void ref_frame(int f, ref logic [15:0] w0[FW], ref logic [15:0] w1[FW],
                                    input bit count);
    logic [15:0] all[$], it[$];
    bit movf;
    int len;
    all = {}; movf = 0;
    for (int r = 0; r < NR; r++) begin
      ref_row(row_hits(f, r), r, it, count);
      if (it.size() == 0) begin
        if (count) n_skip++;
      end else if (all.size() + it.size() <= (one ? MD : CAP)) begin
        foreach (it[i]) all.push_back(it[i]);
        if (count) n_rows_stored++;
      end else movf = 1;
    end
    if (count && movf) n_mem_ovf++;
    for (int s = 0; s < FW; s++) begin w0[s] = '0; w1[s] = '0; end
    if (one) begin
      len = all.size();
      w0[0] = FRAME_HEADER;
      w0[1] = 16'(f); w0[2] = 16'(f >> 16);
      w0[3] = {movf, 5'b0, 10'(len)};
      for (int k = 0; k < len; k++) w0[4 + k] = all[k];
      w0[4 + len] = FRAME_TRAILER;
      return;
    end
    len = (all.size() + 1) / 2;
    w0[0] = FRAME_HEADER; w1[0] = FRAME_HEADER;
    w0[1] = 16'(f); w1[1] = 16'(f >> 16);
    w0[2] = {movf, 5'b0, 10'(len)}; w1[2] = w0[2];
    for (int k = 0; k < len; k++) begin
      w0[3 + k] = all[2 * k];
      w1[3 + k] = (2 * k + 1 < all.size()) ? all[2 * k + 1] : 16'h0000;
    end
    w0[3 + len] = FRAME_TRAILER; w1[3 + len] = FRAME_TRAILER;
  endfunction

  // ------------------------------------------------------------ capture
  logic [15:0] c0[FW], c1[FW];
  int cap_bit;           // -1: idle
  int frames_done;       // frames captured in the current phase
  bit frame_ok [int];
  longint cyc = 0, last_mkd = -1;
  logic mkd_q;
  int n_period_ok;

  always_ff @(posedge clk) cyc <= cyc + 1;

  initial cap_bit = -1;
  always @(posedge clk) begin
    mkd_q <= mkd;
    if (!rst_n) begin
      cap_bit = -1;
    end else begin
      if (mkd && !mkd_q) begin
        if (last_mkd >= 0) begin
          check(cyc - last_mkd == FW * 16, $sformatf("frame period %0d", cyc - last_mkd));
          n_period_ok++;
        end
        last_mkd = cyc;
        cap_bit = 0;
      end
      if (cap_bit >= 0) begin
        c0[cap_bit / 16] = {c0[cap_bit / 16][14:0], sdata[0]};
        c1[cap_bit / 16] = {c1[cap_bit / 16][14:0], sdata[1]};
        cap_bit++;
        if (cap_bit == FW * 16) begin
          compare_frame();
          cap_bit = -1;
        end
      end
    end
  end

  int frames_checked, n_one;
  task automatic compare_frame();
    logic [15:0] e0[FW], e1[FW];
    int f, bad;
    f = one ? int'({c0[2], c0[1]}) : int'({c1[1], c0[1]});
    n_one += one;
    ref_frame(f, e0, e1, 1'b1);
    bad = 0;
    for (int s = 0; s < FW; s++) begin
      if (c0[s] !== e0[s] || c1[s] !== e1[s]) begin
        bad++;
        if (bad <= 4)
          $display("  frame %0d slot %0d: got %h %h exp %h %h", f, s, c1[s], c0[s], e1[s], e0[s]);
      end
    end
    check(bad == 0, $sformatf("mode %0d frame %0d: %0d words differ", mode, f, bad));
    frames_checked++;
    frames_done++;
  endtask

  // ------------------------------------------------------------ 8b/10b
  int n_comma, n_hdr_syms, n_enc_bad, n_enc_frames;
  int enc_rd;   // -1 / +1
  int d212_run;
  initial enc_rd = -1;
  always @(posedge clk) begin
    if (!rst_n) begin
      enc_rd = -1; d212_run = 0;
    end else if (enc_valid) begin
      int ones, disp;
      ones = $countones(enc_symbol);
      disp = 2 * ones - 10;
      if (!(disp == 0 || (disp == 2 && enc_rd == -1) || (disp == -2 && enc_rd == 1))) n_enc_bad++;
      if (disp != 0) enc_rd = -enc_rd;
      if (enc_symbol == 10'b0011111010 || enc_symbol == 10'b1100000101) begin
        n_comma++;
        d212_run = 0;
      end else if (enc_symbol == 10'b1010100101) begin
        d212_run++;
        if (d212_run == 4) n_enc_frames++;
      end else d212_run = 0;
    end
  end

  // ------------------------------------------------------------ JTAG
  task automatic jtick(logic m, logic d, output logic q);
    tms = m; tdi = d;
    #20;
    q = tdo;
    tck = 1'b1;
    #20;
    tck = 1'b0;
  endtask

  task automatic jreset();
    logic q;
    for (int i = 0; i < 6; i++) jtick(1'b1, 1'b0, q);
    jtick(1'b0, 1'b0, q);
  endtask

  task automatic jshift(bit ir, logic [NC-1:0] v, int n, output logic [NC-1:0] got);
    logic q;
    got = '0;
    jtick(1'b1, 1'b0, q);
    if (ir) jtick(1'b1, 1'b0, q);
    jtick(1'b0, 1'b0, q);
    jtick(1'b0, 1'b0, q);
    for (int i = 0; i < n; i++) begin
      jtick(i == n - 1, v[i], q);
      got[i] = q;
    end
    jtick(1'b1, 1'b0, q);
    jtick(1'b0, 1'b0, q);
  endtask

  task automatic write_reg(logic [3:0] instr, logic [NC-1:0] v, int n);
    logic [NC-1:0] g;
    jshift(1'b1, NC'(instr), 4, g);
    jshift(1'b0, v, n, g);
  endtask

  task automatic configure(logic [7:0] ctrl);
    logic [NC-1:0] d, g;
    jreset();
    jshift(1'b0, '0, 32, g);          // IDCODE after reset
    check(g[31:0] == 32'h0260_0001, $sformatf("idcode %h", g[31:0]));
    d = '0;
    for (int i = 0; i < NG; i++) d[8 * i +: 8] = THR[i];
    d[8 * NG +: 8] = TEST_LEVEL;
    d[8 * (NG + 1) +: 24] = 24'h778899;
    write_reg(4'b0010, d, 64);
    write_reg(4'b0100, pat, NC);
    write_reg(4'b0011, NC'(ctrl), 8);
    // read back the control register
    jshift(1'b1, NC'(4'b0011), 4, g);
    jshift(1'b0, NC'(ctrl), 8, g);
    check(g[7:0] == ctrl, "control read back");
  endtask

  task automatic run_phase(int m, logic [7:0] ctrl, int nframes);
    rst_n = 1'b0;
    mode = m;
    configure(ctrl);
    check(dac[0] == THR[0] && dac[3] == THR[3] && dac[4] == TEST_LEVEL, "DAC codes");
    @(negedge clk);
    frames_done = 0;
    last_mkd = -1;
    rst_n = 1'b1;
    wait (frames_done == nframes);
    @(negedge clk);
  endtask

  // ------------------------------------------------------------ sequence
  int n_pp;      // memory swaps seen
  logic wsel_q;
  always @(posedge clk) begin
    wsel_q <= dut.wsel;
    if (rst_n && dut.wsel != wsel_q) n_pp++;
  end

  initial begin
    mode = 0;
    #1 rst_n = 1'b0;
    for (int c = 0; c < NC; c++) pat[c] = (c % 300 == 7) || (c >= 500 && c < 503);
    #100 trst_n = 1'b1;
    run_phase(0, 8'b0000_1001, 3);   // run + 8b/10b
    run_phase(1, 8'b0000_0101, 1);   // run + pattern to the zero suppression
    run_phase(2, 8'b0000_0011, 1);   // run + isolated discriminators
    one = 1;
    run_phase(0, 8'b0001_0001, 2);   // run + single-line output

    $display("frames checked %0d, long strings %0d, block-crossing strings %0d, block overflows %0d,",
             frames_checked, n_long, n_cross, n_bank_ovf);
    $display("row overflows %0d, memory overflows %0d, skipped rows %0d, stored rows %0d, swaps %0d,",
             n_row_ovf, n_mem_ovf, n_skip, n_rows_stored, n_pp);
    $display("periods %0d, commas %0d, 8b10b frame headers %0d, disparity errors %0d",
             n_period_ok, n_comma, n_enc_frames, n_enc_bad);
    check(frames_checked == 7, "number of frames");
    check(n_one == 2, "single-line frames");
    check(n_long > 0, "long string split");
    check(n_cross > 0, "string crossing a block edge");
    check(n_bank_ovf > 0, "block overflow");
    check(n_row_ovf > 0, "row overflow");
    check(n_mem_ovf > 0, "memory overflow");
    check(n_skip > 0, "empty rows skipped");
    check(n_pp >= 4, "ping-pong swaps");
    check(n_period_ok > 0, "frame period");
    check(n_comma > 0, "8b/10b commas");
    check(n_enc_frames >= 3, "8b/10b frame headers");
    check(n_enc_bad == 0, "8b/10b running disparity");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #4ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
