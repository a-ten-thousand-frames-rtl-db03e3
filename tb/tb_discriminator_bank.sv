// tb_discriminator_bank: checks the discriminator model with 16 columns in 4
// groups. Random column voltages are applied as signal and as baseline
// sample, each group gets its own threshold, and every decision is compared
// with (signal - baseline) > threshold of the column's group, including
// differences right at the threshold and negative ones. In isolated mode all
// columns must follow test voltage > threshold whatever the array drives.
module tb_discriminator_bank;
  timeunit 1ns;
  timeprecision 1ps;
  import m26_pkg::*;

  localparam int NC = 16, NG = 4;
  logic clk = 1'b0, rst_n = 1'b1;
  logic [NC-1:0][SIG_W-1:0] col_v;
  logic isolate = 1'b0;
  logic [SIG_W-1:0] test_level = '0;
  logic [NG-1:0][THR_W-1:0] thr;
  logic sig_s = 0, ref_s = 0, latch = 0;
  logic [NC-1:0] hit;

  discriminator_bank #(.N_COLS(NC), .N_GROUPS(NG)) dut (
    .clk, .rst_n, .col_v, .isolate, .test_level, .thr, .sig_s, .ref_s, .latch, .hit
  );

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  int sv [NC], rv [NC];

  task automatic strobe(output logic [NC-1:0] h);
    @(negedge clk);
    for (int c = 0; c < NC; c++) col_v[c] = SIG_W'(sv[c]);
    sig_s = 1;
    @(negedge clk) sig_s = 0;
    for (int c = 0; c < NC; c++) col_v[c] = SIG_W'(rv[c]);
    ref_s = 1;
    @(negedge clk) ref_s = 0;
    for (int c = 0; c < NC; c++) col_v[c] = SIG_W'($urandom_range(0, 255));
    latch = 1;
    @(negedge clk) latch = 0;
    h = hit;
  endtask

  initial begin
    logic [NC-1:0] h;
    int nhit;
    col_v = '0;
    #1 rst_n = 1'b0;
    for (int g = 0; g < NG; g++) thr[g] = THR_W'(10 + 15 * g);
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    nhit = 0;
    for (int it = 0; it < 200; it++) begin
      for (int c = 0; c < NC; c++) begin
        rv[c] = $urandom_range(0, 150);
        case ($urandom_range(0, 3))
          0: sv[c] = rv[c] + thr[c / 4];          // at threshold: no hit
          1: sv[c] = rv[c] + thr[c / 4] + 1;      // just above
          2: sv[c] = $urandom_range(0, 100);      // anything, also negative
          default: sv[c] = rv[c] + $urandom_range(0, 100);
        endcase
        if (sv[c] > 255) sv[c] = 255;
      end
      strobe(h);
      for (int c = 0; c < NC; c++) begin
        check(h[c] == ((sv[c] - rv[c]) > int'(thr[c / 4])),
              $sformatf("col %0d sig %0d ref %0d thr %0d hit %0b", c, sv[c], rv[c], thr[c / 4], h[c]));
        nhit += h[c];
      end
    end
    check(nhit > 100, "some hits");
    // isolated: a threshold scan with the test voltage
    isolate = 1'b1;
    for (int lv = 0; lv < 70; lv += 3) begin
      test_level = SIG_W'(lv);
      for (int c = 0; c < NC; c++) begin sv[c] = 255; rv[c] = 0; end
      strobe(h);
      for (int c = 0; c < NC; c++)
        check(h[c] == (lv > int'(thr[c / 4])), $sformatf("isolated col %0d level %0d", c, lv));
    end
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
