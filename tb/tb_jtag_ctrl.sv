// tb_jtag_ctrl: checks the JTAG controller with a 40-bit pattern register.
// It walks the TAP through reset (five clocks with tms high), reads the
// IDCODE selected by reset, reads the instruction register capture value,
// writes and reads back the DAC, CTRL and PATTERN registers with random
// values (the outputs change only at Update-DR), passes a bit through
// BYPASS with one clock of delay, uses the Pause-DR state in the middle of a
// shift, and checks that trst_n clears the outputs.
module tb_jtag_ctrl;
  timeunit 1ns;
  timeprecision 1ps;
  import m26_pkg::*;

  localparam int NC = 40, ND = 8;
  logic tck = 1'b0, trst_n = 1'b0, tms = 1'b1, tdi = 1'b0, tdo;
  logic [ND-1:0][7:0] dac;
  logic [7:0] ctrl;
  logic [NC-1:0] pattern;

  jtag_ctrl #(.N_COLS(NC), .N_DAC(ND)) dut (.tck, .trst_n, .tms, .tdi, .tdo, .dac, .ctrl, .pattern);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

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
    for (int i = 0; i < 5; i++) jtick(1'b1, 1'b0, q);
    jtick(1'b0, 1'b0, q);
  endtask

  // shift n bits through IR or DR from Run-Test/Idle back to Run-Test/Idle;
  // with pause set, stop in Pause-DR halfway
  task automatic jshift(bit ir, logic [127:0] v, int n, output logic [127:0] got, input bit pause = 0);
    logic q;
    got = '0;
    jtick(1'b1, 1'b0, q);
    if (ir) jtick(1'b1, 1'b0, q);
    jtick(1'b0, 1'b0, q);
    jtick(1'b0, 1'b0, q);
    for (int i = 0; i < n; i++) begin
      if (pause && i == n / 2) begin
        jtick(1'b1, v[i], q); got[i] = q;   // to Exit1-DR
        jtick(1'b0, 1'b0, q);               // Pause-DR
        jtick(1'b0, 1'b0, q);
        jtick(1'b1, 1'b0, q);               // Exit2-DR
        jtick(1'b0, 1'b0, q);               // Shift-DR
      end else begin
        jtick(i == n - 1, v[i], q);
        got[i] = q;
      end
    end
    jtick(1'b1, 1'b0, q);
    jtick(1'b0, 1'b0, q);
  endtask

  initial begin
    logic [127:0] g, v;
    logic [7:0] old_ctrl;
    #100 trst_n = 1'b1;
    jreset();
    jshift(0, '0, 32, g);
    check(g[31:0] == 32'h0260_0001, $sformatf("idcode %h", g[31:0]));
    jshift(1, 128'(4'b1111), 4, g);
    check(g[3:0] == 4'b0001, "IR capture value");
    // bypass: one bit of delay
    v = 128'($urandom);
    jshift(0, v, 20, g);
    check(g[0] == 1'b0 && g[19:1] == v[18:0], "bypass");
    for (int it = 0; it < 20; it++) begin
      logic [127:0] d;
      // DAC
      d = {$urandom, $urandom};
      jshift(1, 128'(4'b0010), 4, g);
      jshift(0, d, 64, g, it % 2 == 1);
      check(dac == d[63:0], "dac written");
      jshift(0, '0, 64, g);
      check(g[63:0] == d[63:0], "dac read back");
      check(dac == '0, "dac after zero write");
      // CTRL
      d = 128'($urandom);
      old_ctrl = ctrl;
      jshift(1, 128'(4'b0011), 4, g);
      jshift(0, d, 8, g);
      check(g[7:0] == old_ctrl && ctrl == d[7:0], "ctrl write and capture");
      // PATTERN
      d = {$urandom, $urandom};
      jshift(1, 128'(4'b0100), 4, g);
      jshift(0, d, NC, g, it % 3 == 0);
      check(pattern == d[NC-1:0], "pattern written");
      jshift(0, d, NC, g);
      check(g[NC-1:0] == d[NC-1:0], "pattern read back");
    end
    // TAP reset keeps registers but selects IDCODE
    jreset();
    jshift(0, '0, 32, g);
    check(g[31:0] == 32'h0260_0001, "idcode after tap reset");
    check(pattern != '0 || ctrl != '0, "registers kept over tap reset");
    trst_n = 1'b0;
    #10;
    check(dac == '0 && ctrl == '0 && pattern == '0, "trst clears");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
