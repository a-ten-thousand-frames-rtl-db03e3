// discriminator_bank: behavioural model of the column-level discriminators.
//
// This is a behavioural model of an analog circuit, written so that the rest
// of the digital chain can be simulated; it stands for the N_COLS
// offset-compensated comparators at the bottom of the pixel columns.
// Column voltages are given as unsigned numbers in units of one threshold
// DAC step. Each discriminator samples its column twice in a row period: at
// sig_s (pixel signal) and at ref_s (pixel baseline after the in-pixel
// clamp). At latch it compares the difference sig - ref with the threshold of
// its group and holds the decision in hit[] until the next latch. The
// difference of the two samples removes each pixel's buffer offset, so one
// threshold per group is enough. The columns form N_GROUPS equal groups
// (4 x 288 by default), each with its own threshold code, as in the sensor.
// With isolate set, the columns are disconnected from the array and both
// samples see the common test voltage test_level against ground, which is
// how the discriminators are characterised on their own (threshold scan).
// The unit scaling of voltages and the isolate connection are this model's
// own choices. Noise and comparator offsets are not modelled.
module discriminator_bank
  import m26_pkg::*;
#(
  parameter int unsigned N_COLS   = N_COLS_DEF,
  parameter int unsigned N_GROUPS = N_GROUPS_DEF
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [N_COLS-1:0][SIG_W-1:0] col_v,
  input  logic                        isolate,
  input  logic [SIG_W-1:0]            test_level,
  input  logic [N_GROUPS-1:0][THR_W-1:0] thr,
  input  logic                        sig_s,
  input  logic                        ref_s,
  input  logic                        latch,
  output logic [N_COLS-1:0]           hit
);
  localparam int unsigned GROUP_COLS = N_COLS / N_GROUPS;

  logic [N_COLS-1:0][SIG_W-1:0] s_sig, s_ref;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < N_COLS; c++) begin
        s_sig[c] <= '0;
        s_ref[c] <= '0;
      end
      hit <= '0;
    end else begin
      for (int c = 0; c < N_COLS; c++) begin
        if (sig_s) s_sig[c] <= isolate ? test_level : col_v[c];
        if (ref_s) s_ref[c] <= isolate ? '0 : col_v[c];
        if (latch)
          hit[c] <= ($signed({1'b0, s_sig[c]}) - $signed({1'b0, s_ref[c]}))
                    > $signed({1'b0, thr[c / GROUP_COLS]});
      end
    end
  end

  initial assert (N_COLS % N_GROUPS == 0) else $error("groups must divide columns");
endmodule
