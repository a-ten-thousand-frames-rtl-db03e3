// rolling_shutter_ctrl: row sequencer of the rolling shutter readout.
//
// The pixel array is read one row at a time; all columns of the selected row
// are presented to the column discriminators at the same moment. This block
// counts ROW_CYCLES clock periods per row and N_ROWS rows per frame, and
// decodes the count into the phases of one row period:
//   SIG_PH            discriminators take the first sample (pixel signal)
//   CLAMP_PH..+1      in-pixel clamp pulse (the in-pixel double sampling)
//   REF_PH            discriminators take the second sample (pixel baseline),
//                     which removes the offset of the in-pixel buffer
//   LATCH_PH          discriminators compare the difference with threshold
//   LATCH_PH+1        row_done: the row's hit pattern is valid for the
//                     zero suppression, tagged with done_row / done_last
// The row sequence, the two double samplings and the 576-row frame follow the
// sensor description; the 16-cycle row period and the position of the phases
// inside it are this design's choice (576 x 16 = 9216 periods, 115.2 us per
// frame at 80 MHz). frame_start pulses with the first period of row 0, and
// frame_cnt counts frames from reset. Nothing advances while run is low.
module rolling_shutter_ctrl
  import m26_pkg::*;
#(
  parameter int unsigned N_ROWS     = N_ROWS_DEF,
  parameter int unsigned ROW_CYCLES = ROW_CYCLES_DEF,
  parameter int unsigned SIG_PH     = 2,
  parameter int unsigned CLAMP_PH   = 4,
  parameter int unsigned REF_PH     = 8,
  parameter int unsigned LATCH_PH   = 12
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             run,
  output logic [ROW_W-1:0] row_addr,    // selected row
  output logic             row_sel,     // a row is selected
  output logic             clamp,       // in-pixel clamp of the selected row
  output logic             disc_sig_s,  // discriminator sample 1
  output logic             disc_ref_s,  // discriminator sample 2
  output logic             disc_latch,  // discriminator decision
  output logic             row_done,    // hit pattern of done_row is valid
  output logic [ROW_W-1:0] done_row,
  output logic             done_last,   // done_row is the frame's last row
  output logic             frame_start,
  output logic [31:0]      frame_cnt
);
  localparam int unsigned CYC_W = $clog2(ROW_CYCLES);

  logic [CYC_W-1:0] cyc;
  logic [ROW_W-1:0] row;
  logic             active;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cyc       <= '0;
      row       <= '0;
      active    <= 1'b0;
      frame_cnt <= '0;
    end else if (run) begin
      active <= 1'b1;
      if (active) begin
        if (cyc == CYC_W'(ROW_CYCLES - 1)) begin
          cyc <= '0;
          if (row == ROW_W'(N_ROWS - 1)) begin
            row       <= '0;
            frame_cnt <= frame_cnt + 32'd1;
          end else begin
            row <= row + 1'b1;
          end
        end else begin
          cyc <= cyc + 1'b1;
        end
      end
    end
  end

  logic go;
  assign go = active && run;

  always_comb begin
    row_addr    = row;
    row_sel     = go;
    clamp       = go && (cyc == CYC_W'(CLAMP_PH) || cyc == CYC_W'(CLAMP_PH + 1));
    disc_sig_s  = go && (cyc == CYC_W'(SIG_PH));
    disc_ref_s  = go && (cyc == CYC_W'(REF_PH));
    disc_latch  = go && (cyc == CYC_W'(LATCH_PH));
    frame_start = go && (cyc == '0) && (row == '0);
  end

  // row_done one period after the decision
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row_done  <= 1'b0;
      done_row  <= '0;
      done_last <= 1'b0;
    end else begin
      row_done  <= disc_latch;
      if (disc_latch) begin
        done_row  <= row;
        done_last <= (row == ROW_W'(N_ROWS - 1));
      end
    end
  end

  initial begin
    assert (SIG_PH < CLAMP_PH && CLAMP_PH + 1 < REF_PH && REF_PH < LATCH_PH
            && LATCH_PH + 1 < ROW_CYCLES)
      else $error("row phases out of order");
  end
endmodule
