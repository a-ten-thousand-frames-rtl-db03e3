// zs_mem_writer: third pipeline stage of the zero suppression; fills the
// ping-pong frame memory.
//
// For every row record that holds at least one string (or an overflow flag),
// it writes a row header word followed by one word per string, successively,
// one 16-bit word per clock, into the memory it is currently filling.
// Rows without hits are skipped, which is where the data compression comes
// from. Words are packed two per 32-bit memory word: even words go to lane 0
// (output line 0), odd words to lane 1 (line 1); writing lane 0 also clears
// lane 1, so the last word of a frame never carries stale data. A row that
// does not fit in the space left is dropped as a whole and mem_ovf is set for
// the frame. The space is 2 x MEM_DEPTH words, or MEM_DEPTH words when
// one_line is set, since a single output line can send only half as much in
// a frame period (one_line must stay constant while a frame is written).
// N_OUT+3 clocks after the frame's last row record (a fixed time, so that
// frames leave the chip at a constant period) swap pulses for one
// clock with the number of 16-bit words written, the memory-overflow flag and
// the frame number; the writer then fills the other memory (wsel toggles).
// A row record may arrive at most every N_OUT+4 clocks (one row period of 16
// clocks is enough). Storing string lengths and start addresses successively
// into two alternating SRAMs follows the sensor description; word packing,
// dropping of rows that do not fit and the swap interface are this design's
// choice, as is the single-line capacity.
module zs_mem_writer
  import m26_pkg::*;
#(
  parameter int unsigned N_OUT     = STATES_PER_ROW,
  parameter int unsigned MEM_DEPTH = MEM_DEPTH_DEF,
  parameter int unsigned AW        = $clog2(MEM_DEPTH),
  parameter int unsigned LW        = $clog2(2 * MEM_DEPTH + 1)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  zs_state_t [N_OUT-1:0]  row_states,
  input  logic [NST_W-1:0]       row_n,
  input  logic                   row_ovf,
  input  logic [ROW_W-1:0]       row_idx,
  input  logic                   row_last,
  input  logic                   one_line,   // single-line output: half capacity
  // write port to the memory selected by wsel
  output logic                   wsel,
  output logic [1:0]             we,
  output logic [AW-1:0]          waddr,
  output logic [31:0]            wdata,
  // end of frame
  output logic                   swap,
  output logic [LW-1:0]          swap_len,
  output logic                   swap_ovf,
  output logic [31:0]            swap_frame
);
  localparam int unsigned HW_W = $clog2(2 * MEM_DEPTH + 1);
  // the frame ends a fixed time after the last row record, whatever that
  // row holds, so that frames leave the chip at a constant period
  localparam int unsigned END_DELAY = N_OUT + 1;

  zs_state_t [N_OUT-1:0] st_q;
  logic [NST_W-1:0]      n_q;
  logic                  ovf_q;
  logic [ROW_W-1:0]      row_q;
  logic                  busy;
  logic [NST_W-1:0]      idx;       // 0: header, k: string k-1
  logic [HW_W-1:0]       hw;        // next free 16-bit word
  logic                  mem_ovf;
  logic [31:0]           frame_no;
  logic                  end_pend;  // frame ends after the last row
  logic [NST_W:0]        end_cnt;   // clocks since the last row record

  logic [WORD_W-1:0] item;
  always_comb begin
    item = (idx == '0) ? row_header_word(ovf_q, n_q, row_q)
                       : state_word(st_q[idx - 1'b1]);
  end

  logic fits;
  assign fits = (32'(hw) + 32'(row_n) + 32'd1)
                <= (one_line ? 32'(MEM_DEPTH) : 32'(2 * MEM_DEPTH));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q <= '0; n_q <= '0; ovf_q <= 1'b0; row_q <= '0;
      busy <= 1'b0; idx <= '0; hw <= '0; mem_ovf <= 1'b0; frame_no <= '0;
      end_pend <= 1'b0; end_cnt <= '0;
      wsel <= 1'b0; we <= '0; waddr <= '0; wdata <= '0;
      swap <= 1'b0; swap_len <= '0; swap_ovf <= 1'b0; swap_frame <= '0;
    end else begin
      we   <= '0;
      swap <= 1'b0;
      if (in_valid) begin
        if ((row_n != '0 || row_ovf) && fits) begin
          st_q <= row_states; n_q <= row_n; ovf_q <= row_ovf; row_q <= row_idx;
          busy <= 1'b1;
          idx  <= '0;
          end_pend <= row_last;
        end else begin
          if (row_n != '0 || row_ovf) mem_ovf <= 1'b1;
          end_pend <= row_last;
        end
        end_cnt <= '0;
      end else if (busy) begin
        end_cnt <= end_cnt + 1'b1;
        we    <= hw[0] ? 2'b10 : 2'b11;
        waddr <= AW'(hw >> 1);
        wdata <= hw[0] ? {item, 16'h0000} : {16'h0000, item};
        hw    <= hw + 1'b1;
        if (idx == n_q) busy <= 1'b0;
        else            idx  <= idx + 1'b1;
      end else if (end_pend && end_cnt != (NST_W+1)'(END_DELAY)) begin
        end_cnt <= end_cnt + 1'b1;
      end else if (end_pend) begin
        end_pend   <= 1'b0;
        swap       <= 1'b1;
        swap_len   <= LW'(hw);
        swap_ovf   <= mem_ovf;
        swap_frame <= frame_no;
        frame_no   <= frame_no + 32'd1;
        wsel       <= ~wsel;
        hw         <= '0;
        mem_ovf    <= 1'b0;
      end
    end
  end

  // a new row must not arrive while the previous one is still being written
  a_not_busy: assert property (@(posedge clk) disable iff (!rst_n)
                               in_valid |-> !(busy || end_pend))
    else $error("row record arrived while the writer was busy");
endmodule
