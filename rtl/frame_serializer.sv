// frame_serializer: serial transmission of one frame of sparse data during
// the acquisition of the next frame, on two lines or on one.
//
// On start (the writer's swap pulse) it latches the frame's length in 16-bit
// words, the overflow flag, the frame number and the line mode, and sends
// FRAME_WORDS word slots of 16 bits per line, most significant bit first,
// one bit per clock and line (80 Mbit/s per line at 80 MHz).
// Two-line mode (one_line low), with L = ceil(len / 2) memory words:
//   slot 0          FRAME_HEADER on both lines (mkd is high during it)
//   slot 1          frame number, bits 15:0 on line 0 and 31:16 on line 1
//   slot 2          {mem_ovf, 5'b0, L} on both lines
//   slots 3..3+L-1  memory word k: bits 15:0 on line 0, 31:16 on line 1
//   slot 3+L        FRAME_TRAILER on both lines
//   remaining       zeros
// One-line mode (one_line high), line 1 stays low, with L = len words:
//   slot 0 FRAME_HEADER, 1 frame number [15:0], 2 frame number [31:16],
//   3 {mem_ovf, 5'b0, L}, 4..4+L-1 the 16-bit words in the order written
//   (memory word k/2, lane k%2), 4+L FRAME_TRAILER, then zeros.
// With the defaults, 576 slots x 16 clocks = 9216 clocks, exactly one frame
// period, so the transmission of one frame ends when the next one starts.
// The memory is read one clock ahead (re/raddr, data on rdata next clock).
// cur_word/bitpos expose the words on the lines and the bit being sent, for
// the 8b/10b path. Sending a frame during the next one on one or two
// 80 Mbit/s lines follows the sensor description; the frame format is this
// design's choice.
module frame_serializer
  import m26_pkg::*;
#(
  parameter int unsigned FRAME_WORDS = N_ROWS_DEF * ROW_CYCLES_DEF / WORD_W,
  parameter int unsigned MEM_DEPTH   = MEM_DEPTH_DEF,
  parameter int unsigned AW          = $clog2(MEM_DEPTH),
  parameter int unsigned LW          = $clog2(2 * MEM_DEPTH + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [LW-1:0]     len,       // 16-bit words in the memory
  input  logic              mem_ovf,
  input  logic [31:0]       frame_no,
  input  logic              one_line,
  output logic              re,
  output logic [AW-1:0]     raddr,
  input  logic [31:0]       rdata,
  output logic [1:0]        sdata,     // line 1, line 0
  output logic              mkd,
  output logic              active,
  output logic [31:0]       cur_word,  // {line 1 word, line 0 word}
  output logic [3:0]        bitpos
);
  localparam int unsigned SW = $clog2(FRAME_WORDS + 1);

  logic [SW-1:0]   slot;
  logic [LW-1:0]   nw_q;      // data slots of the frame
  logic            ovf_q, one_q, lane_q;
  logic [31:0]     fno_q;
  logic [15:0]     sh0, sh1;

  logic [SW-1:0] nslot;
  logic [31:0]   nword;
  logic [31:0]   dbase;       // first data slot
  assign nslot = slot + 1'b1;
  assign dbase = one_q ? 32'd4 : 32'd3;

  // word for the next slot; data slots take rdata
  always_comb begin
    logic [15:0] lw;
    logic [31:0] s;
    s  = 32'(nslot);
    lw = {ovf_q, 5'b0, 10'(nw_q)};
    if (s < dbase) begin
      if (one_q)
        unique case (s)
          32'd1:   nword = {16'h0, fno_q[15:0]};
          32'd2:   nword = {16'h0, fno_q[31:16]};
          default: nword = {16'h0, lw};
        endcase
      else
        nword = (s == 32'd1) ? fno_q : {lw, lw};
    end else if (s < dbase + 32'(nw_q)) begin
      if (one_q) nword = {16'h0, lane_q ? rdata[31:16] : rdata[15:0]};
      else       nword = rdata;
    end else if (s == dbase + 32'(nw_q)) begin
      nword = one_q ? {16'h0, FRAME_TRAILER} : {FRAME_TRAILER, FRAME_TRAILER};
    end else begin
      nword = '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot <= '0; bitpos <= '0; active <= 1'b0;
      nw_q <= '0; ovf_q <= 1'b0; one_q <= 1'b0; fno_q <= '0;
      sh0 <= '0; sh1 <= '0; cur_word <= '0;
    end else if (start) begin
      nw_q     <= one_line ? len : LW'((32'(len) + 32'd1) >> 1);
      ovf_q    <= mem_ovf;
      one_q    <= one_line;
      fno_q    <= frame_no;
      active   <= 1'b1;
      slot     <= '0;
      bitpos   <= '0;
      sh0      <= FRAME_HEADER;
      sh1      <= one_line ? 16'h0 : FRAME_HEADER;
      cur_word <= one_line ? {16'h0, FRAME_HEADER} : {FRAME_HEADER, FRAME_HEADER};
    end else if (active) begin
      bitpos <= bitpos + 1'b1;
      if (bitpos == 4'd15) begin
        if (32'(slot) == 32'(FRAME_WORDS - 1)) begin
          active   <= 1'b0;
          sh0      <= '0;
          sh1      <= '0;
          cur_word <= '0;
        end else begin
          slot     <= nslot;
          sh0      <= nword[15:0];
          sh1      <= nword[31:16];
          cur_word <= nword;
        end
      end else begin
        sh0 <= {sh0[14:0], 1'b0};
        sh1 <= {sh1[14:0], 1'b0};
      end
    end
  end

  // memory read one clock before the slot's word is loaded
  logic [31:0] didx;   // data index of the next slot
  always_comb begin
    didx  = 32'(nslot) - dbase;
    re    = active && bitpos == 4'd14 && 32'(nslot) >= dbase
            && 32'(nslot) < dbase + 32'(nw_q);
    raddr = one_q ? AW'(didx >> 1) : AW'(didx);
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)  lane_q <= 1'b0;
    else if (re) lane_q <= didx[0];

  assign sdata = {sh1[15], sh0[15]};
  assign mkd   = active && slot == '0;

  initial assert (FRAME_WORDS >= MEM_DEPTH + 5) else $error("frame too short for the memory");
endmodule
