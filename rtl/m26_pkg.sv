// m26_pkg: constants and record formats shared by the sensor's digital blocks.
//
// The array size (576 rows x 1152 columns), the 4 threshold groups and the
// 80 MHz / 2-line output come from the sensor description. The block width
// of the zero suppression (64 columns), the string limits (4 pixels per
// string, 6 strings per block, 9 strings per row), the 16 clock cycles per
// row, the SRAM depth (570 words of 32 bits) and the 16-bit word formats
// below are this design's own choices, picked so that one frame of output
// words fills exactly the 9216 clock periods of one frame.
//
// Output word formats (16 bits, one per line and per 16 clock periods):
//   row header : {overflow, n_states[3:0], 1'b0, row[9:0]}
//   string     : {3'b000, first_column[10:0], length_minus_1[1:0]}
//   frame      : HEADER, frame counter, data length, data..., TRAILER, zeros
package m26_pkg;

  localparam int unsigned N_ROWS_DEF      = 576;
  localparam int unsigned N_COLS_DEF      = 1152;
  localparam int unsigned N_GROUPS_DEF    = 4;
  localparam int unsigned BANK_COLS_DEF   = 64;
  localparam int unsigned STR_PER_BANK    = 6;
  localparam int unsigned STATES_PER_ROW  = 9;
  localparam int unsigned MAX_STR_LEN     = 4;
  localparam int unsigned ROW_CYCLES_DEF  = 16;
  localparam int unsigned MEM_DEPTH_DEF   = 570;

  localparam int unsigned COL_W   = 11;   // column field of a string word
  localparam int unsigned ROW_W   = 10;   // row field of a row header
  localparam int unsigned LEN_W   = 2;    // length-1 field of a string word
  localparam int unsigned NST_W   = 4;    // number of strings in a row header
  localparam int unsigned WORD_W  = 16;   // one word per output line
  localparam int unsigned THR_W   = 8;    // threshold DAC code
  localparam int unsigned SIG_W   = 8;    // column signal sample, DAC LSB units

  localparam logic [WORD_W-1:0] FRAME_HEADER  = 16'h5555;
  localparam logic [WORD_W-1:0] FRAME_TRAILER = 16'hAAAA;

  // One string (a "state"): first column and length-1.
  typedef struct packed {
    logic             valid;
    logic [COL_W-1:0] col;
    logic [LEN_W-1:0] len_m1;
  } zs_state_t;

  function automatic logic [WORD_W-1:0] state_word(zs_state_t s);
    return {3'b000, s.col, s.len_m1};
  endfunction

  function automatic logic [WORD_W-1:0] row_header_word(logic ovf,
      logic [NST_W-1:0] n, logic [ROW_W-1:0] row);
    return {ovf, n, 1'b0, row};
  endfunction

endpackage
