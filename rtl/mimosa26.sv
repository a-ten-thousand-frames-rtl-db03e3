// mimosa26: digital readout chain of a reticle-size monolithic pixel sensor
// with binary outputs and on-chip zero suppression, read at ~10k frames/s.
//
// Data flow, one row every ROW_CYCLES clocks (16 clocks, 0.2 us at 80 MHz):
//   rolling_shutter_ctrl  selects a row of the pixel array (row_addr, clamp)
//                         and sequences the column discriminators
//   discriminator_bank    N_COLS column discriminators, N_GROUPS threshold
//                         groups (behavioural model of the analog part)
//   zs_bank_scanner x N   finds strings of hit pixels in each block of
//                         BANK_COLS columns (pipeline stage 1)
//   zs_row_mux            packs them into a row record (stage 2)
//   zs_mem_writer         writes row header + string words into one of two
//                         sram_1r1w memories (stage 3, ping-pong)
//   frame_serializer      sends the other memory, i.e. the previous frame,
//                         on two (or one) serial lines during the current
//                         frame
//   enc_8b10b             optionally re-codes the output words as 8b/10b
//                         symbols for a clock-recovering link
//   jtag_ctrl             sets thresholds, biases and the test modes
// Test modes (CTRL register): isolate the discriminators from the array and
// drive them with a common test voltage; feed the zero suppression from the
// PATTERN register instead of the discriminators. CTRL also selects the
// single-line output, which halves the frame memory used (only line 0
// carries data).
//
// Interface: clk is the readout clock (80 MHz nominal), rst_n an asynchronous
// active-low reset; tck/tms/tdi/tdo/trst_n the JTAG port. col_v are the
// column voltages of the selected row, delivered by the pixel array (outside
// this module, driven from row_addr/row_sel/clamp). sdata[1:0]/mkd are the
// two serial lines and the frame marker, enc_symbol/enc_valid the 8b/10b
// symbols (one every 4 clocks, to be serialised by a faster clock), dac the
// bias DAC codes for the analog bias generators.
// Latency: a row's strings are in memory at most 16 clocks after its
// discriminator decision; a frame is sent during the frame that follows it,
// starting about 16 clocks after the last row decision, at a constant
// period of N_ROWS x ROW_CYCLES clocks.
// The chain follows the sensor description; the sizes of the zero
// suppression, the output format, the JTAG registers and the 8b/10b byte
// order are this design's choices (see each block).
module mimosa26
  import m26_pkg::*;
#(
  parameter int unsigned N_ROWS     = N_ROWS_DEF,
  parameter int unsigned N_COLS     = N_COLS_DEF,
  parameter int unsigned N_GROUPS   = N_GROUPS_DEF,
  parameter int unsigned BANK_COLS  = BANK_COLS_DEF,
  parameter int unsigned ROW_CYCLES = ROW_CYCLES_DEF,
  parameter int unsigned MEM_DEPTH  = MEM_DEPTH_DEF,
  parameter int unsigned N_DAC      = 8
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // JTAG
  input  logic                          tck,
  input  logic                          trst_n,
  input  logic                          tms,
  input  logic                          tdi,
  output logic                          tdo,
  // pixel array
  output logic [ROW_W-1:0]              row_addr,
  output logic                          row_sel,
  output logic                          clamp,
  input  logic [N_COLS-1:0][SIG_W-1:0]  col_v,
  // bias DACs
  output logic [N_DAC-1:0][THR_W-1:0]   dac,
  // serial outputs
  output logic [1:0]                    sdata,
  output logic                          mkd,
  output logic [9:0]                    enc_symbol,
  output logic                          enc_valid
);
  localparam int unsigned N_BANKS     = N_COLS / BANK_COLS;
  localparam int unsigned FRAME_WORDS = N_ROWS * ROW_CYCLES / WORD_W;
  localparam int unsigned AW          = $clog2(MEM_DEPTH);
  localparam int unsigned LW          = $clog2(2 * MEM_DEPTH + 1);

  // ---------------- slow control
  logic [7:0]        ctrl;
  logic [N_COLS-1:0] pattern;

  jtag_ctrl #(.N_COLS(N_COLS), .N_GROUPS(N_GROUPS), .N_DAC(N_DAC)) u_jtag (
    .tck, .trst_n, .tms, .tdi, .tdo, .dac, .ctrl, .pattern
  );

  logic run, isolate, zs_test, enc_en, one_line;
  assign run      = ctrl[0];
  assign isolate  = ctrl[1];
  assign zs_test  = ctrl[2];
  assign enc_en   = ctrl[3];
  assign one_line = ctrl[4];

  // ---------------- rolling shutter and discriminators
  logic             sig_s, ref_s, latch, row_done, done_last;
  logic [ROW_W-1:0] done_row;
  logic             frame_start;
  logic [31:0]      frame_cnt;

  rolling_shutter_ctrl #(.N_ROWS(N_ROWS), .ROW_CYCLES(ROW_CYCLES)) u_rsc (
    .clk, .rst_n, .run, .row_addr, .row_sel, .clamp,
    .disc_sig_s(sig_s), .disc_ref_s(ref_s), .disc_latch(latch),
    .row_done, .done_row, .done_last, .frame_start, .frame_cnt
  );

  logic [N_COLS-1:0] hit;

  discriminator_bank #(.N_COLS(N_COLS), .N_GROUPS(N_GROUPS)) u_disc (
    .clk, .rst_n, .col_v, .isolate, .test_level(dac[N_GROUPS]),
    .thr(dac[N_GROUPS-1:0]), .sig_s, .ref_s, .latch, .hit
  );

  logic [N_COLS-1:0] zs_in;
  assign zs_in = zs_test ? pattern : hit;

  // ---------------- zero suppression, stage 1
  logic [N_BANKS-1:0]                    bank_valid, bank_ovf;
  zs_state_t [N_BANKS-1:0][STR_PER_BANK-1:0] bank_states;
  logic [N_BANKS-1:0][ROW_W:0]           bank_tag;

  for (genvar b = 0; b < N_BANKS; b++) begin : g_bank
    zs_bank_scanner #(.BANK_COLS(BANK_COLS)) u_scan (
      .clk, .rst_n, .in_valid(row_done),
      .hits(zs_in[b*BANK_COLS +: BANK_COLS]),
      .in_tag({done_last, done_row}),
      .out_valid(bank_valid[b]), .states(bank_states[b]),
      .ovf(bank_ovf[b]), .out_tag(bank_tag[b])
    );
  end

  // ---------------- stage 2
  logic                          rec_valid, rec_ovf, rec_last;
  zs_state_t [STATES_PER_ROW-1:0] rec_states;
  logic [NST_W-1:0]              rec_n;
  logic [ROW_W-1:0]              rec_row;

  zs_row_mux #(.N_BANKS(N_BANKS), .BANK_COLS(BANK_COLS)) u_mux (
    .clk, .rst_n, .in_valid(bank_valid[0]), .bank_states, .bank_ovf,
    .in_row(bank_tag[0][ROW_W-1:0]), .in_last(bank_tag[0][ROW_W]),
    .out_valid(rec_valid), .row_states(rec_states), .row_n(rec_n),
    .row_ovf(rec_ovf), .row_idx(rec_row), .row_last(rec_last)
  );

  // ---------------- stage 3 and the ping-pong memory
  logic          wsel, swap, swap_ovf;
  logic [1:0]    we;
  logic [AW-1:0] waddr, raddr;
  logic [31:0]   wdata, swap_frame;
  logic [LW-1:0] swap_len;
  logic          re;
  logic [31:0]   rdata [2];

  zs_mem_writer #(.MEM_DEPTH(MEM_DEPTH)) u_wr (
    .clk, .rst_n, .in_valid(rec_valid), .row_states(rec_states), .row_n(rec_n),
    .row_ovf(rec_ovf), .row_idx(rec_row), .row_last(rec_last), .one_line,
    .wsel, .we, .waddr, .wdata, .swap, .swap_len, .swap_ovf, .swap_frame
  );

  for (genvar m = 0; m < 2; m++) begin : g_mem
    sram_1r1w #(.DEPTH(MEM_DEPTH)) u_sram (
      .clk,
      .we   ((wsel == 1'(m)) ? we : 2'b00),
      .waddr, .wdata,
      .re   (re && (wsel != 1'(m))),
      .raddr,
      .rdata(rdata[m])
    );
  end

  // ---------------- serial output
  logic        ser_active;
  logic [31:0] cur_word;
  logic [3:0]  bitpos;

  frame_serializer #(.FRAME_WORDS(FRAME_WORDS), .MEM_DEPTH(MEM_DEPTH)) u_ser (
    .clk, .rst_n, .start(swap), .len(swap_len), .mem_ovf(swap_ovf),
    .frame_no(swap_frame), .one_line, .re, .raddr, .rdata(rdata[~wsel]),
    .sdata, .mkd, .active(ser_active), .cur_word, .bitpos
  );

  // ---------------- 8b/10b path: one byte of the word on the lines every
  // 4 clocks, K28.5 commas while no frame is being sent
  logic       enc_in_valid, enc_k;
  logic [7:0] enc_byte;
  always_comb begin
    enc_in_valid = enc_en && bitpos[1:0] == 2'b00;
    enc_k        = !ser_active;
    enc_byte     = ser_active ? cur_word[8*bitpos[3:2] +: 8] : 8'hBC;
  end

  logic enc_rd;
  enc_8b10b u_enc (
    .clk, .rst_n, .valid(enc_in_valid), .data(enc_byte), .k(enc_k),
    .sym_valid(enc_valid), .symbol(enc_symbol), .rd(enc_rd)
  );

  initial begin
    assert (N_COLS % BANK_COLS == 0) else $error("blocks must divide the columns");
    assert (ROW_CYCLES >= STATES_PER_ROW + 4) else $error("row period too short for the writer");
    assert ((N_ROWS * ROW_CYCLES) % WORD_W == 0) else $error("frame must hold whole words");
  end
endmodule
