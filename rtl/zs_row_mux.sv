// zs_row_mux: second pipeline stage of the zero suppression.
//
// Takes the strings found by the N_BANKS block scanners for one row and
// packs them, in increasing column order, into a row record of at most
// N_OUT strings with absolute column addresses (block index x BANK_COLS +
// offset). The record also holds the number of strings, the row number and
// whether it is the frame's last row (both from the tag), and an overflow
// flag, set when a block scanner dropped strings or when the row held more
// than N_OUT strings (the extra ones are dropped). Registered on in_valid:
// the record appears one clock after the block results, one row per clock
// at most. Packing the sparse data of a row follows the sensor description;
// the limit of 9 strings per row and the overflow rule are this design's
// choice.
module zs_row_mux
  import m26_pkg::*;
#(
  parameter int unsigned N_BANKS   = N_COLS_DEF / BANK_COLS_DEF,
  parameter int unsigned BANK_COLS = BANK_COLS_DEF,
  parameter int unsigned N_STR     = STR_PER_BANK,
  parameter int unsigned N_OUT     = STATES_PER_ROW
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  logic                                 in_valid,
  input  zs_state_t [N_BANKS-1:0][N_STR-1:0]   bank_states,
  input  logic [N_BANKS-1:0]                   bank_ovf,
  input  logic [ROW_W-1:0]                     in_row,
  input  logic                                 in_last,
  output logic                                 out_valid,
  output zs_state_t [N_OUT-1:0]                row_states,
  output logic [NST_W-1:0]                     row_n,
  output logic                                 row_ovf,
  output logic [ROW_W-1:0]                     row_idx,
  output logic                                 row_last
);
  zs_state_t [N_OUT-1:0] st_c;
  logic [NST_W-1:0]      n_c;
  logic                  ovf_c;

  always_comb begin
    int unsigned n;
    st_c  = '0;
    ovf_c = |bank_ovf;
    n     = 0;
    for (int unsigned b = 0; b < N_BANKS; b++) begin
      for (int unsigned s = 0; s < N_STR; s++) begin
        if (bank_states[b][s].valid) begin
          if (n < N_OUT) begin
            st_c[n].valid  = 1'b1;
            st_c[n].col    = COL_W'(b * BANK_COLS) + bank_states[b][s].col;
            st_c[n].len_m1 = bank_states[b][s].len_m1;
            n = n + 1;
          end else begin
            ovf_c = 1'b1;
          end
        end
      end
    end
    n_c = NST_W'(n);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      row_states <= '0;
      row_n      <= '0;
      row_ovf    <= 1'b0;
      row_idx    <= '0;
      row_last   <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        row_states <= st_c;
        row_n      <= n_c;
        row_ovf    <= ovf_c;
        row_idx    <= in_row;
        row_last   <= in_last;
      end
    end
  end

  initial assert (N_OUT < (1 << NST_W)) else $error("N_OUT too large for count field");
endmodule
