// zs_bank_scanner: first pipeline stage of the zero suppression, one block of
// BANK_COLS columns.
//
// The scanner looks at the discriminator outputs of one block of the current
// row, skips the pixels without a hit and reports each string of contiguous
// hit pixels as its first column (relative to the block) and its length.
// A string longer than MAX_STR_LEN pixels is cut into several strings; at most
// STR_PER_BANK strings per block are reported, in increasing column order,
// and ovf is set when further strings were dropped. A string that runs over
// the edge of the block is reported by each of the two blocks as a string of
// its own. The scan of one row is combinational and registered on in_valid,
// so the result (out_valid, states, ovf, out_tag) appears one clock after the
// row is presented; a new row can be presented every clock.
// Skipping empty pixels and coding strings by start and length follow the
// sensor description; the block width, the string limits and the handling of
// long strings are this design's choice. out_tag carries the row tag along.
module zs_bank_scanner
  import m26_pkg::*;
#(
  parameter int unsigned BANK_COLS = BANK_COLS_DEF,
  parameter int unsigned N_STR     = STR_PER_BANK,
  parameter int unsigned MAX_LEN   = MAX_STR_LEN,
  parameter int unsigned TAG_W     = ROW_W + 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic [BANK_COLS-1:0]  hits,
  input  logic [TAG_W-1:0]      in_tag,
  output logic                  out_valid,
  output zs_state_t [N_STR-1:0] states,
  output logic                  ovf,
  output logic [TAG_W-1:0]      out_tag
);
  zs_state_t [N_STR-1:0] st_c;
  logic                  ovf_c;

  always_comb begin
    int unsigned n, run;
    logic        rec;
    st_c  = '0;
    ovf_c = 1'b0;
    n     = 0;
    run   = 0;
    rec   = 1'b0;
    for (int unsigned i = 0; i < BANK_COLS; i++) begin
      if (hits[i]) begin
        if (run == 0 || run == MAX_LEN) begin
          // a new string starts here
          run = 1;
          if (n < N_STR) begin
            st_c[n].valid  = 1'b1;
            st_c[n].col    = COL_W'(i);
            st_c[n].len_m1 = '0;
            n   = n + 1;
            rec = 1'b1;
          end else begin
            ovf_c = 1'b1;
            rec   = 1'b0;
          end
        end else begin
          run = run + 1;
          if (rec) st_c[n-1].len_m1 = LEN_W'(run - 1);
        end
      end else begin
        run = 0;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      states    <= '0;
      ovf       <= 1'b0;
      out_tag   <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        states  <= st_c;
        ovf     <= ovf_c;
        out_tag <= in_tag;
      end
    end
  end

  initial assert (MAX_LEN <= (1 << LEN_W)) else $error("MAX_LEN too large for length field");
endmodule
