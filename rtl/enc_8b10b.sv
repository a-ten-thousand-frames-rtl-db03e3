// enc_8b10b: 8b/10b line encoder for the high-speed serial link.
//
// Encodes one byte per clock when valid is high into a 10-bit symbol
// abcdei fghj (symbol[9] = a is sent first), keeping the running disparity
// between -1 and +1 so that the serial stream is DC balanced and has enough
// transitions for the receiver to recover the clock. The byte is split into
// x = bits 4:0 (5b/6b sub-block) and y = bits 7:5 (3b/4b sub-block), as in
// the widely used Widmer-Franaszek code. With k set the byte is sent as a
// control symbol; K28.y (y = 0..7) and K23.7, K27.7, K29.7, K30.7 are
// supported, K28.5 being the comma used for alignment. Other bytes with k set
// are sent as K28.5. The symbol is registered: it appears one clock after
// valid, and rd holds the running disparity after it (0: -1, 1: +1). Reset
// sets the running disparity to -1. The sensor names the 8b/10b encoder for
// its clock-recovery output; the choice of this standard code is this
// design's.
module enc_8b10b (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       valid,
  input  logic [7:0] data,
  input  logic       k,
  output logic       sym_valid,
  output logic [9:0] symbol,
  output logic       rd
);
  // 5b/6b codes (abcdei) for running disparity -1
  function automatic logic [5:0] code6(logic [4:0] x);
    case (x)
      5'd0:  return 6'b100111;  5'd1:  return 6'b011101;
      5'd2:  return 6'b101101;  5'd3:  return 6'b110001;
      5'd4:  return 6'b110101;  5'd5:  return 6'b101001;
      5'd6:  return 6'b011001;  5'd7:  return 6'b111000;
      5'd8:  return 6'b111001;  5'd9:  return 6'b100101;
      5'd10: return 6'b010101;  5'd11: return 6'b110100;
      5'd12: return 6'b001101;  5'd13: return 6'b101100;
      5'd14: return 6'b011100;  5'd15: return 6'b010111;
      5'd16: return 6'b011011;  5'd17: return 6'b100011;
      5'd18: return 6'b010011;  5'd19: return 6'b110010;
      5'd20: return 6'b001011;  5'd21: return 6'b101010;
      5'd22: return 6'b011010;  5'd23: return 6'b111010;
      5'd24: return 6'b110011;  5'd25: return 6'b100110;
      5'd26: return 6'b010110;  5'd27: return 6'b110110;
      5'd28: return 6'b001110;  5'd29: return 6'b101110;
      5'd30: return 6'b011110;  default: return 6'b101011;
    endcase
  endfunction

  // 3b/4b codes (fghj) for running disparity -1
  function automatic logic [3:0] code4(logic [2:0] y);
    case (y)
      3'd0: return 4'b1011;  3'd1: return 4'b1001;
      3'd2: return 4'b0101;  3'd3: return 4'b1100;
      3'd4: return 4'b1101;  3'd5: return 4'b1010;
      3'd6: return 4'b0110;  default: return 4'b1110;
    endcase
  endfunction

  function automatic logic [3:0] code4_k(logic [2:0] y);
    case (y)
      3'd0: return 4'b1011;  3'd1: return 4'b0110;
      3'd2: return 4'b1010;  3'd3: return 4'b1100;
      3'd4: return 4'b1101;  3'd5: return 4'b0101;
      3'd6: return 4'b1001;  default: return 4'b0111;
    endcase
  endfunction

  function automatic int ones6(logic [5:0] v);
    return int'(v[0]) + int'(v[1]) + int'(v[2]) + int'(v[3]) + int'(v[4]) + int'(v[5]);
  endfunction
  function automatic int ones4(logic [3:0] v);
    return int'(v[0]) + int'(v[1]) + int'(v[2]) + int'(v[3]);
  endfunction

  logic [9:0] sym_c;
  logic       rd_c;

  always_comb begin
    logic [4:0] x;
    logic [2:0] y;
    logic       kk, rd_mid;
    logic [5:0] c6;
    logic [3:0] c4;
    x  = data[4:0];
    y  = data[7:5];
    kk = k;
    if (kk && !(x == 5'd28 || (y == 3'd7 &&
        (x == 5'd23 || x == 5'd27 || x == 5'd29 || x == 5'd30)))) begin
      x = 5'd28;
      y = 3'd5;
    end
    // 6-bit sub-block
    c6 = (kk && x == 5'd28) ? 6'b001111 : code6(x);
    if (rd && (ones6(c6) != 3 || c6 == 6'b111000)) c6 = ~c6;
    rd_mid = (ones6(c6) != 3) ? ~rd : rd;
    // 4-bit sub-block
    if (kk) begin
      c4 = code4_k(y);
      if (rd_mid) c4 = ~c4;
    end else begin
      c4 = code4(y);
      if (y == 3'd7 && ((!rd_mid && (x == 5'd17 || x == 5'd18 || x == 5'd20)) ||
                        ( rd_mid && (x == 5'd11 || x == 5'd13 || x == 5'd14))))
        c4 = 4'b0111;
      if (rd_mid && (ones4(c4) != 2 || c4 == 4'b1100)) c4 = ~c4;
    end
    rd_c  = (ones4(c4) != 2) ? ~rd_mid : rd_mid;
    sym_c = {c6, c4};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd        <= 1'b0;
      symbol    <= '0;
      sym_valid <= 1'b0;
    end else begin
      sym_valid <= valid;
      if (valid) begin
        symbol <= sym_c;
        rd     <= rd_c;
      end
    end
  end
endmodule
