// 8b/10b code tables and coding functions shared by the encoder and decoder.
//
// A character is a byte HGFEDCBA plus a control flag. The five low bits EDCBA
// (x) are coded into six bits abcdei and the three high bits HGF (y) into four
// bits fghj, giving the character names Dx.y (data) and Kx.y (control). The
// 10-bit symbol is held with a in bit 0 and j in bit 9, so a shifter that sends
// bit 0 first puts a on the line first.
//
// Each sub-block code is stored as its running-disparity-minus (RD-) form;
// the RD+ form is the complement whenever the RD- form is unbalanced, and for
// the two balanced exceptions D.7 (111000/000111) and x.3 (1100/0011). Running
// disparity is kept as one bit: 0 = RD-, 1 = RD+. It flips after every
// unbalanced sub-block, so the line's running digital sum never leaves the
// band of +/-2 around zero at sub-block boundaries. The tables are the
// standard Widmer-Franaszek ones.
package enc8b10b_pkg;

  localparam int unsigned SYM_W  = 10;  // code group width

  typedef logic [SYM_W-1:0] sym_t;

  // Comma prefix of K28.1, K28.5 and K28.7 in line order a..g (bits 6:0 of a
  // symbol): 0011111 for RD- and 1100000 for RD+.
  localparam logic [6:0] COMMA_M = 7'b1111100;
  localparam logic [6:0] COMMA_P = 7'b0000011;

  // K28.5, the character used as idle fill and as the alignment comma.
  localparam logic [7:0] K28_5 = 8'hBC;

  // Result of encoding one character.
  typedef struct packed {
    sym_t code;   // a in bit 0 ... j in bit 9
    logic rd;     // running disparity after the character
  } enc_t;

  // Result of decoding one symbol.
  typedef struct packed {
    logic [7:0] data;      // HGFEDCBA
    logic       k;         // control character
    logic       code_err;  // not a code group under either running disparity
    logic       disp_err;  // a code group, but of the wrong running disparity
    logic       rd;        // running disparity after the symbol
  } dec_t;

  // 5b/6b RD- codes, written abcdei from left to right.
  function automatic logic [5:0] code6_rdm(input logic [4:0] x);
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

  // 3b/4b RD- codes, written fghj from left to right; y = 7 gives the
  // primary code P7, the alternate A7 is chosen in enc4.
  function automatic logic [3:0] code4_rdm(input logic [2:0] y);
    case (y)
      3'd0: return 4'b1011;  3'd1: return 4'b1001;
      3'd2: return 4'b0101;  3'd3: return 4'b1100;
      3'd4: return 4'b1101;  3'd5: return 4'b1010;
      3'd6: return 4'b0110;  default: return 4'b1110;
    endcase
  endfunction

  function automatic int unsigned ones6(input logic [5:0] v);
    return $countones(v);
  endfunction

  function automatic int unsigned ones4(input logic [3:0] v);
    return $countones(v);
  endfunction

  // True for the control characters the code defines:
  // K28.0-K28.7, K23.7, K27.7, K29.7 and K30.7.
  function automatic logic k_valid(input logic [7:0] d);
    logic [4:0] x;
    logic [2:0] y;
    x = d[4:0];
    y = d[7:5];
    return (x == 5'd28) ||
           ((y == 3'd7) && (x == 5'd23 || x == 5'd27 || x == 5'd29 || x == 5'd30));
  endfunction

  // 6-bit sub-block (abcdei, a leftmost) for x under running disparity rd.
  function automatic logic [5:0] enc6(input logic [4:0] x, input logic k28,
                                      input logic rd);
    logic [5:0] c;
    c = k28 ? 6'b001111 : code6_rdm(x);
    if (rd && (ones6(c) != 3 || c == 6'b111000)) c = ~c;
    return c;
  endfunction

  // 4-bit sub-block (fghj, f leftmost) for y, given x, the control flag and the
  // running disparity left by the 6-bit sub-block.
  function automatic logic [3:0] enc4(input logic [2:0] y, input logic [4:0] x,
                                      input logic k, input logic rd_mid);
    logic [3:0] c;
    logic       use_a7;
    c = code4_rdm(y);
    // A7 avoids a run of five equal bits across the sub-block boundary; all
    // Kx.7 use it as well.
    use_a7 = (y == 3'd7) &&
             (k || (!rd_mid && (x == 5'd17 || x == 5'd18 || x == 5'd20)) ||
                   ( rd_mid && (x == 5'd11 || x == 5'd13 || x == 5'd14)));
    if (use_a7) c = 4'b0111;
    if (rd_mid && (ones4(c) != 2 || c == 4'b1100)) c = ~c;
    // K28.1, .2, .5 and .6 use the complement of the balanced data code when
    // the 6-bit sub-block (110000) left RD-.
    if (k && x == 5'd28 && !rd_mid &&
        (y == 3'd1 || y == 3'd2 || y == 3'd5 || y == 3'd6)) c = ~c;
    return c;
  endfunction

  // Reverse the order of a sub-block written left to right into symbol order.
  function automatic logic [5:0] rev6(input logic [5:0] v);
    logic [5:0] r;
    for (int i = 0; i < 6; i++) r[i] = v[5-i];
    return r;
  endfunction

  function automatic logic [3:0] rev4(input logic [3:0] v);
    logic [3:0] r;
    for (int i = 0; i < 4; i++) r[i] = v[3-i];
    return r;
  endfunction

  // Encode one character. A control flag on a byte that is not a defined
  // control character is ignored (the caller flags it).
  function automatic enc_t encode(input logic [7:0] d, input logic k, input logic rd);
    enc_t       r;
    logic [4:0] x;
    logic [2:0] y;
    logic       kk;
    logic [5:0] c6;
    logic [3:0] c4;
    logic       rd_mid;
    x  = d[4:0];
    y  = d[7:5];
    kk = k && k_valid(d);
    c6 = enc6(x, kk && (x == 5'd28), rd);
    rd_mid = (ones6(c6) == 3) ? rd : (ones6(c6) > 3);
    c4 = enc4(y, x, kk, rd_mid);
    r.rd   = (ones4(c4) == 2) ? rd_mid : (ones4(c4) > 2);
    r.code = {rev4(c4), rev6(c6)};
    return r;
  endfunction

  // Decode one symbol received under running disparity rd. The sub-blocks
  // are looked up loosely (either disparity), then the character found is
  // re-encoded: a match under rd is good, a match only under !rd is a
  // disparity error, and no match at all is a code error. The running
  // disparity that follows is taken from the received sub-blocks themselves,
  // so one bad symbol does not leave the tracker wrong.
  function automatic dec_t decode(input sym_t s, input logic rd);
    dec_t       r;
    logic [5:0] c6;
    logic [3:0] c4;
    logic [4:0] x;
    logic [2:0] y;
    logic       k28, k;
    logic       rd_mid;
    enc_t       e_same, e_other;
    c6  = rev6(s[5:0]);
    c4  = rev4(s[9:6]);
    k28 = (c6 == 6'b001111) || (c6 == 6'b110000);
    x   = k28 ? 5'd28 : 5'd0;
    if (!k28)
      for (int xi = 0; xi < 32; xi++)
        for (int ri = 0; ri < 2; ri++)
          if (enc6(5'(xi), 1'b0, ri[0]) == c6) x = 5'(xi);
    rd_mid = (ones6(c6) == 3) ? rd : (ones6(c6) > 3);
    // Data 4b codes are distinct under both disparities, so they are looked
    // up under either; the K28 codes are not (K28.1 RD+ equals D.x.6), so
    // they are looked up under the disparity the comma sub-block left.
    y = 3'd0;
    for (int yi = 0; yi < 8; yi++)
      for (int ri = 0; ri < 2; ri++)
        if ((!k28 || ri[0] == (ones6(c6) > 3)) && enc4(3'(yi), x, k28, ri[0]) == c4)
          y = 3'(yi);
    // A7 after x = 23, 27, 29 or 30 can only be a control character.
    if ((c4 == 4'b0111 || c4 == 4'b1000) && !k28) y = 3'd7;
    k = k28 || ((c4 == 4'b0111 || c4 == 4'b1000) &&
                (x == 5'd23 || x == 5'd27 || x == 5'd29 || x == 5'd30));
    r.data = {y, x};
    r.k    = k;
    e_same  = encode(r.data, k, rd);
    e_other = encode(r.data, k, !rd);
    r.code_err = (e_same.code != s) && (e_other.code != s);
    r.disp_err = (e_same.code != s) && (e_other.code == s);
    r.rd = (ones4(c4) == 2) ? rd_mid : (ones4(c4) > 2);
    return r;
  endfunction

endpackage
