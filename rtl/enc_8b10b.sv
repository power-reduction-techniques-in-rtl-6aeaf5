// 8b/10b encoder with running-disparity control.
//
// On each rising edge of clk (in the link, the divided clock from the ripple
// counter) the encoder registers the 10-bit code group of the character on
// ip/k_in and the running disparity that follows it. The byte HGFEDCBA is
// split into x = EDCBA, coded 5b/6b into abcdei, and y = HGF, coded 3b/4b into
// fghj (tables and rules in enc8b10b_pkg). op carries a in bit 0 and j in bit
// 9. Every code group has four, five or six ones and the running disparity
// picks between a code and its complement, so the line stays DC balanced and
// never holds the same level for more than five bits.
//
// The 8b/10b mapping, the naming of x/y and the bit order come from the
// design description; it does not say what is sent when there is no data.
// Here a cycle with ip_en low sends K28.5 as idle fill, which also gives the
// receiver its alignment comma, and op_en marks the cycles that carry a
// character from ip. A control flag on a byte that is not one of the twelve
// control characters is reported on k_err and the byte is sent as data.
// Reset loads K28.5 (RD- form) into op and RD+ into the disparity state.
//
// Timing: one character per clk cycle, op valid one cycle after ip.
module enc_8b10b
  import enc8b10b_pkg::*;
(
  input  logic       clk,
  input  logic       rst,     // asynchronous, active high
  input  logic       ip_en,   // ip/k_in hold a character to send
  input  logic [7:0] ip,      // HGFEDCBA
  input  logic       k_in,    // ip is a control character Kx.y
  output sym_t       op,      // code group, a in bit 0 ... j in bit 9
  output logic       op_en,   // op carries a character from ip (not idle)
  output logic       k_err,   // k_in was set on an undefined control character
  output logic       rd       // running disparity after op: 1 = RD+
);

  enc_t next;

  always_comb begin
    if (ip_en) next = encode(ip, k_in, rd);
    else       next = encode(K28_5, 1'b1, rd);
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      op    <= encode(K28_5, 1'b1, 1'b0).code;
      rd    <= 1'b1;
      op_en <= 1'b0;
      k_err <= 1'b0;
    end else begin
      op    <= next.code;
      rd    <= next.rd;
      op_en <= ip_en;
      k_err <= ip_en && k_in && !k_valid(ip);
    end
  end

endmodule
