// 10b/8b decoder with running-disparity and code checking.
//
// On each rising edge of clk (in the link, the receiver's divided clock from
// its ripple counter) with ip_en high, the decoder registers the character
// carried by the 10-bit code group ip: the byte HGFEDCBA on op and the control
// flag on k_out. The abcdei sub-block gives x = EDCBA and the fghj sub-block
// gives y = HGF; the character found is re-encoded under the tracked running
// disparity to check the symbol (decode in enc8b10b_pkg). A symbol that is no
// code group sets code_err; one that is a code group of the opposite running
// disparity sets disp_err. The running disparity then follows the received
// sub-blocks.
//
// Reversing the 8b/10b mapping comes from the design description. The error
// flags and the start-up rule are this design's choices: after reset the
// running disparity is unknown, so the first symbol is accepted under either
// disparity and sets it.
//
// Timing: one symbol per clk cycle, op valid one cycle after ip. op_en
// follows ip_en with the same one-cycle delay.
module dec_10b8b
  import enc8b10b_pkg::*;
(
  input  logic       clk,
  input  logic       rst,       // asynchronous, active high
  input  logic       ip_en,     // ip holds a received code group
  input  sym_t       ip,        // a in bit 0 ... j in bit 9
  output logic [7:0] op,        // HGFEDCBA
  output logic       k_out,     // op is a control character
  output logic       op_en,     // op/k_out/errors hold a decoded symbol
  output logic       code_err,  // ip was not a code group
  output logic       disp_err,  // ip had the wrong running disparity
  output logic       rd         // running disparity after the last symbol
);

  logic rd_known;  // a symbol has been received since reset
  dec_t d;

  always_comb d = decode(ip, rd);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      op       <= '0;
      k_out    <= 1'b0;
      op_en    <= 1'b0;
      code_err <= 1'b0;
      disp_err <= 1'b0;
      rd       <= 1'b0;
      rd_known <= 1'b0;
    end else begin
      op_en <= ip_en;
      if (ip_en) begin
        op       <= d.data;
        k_out    <= d.k;
        code_err <= d.code_err;
        disp_err <= d.disp_err && rd_known;
        rd       <= d.rd;
        rd_known <= 1'b1;
      end
    end
  end

endmodule
