// Serial-in parallel-out shift register with comma alignment (the link's
// deserializer).
//
// Each bit-clock edge shifts the line bit in at the top of a 10-bit register,
// so after ten edges the first bit received (a) sits in bit 0, matching the
// encoder's symbol layout. A modulo-10 counter marks word boundaries: when it
// wraps, the word is copied to par_out and word_stb pulses for one cycle.
// The boundary is found from the stream itself: whenever bits a..g of the
// word being assembled form a comma (0011111 or 1100000, carried only by
// K28.1, K28.5 and K28.7), that word is taken as complete at once and the
// counter restarts. aligned goes high with the first comma and stays high; a
// comma that moves the boundary pulses slip.
//
// The 10-bit serial-in parallel-out register follows the design description.
// The comma search is this design's way of finding word boundaries, built on
// the special code groups the description says help the receiver; the
// transmitter sends K28.5 while idle, so a link aligns during its first idle
// symbol. The receiver is assumed to be clocked by a bit clock recovered from
// the line (clock recovery itself is not part of this RTL).
//
// Timing: par_out changes on the edge where word_stb is high and is then held
// for ten bit-clock cycles; a reader in the divided-clock domain samples it
// once per word at a fixed phase.
module deserializer_sipo
  import enc8b10b_pkg::*;
(
  input  logic bit_clk,
  input  logic rst,        // asynchronous, active high
  input  logic serial_in,  // line bit
  output sym_t par_out,    // last complete word, a in bit 0
  output logic word_stb,   // par_out was updated on this edge
  output logic aligned,    // a comma has fixed the word boundary
  output logic slip        // a comma moved the word boundary
);

  logic [3:0] cnt;
  sym_t       sr;
  sym_t       cand;        // register contents after this edge's shift
  logic       comma_here;

  assign cand       = {serial_in, sr[SYM_W-1:1]};
  assign comma_here = (cand[6:0] == COMMA_M) || (cand[6:0] == COMMA_P);

  always_ff @(posedge bit_clk or posedge rst) begin
    if (rst) begin
      cnt      <= '0;
      sr       <= '0;
      par_out  <= '0;
      word_stb <= 1'b0;
      aligned  <= 1'b0;
      slip     <= 1'b0;
    end else begin
      sr <= cand;
      if (comma_here || cnt == 4'(SYM_W - 1)) begin
        cnt      <= '0;
        par_out  <= cand;
        word_stb <= 1'b1;
      end else begin
        cnt      <= cnt + 1'b1;
        word_stb <= 1'b0;
      end
      if (comma_here) aligned <= 1'b1;
      slip <= comma_here && (cnt != 4'(SYM_W - 1));
    end
  end

endmodule
