// Parallel-in serial-out shift register (the link's serializer).
//
// A modulo-W bit counter runs on the bit clock. On the edge where it wraps,
// the shift register loads the W-bit word on par_in; on every other edge it
// shifts right by one. serial_out is bit 0 of the register, so a word is sent
// bit 0 first (bit a of an 8b/10b code group) and bit W-1 last, one bit per
// bit-clock cycle, W cycles per word.
//
// The 10-bit parallel-in serial-out register follows the design description.
// The counter, the load timing and the reset behaviour are this design's
// choices: reset puts the counter on its last count, so the first bit-clock
// edge after reset already loads a word.
//
// Timing: par_in is sampled on the edge where load is high; it must be
// stable then. In the link the word comes from the encoder, clocked by the
// divided clock, which must have exactly one cycle per W bit-clock cycles and
// no edge coinciding with a load edge.
module serializer_piso #(
  parameter int unsigned W = 10
) (
  input  logic         bit_clk,
  input  logic         rst,         // asynchronous, active high
  input  logic [W-1:0] par_in,      // word to send, bit 0 first
  output logic         serial_out,  // line bit
  output logic         load         // par_in is sampled on this edge
);

  logic [$clog2(W)-1:0] cnt;
  logic [W-1:0]         sr;

  assign load       = (cnt == ($clog2(W))'(W - 1));
  assign serial_out = sr[0];

  always_ff @(posedge bit_clk or posedge rst) begin
    if (rst) begin
      cnt <= ($clog2(W))'(W - 1);
      sr  <= '0;
    end else if (load) begin
      cnt <= '0;
      sr  <= par_in;
    end else begin
      cnt <= cnt + 1'b1;
      sr  <= {1'b0, sr[W-1:1]};
    end
  end

endmodule
