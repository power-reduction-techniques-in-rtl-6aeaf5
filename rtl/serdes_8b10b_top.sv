// One 8b/10b serial link: transmitter and receiver side by side.
//
// Transmitter: a 3-bit down ripple counter divides tx_clk by eight and its
// last stage clocks the 8b/10b encoder, which turns one byte (plus a control
// flag) per divided-clock cycle into a 10-bit code group; a 10-bit
// parallel-in serial-out register sends it on serial_out, bit a first.
// Receiver: a 10-bit serial-in parallel-out register rebuilds code groups
// from serial_in, aligned on the K28.5 commas of the idle fill; a second
// ripple counter divides rx_clk by eight and clocks the 10b/8b decoder, which
// returns the byte, the control flag and error flags.
//
// The chain encoder -> serializer -> line -> deserializer -> decoder and
// the ripple counters driving the encoder and decoder clocks follow the
// design description. How the two clock domains of each side relate is this
// design's choice: each side's bit clock must run at exactly ten cycles per
// divided-clock cycle (bit clock = 1.25 x tx_clk or rx_clk), frequency-locked
// and with no bit-clock edge on a divided-clock edge. In a real receiver
// rx_bit_clk and rx_clk come from clock recovery, which is outside this RTL;
// for a loopback test all four clocks may come from one source.
//
// Timing: one character per divided-clock cycle in each direction. tx_en,
// tx_data and tx_k are sampled on the rising edge of tx_word_clk; rx_* change
// on the rising edge of rx_word_clk. While tx_en is low the link carries
// K28.5, which the receiver reports as a control character with rx_valid high.
module serdes_8b10b_top (
  // transmitter
  input  logic       tx_clk,       // divided by eight for the encoder
  input  logic       tx_bit_clk,   // serializer clock, 10 per word
  input  logic       rst,          // asynchronous, active high, both sides
  input  logic       tx_en,        // tx_data/tx_k hold a character
  input  logic [7:0] tx_data,      // HGFEDCBA
  input  logic       tx_k,         // tx_data is a control character
  output logic       tx_word_clk,  // encoder clock
  output logic       tx_k_err,     // undefined control character requested
  output logic       tx_rd,        // transmitter running disparity, 1 = RD+
  output logic       serial_out,
  // receiver
  input  logic       rx_clk,       // divided by eight for the decoder
  input  logic       rx_bit_clk,   // deserializer clock, 10 per word
  input  logic       serial_in,
  output logic       rx_word_clk,  // decoder clock
  output logic [7:0] rx_data,
  output logic       rx_k,
  output logic       rx_valid,     // rx_data/rx_k/errors hold a symbol
  output logic       rx_code_err,
  output logic       rx_disp_err,
  output logic       rx_aligned,   // word boundary found
  output logic       rx_slip,      // a comma moved the word boundary
  output logic       rx_rd         // receiver running disparity, 1 = RD+
);

  import enc8b10b_pkg::*;

  // ---------------- transmitter ----------------
  sym_t       tx_sym;

  ripple_down_counter #(.WIDTH(3)) u_tx_div (
    .clk     (tx_clk),
    .rst     (rst),
    .count   (),
    .clk_div (tx_word_clk)
  );

  enc_8b10b u_enc (
    .clk   (tx_word_clk),
    .rst   (rst),
    .ip_en (tx_en),
    .ip    (tx_data),
    .k_in  (tx_k),
    .op    (tx_sym),
    .op_en (),
    .k_err (tx_k_err),
    .rd    (tx_rd)
  );

  serializer_piso #(.W(SYM_W)) u_ser (
    .bit_clk    (tx_bit_clk),
    .rst        (rst),
    .par_in     (tx_sym),
    .serial_out (serial_out),
    .load       ()
  );

  // ---------------- receiver ----------------
  sym_t       rx_sym;

  deserializer_sipo u_des (
    .bit_clk   (rx_bit_clk),
    .rst       (rst),
    .serial_in (serial_in),
    .par_out   (rx_sym),
    .word_stb  (),
    .aligned   (rx_aligned),
    .slip      (rx_slip)
  );

  ripple_down_counter #(.WIDTH(3)) u_rx_div (
    .clk     (rx_clk),
    .rst     (rst),
    .count   (),
    .clk_div (rx_word_clk)
  );

  dec_10b8b u_dec (
    .clk      (rx_word_clk),
    .rst      (rst),
    .ip_en    (rx_aligned),
    .ip       (rx_sym),
    .op       (rx_data),
    .k_out    (rx_k),
    .op_en    (rx_valid),
    .code_err (rx_code_err),
    .disp_err (rx_disp_err),
    .rd       (rx_rd)
  );

endmodule
