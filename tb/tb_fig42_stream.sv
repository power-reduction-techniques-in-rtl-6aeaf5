// Example stream through the whole link: D0.0, D31.5, D0.0, K28.5.
//
// The four characters are sent after idle fill, with the transmitter's
// running disparity at RD-, through serdes_8b10b_top with its serial output
// looped back. The line bits are recorded and must contain the standard code
// groups in order, bit a first:
//   D0.0 from RD-  100111 0100   (RD- after)
//   D31.5 from RD- 101011 1010   (RD+ after)
//   D0.0 from RD+  011000 1011   (RD+ after)
//   K28.5 from RD+ 110000 0101   (RD- after)
// and the receiver must return the same four characters without errors.
`timescale 1ns/1ps
module tb_fig42_stream;
  logic       clk = 1'b0;
  logic       bit_clk = 1'b0;
  logic       rst;
  logic       tx_en;
  logic [7:0] tx_data;
  logic       tx_k;
  logic       tx_word_clk, tx_k_err, tx_rd, serial_out;
  logic       rx_word_clk;
  logic [7:0] rx_data;
  logic       rx_k, rx_valid, rx_code_err, rx_disp_err, rx_aligned, rx_slip, rx_rd;

  int checks = 0;
  int failures = 0;

  serdes_8b10b_top dut (
    .tx_clk(clk), .tx_bit_clk(bit_clk), .rst(rst),
    .tx_en(tx_en), .tx_data(tx_data), .tx_k(tx_k),
    .tx_word_clk(tx_word_clk), .tx_k_err(tx_k_err), .tx_rd(tx_rd), .serial_out(serial_out),
    .rx_clk(clk), .rx_bit_clk(bit_clk), .serial_in(serial_out),
    .rx_word_clk(rx_word_clk), .rx_data(rx_data), .rx_k(rx_k), .rx_valid(rx_valid),
    .rx_code_err(rx_code_err), .rx_disp_err(rx_disp_err), .rx_aligned(rx_aligned),
    .rx_slip(rx_slip), .rx_rd(rx_rd));

  always #5 clk = ~clk;
  initial begin
    #2;
    forever #4 bit_clk = ~bit_clk;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    #100us;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Line record, one bit per bit clock.
  logic line[$];
  always @(negedge bit_clk) if (!rst) line.push_back(serial_out);

  // Receiver record: characters after the idle fill.
  logic [8:0] rx_chars[$];
  always @(posedge rx_word_clk) begin
    #1;
    if (rx_valid) begin
      check(!rx_code_err && !rx_disp_err, "no receive error");
      if (!(rx_k && rx_data == 8'hBC) || rx_chars.size() > 0) rx_chars.push_back({rx_k, rx_data});
    end
  end

  task automatic tx(input logic en, input logic [7:0] d, input logic k);
    @(negedge tx_word_clk);
    tx_en = en;
    tx_data = d;
    tx_k = k;
    @(posedge tx_word_clk);
  endtask

  initial begin
    string exp_s;
    logic  expected[$];
    int    found;
    tx_en = 1'b0; tx_data = '0; tx_k = 1'b0;
    rst = 1'b1;
    #33 rst = 1'b0;
    repeat (6) tx(1'b0, 8'h00, 1'b0);
    // Idle K28.5 flips the disparity each time: wait for RD- before the data.
    #1 if (tx_rd) tx(1'b0, 8'h00, 1'b0);
    #1 check(tx_rd == 1'b0, "RD- before the example");
    tx(1'b1, 8'h00, 1'b0);  // D0.0
    tx(1'b1, 8'hBF, 1'b0);  // D31.5
    tx(1'b1, 8'h00, 1'b0);  // D0.0
    tx(1'b1, 8'hBC, 1'b1);  // K28.5
    repeat (6) tx(1'b0, 8'h00, 1'b0);
    check(rx_aligned, "receiver aligned");

    exp_s = "1001110100101011101001100010111100000101";
    for (int i = 0; i < exp_s.len(); i++) expected.push_back(exp_s[i] == "1");
    found = 0;
    for (int s = 0; s + 40 <= line.size(); s++) begin
      logic match;
      match = 1'b1;
      for (int i = 0; i < 40; i++) if (line[s+i] != expected[i]) match = 1'b0;
      if (match) found++;
    end
    check(found == 1, "example code groups on the line, once");
    check(rx_chars.size() >= 4, "four characters received");
    if (rx_chars.size() >= 4) begin
      check(rx_chars[0] == {1'b0, 8'h00}, "D0.0 received");
      check(rx_chars[1] == {1'b0, 8'hBF}, "D31.5 received");
      check(rx_chars[2] == {1'b0, 8'h00}, "D0.0 received");
      check(rx_chars[3] == {1'b1, 8'hBC}, "K28.5 received");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
