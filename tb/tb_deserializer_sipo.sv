// Self-checking testbench for deserializer_sipo.
//
// Sends a bit stream of 10-bit code groups, bit a first, starting after a
// random number of filler bits so the word boundary is unknown. The stream
// mixes K28.5 commas of both disparities with data code groups. Checks that
// the deserializer aligns on the first comma, that every later word equals
// the code group sent, that word_stb comes every ten bit clocks, and that an
// inserted extra bit is caught by the next comma (slip) after which the words
// are correct again.
`timescale 1ns/1ps
module tb_deserializer_sipo;
  import enc8b10b_pkg::sym_t;

  logic bit_clk = 1'b0;
  logic rst;
  logic serial_in;
  sym_t par_out;
  logic word_stb, aligned, slip;

  int checks = 0;
  int failures = 0;

  deserializer_sipo dut (.bit_clk(bit_clk), .rst(rst), .serial_in(serial_in),
                         .par_out(par_out), .word_stb(word_stb), .aligned(aligned), .slip(slip));

  always #4 bit_clk = ~bit_clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t: par_out=%b", what, $time, par_out);
    end
  endtask

  function automatic sym_t s2sym(input string s);
    sym_t r;
    int   j;
    j = 0;
    r = '0;
    for (int i = 0; i < s.len(); i++)
      if (s[i] == "0" || s[i] == "1") begin
        r[j] = (s[i] == "1");
        j++;
      end
    return r;
  endfunction

  initial begin : watchdog
    repeat (20000) @(posedge bit_clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  sym_t sent[$];    // words in line order
  int   slips = 0;
  int   stb_gap = 0;

  // One bit per bit clock, changed on the falling edge.
  task automatic send_bit(input logic b);
    @(negedge bit_clk);
    serial_in = b;
  endtask

  task automatic send_word(input sym_t w);
    sent.push_back(w);
    for (int i = 0; i < 10; i++) send_bit(w[i]);
  endtask

  // Word checker: after alignment every strobed word must be the next one
  // sent. Words sent before the first comma are dropped from the queue.
  logic checking = 1'b0;
  int   words_ok = 0;
  always @(posedge bit_clk) begin
    #1;
    if (slip) slips++;
    if (word_stb && aligned && checking) begin
      sym_t w;
      w = sent.pop_front();
      checks++;
      if (par_out != w) begin
        failures++;
        $display("FAIL word at %0t: got %b expected %b", $time, par_out, w);
      end else words_ok++;
    end
  end

  initial begin
    sym_t d_codes[4];
    d_codes[0] = s2sym("101010 1010");  // D21.5
    d_codes[1] = s2sym("010101 0101");  // D10.2
    d_codes[2] = s2sym("110001 1100");  // D3.3 RD-
    d_codes[3] = s2sym("100011 0111");  // D17.7 RD-
    serial_in = 1'b0;
    rst = 1'b1;
    #10 rst = 1'b0;
    check(!aligned, "not aligned after reset");
    // Filler bits: alternating, no comma.
    for (int i = 0; i < 3 + $urandom_range(0, 9); i++) send_bit(i[0]);
    // First comma: the checker starts with the word after it.
    send_word(s2sym("001111 1010"));  // K28.5 RD-
    @(posedge bit_clk); #2;
    check(aligned, "aligned on first comma");
    check(par_out == s2sym("001111 1010"), "comma word delivered");
    void'(sent.pop_front());
    checking = 1'b1;
    // This bit belongs to the next word; it was already on the line.
    for (int n = 0; n < 200; n++) begin
      if (n % 10 == 0) send_word(n % 20 == 0 ? s2sym("110000 0101") : s2sym("001111 1010"));
      else send_word(d_codes[$urandom_range(0, 3)]);
    end
    check(slips == 1 || slips == 0, "no slip while aligned");
    begin
      int slips_before;
      slips_before = slips;
      // One extra bit on the line, then data until the next comma realigns.
      checking = 1'b0;
      send_bit(1'b0);
      send_word(d_codes[0]);
      send_word(d_codes[1]);
      sent.delete();
      send_word(s2sym("001111 1010"));
      @(posedge bit_clk); #2;
      check(slips == slips_before + 1, "extra bit caught as slip");
      check(par_out == s2sym("001111 1010"), "realigned on comma");
      void'(sent.pop_front());
      checking = 1'b1;
    end
    for (int n = 0; n < 100; n++) begin
      if (n % 10 == 0) send_word(s2sym("110000 0101"));
      else send_word(d_codes[$urandom_range(0, 3)]);
    end
    @(posedge bit_clk);
    #3 checking = 1'b0;
    check(sent.size() == 0, "every word sent was delivered");
    check(words_ok >= 290, "words delivered after alignment");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // word_stb spacing once aligned: exactly ten bit clocks, except at a slip.
  always @(posedge bit_clk) begin
    #1;
    if (word_stb) begin
      if (aligned && checking && !slip && stb_gap != 0) begin
        checks++;
        if (stb_gap != 10) begin
          failures++;
          $display("FAIL word_stb spacing %0d at %0t", stb_gap, $time);
        end
      end
      stb_gap = 1;
    end else stb_gap++;
  end
endmodule
