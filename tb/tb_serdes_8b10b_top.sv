// End-to-end testbench for serdes_8b10b_top with its default parameters.
//
// The transmitter's serial output is looped back to the receiver input. Both
// sides run from one reference: tx_clk = rx_clk with a 10 ns period (word
// clock 80 ns after the divide-by-eight ripple counter) and a bit clock of
// 8 ns (ten bits per word), offset so no bit-clock edge meets a word-clock
// edge. The test sends idle fill, every data byte, all twelve control
// characters, an undefined control character and a long random stream with
// idle gaps, and checks:
//   - every character arrives unchanged, in order, with a constant latency;
//   - eight tx_clk cycles and ten bit clocks per word;
//   - the line never runs more than five equal bits and its running digital
//     sum stays within a band of six;
//   - a bit flipped on the line is reported as a code or disparity error.
// Each mechanism (idle fill, comma alignment, both disparities, the A7
// alternate, every control character, k_err, error detection) is counted and
// a failure is recorded for any that never happened.
`timescale 1ns/1ps
module tb_serdes_8b10b_top;
  import enc8b10b_pkg::K28_5;

  logic       clk = 1'b0;
  logic       bit_clk = 1'b0;
  logic       rst;
  logic       tx_en;
  logic [7:0] tx_data;
  logic       tx_k;
  logic       tx_word_clk, tx_k_err, tx_rd, serial_out;
  logic       serial_in;
  logic       rx_word_clk;
  logic [7:0] rx_data;
  logic       rx_k, rx_valid, rx_code_err, rx_disp_err, rx_aligned, rx_slip, rx_rd;
  logic       flip = 1'b0;  // inverts the line bit while set

  int checks = 0;
  int failures = 0;

  serdes_8b10b_top dut (
    .tx_clk(clk), .tx_bit_clk(bit_clk), .rst(rst),
    .tx_en(tx_en), .tx_data(tx_data), .tx_k(tx_k),
    .tx_word_clk(tx_word_clk), .tx_k_err(tx_k_err), .tx_rd(tx_rd), .serial_out(serial_out),
    .rx_clk(clk), .rx_bit_clk(bit_clk), .serial_in(serial_in),
    .rx_word_clk(rx_word_clk), .rx_data(rx_data), .rx_k(rx_k), .rx_valid(rx_valid),
    .rx_code_err(rx_code_err), .rx_disp_err(rx_disp_err), .rx_aligned(rx_aligned),
    .rx_slip(rx_slip), .rx_rd(rx_rd));

  assign serial_in = serial_out ^ flip;

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
    #5ms;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters ----------------
  int n_idle = 0, n_align = 0, n_rdp = 0, n_rdm = 0, n_a7 = 0, n_kerr = 0, n_err = 0;
  int n_kchar[12];

  function automatic int k_index(input logic [7:0] d);
    case (d)
      8'hF7: return 8;
      8'hFB: return 9;
      8'hFD: return 10;
      8'hFE: return 11;
      default: return (d[4:0] == 5'd28) ? int'(d[7:5]) : -1;
    endcase
  endfunction

  // ---------------- rate checks ----------------
  int clk_per_word = 0, bits_per_word = 0, words_seen = 0;
  always @(posedge clk) clk_per_word++;
  always @(posedge bit_clk) bits_per_word++;
  always @(posedge tx_word_clk) begin
    if (words_seen > 1) begin
      check(clk_per_word == 8, "eight tx_clk cycles per word");
      check(bits_per_word == 10, "ten bit clocks per word");
    end
    words_seen++;
    clk_per_word = 0;
    bits_per_word = 0;
  end

  // ---------------- line checks ----------------
  int run = 0, rds = 0, rds_min = 0, rds_max = 0;
  logic last_bit = 1'b0;
  logic line_check = 1'b0;
  always @(negedge bit_clk) if (line_check && !rst) begin
    run = (serial_out == last_bit) ? run + 1 : 1;
    last_bit = serial_out;
    rds += serial_out ? 1 : -1;
    if (rds < rds_min) rds_min = rds;
    if (rds > rds_max) rds_max = rds;
    checks++;
    if (run > 5) begin
      failures++;
      $display("FAIL run of %0d equal bits at %0t", run, $time);
    end
  end

  // ---------------- transmit side ----------------
  typedef struct packed {
    logic [7:0] d;
    logic       k;
  } chr_t;

  chr_t    exp_q[$];   // characters in flight, recorded once data starts
  realtime t_q[$];     // when each was sampled by the encoder
  logic    started = 1'b0;

  // Applies a character (or idle when en is 0) for one word-clock cycle.
  task automatic tx(input logic en, input logic [7:0] d, input logic k);
    @(negedge tx_word_clk);
    tx_en = en;
    tx_data = d;
    tx_k = k;
    @(posedge tx_word_clk);
    // Sampled on this edge; tx_rd still shows the disparity before it.
    if (!en) n_idle += started;
    if (en) started = 1'b1;
    if (started) begin
      chr_t c;
      logic kk;
      kk = k && (k_index(d) >= 0);
      c.d = en ? d : K28_5;
      c.k = en ? kk : 1'b1;
      exp_q.push_back(c);
      t_q.push_back($realtime);
      if (tx_rd) n_rdp++;
      else n_rdm++;
      if (en && !k && d[7:5] == 3'd7 &&
          ((!tx_rd && (d[4:0] == 5'd17 || d[4:0] == 5'd18 || d[4:0] == 5'd20)) ||
           ( tx_rd && (d[4:0] == 5'd11 || d[4:0] == 5'd13 || d[4:0] == 5'd14)))) n_a7++;
      if (kk) n_kchar[k_index(d)]++;
    end
  endtask

  // ---------------- receive side ----------------
  logic    comparing = 1'b1;
  logic    seen_data = 1'b0;
  int      n_rx = 0;
  realtime latency = -1.0;
  always @(posedge rx_word_clk) begin
    #1;
    if (rx_valid && comparing) begin
      if (!seen_data && !(rx_k && rx_data == K28_5)) seen_data = 1'b1;
      if (seen_data) begin
        chr_t    c;
        realtime t;
        checks++;
        if (exp_q.size() == 0) begin
          failures++;
          $display("FAIL character received with none in flight at %0t", $time);
        end else begin
          c = exp_q.pop_front();
          t = t_q.pop_front();
          if (rx_data != c.d || rx_k != c.k || rx_code_err || rx_disp_err) begin
            failures++;
            $display("FAIL received %h k=%b (errs %b%b), expected %h k=%b at %0t",
                     rx_data, rx_k, rx_code_err, rx_disp_err, c.d, c.k, $time);
          end
          if (latency < 0) latency = $realtime - t;
          else check($realtime - t == latency, "constant latency");
          n_rx++;
        end
      end
    end
  end

  always @(posedge rx_aligned) n_align++;
  always @(posedge tx_k_err) n_kerr++;

  initial begin
    tx_en = 1'b0; tx_data = '0; tx_k = 1'b0;
    rst = 1'b1;
    #33 rst = 1'b0;
    line_check = 1'b1;
    // Idle fill until the receiver has aligned.
    repeat (6) tx(1'b0, 8'h00, 1'b0);
    check(rx_aligned, "receiver aligned during idle");
    // Every data byte, twice, from D0.0.
    for (int p = 0; p < 2; p++)
      for (int b = 0; b < 256; b++) tx(1'b1, 8'(b), 1'b0);
    // The twelve control characters, each from both disparities.
    for (int p = 0; p < 3; p++) begin
      for (int i = 0; i < 8; i++) tx(1'b1, {3'(i), 5'd28}, 1'b1);
      tx(1'b1, 8'hF7, 1'b1);
      tx(1'b1, 8'hFB, 1'b1);
      tx(1'b1, 8'hFD, 1'b1);
      tx(1'b1, 8'hFE, 1'b1);
      tx(1'b1, 8'h00, 1'b0);
    end
    // An undefined control character goes out as data.
    tx(1'b1, 8'h00, 1'b1);
    tx(1'b1, 8'h55, 1'b0);
    // Random data and control characters with idle gaps. After K28.7 the
    // stream avoids K28.x, D3, D11, D12, D19, D20 and D28 (and idle K28.5),
    // which would form a comma across the character boundary.
    begin
      logic after_k28_7;
      after_k28_7 = 1'b0;
      for (int n = 0; n < 3000; n++) begin
        int         r;
        logic [7:0] d;
        logic       k;
        r = $urandom_range(0, 15);
        do begin
          k = (r == 1);
          if (k) begin
            int sel;
            sel = $urandom_range(0, 11);
            d = (sel < 8) ? {3'(sel), 5'd28} :
                (sel == 8 ? 8'hF7 : sel == 9 ? 8'hFB : sel == 10 ? 8'hFD : 8'hFE);
          end else d = 8'($urandom);
          if (r == 0 && after_k28_7) r = 2;
        end while (after_k28_7 && r != 0 &&
                   ((k && d[4:0] == 5'd28) ||
                    (!k && (d[4:0] == 5'd3 || d[4:0] == 5'd11 || d[4:0] == 5'd12 ||
                            d[4:0] == 5'd19 || d[4:0] == 5'd20 || d[4:0] == 5'd28))));
        if (r == 0) tx(1'b0, 8'h00, 1'b0);
        else tx(1'b1, d, k);
        after_k28_7 = (r != 0) && k && (d == 8'hFC);
      end
    end
    // Let the last characters arrive.
    repeat (6) tx(1'b0, 8'h00, 1'b0);
    check(exp_q.size() <= 5, "all characters arrived");
    check(n_rx > 3500, "characters received");
    check(rds_max - rds_min <= 6, "running digital sum within a band of six");

    // Error detection: flip one line bit in each of several data words.
    comparing = 1'b0;
    line_check = 1'b0;
    fork
      begin
        for (int n = 0; n < 40; n++) tx(1'b1, 8'($urandom_range(0, 255)), 1'b0);
      end
      begin
        for (int n = 0; n < 8; n++) begin
          repeat (37 + n) @(posedge bit_clk);
          #1 flip = 1'b1;
          @(posedge bit_clk);
          #1 flip = 1'b0;
        end
      end
      begin
        repeat (40) begin
          @(posedge rx_word_clk);
          #1 if (rx_valid && (rx_code_err || rx_disp_err)) n_err++;
        end
      end
    join

    // Every mechanism must have happened.
    check(n_idle > 0, "idle fill between characters");
    check(n_align > 0, "comma alignment");
    check(n_rdp > 0 && n_rdm > 0, "both running disparities");
    check(n_a7 > 0, "A7 alternate code");
    check(n_kerr > 0, "undefined control character flagged");
    check(n_err > 0, "line error detected");
    for (int i = 0; i < 12; i++) check(n_kchar[i] > 0, "every control character sent");
    $display("mechanisms: idle=%0d align=%0d rd+=%0d rd-=%0d a7=%0d kerr=%0d line_err=%0d rx=%0d latency=%0t",
             n_idle, n_align, n_rdp, n_rdm, n_a7, n_kerr, n_err, n_rx, latency);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
