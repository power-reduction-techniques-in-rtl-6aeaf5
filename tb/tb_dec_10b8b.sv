// Self-checking testbench for dec_10b8b.
//
// 1. Reference code groups written out in line order "abcdei fghj" (both
//    running disparities) must decode to their characters without errors.
// 2. A stream produced by the encoder (every data byte twice, then random
//    data and control characters) must decode to the bytes that were sent.
// 3. Error detection: a code group of the wrong running disparity sets
//    disp_err only, words that are no code group (all ones, a misused A7)
//    set code_err, and the first symbol after reset is accepted under either
//    disparity. op_en follows ip_en with one cycle of latency.
`timescale 1ns/1ps
module tb_dec_10b8b;
  import enc8b10b_pkg::sym_t;

  logic       clk = 1'b0;
  logic       rst;
  // decoder under test
  logic       ip_en;
  sym_t       ip;
  logic [7:0] op;
  logic       k_out, op_en, code_err, disp_err, rd;
  // encoder used as a stimulus source
  logic       e_en;
  logic [7:0] e_d;
  logic       e_k;
  sym_t       e_op;
  logic       e_op_en, e_kerr, e_rd;

  int checks = 0;
  int failures = 0;

  dec_10b8b dut (.clk(clk), .rst(rst), .ip_en(ip_en), .ip(ip), .op(op), .k_out(k_out),
                 .op_en(op_en), .code_err(code_err), .disp_err(disp_err), .rd(rd));

  enc_8b10b u_src (.clk(clk), .rst(rst), .ip_en(e_en), .ip(e_d), .k_in(e_k), .op(e_op),
                   .op_en(e_op_en), .k_err(e_kerr), .rd(e_rd));

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t: ip=%b op=%h k=%b cerr=%b derr=%b", what, $time, ip, op,
               k_out, code_err, disp_err);
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

  // Running disparity after a code group, from its sub-blocks.
  function automatic logic rd_after(input logic r, input sym_t c);
    logic x;
    x = r;
    if ($countones(c[5:0]) != 3) x = ($countones(c[5:0]) > 3);
    if ($countones(c[9:6]) != 2) x = ($countones(c[9:6]) > 2);
    return x;
  endfunction

  // Presents one word to the decoder and checks its outputs.
  task automatic rx(input logic en, input sym_t w, input logic [7:0] d, input logic k,
                    input logic cerr, input logic derr, input string what);
    @(negedge clk);
    ip_en = en;
    ip = w;
    @(posedge clk);
    #1;
    check(op_en == en, {what, ": op_en"});
    if (en) begin
      check(code_err == cerr, {what, ": code_err"});
      check(disp_err == derr, {what, ": disp_err"});
      if (!cerr) check(op == d && k_out == k, {what, ": character"});
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct {
    logic [7:0] d;
    logic       k;
    string      rdm;
    string      rdp;
  } vec_t;

  vec_t vecs[$];

  initial begin
    logic       trd;
    logic [7:0] q_d[$];
    logic       q_k[$];
    vecs = '{
      '{8'h00, 1'b0, "100111 0100", "011000 1011"},  // D0.0
      '{8'hB5, 1'b0, "101010 1010", "101010 1010"},  // D21.5
      '{8'h63, 1'b0, "110001 1100", "110001 0011"},  // D3.3
      '{8'hE7, 1'b0, "111000 1110", "000111 0001"},  // D7.7
      '{8'hF1, 1'b0, "100011 0111", "100011 0001"},  // D17.7
      '{8'hEB, 1'b0, "110100 1110", "110100 1000"},  // D11.7
      '{8'hBF, 1'b0, "101011 1010", "010100 1010"},  // D31.5
      '{8'hBC, 1'b1, "001111 1010", "110000 0101"},  // K28.5
      '{8'h3C, 1'b1, "001111 1001", "110000 0110"},  // K28.1
      '{8'hDC, 1'b1, "001111 0110", "110000 1001"},  // K28.6
      '{8'hFC, 1'b1, "001111 1000", "110000 0111"},  // K28.7
      '{8'hF7, 1'b1, "111010 1000", "000101 0111"},  // K23.7
      '{8'hFE, 1'b1, "011110 1000", "100001 0111"}   // K30.7
    };
    ip_en = 1'b0; ip = '0; e_en = 1'b0; e_d = '0; e_k = 1'b0;
    rst = 1'b1;
    #12 rst = 1'b0;
    check(op_en == 1'b0 && code_err == 1'b0 && disp_err == 1'b0, "reset outputs");

    // First symbol after reset: an RD+ code group is accepted.
    rx(1'b1, s2sym("011000 1011"), 8'h00, 1'b0, 1'b0, 1'b0, "first symbol RD+");
    trd = 1'b1;  // D0.0 ends with an unbalanced 4b block 1011: RD+
    rx(1'b0, '0, 8'h00, 1'b0, 1'b0, 1'b0, "idle input");

    // 1. Reference code groups.
    for (int pass = 0; pass < 3; pass++)
      foreach (vecs[i])
        for (int rep = 0; rep < 1 + pass; rep++) begin
          sym_t w;
          w = s2sym(trd ? vecs[i].rdp : vecs[i].rdm);
          rx(1'b1, w, vecs[i].d, vecs[i].k, 1'b0, 1'b0, "reference");
          check(rd == rd_after(trd, w), "reference: rd");
          trd = rd_after(trd, w);
        end

    // 3. Errors.
    begin
      sym_t w;
      w = s2sym(trd ? "100111 0100" : "011000 1011");  // D0.0 of the wrong column
      rx(1'b1, w, 8'h00, 1'b0, 1'b0, 1'b1, "wrong disparity");
      trd = rd_after(trd, w);
      rx(1'b1, s2sym("111111 1111"), 8'h00, 1'b0, 1'b1, 1'b0, "all ones");
      trd = rd_after(trd, s2sym("111111 1111"));
      // Bring RD to + with D0.0, then D17.7 with A7 is only legal from RD-.
      w = s2sym(trd ? "011000 1011" : "100111 0100");
      rx(1'b1, w, 8'h00, 1'b0, 1'b0, 1'b0, "D0.0 after error");
      trd = rd_after(trd, w);
      if (trd) begin
        rx(1'b1, s2sym("100011 1000"), 8'hF1, 1'b0, 1'b1, 1'b0, "misused A7");
        trd = rd_after(trd, s2sym("100011 1000"));
      end else begin
        rx(1'b1, s2sym("110100 0111"), 8'hEB, 1'b0, 1'b1, 1'b0, "misused A7");
        trd = rd_after(trd, s2sym("110100 0111"));
      end
      // Resynchronise the testbench's disparity with the decoder's.
      check(rd == trd, "rd follows received sub-blocks after errors");
    end

    // 2. Encoder-generated stream. The decoder's rd has followed the
    //    received words; the encoder starts from its own state, so a first
    //    disparity error is possible and is skipped.
    for (int n = 0; n < 512 + 3000 + 2; n++) begin
      logic [7:0] d;
      logic       k;
      if (n < 512) begin
        d = 8'(n);
        k = 1'b0;
      end else begin
        k = ($urandom_range(0, 7) == 0);
        if (k) begin
          int sel;
          sel = $urandom_range(0, 11);
          d = (sel < 8) ? {3'(sel), 5'd28} :
              (sel == 8 ? 8'hF7 : sel == 9 ? 8'hFB : sel == 10 ? 8'hFD : 8'hFE);
        end else d = 8'($urandom);
      end
      @(negedge clk);
      ip_en = e_op_en;
      ip    = e_op;
      e_en  = 1'b1;
      e_d   = d;
      e_k   = k;
      q_d.push_back(d);
      q_k.push_back(k);
      @(posedge clk);
      #1;
      if (n >= 1) begin
        logic [7:0] xd;
        logic       xk;
        xd = q_d.pop_front();
        xk = q_k.pop_front();
        check(op_en == 1'b1, "stream: op_en");
        check(op == xd && k_out == xk, "stream: character");
        check(code_err == 1'b0, "stream: code_err");
        if (n > 1) check(disp_err == 1'b0, "stream: disp_err");
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
