// Self-checking testbench for enc_8b10b.
//
// 1. Reference vectors: characters whose code groups are written out below in
//    line order "abcdei fghj" for both running disparities, covering balanced
//    and unbalanced sub-blocks, D.7, x.3, the A7 alternate and control
//    characters. The column is chosen by a running disparity the testbench
//    tracks from the code groups themselves.
// 2. Properties over every data byte and a long random stream: four to six
//    ones per code group, sub-block disparity allowed by the running
//    disparity, no run longer than five bits on the line, no comma in data,
//    and no two characters sharing a code group.
// 3. Idle fill (ip_en low sends K28.5 with op_en low), undefined control
//    characters (k_err), the reset state, and the one-cycle latency.
`timescale 1ns/1ps
module tb_enc_8b10b;
  import enc8b10b_pkg::sym_t;

  logic       clk = 1'b0;
  logic       rst;
  logic       ip_en;
  logic [7:0] ip;
  logic       k_in;
  sym_t       op;
  logic       op_en;
  logic       k_err;
  logic       rd;

  int checks = 0;
  int failures = 0;

  enc_8b10b dut (.clk(clk), .rst(rst), .ip_en(ip_en), .ip(ip), .k_in(k_in),
                 .op(op), .op_en(op_en), .k_err(k_err), .rd(rd));

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t: ip=%h k=%b op=%b", what, $time, ip, k_in, op);
    end
  endtask

  // "abcdei fghj" -> symbol with a in bit 0.
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

  // Testbench's own running disparity and line state.
  logic tb_rd;
  int   run_len;
  logic last_bit;

  // Checks every property of one emitted code group and advances tb_rd.
  task automatic check_code(input sym_t c);
    int o6, o4;
    o6 = $countones(c[5:0]);
    o4 = $countones(c[9:6]);
    check($countones(c) >= 4 && $countones(c) <= 6, "4..6 ones per code group");
    check(tb_rd ? (o6 == 2 || o6 == 3) : (o6 == 3 || o6 == 4), "6b disparity vs RD");
    if (o6 != 3) tb_rd = (o6 > 3);
    check(tb_rd ? (o4 == 1 || o4 == 2) : (o4 == 2 || o4 == 3), "4b disparity vs RD");
    if (o4 != 2) tb_rd = (o4 > 2);
    check(rd == tb_rd, "rd output matches tracked disparity");
    for (int i = 0; i < 10; i++) begin
      if (c[i] == last_bit) run_len++;
      else run_len = 1;
      last_bit = c[i];
    end
    check(run_len <= 5, "run length at most 5");
  endtask

  // Applies one character and returns the registered code group.
  task automatic send(input logic en, input logic [7:0] d, input logic k, output sym_t c);
    @(negedge clk);
    ip_en = en;
    ip = d;
    k_in = k;
    @(posedge clk);
    #1 c = op;
    check(op_en == en, "op_en follows ip_en after one cycle");
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
  sym_t seen[sym_t];  // code group -> {k, byte} it was produced for
  logic [8:0] owner[sym_t];

  initial begin
    sym_t c;
    logic [7:0] d;
    logic       runs_ok;
    vecs = '{
      '{8'h00, 1'b0, "100111 0100", "011000 1011"},  // D0.0
      '{8'hB5, 1'b0, "101010 1010", "101010 1010"},  // D21.5
      '{8'h4A, 1'b0, "010101 0101", "010101 0101"},  // D10.2
      '{8'h63, 1'b0, "110001 1100", "110001 0011"},  // D3.3
      '{8'hE7, 1'b0, "111000 1110", "000111 0001"},  // D7.7
      '{8'hF1, 1'b0, "100011 0111", "100011 0001"},  // D17.7
      '{8'hEB, 1'b0, "110100 1110", "110100 1000"},  // D11.7
      '{8'hBF, 1'b0, "101011 1010", "010100 1010"},  // D31.5
      '{8'h50, 1'b0, "011011 0101", "100100 0101"},  // D16.2
      '{8'hBC, 1'b1, "001111 1010", "110000 0101"},  // K28.5
      '{8'h1C, 1'b1, "001111 0100", "110000 1011"},  // K28.0
      '{8'h3C, 1'b1, "001111 1001", "110000 0110"},  // K28.1
      '{8'hFC, 1'b1, "001111 1000", "110000 0111"},  // K28.7
      '{8'hF7, 1'b1, "111010 1000", "000101 0111"},  // K23.7
      '{8'hFB, 1'b1, "110110 1000", "001001 0111"},  // K27.7
      '{8'hFD, 1'b1, "101110 1000", "010001 0111"},  // K29.7
      '{8'hFE, 1'b1, "011110 1000", "100001 0111"}   // K30.7
    };

    ip_en = 1'b0; ip = '0; k_in = 1'b0;
    rst = 1'b1;
    #12;
    // Reset state: K28.5 in its RD- form, RD+ after it.
    check(op == s2sym("001111 1010"), "reset code is K28.5 RD-");
    check(rd == 1'b1 && op_en == 1'b0, "reset disparity and op_en");
    rst = 1'b0;
    tb_rd = 1'b1;
    run_len = 0;
    last_bit = 1'b0;
    // The first clock after reset sends idle fill from RD+.
    @(posedge clk);
    #1 check(op == s2sym("110000 0101") && op_en == 1'b0, "idle K28.5 RD+ after reset");
    check_code(op);

    // 1. Reference vectors, each twice in a row and after a D0.0 so both
    //    columns are reached.
    for (int pass = 0; pass < 3; pass++)
      foreach (vecs[i]) begin
        for (int rep = 0; rep < 2 + pass; rep++) begin
          logic rd_before;
          rd_before = tb_rd;
          send(1'b1, vecs[i].d, vecs[i].k, c);
          check(c == s2sym(rd_before ? vecs[i].rdp : vecs[i].rdm), "reference code group");
          check_code(c);
          check(k_err == 1'b0, "no k_err on defined characters");
        end
      end

    // 2. Every data byte from both disparities, then a random stream.
    for (int pass = 0; pass < 2; pass++)
      for (int b = 0; b < 256; b++) begin
        logic rd_before;
        rd_before = tb_rd;
        send(1'b1, 8'(b), 1'b0, c);
        check_code(c);
        check(!((c[6:0] == 7'b1111100) || (c[6:0] == 7'b0000011)), "no comma in data");
        if (owner.exists(c)) check(owner[c] == {1'b0, 8'(b)}, "code group unique to one character");
        else owner[c] = {1'b0, 8'(b)};
      end
    for (int n = 0; n < 3000; n++) begin
      logic k;
      k = ($urandom_range(0, 7) == 0);
      if (k) begin
        int sel;
        sel = $urandom_range(0, 11);
        d = (sel < 8) ? {3'(sel), 5'd28} : (sel == 8 ? 8'hF7 : sel == 9 ? 8'hFB : sel == 10 ? 8'hFD : 8'hFE);
      end else d = 8'($urandom);
      send(1'b1, d, k, c);
      check_code(c);
      if (owner.exists(c)) check(owner[c] == {k, d}, "code group unique to one character");
      else owner[c] = {k, d};
    end
    check(owner.num() > 256, "both disparity columns reached");

    // 3. Idle fill and an undefined control character.
    for (int n = 0; n < 4; n++) begin
      logic rd_before;
      rd_before = tb_rd;
      send(1'b0, 8'h55, 1'b0, c);
      check(c == s2sym(rd_before ? "110000 0101" : "001111 1010"), "idle sends K28.5");
      check_code(c);
    end
    begin
      logic rd_before;
      rd_before = tb_rd;
      send(1'b1, 8'h00, 1'b1, c);
      check(k_err == 1'b1, "k_err on undefined control character");
      check(c == s2sym(rd_before ? "011000 1011" : "100111 0100"), "undefined K sent as data");
      check_code(c);
    end
    send(1'b1, 8'h00, 1'b0, c);
    check(k_err == 1'b0, "k_err clears");
    check_code(c);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
