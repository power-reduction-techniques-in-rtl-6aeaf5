// Self-checking testbench for serializer_piso.
//
// Offers a new random 10-bit word every time the serializer loads one and
// rebuilds the expected line bits itself: word bit 0 first, one bit per
// bit-clock cycle. Checks every line bit, that load comes every W cycles and
// that the first load is on the first bit-clock edge after reset.
`timescale 1ns/1ps
module tb_serializer_piso;
  localparam int unsigned W = 10;

  logic         bit_clk = 1'b0;
  logic         rst;
  logic [W-1:0] par_in;
  logic         serial_out;
  logic         load;

  int checks = 0;
  int failures = 0;

  serializer_piso #(.W(W)) dut (.bit_clk(bit_clk), .rst(rst), .par_in(par_in),
                                .serial_out(serial_out), .load(load));

  always #4 bit_clk = ~bit_clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge bit_clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic expected[$];
    int   since_load;
    int   loads;
    rst = 1'b1;
    par_in = W'($urandom);
    #10;
    // Reset leaves the counter on its last count: the first edge loads.
    check(load == 1'b1, "load armed on first edge after reset");
    for (int i = 0; i < W; i++) expected.push_back(par_in[i]);
    rst = 1'b0;
    since_load = 0;
    loads = 1;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      @(negedge bit_clk);
      since_load++;
      // Line bit during the cycle that began at the last rising edge.
      check(expected.size() > 0, "a word is being sent");
      if (expected.size() > 0) check(serial_out == expected.pop_front(), "line bit");
      if (load) begin
        // The coming edge captures par_in: hold it and queue its bits.
        check(since_load == W, "one load every W cycles");
        for (int i = 0; i < W; i++) expected.push_back(par_in[i]);
        since_load = 0;
        loads++;
      end else begin
        // Other cycles get fresh data, so a load at the wrong edge shows.
        par_in = W'($urandom);
      end
    end
    check(loads == 2000 / W + 1, "number of loads");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
