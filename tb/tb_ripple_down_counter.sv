// Self-checking testbench for ripple_down_counter.
//
// Drives the external clock and, after every rising edge, compares the count
// with an independently kept model (previous value minus one, modulo 2**W).
// It also checks that clk_div rises exactly once every 2**W input clocks,
// starting with the first clock after reset, and is high for half of them.
// A second reset in mid-count checks the asynchronous reset.
`timescale 1ns/1ps
module tb_ripple_down_counter;
  localparam int unsigned W = 3;

  logic         clk = 1'b0;
  logic         rst;
  logic [W-1:0] count;
  logic         clk_div;

  int checks = 0;
  int failures = 0;

  ripple_down_counter #(.WIDTH(W)) dut (.clk(clk), .rst(rst), .count(count), .clk_div(clk_div));

  always #5 clk = ~clk;

  // Rising edges of the divided clock, counted independently.
  int div_rises = 0;
  always @(posedge clk_div) div_rises++;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t: count=%0d clk_div=%b", what, $time, count, clk_div);
    end
  endtask

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] model;
    int           rises_before;
    int           high_cycles;
    rst = 1'b1;
    #12;
    check(count == '0, "reset value");
    rst = 1'b0;
    model = '0;
    rises_before = div_rises;
    high_cycles = 0;
    for (int n = 0; n < 8 * (1 << W); n++) begin
      @(posedge clk);
      #1;
      model = model - 1'b1;
      check(count == model, "count follows down sequence");
      check(clk_div == model[W-1], "clk_div is the last stage");
      if (clk_div) high_cycles++;
      // One divided-clock rise per 2**W clocks, the first on the first clock.
      check(div_rises - rises_before == (n / (1 << W)) + 1, "divided clock rate");
    end
    check(high_cycles == 8 * (1 << (W - 1)), "divided clock duty cycle");
    // Asynchronous reset in the middle of a count.
    repeat (3) @(posedge clk);
    #2 rst = 1'b1;
    #1 check(count == '0, "asynchronous reset");
    rst = 1'b0;
    @(posedge clk); #1;
    check(count == {W{1'b1}}, "count after reset release");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
