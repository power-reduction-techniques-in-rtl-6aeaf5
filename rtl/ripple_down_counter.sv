// Asynchronous (ripple) down counter used as the clock divider of the link.
//
// Stage 0 is a toggle flip-flop clocked by the rising edge of the external
// clock; every later stage toggles on the rising edge of the previous stage's
// output. A stage's output rises exactly when the stages below it wrap from
// all-zeros to all-ones, so the count goes 0, 7, 6, ..., 1, 0 for WIDTH = 3.
// The last stage's output, clk_div, is the input clock divided by 2**WIDTH
// with a 50 % duty cycle, and is used as the clock of the encoder and the
// decoder; its first rising edge comes with the first clk edge after reset.
//
// The counter structure, its three stages, the down direction and the
// rising-edge clocking of every stage follow the design description. The
// asynchronous active-high reset to zero is this design's choice.
//
// Interface: clk, rst (asynchronous, active high) in; count (WIDTH bits) and
// clk_div out. Each stage adds one flip-flop clock-to-output delay, so
// clk_div lags clk by WIDTH flip-flop delays in silicon; in RTL simulation
// the stages settle within the same time step.
module ripple_down_counter #(
  parameter int unsigned WIDTH = 3
) (
  input  logic             clk,
  input  logic             rst,
  output logic [WIDTH-1:0] count,
  output logic             clk_div
);

  // Clock of each stage: the external clock for stage 0, else the output of
  // the stage below.
  logic [WIDTH-1:0] stage_clk;

  assign stage_clk[0] = clk;

  for (genvar i = 1; i < WIDTH; i++) begin : g_clk
    assign stage_clk[i] = count[i-1];
  end

  // Each stage is its own toggle flip-flop with its own clock.
  for (genvar i = 0; i < WIDTH; i++) begin : g_stage
    logic q;
    always_ff @(posedge stage_clk[i] or posedge rst) begin
      if (rst) q <= 1'b0;
      else     q <= ~q;
    end
    assign count[i] = q;
  end

  assign clk_div = count[WIDTH-1];

endmodule
