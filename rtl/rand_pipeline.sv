// rand_pipeline: randomness-delivery pipeline of a pipelined masked circuit.
//
// The W physical random bits of one operation are applied together with its
// input shares. Gadgets at logic level k latch their inputs k clocks later,
// so the bits are forwarded through DEPTH register stages that mirror the
// circuit's depth: level k reads tap[k], which is rnd delayed by k clocks
// (tap[0] is rnd itself). A physical bit shared by gadgets at different
// levels thus always carries the value of the same operation. No reset.
module rand_pipeline #(
  parameter int unsigned W     = 8,
  parameter int unsigned DEPTH = 4
) (
  input  logic                       clk,
  input  logic [W-1:0]               rnd,
  output logic [DEPTH:0][W-1:0]      tap
);

  logic [W-1:0] stage [DEPTH];

  always_ff @(posedge clk) begin
    stage[0] <= rnd;
    for (int s = 1; s < int'(DEPTH); s++) stage[s] <= stage[s-1];
  end

  always_comb begin
    tap[0] = rnd;
    for (int s = 1; s <= int'(DEPTH); s++) tap[s] = stage[s-1];
  end

endmodule
