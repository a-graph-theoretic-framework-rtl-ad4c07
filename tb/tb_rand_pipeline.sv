// Testbench for rand_pipeline: random bits each clock; checks that tap[k]
// is the input of k clocks earlier for every k.
module tb_rand_pipeline;
  localparam int unsigned W = 5, DEPTH = 4;
  logic clk = 1'b0;
  logic [W-1:0] rnd;
  logic [DEPTH:0][W-1:0] tap;
  logic [W-1:0] hist [DEPTH+1];
  int checks = 0, failures = 0;

  rand_pipeline #(.W(W), .DEPTH(DEPTH)) dut (.clk, .rnd, .tap);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rnd = '0;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      for (int k = DEPTH; k > 0; k--) hist[k] = hist[k-1];
      rnd = W'($urandom);
      hist[0] = rnd;
      #1;
      if (n >= int'(DEPTH)) begin
        for (int k = 0; k <= int'(DEPTH); k++) begin
          checks++;
          if (tap[k] !== hist[k]) failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
