// Testbench for share_pipe: a 3-deep, 4-bit pipe fed with random shares;
// checks that q equals d exactly three clocks earlier.
module tb_share_pipe;
  import masked_pkg::*;

  localparam int unsigned W = 4, DEPTH = 3;
  logic clk = 1'b0;
  share_t [W-1:0] d, q;
  share_t [W-1:0] hist [$];
  int checks = 0, failures = 0;

  share_pipe #(.W(W), .DEPTH(DEPTH)) dut (.clk, .d, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '0;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      if (hist.size() == DEPTH) begin
        checks++;
        if (q !== hist.pop_front()) failures++;
      end
      d = (2*W)'($urandom);
      hist.push_back(d);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
