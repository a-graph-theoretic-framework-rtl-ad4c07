// Testbench for hpc3_and: random shares (also dependent ones, b = a) and
// fresh bits every clock. Checks one clock later that the unmasked output is
// a & b and that each share is a_i & b ^ r1 ^ r2.
module tb_hpc3_and;
  import masked_pkg::*;

  logic   clk = 1'b0;
  share_t a, b, z;
  logic   r1, r2;
  int     checks = 0, failures = 0;

  hpc3_and dut (.clk, .a, .b, .r1, .r2, .z);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    share_t pa, pb;
    logic   pr1, pr2;
    a = '0; b = '0; r1 = 1'b0; r2 = 1'b0;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      if (n > 0) begin
        checks += 3;
        if (unmask(z) !== (unmask(pa) & unmask(pb))) failures++;
        if (z[0] !== ((pa[0] & unmask(pb)) ^ pr1 ^ pr2)) failures++;
        if (z[1] !== ((pa[1] & unmask(pb)) ^ pr1 ^ pr2)) failures++;
      end
      a = share_t'($urandom);
      b = (n % 4 == 0) ? a : share_t'($urandom);
      r1 = 1'($urandom); r2 = 1'($urandom);
      pa = a; pb = b; pr1 = r1; pr2 = r2;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
