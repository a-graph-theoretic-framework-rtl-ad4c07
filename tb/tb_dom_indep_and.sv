// Testbench for dom_indep_and: random shares and fresh bits every clock.
// Checks, one clock later, that the unmasked output is a & b and that each
// output share has the closed form z_i = a_i & b ^ r of the gadget.
module tb_dom_indep_and;
  import masked_pkg::*;

  logic   clk = 1'b0;
  share_t a, b, z;
  logic   r;
  int     checks = 0, failures = 0;

  dom_indep_and dut (.clk, .a, .b, .r, .z);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    share_t pa, pb;
    logic   pr;
    a = '0; b = '0; r = 1'b0;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      if (n > 0) begin
        checks += 3;
        if (unmask(z) !== (unmask(pa) & unmask(pb))) failures++;
        if (z[0] !== ((pa[0] & unmask(pb)) ^ pr)) failures++;
        if (z[1] !== ((pa[1] & unmask(pb)) ^ pr)) failures++;
      end
      a = share_t'($urandom); b = share_t'($urandom); r = 1'($urandom);
      pa = a; pb = b; pr = r;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
