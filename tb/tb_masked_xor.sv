// Testbench for masked_xor: random 8-bit masked words; checks each share
// and the unmasked result x ^ y.
module tb_masked_xor;
  import masked_pkg::*;

  localparam int unsigned W = 8;
  share_t [W-1:0] x, y, z;
  int checks = 0, failures = 0;

  masked_xor #(.W(W)) dut (.x, .y, .z);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 300; n++) begin
      x = (2*W)'($urandom); y = (2*W)'($urandom);
      #1;
      for (int i = 0; i < int'(W); i++) begin
        checks += 3;
        if (z[i][0] !== (x[i][0] ^ y[i][0])) failures++;
        if (z[i][1] !== (x[i][1] ^ y[i][1])) failures++;
        if (unmask(z[i]) !== (unmask(x[i]) ^ unmask(y[i]))) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
