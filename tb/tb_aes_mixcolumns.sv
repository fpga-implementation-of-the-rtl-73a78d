// tb_aes_mixcolumns -- checks MixColumns and InvMixColumns on the FIPS-197
// example columns and on random columns against full-coefficient reference
// products, and that InvMixColumns undoes MixColumns.
module tb_aes_mixcolumns;
  import aes_ref_pkg::*;

  logic [31:0] a, mix, inv_mix;
  int checks = 0, failures = 0;

  aes_mixcolumns dut (.a(a), .mix(mix), .inv_mix(inv_mix));

  function automatic logic [31:0] ref_prod(input logic [31:0] x, input u8 c0, input u8 c1,
                                           input u8 c2, input u8 c3);
    // row i: c0*x_i ^ c1*x_{i+1} ^ c2*x_{i+2} ^ c3*x_{i+3}
    u8 v [4];
    logic [31:0] r;
    for (int i = 0; i < 4; i++) v[i] = x[31 - 8*i -: 8];
    for (int i = 0; i < 4; i++)
      r[31 - 8*i -: 8] = mul(c0, v[i]) ^ mul(c1, v[(i+1)%4]) ^ mul(c2, v[(i+2)%4]) ^ mul(c3, v[(i+3)%4]);
    return r;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    a = 32'hdb135345; #1;
    check(mix == 32'h8e4da1bc, $sformatf("mix(db135345) = %h", mix));
    a = 32'h8e4da1bc; #1;
    check(inv_mix == 32'hdb135345, $sformatf("inv_mix(8e4da1bc) = %h", inv_mix));
    a = 32'hd4bf5d30; #1;
    check(mix == 32'h046681e5, $sformatf("mix(d4bf5d30) = %h", mix));
    for (int n = 0; n < 2000; n++) begin
      logic [31:0] x;
      x = $urandom;
      a = x; #1;
      check(mix == ref_prod(x, 2, 3, 1, 1), $sformatf("mix(%h) = %h", x, mix));
      check(inv_mix == ref_prod(x, 14, 11, 13, 9), $sformatf("inv_mix(%h) = %h", x, inv_mix));
      a = mix; #1;
      check(inv_mix == x, "inv_mix(mix(x)) != x");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
