// tb_aes_sbox_bram -- checks all 512 words of the S-box ROM on both ports
// against the reference S-box and its inverse, including the one-clock
// read latency and that the output holds while en is low.
module tb_aes_sbox_bram;
  import aes_ref_pkg::*;

  logic       clk = 1'b0, en = 1'b0, rst = 1'b1;
  logic [8:0] addra = '0, addrb = '0;
  logic [7:0] doa, dob;
  int checks = 0, failures = 0;

  aes_sbox_bram dut (.*);
  always #5 clk = ~clk;

  function automatic logic [7:0] expect_word(input logic [8:0] a);
    return a[8] ? ref_inv_sbox(a[7:0]) : ref_sbox(a[7:0]);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk) rst = 1'b0;
    check(ref_sbox(8'h00) == 8'h63 && ref_sbox(8'h53) == 8'hed && ref_inv_sbox(8'h63) == 8'h00,
          "reference S-box spot values");
    en = 1'b1;
    for (int i = 0; i < 512; i++) begin
      addra = 9'(i);
      addrb = 9'(511 - i);
      @(posedge clk);
      #1;
      check(doa == expect_word(9'(i)), $sformatf("port A addr %h: %h", i, doa));
      check(dob == expect_word(9'(511 - i)), $sformatf("port B addr %h: %h", 511 - i, dob));
      @(negedge clk);
    end
    // hold while disabled
    addra = 9'h053; addrb = 9'h163;
    @(posedge clk); #1;
    en = 1'b0; addra = 9'h001; addrb = 9'h001;
    @(posedge clk); #1;
    check(doa == 8'hed && dob == 8'h00, "output held while en is low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
