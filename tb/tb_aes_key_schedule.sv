// tb_aes_key_schedule -- loads cipher keys (FIPS-197 example keys and
// random ones, with and without gaps between key words), captures every
// word written towards the round-key RAM and compares all 44 with the
// reference key expansion. Checks that the 40 computed words come in 40
// consecutive clocks, that keys_valid rises 45 clocks after the first word
// of a gap-free key, and that no key word is taken while allow is low.
module tb_aes_key_schedule;
  import aes_ref_pkg::*;

  logic        clk = 1'b0, rst = 1'b1, allow = 1'b1, key_valid = 1'b0;
  logic [31:0] key_word = '0, ram_wdata;
  logic        key_ready, keys_valid, ram_we;
  logic [5:0]  ram_waddr;
  logic [31:0] got [44];
  int          wcount = 0;
  int unsigned cyc = 0, first_gen = 0, last_gen = 0;
  int checks = 0, failures = 0;

  aes_key_schedule dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (ram_we) begin
      got[ram_waddr] = ram_wdata;
      wcount++;
      if (ram_waddr == 6'd4) first_gen = cyc;
      if (ram_waddr == 6'd43) last_gen = cyc;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run_key(input logic [127:0] key, input bit gaps);
    words_t w;
    int unsigned c0;
    int i = 0;
    wcount = 0;
    while (i < 4) begin
      @(negedge clk);
      if (gaps && ($urandom % 2 == 0)) begin
        key_valid = 1'b0;
        continue;
      end
      key_valid = 1'b1;
      key_word  = key[127 - 32*i -: 32];
      @(posedge clk);
      if (i == 0) c0 = cyc;
      i++;
    end
    @(negedge clk);
    key_valid = 1'b0;
    while (!keys_valid) @(negedge clk);
    if (!gaps) check(cyc - c0 == 45, $sformatf("keys_valid after %0d clocks", cyc - c0));
    check(last_gen - first_gen == 39, "computed words not in consecutive clocks");
    check(wcount == 44, $sformatf("%0d RAM writes", wcount));
    w = expand(key);
    for (int k = 0; k < 44; k++)
      check(got[k] == w[k], $sformatf("w[%0d] = %h, want %h", k, got[k], w[k]));
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    run_key(128'h2b7e151628aed2a6abf7158809cf4f3c, 1'b0);
    check(got[43] == 32'hb6630ca6, "FIPS-197 A.1 w[43]");
    run_key(128'h000102030405060708090a0b0c0d0e0f, 1'b1);
    // a key offered while allow is low is refused
    @(negedge clk);
    allow = 1'b0; key_valid = 1'b1; key_word = 32'h12345678;
    repeat (3) @(negedge clk);
    check(!key_ready && keys_valid && wcount == 44, "key taken while allow low");
    key_valid = 1'b0; allow = 1'b1;
    for (int n = 0; n < 20; n++)
      run_key({$urandom, $urandom, $urandom, $urandom}, n % 2 == 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
