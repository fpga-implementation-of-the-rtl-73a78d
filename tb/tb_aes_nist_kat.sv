// tb_aes_nist_kat -- known-answer sweeps in the style of the NIST AES
// validation suite, run on the full core at its default size.
//
// VarTxt: all-zero key, plaintexts with the first i bits set (i = 1..128).
// VarKey: all-zero plaintext, keys with the first i bits set (i = 1..128).
// Every ciphertext is checked against the reference model and decrypted
// back; the first and last vector of each sweep are also checked against
// their published values. Every block must finish 45 clocks after start.
module tb_aes_nist_kat;
  import aes_ref_pkg::*;

  logic        clk = 1'b0, rst = 1'b1;
  logic        key_valid = 1'b0;
  logic [31:0] key_word = '0;
  logic        key_ready, keys_valid;
  logic        start = 1'b0, decrypt = 1'b0;
  logic        ready, in_valid = 1'b0, in_ready;
  logic [31:0] din = '0;
  logic        out_valid;
  logic [31:0] dout;
  logic        busy;
  int checks = 0, failures = 0;
  int unsigned cyc = 0, last_out = 0;
  logic [31:0] outq [$];

  aes_top dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (out_valid) begin outq.push_back(dout); last_out = cyc; end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic load_key(input logic [127:0] key);
    for (int i = 0; i < 4; i++) begin
      @(negedge clk);
      while (!key_ready) @(negedge clk);
      key_valid = 1'b1;
      key_word  = key[127 - 32*i -: 32];
    end
    @(negedge clk);
    key_valid = 1'b0;
    while (!keys_valid) @(negedge clk);
  endtask

  task automatic run_block(input bit dec, input logic [127:0] data, output logic [127:0] res);
    int unsigned c0;
    outq.delete();
    @(negedge clk);
    while (!ready) @(negedge clk);
    start = 1'b1; decrypt = dec;
    @(posedge clk); c0 = cyc;
    @(negedge clk); start = 1'b0;
    for (int i = 0; i < 4; i++) begin
      in_valid = 1'b1;
      din = data[127 - 32*i -: 32];
      @(negedge clk);
    end
    in_valid = 1'b0;
    while (outq.size() < 4) @(negedge clk);
    res = {outq[0], outq[1], outq[2], outq[3]};
    check(last_out - c0 == 45, $sformatf("latency %0d", last_out - c0));
  endtask

  function automatic logic [127:0] ones(input int i);
    return ~(128'h0) << (128 - i);
  endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] ct, back;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;

    // VarTxt
    load_key('0);
    for (int i = 1; i <= 128; i++) begin
      run_block(1'b0, ones(i), ct);
      check(ct == encrypt('0, ones(i)), $sformatf("VarTxt %0d: %h", i, ct));
      if (i == 1)   check(ct == 128'h3ad78e726c1ec02b7ebfe92b23d9ec34, "VarTxt first vector");
      if (i == 128) check(ct == 128'h3f5b8cc9ea855a0afa7347d23e8d664e, "VarTxt last vector");
      run_block(1'b1, ct, back);
      check(back == ones(i), $sformatf("VarTxt %0d decrypt", i));
    end

    // VarKey
    for (int i = 1; i <= 128; i++) begin
      load_key(ones(i));
      run_block(1'b0, '0, ct);
      check(ct == encrypt(ones(i), '0), $sformatf("VarKey %0d: %h", i, ct));
      if (i == 1)   check(ct == 128'h0edd33d3c621e546455bd8ba1418bec8, "VarKey first vector");
      if (i == 128) check(ct == 128'ha1f6258c877d5fcd8964484538bfc92c, "VarKey last vector");
      run_block(1'b1, ct, back);
      check(back == '0, $sformatf("VarKey %0d decrypt", i));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
