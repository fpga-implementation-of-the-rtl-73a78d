// tb_aes_top -- end-to-end test of the AES-128 core at its default size.
//
// Loads cipher keys, encrypts and decrypts blocks and compares every result
// with the behavioural reference in aes_ref_pkg, starting with the two
// FIPS-197 example vectors. It also checks the timing: 45 clocks from the
// first key word to keys_valid, and 45 clocks from start to the last output
// word when the input words come without gaps (plus one per gap). The test
// makes each mechanism of the design happen and counts it: encryption,
// decryption, a switch of direction between blocks, the forwarding path,
// input gaps (stall), key reloads, a key offer refused while a block is in
// flight, and a start taken in the clock of the previous block's last word.
module tb_aes_top;
  import aes_ref_pkg::*;

  logic        clk = 1'b0;
  logic        rst = 1'b1;
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
  int unsigned cyc = 0;

  // mechanism counters
  int n_enc = 0, n_dec = 0, n_switch = 0, n_fwd = 0, n_stall = 0;
  int n_keyload = 0, n_key_refused = 0, n_back2back = 0;

  aes_top dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (dut.u_ctrl.fwd != '0) n_fwd++;
    if (in_ready && !in_valid) n_stall++;
    if (busy && !key_ready) n_key_refused++;
  end

  // output monitor
  logic [31:0]  outq [$];
  int unsigned  last_out_cyc;
  always @(posedge clk) if (out_valid) begin
    outq.push_back(dout);
    last_out_cyc = cyc;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic load_key(input logic [127:0] key, input bit gaps);
    int unsigned c0;
    int i = 0;
    n_keyload++;
    while (i < 4) begin
      @(negedge clk);
      if (gaps && ($urandom % 3 == 0)) begin
        key_valid = 1'b0;
        continue;
      end
      key_valid = 1'b1;
      key_word  = key[127 - 32*i -: 32];
      @(posedge clk);
      if (key_ready) begin
        if (i == 0) c0 = cyc;
        i++;
      end
    end
    @(negedge clk);
    key_valid = 1'b0;
    while (!keys_valid) @(negedge clk);
    if (!gaps)
      check(cyc - c0 == 45, $sformatf("key schedule took %0d clocks, expected 45", cyc - c0));
  endtask

  bit last_mode = 1'b0;
  bit first_block = 1'b1;

  task automatic run_block(input bit dec, input logic [127:0] data, input bit gaps,
                           output logic [127:0] res);
    int unsigned c0;
    int ngap = 0;
    int i = 0;
    outq.delete();
    @(negedge clk);
    while (!ready) @(negedge clk);
    if (out_valid) n_back2back++;
    start   = 1'b1;
    decrypt = dec;
    @(posedge clk);
    c0 = cyc;
    @(negedge clk);
    start = 1'b0;
    while (i < 4) begin
      if (gaps && ($urandom % 2 == 0)) begin
        in_valid = 1'b0;
        ngap++;
        @(negedge clk);
        continue;
      end
      in_valid = 1'b1;
      din      = data[127 - 32*i -: 32];
      check(in_ready, "in_ready low during load");
      @(negedge clk);
      i++;
    end
    in_valid = 1'b0;
    while (outq.size() < 4) @(negedge clk);
    res = {outq[0], outq[1], outq[2], outq[3]};
    check(last_out_cyc - c0 == 45 + ngap,
          $sformatf("block latency %0d, expected %0d", last_out_cyc - c0, 45 + ngap));
    if (dec) n_dec++; else n_enc++;
    if (!first_block && dec != last_mode) n_switch++;
    last_mode   = dec;
    first_block = 1'b0;
  endtask

  task automatic enc_dec(input logic [127:0] key, input logic [127:0] pt, input bit gaps);
    logic [127:0] ct, got;
    ct = encrypt(key, pt);
    run_block(1'b0, pt, gaps, got);
    check(got == ct, $sformatf("encrypt %h: got %h want %h", pt, got, ct));
    run_block(1'b1, ct, gaps, got);
    check(got == pt, $sformatf("decrypt %h: got %h want %h", ct, got, pt));
  endtask

  // watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] key, pt, got;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;

    // reference model against FIPS-197 Appendix C.1 and B
    check(encrypt(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff)
          == 128'h69c4e0d86a7b0430d8cdb78070b4c55a, "reference model, FIPS-197 C.1");

    // FIPS-197 C.1
    load_key(128'h000102030405060708090a0b0c0d0e0f, 1'b0);
    run_block(1'b0, 128'h00112233445566778899aabbccddeeff, 1'b0, got);
    check(got == 128'h69c4e0d86a7b0430d8cdb78070b4c55a, $sformatf("C.1 encrypt got %h", got));
    run_block(1'b1, 128'h69c4e0d86a7b0430d8cdb78070b4c55a, 1'b0, got);
    check(got == 128'h00112233445566778899aabbccddeeff, $sformatf("C.1 decrypt got %h", got));

    // FIPS-197 Appendix B
    load_key(128'h2b7e151628aed2a6abf7158809cf4f3c, 1'b0);
    run_block(1'b0, 128'h3243f6a8885a308d313198a2e0370734, 1'b0, got);
    check(got == 128'h3925841d02dc09fbdc118597196a0b32, $sformatf("B encrypt got %h", got));

    // random keys and blocks, back-to-back and with input gaps
    for (int k = 0; k < 6; k++) begin
      key = {$urandom, $urandom, $urandom, $urandom};
      load_key(key, k % 2 == 1);
      for (int b = 0; b < 4; b++) begin
        pt = {$urandom, $urandom, $urandom, $urandom};
        enc_dec(key, pt, b % 2 == 1);
      end
      // same direction twice in a row, started in the last-output clock
      pt = {$urandom, $urandom, $urandom, $urandom};
      fork
        run_block(1'b0, pt, 1'b0, got);
        begin
          // offer a key word while the block is in flight: it must be refused
          repeat (10) @(negedge clk);
          check(!key_ready, "key accepted while busy");
        end
      join
      check(got == encrypt(key, pt), "encrypt after encrypt");
    end

    // two blocks back to back: the second start is taken in the clock of the
    // first block's last output word
    begin
      logic [127:0] p1, p2;
      int unsigned c1;
      p1 = {$urandom, $urandom, $urandom, $urandom};
      p2 = {$urandom, $urandom, $urandom, $urandom};
      outq.delete();
      for (int b = 0; b < 2; b++) begin
        @(negedge clk);
        while (!ready) @(negedge clk);
        if (out_valid) n_back2back++;
        start   = 1'b1;
        decrypt = 1'b0;
        @(posedge clk);
        if (b == 0) c1 = cyc;
        @(negedge clk);
        start = 1'b0;
        for (int i = 0; i < 4; i++) begin
          in_valid = 1'b1;
          din      = (b == 0) ? p1[127 - 32*i -: 32] : p2[127 - 32*i -: 32];
          @(negedge clk);
        end
        in_valid = 1'b0;
      end
      while (outq.size() < 8) @(negedge clk);
      check({outq[0], outq[1], outq[2], outq[3]} == encrypt(key, p1), "back-to-back block 1");
      check({outq[4], outq[5], outq[6], outq[7]} == encrypt(key, p2), "back-to-back block 2");
      check(last_out_cyc - c1 == 90, $sformatf("two blocks took %0d clocks, expected 90",
                                               last_out_cyc - c1));
    end

    $display("mechanisms: enc=%0d dec=%0d switch=%0d fwd=%0d stall=%0d keyload=%0d key_refused=%0d back2back=%0d",
             n_enc, n_dec, n_switch, n_fwd, n_stall, n_keyload, n_key_refused, n_back2back);
    check(n_enc > 0, "no encryption");
    check(n_dec > 0, "no decryption");
    check(n_switch > 0, "no direction switch");
    check(n_fwd > 0, "forwarding never used");
    check(n_stall > 0, "no input stall");
    check(n_keyload > 1, "no key reload");
    check(n_key_refused > 0, "no key refused while busy");
    check(n_back2back > 0, "no start in the last-output clock");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
