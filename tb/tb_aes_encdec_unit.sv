// tb_aes_encdec_unit -- runs the folded datapath under its sequencer, with
// a behavioural round-key RAM filled from the reference key expansion, and
// compares every encrypted and decrypted block with the reference cipher
// (FIPS-197 C.1 first, then random keys and blocks). Checks the four output
// words arrive in consecutive clocks, 45 clocks after start.
module tb_aes_encdec_unit;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  logic        clk = 1'b0, rst = 1'b1;
  logic        start = 1'b0, decrypt_in = 1'b0, in_valid = 1'b0;
  logic        ready, in_ready, out_valid, busy, dec_mode;
  logic [0:3][3:0] tap;
  logic [0:3]  fwd;
  logic        sel_input, sel_invmix, sel_rkey, wr_en;
  logic [5:0]  key_addr;
  col_t        din = '0, subkey, dout;
  words_t      w;
  int unsigned cyc = 0, last_out = 0;
  logic [31:0] outq [$];
  int checks = 0, failures = 0;

  aes_controller #(.DEPTH(16)) u_ctrl (.clk, .rst, .keys_valid(1'b1), .start, .decrypt_in,
    .ready, .in_valid, .in_ready, .out_valid, .busy, .decrypt(dec_mode), .tap, .fwd, .sel_input,
    .sel_invmix, .sel_rkey, .wr_en, .key_addr);

  aes_encdec_unit #(.DEPTH(16)) dut (.clk, .rst, .decrypt(dec_mode), .tap, .fwd, .sel_input,
    .sel_invmix, .sel_rkey, .wr_en, .din, .subkey, .dout);

  always #5 clk = ~clk;

  // behavioural synchronous round-key RAM
  always @(posedge clk) subkey <= (key_addr < 6'd44) ? w[key_addr] : '0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (out_valid) begin outq.push_back(dout); last_out = cyc; end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic block(input bit dec, input logic [127:0] data, output logic [127:0] res);
    int unsigned c0;
    outq.delete();
    @(negedge clk);
    while (!ready) @(negedge clk);
    start = 1'b1; decrypt_in = dec;
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

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] key, pt, got;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    key = 128'h000102030405060708090a0b0c0d0e0f;
    w = expand(key);
    block(1'b0, 128'h00112233445566778899aabbccddeeff, got);
    check(got == 128'h69c4e0d86a7b0430d8cdb78070b4c55a, $sformatf("C.1 encrypt %h", got));
    block(1'b1, 128'h69c4e0d86a7b0430d8cdb78070b4c55a, got);
    check(got == 128'h00112233445566778899aabbccddeeff, $sformatf("C.1 decrypt %h", got));
    for (int n = 0; n < 20; n++) begin
      key = {$urandom, $urandom, $urandom, $urandom};
      pt  = {$urandom, $urandom, $urandom, $urandom};
      w = expand(key);
      block(1'b0, pt, got);
      check(got == encrypt(key, pt), $sformatf("encrypt %h", pt));
      block(1'b1, pt, got);
      check(got == decrypt(key, pt), $sformatf("decrypt %h", pt));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
