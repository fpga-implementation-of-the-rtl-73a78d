// tb_aes_controller -- runs the sequencer alone and checks the control
// stream it produces for encryption and decryption blocks: the round-key
// word used in each clock that writes the state or outputs a word (0..43
// in order for encryption; 40..43, 36..39, ..., 0..3 for decryption), the
// tap depths of the first column read (ShiftRows / InvShiftRows pattern),
// nine forwarding clocks per block with one row each, the number of
// d^2(x) writes, and the start-to-last-output time of 45 clocks plus one
// per input gap.
module tb_aes_controller;
  logic        clk = 1'b0, rst = 1'b1;
  logic        keys_valid = 1'b1, start = 1'b0, decrypt_in = 1'b0, in_valid = 1'b0;
  logic        ready, in_ready, out_valid, busy, decrypt;
  logic [0:3][3:0] tap;
  logic [0:3]  fwd;
  logic        sel_input, sel_invmix, sel_rkey, wr_en;
  logic [5:0]  key_addr, key_used;
  int unsigned cyc = 0;
  int checks = 0, failures = 0;

  aes_controller #(.DEPTH(16)) dut (.*);
  always #5 clk = ~clk;

  // the key word visible in a clock is the address of the clock before
  always @(posedge clk) begin
    cyc <= cyc + 1;
    key_used <= key_addr;
  end

  int keyseq [$];
  int n_fwd, n_inv, n_out, n_wr;
  logic [0:3][3:0] first_taps;
  int unsigned last_out;

  always @(posedge clk) begin
    if ((wr_en && !sel_input) || out_valid || (wr_en && sel_input)) keyseq.push_back(int'(key_used));
    if (fwd != '0) begin
      n_fwd++;
      if ($countones(fwd) != 1) begin failures++; $display("FAIL: several rows forwarded"); end
    end
    if (sel_invmix) n_inv++;
    if (out_valid) begin n_out++; last_out = cyc; end
    if (wr_en) n_wr++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic block(input bit dec, input bit gaps);
    int unsigned c0;
    int ngap = 0, i = 0;
    keyseq.delete();
    n_fwd = 0; n_inv = 0; n_out = 0; n_wr = 0;
    @(negedge clk);
    while (!ready) @(negedge clk);
    start = 1'b1; decrypt_in = dec;
    @(posedge clk); c0 = cyc;
    @(negedge clk); start = 1'b0;
    while (i < 4) begin
      if (gaps && $urandom % 2 == 0) begin in_valid = 1'b0; ngap++; end
      else begin in_valid = 1'b1; i++; end
      @(negedge clk);
    end
    first_taps = tap;   // first read clock of round 1
    in_valid = 1'b0;
    while (n_out < 4) @(negedge clk);
    check(last_out - c0 == 45 + ngap, $sformatf("latency %0d", last_out - c0));
    check(keyseq.size() == 44, $sformatf("%0d key uses", keyseq.size()));
    for (int k = 0; k < keyseq.size() && k < 44; k++) begin
      int want = dec ? 4 * (10 - k / 4) + k % 4 : k;
      check(keyseq[k] == want, $sformatf("key use %0d: word %0d, want %0d", k, keyseq[k], want));
    end
    check(n_fwd == 9, $sformatf("%0d forwarding clocks", n_fwd));
    check(n_inv == (dec ? 36 : 0), $sformatf("%0d d2 writes", n_inv));
    check(n_wr == 40, $sformatf("%0d state writes", n_wr));
    // first column of round 1: row i from column i (enc) or (-i mod 4) (dec),
    // depth 3 - column after the four load writes
    check(first_taps == (dec ? {4'd3, 4'd0, 4'd1, 4'd2} : {4'd3, 4'd2, 4'd1, 4'd0}),
          $sformatf("first taps %h", first_taps));
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
    // no start without valid keys
    keys_valid = 1'b0;
    @(negedge clk);
    check(!ready, "ready without keys");
    keys_valid = 1'b1;
    for (int n = 0; n < 12; n++) block(n % 3 == 1, n % 4 == 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
