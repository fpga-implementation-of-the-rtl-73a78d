// tb_aes_srl -- shifts random words into the variable-tap shift register,
// with random pauses, and checks every tap against a model of the last
// DEPTH words shifted in.
module tb_aes_srl;
  logic       clk = 1'b0, shift_en = 1'b0;
  logic [7:0] din = '0, dout;
  logic [3:0] addr = '0;
  logic [7:0] hist [$];
  int checks = 0, failures = 0;

  aes_srl #(.WIDTH(8), .DEPTH(16)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      shift_en = ($urandom % 4) != 0;
      din      = 8'($urandom);
      @(posedge clk);
      if (shift_en) hist.push_front(din);
      if (hist.size() > 16) void'(hist.pop_back());
      @(negedge clk);
      shift_en = 1'b0;
      for (int t = 0; t < hist.size(); t++) begin
        addr = 4'(t);
        #1;
        checks++;
        if (dout !== hist[t]) begin
          failures++;
          $display("FAIL: tap %0d = %h, expected %h", t, dout, hist[t]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
