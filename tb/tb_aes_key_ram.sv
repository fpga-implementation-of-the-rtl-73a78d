// tb_aes_key_ram -- writes all 44 words, reads them back in random order
// and checks the one-clock read latency, that a write and a read of
// different words in one clock do not disturb each other, and that
// out-of-range writes are ignored.
module tb_aes_key_ram;
  logic        clk = 1'b0, we = 1'b0;
  logic [5:0]  waddr = '0, raddr = '0;
  logic [31:0] wdata = '0, rdata;
  logic [31:0] model [44];
  int checks = 0, failures = 0;

  aes_key_ram #(.WORDS(44), .AW(6)) dut (.*);
  always #5 clk = ~clk;

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
    for (int i = 0; i < 44; i++) begin
      @(negedge clk);
      we = 1'b1; waddr = 6'(i); wdata = $urandom; model[i] = wdata;
    end
    @(negedge clk);
    we = 1'b1; waddr = 6'd50; wdata = 32'hdeadbeef;   // ignored
    @(negedge clk);
    we = 1'b0;
    for (int n = 0; n < 500; n++) begin
      int a, b;
      a = $urandom % 44;
      b = $urandom % 44;
      raddr = 6'(a);
      if (b != a) begin
        we = 1'b1; waddr = 6'(b); wdata = $urandom;
      end
      @(posedge clk);
      if (we) model[b] = wdata;
      #1;
      we = 1'b0;
      check(rdata == model[a], $sformatf("read %0d: %h want %h", a, rdata, model[a]));
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
