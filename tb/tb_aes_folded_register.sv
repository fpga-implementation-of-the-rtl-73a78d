// tb_aes_folded_register -- writes random columns into the four row
// memories and reads with independent random taps per row, checking each
// byte against a model of the column history; then reads the ShiftRows
// pattern of the first output column (bytes 0, 5, A, F) from a stored state.
module tb_aes_folded_register;
  import aes_pkg::*;

  logic                clk = 1'b0, wr_en = 1'b0;
  col_t                wdata = '0, rdata;
  logic [0:3][3:0]     tap = '0;
  col_t                hist [$];
  int checks = 0, failures = 0;

  aes_folded_register #(.DEPTH(16)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      wr_en = ($urandom % 3) != 0;
      wdata = $urandom;
      @(posedge clk);
      if (wr_en) hist.push_front(wdata);
      if (hist.size() > 16) void'(hist.pop_back());
      @(negedge clk);
      wr_en = 1'b0;
      if (hist.size() == 16)
        for (int k = 0; k < 4; k++) begin
          for (int r = 0; r < 4; r++) tap[r] = 4'($urandom);
          #1;
          for (int r = 0; r < 4; r++)
            check(rdata[r] == hist[tap[r]][r], $sformatf("row %0d tap %0d", r, tap[r]));
        end
    end
    // state bytes 0..F as columns 0..3 (column 3 written last, depth 0)
    for (int c = 0; c < 4; c++) begin
      @(negedge clk);
      wr_en = 1'b1;
      wdata = {8'(4*c), 8'(4*c+1), 8'(4*c+2), 8'(4*c+3)};
      @(posedge clk);
    end
    @(negedge clk);
    wr_en = 1'b0;
    tap = {4'd3, 4'd2, 4'd1, 4'd0};   // rows 0..3 from columns 0..3
    #1;
    check(rdata == 32'h00050a0f, $sformatf("ShiftRows column 0 = %h", rdata));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
