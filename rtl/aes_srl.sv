// aes_srl -- shift register with a variable read tap, the structure an FPGA
// look-up table takes when configured as a 16-bit shift register.
//
// When shift_en is high, din enters position 0 on the rising clock edge and
// every stored entry moves one position deeper; the oldest falls off the
// end. dout is the entry at position addr, read combinationally, so
// position 0 is the value shifted in most recently. WIDTH copies of the
// one-bit LUT structure sit side by side to hold a WIDTH-bit word. The
// shift-register-with-tap structure is the document's; the shift enable is
// this design's addition, so a row holds still when nothing is written.
module aes_srl #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 16
) (
  input  logic                     clk,
  input  logic                     shift_en,
  input  logic [WIDTH-1:0]         din,
  input  logic [$clog2(DEPTH)-1:0] addr,
  output logic [WIDTH-1:0]         dout
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (shift_en) begin
      mem[0] <= din;
      for (int i = 1; i < DEPTH; i++) mem[i] <= mem[i-1];
    end
  end

  assign dout = mem[addr];

endmodule
