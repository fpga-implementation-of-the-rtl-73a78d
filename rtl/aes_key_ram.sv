// aes_key_ram -- the block RAM that stores all precomputed round keys.
//
// One 32-bit word per address, word w[i] of the AES-128 key expansion at
// address i. The key schedule writes through port A; the datapath reads
// through port B. Both ports are synchronous: a write happens on the
// rising edge when we is high, and rdata shows the word at raddr one clock
// after raddr is presented. Keeping every round key in one RAM follows the
// document; the port arrangement is this design's choice.
module aes_key_ram #(
  parameter int unsigned WORDS = 44,
  parameter int unsigned AW    = 6
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [31:0]   wdata,
  input  logic [AW-1:0] raddr,
  output logic [31:0]   rdata
);

  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we && 32'(waddr) < WORDS) mem[waddr] <= wdata;
    rdata <= (32'(raddr) < WORDS) ? mem[raddr] : '0;
  end

endmodule
