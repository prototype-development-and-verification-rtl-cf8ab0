// safil_bram: the single-port trie node memory of one processing element.
//
// 2^13 words of 32 bits (one trie node per word), matching the 8192 x 32
// Block RAM of the document. One port: when en is high the word at addr is
// read and appears on rdata after the rising edge (one cycle read latency,
// like a registered Block RAM output); when we is also high the word is
// written instead and rdata is left unchanged. The contents start
// undefined and are loaded through update frames.
module safil_bram #(
  parameter int unsigned DATA_W = 32,
  parameter int unsigned ADDR_W = 13
) (
  input  logic              clk,
  input  logic              en,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,
  input  logic [DATA_W-1:0] wdata,
  output logic [DATA_W-1:0] rdata
);
  logic [DATA_W-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end
endmodule
