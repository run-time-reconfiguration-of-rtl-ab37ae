// local_imem: local instruction memory of one N-Core processor.
//
// 32 KiB organised as 16K x 16-bit instruction words (the paper gives
// 32K local instruction memory and 16-bit opcodes; reading "32K" as bytes is
// this design's interpretation). Synchronous read: when en is high the word
// at addr appears on rdata after the next rising edge; when en is low rdata
// holds, which is how a SIMD slave's fetch stage is switched to idle. A
// separate write port loads programs before the processors start.
module local_imem #(
  parameter int unsigned WORDS = 16384,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          en,
  input  logic [AW-1:0] addr,
  output logic [15:0]   rdata,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [15:0]   wdata
);
  logic [15:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (en) rdata <= mem[addr];
  end
endmodule
