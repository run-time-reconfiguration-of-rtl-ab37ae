// local_dmem: local data memory of one N-Core processor.
//
// 32 KiB as 8K x 32-bit words (the paper gives 32K local data memory and a
// three-cycle load/store; bytes and word addressing are this design's
// reading). An access presented with req in cycle 0 is registered at the
// end of cycle 0, the array is read (or written) at the end of cycle 1 and
// rvalid with rdata is high in cycle 2, so the issuing instruction completes
// after exactly three cycles. Writes also answer with rvalid in cycle 2.
module local_dmem #(
  parameter int unsigned WORDS = 8192,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          req,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [31:0]   wdata,
  output logic          rvalid,
  output logic [31:0]   rdata
);
  logic [31:0]   mem [WORDS];
  logic          s1_req, s1_we;
  logic [AW-1:0] s1_addr;
  logic [31:0]   s1_wdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_req <= 1'b0; s1_we <= 1'b0; s1_addr <= '0; s1_wdata <= '0;
      rvalid <= 1'b0;
    end else begin
      s1_req   <= req;
      s1_we    <= we;
      s1_addr  <= addr;
      s1_wdata <= wdata;
      rvalid   <= s1_req;
    end
  end

  always_ff @(posedge clk) begin
    if (s1_req && s1_we) mem[s1_addr] <= s1_wdata;
    if (s1_req)          rdata <= mem[s1_addr];
  end
endmodule
