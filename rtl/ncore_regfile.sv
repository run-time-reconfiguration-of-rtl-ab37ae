// ncore_regfile: the 16 x 32-bit local register file of one N-Core processor.
//
// Two combinational read ports and one write port, so an instruction reads
// its operands and writes its result within its single execute cycle. The
// size (16 x 32) is the paper's; the port count and the reset of every
// register to zero are this design's choices. A write lands on the rising
// clock edge and is visible to reads in the following cycle.
module ncore_regfile #(
  parameter int unsigned NREGS = 16,
  parameter int unsigned XLEN  = 32,
  localparam int unsigned AW   = $clog2(NREGS)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [AW-1:0]   ra1,
  output logic [XLEN-1:0] rd1,
  input  logic [AW-1:0]   ra2,
  output logic [XLEN-1:0] rd2,
  input  logic            we,
  input  logic [AW-1:0]   wa,
  input  logic [XLEN-1:0] wd
);
  logic [XLEN-1:0] regs [NREGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we) begin
      regs[wa] <= wd;
    end
  end

  assign rd1 = regs[ra1];
  assign rd2 = regs[ra2];
endmodule
