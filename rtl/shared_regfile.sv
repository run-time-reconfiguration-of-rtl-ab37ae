// shared_regfile: the cluster's shared register file for inter-processor
// communication.
//
// 32 registers of 32 bits, with a dedicated read/write port for each of the
// NCPU processors, so no arbitration is needed (the paper: 32 registers,
// independent ports per processor, two-cycle access, read/write ordering
// scheduled by the compiler). A port's request (req, we, idx, wdata) is
// registered at the end of cycle 0; in cycle 1 rvalid is high, rdata holds
// the register's current value, and a write is performed at the end of
// cycle 1. A value written by one processor can therefore be read by another
// that starts its access in the next cycle: four cycles round trip.
// If two processors write the same register in the same cycle, which the
// compiler must avoid, the higher-numbered processor wins; an assertion flags
// it. Reset clears all registers (this design's choice).
module shared_regfile #(
  parameter int unsigned NCPU  = 4,
  parameter int unsigned NREGS = 32,
  localparam int unsigned AW   = $clog2(NREGS)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [NCPU-1:0]          req,
  input  logic [NCPU-1:0]          we,
  input  logic [NCPU-1:0][AW-1:0]  idx,
  input  logic [NCPU-1:0][31:0]    wdata,
  output logic [NCPU-1:0]          rvalid,
  output logic [NCPU-1:0][31:0]    rdata
);
  logic [31:0]                    regs [NREGS];
  logic [NCPU-1:0]                s_req, s_we;
  logic [NCPU-1:0][AW-1:0]        s_idx;
  logic [NCPU-1:0][31:0]          s_wdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_req <= '0; s_we <= '0; s_idx <= '0; s_wdata <= '0;
    end else begin
      s_req   <= req;
      s_we    <= req & we;
      s_idx   <= idx;
      s_wdata <= wdata;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < NREGS; r++) regs[r] <= '0;
    end else begin
      for (int p = 0; p < NCPU; p++)
        if (s_req[p] && s_we[p]) regs[s_idx[p]] <= s_wdata[p];
    end
  end

  always_comb begin
    for (int p = 0; p < NCPU; p++) begin
      rvalid[p] = s_req[p];
      rdata[p]  = regs[s_idx[p]];
    end
  end

  // Two processors writing one register in the same cycle is a schedule error.
  always_ff @(posedge clk) begin
    if (rst_n) begin
      for (int p = 0; p < NCPU; p++)
        for (int q = p + 1; q < NCPU; q++)
          assert (!(s_we[p] && s_we[q] && s_idx[p] == s_idx[q]))
            else $error("shared register %0d written by processors %0d and %0d", s_idx[p], p, q);
    end
  end
endmodule
