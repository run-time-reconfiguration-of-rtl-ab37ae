// barrier_unit: hardware barrier synchronisation for the processor cluster.
//
// A processor that executes a barrier pulses arrive with its barrier mask,
// the set of processors to synchronise with (the paper's barrier mask in
// the instruction's immediate field). The unit keeps a status bit and the
// mask for every waiting processor. A waiting processor is released when
// every processor of its mask is waiting or arriving in the same cycle; all
// of them then see release in that one cycle and their status bits are
// cleared. Processors that arrive together are released in the cycle they
// arrive, so a barrier costs a single cycle when nobody waits. Disjoint sets
// can synchronise independently at the same time. A processor's own bit is
// always added to its mask (this design's choice).
// Interface: arrive is a one-cycle pulse per barrier; release is a one-cycle
// pulse; mask is sampled with arrive.
module barrier_unit #(
  parameter int unsigned NCPU = 4
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [NCPU-1:0]           arrive,
  input  logic [NCPU-1:0][NCPU-1:0] mask,
  output logic [NCPU-1:0]           release_o,
  output logic [NCPU-1:0]           status_o
);
  logic [NCPU-1:0]           status_q;
  logic [NCPU-1:0][NCPU-1:0] mask_q, mask_eff;
  logic [NCPU-1:0]           pending;

  always_comb begin
    pending = status_q | arrive;
    for (int p = 0; p < NCPU; p++) begin
      mask_eff[p]  = (arrive[p] ? mask[p] : mask_q[p]) | (NCPU'(1) << p);
      release_o[p] = pending[p] && ((pending | ~mask_eff[p]) == '1);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      status_q <= '0;
      mask_q   <= '0;
    end else begin
      status_q <= pending & ~release_o;
      for (int p = 0; p < NCPU; p++) if (arrive[p]) mask_q[p] <= mask[p];
    end
  end

  assign status_o = status_q;

  always_ff @(posedge clk) begin
    if (rst_n) assert ((arrive & status_q) == '0)
      else $error("processor arrived at a barrier while already waiting");
  end
endmodule
