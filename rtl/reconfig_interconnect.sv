// reconfig_interconnect: the reconfigurable layer between the decode and the
// execute stages of the cluster's processors, with its mode registers.
//
// Every processor has a mode register (asynchronous MIMD, synchronous MIMD or
// SIMD) and a group mask, written by that processor's reconfiguration
// instruction in the cycle it commits, so a mode switch takes a single cycle
// (paper). The layer then does three things:
//  - Instruction routing: an execute stage normally receives its own decoded
//    instruction; a SIMD slave receives the decoded instruction of its
//    group's master (lowest processor of the mask), which is how one fetch and
//    decode drives the whole group. The routing uses the mode being written in
//    the current cycle, so the instruction after a reconfiguration already
//    goes the new way.
//  - Lock-step: in synchronous and SIMD mode a processor's execute stage
//    advances only when every member of its group is done (adv), which keeps
//    the group synchronous at every instruction. In asynchronous mode each
//    processor advances on its own done.
//  - Fetch gating: a SIMD slave's decode stage is not consumed (id_take low),
//    so its fetch and decode stand idle and resume where they stopped.
// Several groups can coexist, e.g. three processors in lock-step while the
// fourth runs asynchronously. Reset puts every processor into asynchronous
// mode. The paper gives the multiplexer layer and the modes; the group
// mask semantics, the master choice and the per-processor mode registers are
// this design's choices. Outputs adv, ex_in and id_take are combinational.
module reconfig_interconnect
  import qc_pkg::*;
#(
  parameter int unsigned NCPU = 4
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  dec_t  [NCPU-1:0]          dec,
  input  logic  [NCPU-1:0]          done,
  input  logic  [NCPU-1:0]          rcfg_we,
  input  mode_e [NCPU-1:0]          rcfg_mode,
  input  logic  [NCPU-1:0][3:0]     rcfg_mask,
  output dec_t  [NCPU-1:0]          ex_in,
  output logic  [NCPU-1:0]          adv,
  output logic  [NCPU-1:0]          id_take,
  output logic  [NCPU-1:0]          slave,
  output mode_e [NCPU-1:0]          mode,
  output logic  [NCPU-1:0][3:0]     group
);
  mode_e [NCPU-1:0]      mode_q, mode_n;
  logic  [NCPU-1:0][3:0] mask_q, mask_n;
  logic  [NCPU-1:0]      slave_n;
  logic  [3:0]           gm;
  logic  [1:0]           mst;

  always_comb begin
    for (int p = 0; p < NCPU; p++) begin
      gm = mask_q[p] | 4'(1 << p);
      if (mode_q[p] == MODE_ASYNC) adv[p] = done[p];
      else                         adv[p] = ((4'(done) | ~gm) == 4'hF);
      mode_n[p] = rcfg_we[p] ? rcfg_mode[p] : mode_q[p];
      mask_n[p] = rcfg_we[p] ? rcfg_mask[p] : mask_q[p];
      mst       = mask_master(mask_n[p]);
      slave_n[p] = (mode_n[p] == MODE_SIMD) && (32'(mst) != p);
      ex_in[p]   = slave_n[p] ? dec[mst] : dec[p];
      id_take[p] = adv[p] && !slave_n[p];
      slave[p]   = (mode_q[p] == MODE_SIMD) && (32'(mask_master(mask_q[p])) != p);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < NCPU; p++) begin
        mode_q[p] <= MODE_ASYNC;
        mask_q[p] <= 4'(1 << p);
      end
    end else begin
      mode_q <= mode_n;
      mask_q <= mask_n;
    end
  end

  assign mode  = mode_q;
  assign group = mask_q;

  // All members of a lock-step group must agree on its mask.
  always_ff @(posedge clk) begin
    for (int p = 0; p < NCPU; p++)
      for (int q = 0; q < NCPU; q++)
        if (rst_n && mode_q[p] != MODE_ASYNC && mask_q[p][q])
          assert (mode_q[q] == mode_q[p] && mask_q[q] == mask_q[p])
            else $error("processor %0d and %0d disagree on their group", p, q);
  end
endmodule
