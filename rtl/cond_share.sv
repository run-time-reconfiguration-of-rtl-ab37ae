// cond_share: shared condition flags for shared and collective branches.
//
// One flag per processor. A processor that executes SFLG copies its own
// condition flag into its slot (we/flag_in); every processor reads all slots
// (flags) and can branch on another processor's condition or on all/any of a
// set of them. The paper names sharing (broadcasting) a processor's
// condition flag for collective branch operations; the register holding one
// bit per processor is this design's realisation. A write on a rising edge
// is visible from the next cycle. Reset clears all flags.
module cond_share #(
  parameter int unsigned NCPU = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [NCPU-1:0] we,
  input  logic [NCPU-1:0] flag_in,
  output logic [NCPU-1:0] flags
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) flags <= '0;
    else for (int p = 0; p < NCPU; p++) if (we[p]) flags[p] <= flag_in[p];
  end
endmodule
