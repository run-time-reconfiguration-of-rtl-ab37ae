// rr_arbiter: round-robin arbiter for the cluster's shared memory bus.
//
// gnt is one-hot (or zero): the first requester at or after the priority
// pointer, searching upward with wrap-around. When advance is high and a
// grant is given, the pointer moves to the requester after the granted one,
// so every requester is served within N grants. Combinational grant,
// registered pointer, reset to requester 0. The paper specifies
// round-robin arbitration; the pointer scheme is this design's.
module rr_arbiter #(
  parameter int unsigned N = 4,
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         advance,
  output logic [N-1:0] gnt,
  output logic [IW-1:0] gnt_idx
);
  logic [IW-1:0] ptr_q;

  always_comb begin
    logic found;
    int unsigned k;
    gnt     = '0;
    gnt_idx = '0;
    found   = 1'b0;
    for (int unsigned i = 0; i < N; i++) begin
      k = (32'(ptr_q) + i) % N;
      if (!found && req[k]) begin
        found   = 1'b1;
        gnt[k]  = 1'b1;
        gnt_idx = IW'(k);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ptr_q <= '0;
    else if (advance && (req != '0)) ptr_q <= IW'((32'(gnt_idx) + 1) % N);
  end
endmodule
