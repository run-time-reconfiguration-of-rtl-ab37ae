// cluster_bus: the shared external-memory bus of the processor cluster.
//
// Each processor reaches the external memory through this unit, which is a
// Wishbone master in front of the memory and arbitrates round-robin between
// the processors (paper: Wishbone shared bus, round-robin arbitration).
// Two kinds of access:
//  - single: one word for one processor. Alone it takes 6 cycles from the
//    processor's request to its response; with all four processors asking at
//    once the last one waits for three others and sees 15 cycles.
//  - block (fast access to adjacent memory locations): one transaction moves
//    the four consecutive words base+0..base+3; lane j belongs to processor j.
//    A read is distributed to the processors of the lane mask, a write
//    collects each lane's data from its processor. It takes exactly 7 cycles,
//    one more than a single access, for the distribution stage.
// The 6/15/7 cycle figures are the paper's; the pipeline that produces
// them is this design's: cycle 0 the processor's request is registered,
// cycle 1 arbitration, cycles 2-4 the Wishbone transaction (three cycles of
// bus occupancy, the memory acknowledges in the third), cycle 5 the response
// of a single access, cycle 6 the distributed response of a block access.
// A new transaction can start in the cycle after an acknowledge.
// Interface: req[p] is a one-cycle pulse (valid) with its fields; wdata[p] is
// the processor's store data, sampled with any request, so lanes of a block
// write are taken from every processor's wdata in the request cycle. A
// processor keeps at most one request outstanding. rsp_valid[p] is a
// one-cycle pulse with rsp_data[p] (read data; writes also answer).
module cluster_bus
  import qc_pkg::*;
#(
  parameter int unsigned NCPU = 4,
  parameter int unsigned AW   = 16
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  xreq_t [NCPU-1:0]       req,
  input  logic [NCPU-1:0][31:0]  wdata,
  output logic [NCPU-1:0]        rsp_valid,
  output logic [NCPU-1:0][31:0]  rsp_data,
  // Wishbone master
  output logic                   wb_cyc,
  output logic                   wb_stb,
  output logic                   wb_we,
  output logic [AW-1:0]          wb_adr,
  output logic [3:0]             wb_sel,
  output logic [3:0][31:0]       wb_dat_w,
  input  logic [3:0][31:0]       wb_dat_r,
  input  logic                   wb_ack
);
  localparam int unsigned IW = $clog2(NCPU);

  // pending request per processor (cycle 1)
  logic [NCPU-1:0]             pend_q;
  xreq_t [NCPU-1:0]            preq_q;
  logic [NCPU-1:0][3:0][31:0]  pwd_q;

  // transaction on the bus (cycles 2-4)
  logic                        busy_q;
  logic                        t_we, t_block;
  logic [3:0]                  t_sel;
  logic [AW-1:0]               t_adr;
  logic [IW-1:0]               t_owner;
  logic [3:0][31:0]            t_wd;

  // response stage (cycle 5) and distribution stage (cycle 6)
  logic                        r_valid_q, r_block_q;
  logic [IW-1:0]               r_owner_q;
  logic [1:0]                  r_base_q;
  logic [3:0]                  r_lanes_q;
  logic [3:0][31:0]            r_bank_q;
  logic                        d_valid_q;
  logic [3:0]                  d_lanes_q;
  logic [3:0][31:0]            d_lane_q;

  logic [NCPU-1:0]             gnt;
  logic [IW-1:0]               gnt_idx;
  logic                        bus_free, take;

  assign bus_free = !busy_q || wb_ack;
  assign take     = bus_free && (pend_q != '0);

  rr_arbiter #(.N(NCPU)) u_arb (
    .clk, .rst_n, .req(pend_q), .advance(take), .gnt, .gnt_idx
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend_q <= '0; preq_q <= '0; pwd_q <= '0;
      busy_q <= 1'b0; t_we <= 1'b0; t_block <= 1'b0; t_sel <= '0; t_adr <= '0;
      t_owner <= '0; t_wd <= '0;
      r_valid_q <= 1'b0; r_block_q <= 1'b0; r_owner_q <= '0; r_base_q <= '0;
      r_lanes_q <= '0; r_bank_q <= '0;
      d_valid_q <= 1'b0; d_lanes_q <= '0; d_lane_q <= '0;
    end else begin
      // cycle 0 -> 1: register requests; a block write collects all lanes
      for (int p = 0; p < NCPU; p++) begin
        if (req[p].valid) begin
          pend_q[p] <= 1'b1;
          preq_q[p] <= req[p];
          for (int j = 0; j < 4; j++)
            pwd_q[p][j] <= req[p].block ? wdata[j % NCPU] : wdata[p];
        end else if (take && gnt[p]) begin
          pend_q[p] <= 1'b0;
        end
      end
      // cycle 1 -> 2: arbitration, start a Wishbone transaction
      if (take) begin
        busy_q  <= 1'b1;
        t_we    <= preq_q[gnt_idx].we;
        t_block <= preq_q[gnt_idx].block;
        t_sel   <= preq_q[gnt_idx].block ? 4'(preq_q[gnt_idx].lanes) : 4'b0001;
        t_adr   <= preq_q[gnt_idx].addr;
        t_owner <= gnt_idx;
        t_wd    <= pwd_q[gnt_idx];
      end else if (wb_ack) begin
        busy_q  <= 1'b0;
      end
      // acknowledge -> response stage
      r_valid_q <= wb_ack;
      if (wb_ack) begin
        r_block_q <= t_block;
        r_owner_q <= t_owner;
        r_base_q  <= t_adr[1:0];
        r_lanes_q <= t_sel;
        r_bank_q  <= wb_dat_r;
      end
      // block responses: route banks to lanes
      d_valid_q <= r_valid_q && r_block_q;
      if (r_valid_q && r_block_q) begin
        d_lanes_q <= r_lanes_q;
        for (int j = 0; j < 4; j++) d_lane_q[j] <= r_bank_q[2'(j) + r_base_q];
      end
    end
  end

  always_comb begin
    for (int p = 0; p < NCPU; p++) begin
      rsp_valid[p] = 1'b0;
      rsp_data[p]  = '0;
      if (r_valid_q && !r_block_q && r_owner_q == IW'(p)) begin
        rsp_valid[p] = 1'b1;
        rsp_data[p]  = r_bank_q[r_base_q];
      end
      if (d_valid_q && d_lanes_q[p % 4]) begin
        rsp_valid[p] = 1'b1;
        rsp_data[p]  = d_lane_q[p % 4];
      end
    end
  end

  assign wb_cyc   = busy_q;
  assign wb_stb   = busy_q;
  assign wb_we    = t_we;
  assign wb_adr   = t_adr;
  assign wb_sel   = t_sel;
  assign wb_dat_w = t_wd;

  // Wishbone: the master holds its request steady until acknowledged
  logic [AW-1:0] adr_prev;
  logic          stb_prev, ack_prev;
  always_ff @(posedge clk) begin
    adr_prev <= wb_adr; stb_prev <= wb_stb; ack_prev <= wb_ack;
    if (rst_n && stb_prev && !ack_prev && wb_stb)
      assert (wb_adr == adr_prev) else $error("wishbone: address changed before ack");
    if (rst_n) assert ((req[0].valid ? !pend_q[0] : 1'b1))
      else $error("processor 0 issued a second outstanding request");
  end
endmodule
