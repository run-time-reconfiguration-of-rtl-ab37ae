// quadrocore: a cluster of four N-Core processors that reconfigures itself at
// run time between asynchronous MIMD, synchronous (lock-step) MIMD and SIMD
// operation, under control of instructions placed in the program by the
// compiler.
//
// Blocks and how they connect:
//  - four ncore processors, each with its own instruction and data memory
//    and 16 x 32 register file;
//  - reconfig_interconnect between every decode and every execute stage,
//    holding each processor's mode and routing decoded instructions (SIMD)
//    and the lock-step advance (synchronous MIMD, SIMD);
//  - barrier_unit for barrier instructions and reconfiguration hand-over;
//  - shared_regfile, 32 x 32, one port per processor, two-cycle access;
//  - cond_share, the processors' published condition flags;
//  - cluster_bus, the round-robin arbitrated Wishbone master with the fast
//    adjacent (block) access, and ext_memory behind it.
// All of this follows the paper's cluster; the instruction encoding, the
// group-mask form of the reconfiguration instruction, the memory sizes not
// given there and the host ports are this design's choices.
//
// Host interface: while the processors are stopped a host loads programs
// with prog_we/prog_cpu/prog_addr/prog_data and loads or inspects external
// memory with host_we/host_addr/host_wdata (host_rdata one cycle after
// host_addr). A one-cycle start pulse makes every processor begin at address
// 0; halted shows which have executed HALT; mode shows each processor's
// current operating mode.
module quadrocore
  import qc_pkg::*;
#(
  parameter int unsigned EXT_WORDS  = 65536,
  parameter int unsigned IMEM_WORDS = 16384,
  parameter int unsigned DMEM_WORDS = 8192
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic                 prog_we,
  input  logic [1:0]           prog_cpu,
  input  logic [13:0]          prog_addr,
  input  logic [15:0]          prog_data,
  input  logic                 host_we,
  input  logic [EXT_AW-1:0]    host_addr,
  input  logic [31:0]          host_wdata,
  output logic [31:0]          host_rdata,
  output logic [NCPU-1:0]      halted,
  output mode_e [NCPU-1:0]     mode
);
  dec_t  [NCPU-1:0]        dec, ex_in;
  logic  [NCPU-1:0]        done, adv, id_take, slave;
  logic  [NCPU-1:0]        rcfg_we;
  mode_e [NCPU-1:0]        rcfg_mode;
  logic  [NCPU-1:0][3:0]   rcfg_mask, group;
  logic  [NCPU-1:0]        bar_arrive, bar_release;
  logic  [NCPU-1:0][3:0]   bar_mask;
  logic  [NCPU-1:0]        srf_req, srf_we, srf_rvalid;
  logic  [NCPU-1:0][4:0]   srf_idx;
  logic  [NCPU-1:0][31:0]  srf_wdata, srf_rdata;
  logic  [NCPU-1:0]        flag_we, flag_val, flags;
  xreq_t [NCPU-1:0]        xreq;
  logic  [NCPU-1:0][31:0]  xwdata, xrsp_data;
  logic  [NCPU-1:0]        xrsp_valid;

  logic                    wb_cyc, wb_stb, wb_we, wb_ack;
  logic [EXT_AW-1:0]       wb_adr;
  logic [3:0]              wb_sel;
  logic [3:0][31:0]        wb_dat_w, wb_dat_r;

  for (genvar p = 0; p < NCPU; p++) begin : g_cpu
    ncore #(.CPU_ID(p), .IMEM_WORDS(IMEM_WORDS), .DMEM_WORDS(DMEM_WORDS)) u_cpu (
      .clk, .rst_n, .start,
      .prog_we(prog_we && prog_cpu == 2'(p)), .prog_addr, .prog_data,
      .dec_o(dec[p]), .ex_i(ex_in[p]), .adv_i(adv[p]), .id_take_i(id_take[p]),
      .done_o(done[p]), .mode_i(mode[p]), .slave_i(slave[p]), .group_i(group[p]),
      .rcfg_we_o(rcfg_we[p]), .rcfg_mode_o(rcfg_mode[p]), .rcfg_mask_o(rcfg_mask[p]),
      .bar_arrive_o(bar_arrive[p]), .bar_mask_o(bar_mask[p]), .bar_release_i(bar_release[p]),
      .srf_req_o(srf_req[p]), .srf_we_o(srf_we[p]), .srf_idx_o(srf_idx[p]),
      .srf_wdata_o(srf_wdata[p]), .srf_rvalid_i(srf_rvalid[p]), .srf_rdata_i(srf_rdata[p]),
      .flag_we_o(flag_we[p]), .flag_o(flag_val[p]), .flags_i(flags),
      .xreq_o(xreq[p]), .xwdata_o(xwdata[p]), .xrsp_valid_i(xrsp_valid[p]),
      .xrsp_data_i(xrsp_data[p]),
      .halted_o(halted[p])
    );
  end

  reconfig_interconnect #(.NCPU(NCPU)) u_icon (
    .clk, .rst_n, .dec, .done, .rcfg_we, .rcfg_mode, .rcfg_mask,
    .ex_in, .adv, .id_take, .slave, .mode, .group
  );

  barrier_unit #(.NCPU(NCPU)) u_bar (
    .clk, .rst_n, .arrive(bar_arrive), .mask(bar_mask), .release_o(bar_release),
    .status_o()
  );

  shared_regfile #(.NCPU(NCPU), .NREGS(NSREGS)) u_srf (
    .clk, .rst_n, .req(srf_req), .we(srf_we), .idx(srf_idx), .wdata(srf_wdata),
    .rvalid(srf_rvalid), .rdata(srf_rdata)
  );

  cond_share #(.NCPU(NCPU)) u_flags (
    .clk, .rst_n, .we(flag_we), .flag_in(flag_val), .flags
  );

  cluster_bus #(.NCPU(NCPU), .AW(EXT_AW)) u_bus (
    .clk, .rst_n, .req(xreq), .wdata(xwdata), .rsp_valid(xrsp_valid), .rsp_data(xrsp_data),
    .wb_cyc, .wb_stb, .wb_we, .wb_adr, .wb_sel, .wb_dat_w, .wb_dat_r, .wb_ack
  );

  ext_memory #(.WORDS(EXT_WORDS)) u_ext (
    .clk, .rst_n, .wb_cyc, .wb_stb, .wb_we, .wb_adr, .wb_sel, .wb_dat_w, .wb_dat_r, .wb_ack,
    .host_we, .host_addr, .host_wdata, .host_rdata
  );
endmodule
