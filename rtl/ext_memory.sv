// ext_memory: the cluster's shared external memory with a Wishbone slave.
//
// WORDS 32-bit words in four word-interleaved banks: word w lives in bank
// w mod 4 at row w / 4, so any four consecutive words lie in four different
// banks and can be read or written in one access. A Wishbone access names a
// base word address adr and a lane mask sel; lane j means word adr + j and
// carries write data on dat_w[j]. Read data is returned per bank on
// dat_r[b] (word adr + ((b - adr) mod 4)); routing banks back to lanes is the
// bus's job. Timing: two wait states, so ack is high in the third cycle of
// stb and the banks are accessed at the end of the second. The paper
// only says the memory is external and reached over Wishbone; the banked
// organisation, the size and the wait states are this design's choices,
// picked so the cluster reproduces the paper's 6, 7 and 15 cycle figures.
// A second, simple port (host_*) lets a host load and inspect the memory
// while the processors are stopped; host reads are registered.
module ext_memory #(
  parameter int unsigned WORDS = 65536,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               wb_cyc,
  input  logic               wb_stb,
  input  logic               wb_we,
  input  logic [AW-1:0]      wb_adr,
  input  logic [3:0]         wb_sel,
  input  logic [3:0][31:0]   wb_dat_w,
  output logic [3:0][31:0]   wb_dat_r,
  output logic               wb_ack,
  input  logic               host_we,
  input  logic [AW-1:0]      host_addr,
  input  logic [31:0]        host_wdata,
  output logic [31:0]        host_rdata
);
  localparam int unsigned RW = AW - 2;
  localparam int unsigned ROWS = WORDS / 4;

  logic [31:0] bank0 [ROWS];
  logic [31:0] bank1 [ROWS];
  logic [31:0] bank2 [ROWS];
  logic [31:0] bank3 [ROWS];

  logic [1:0]          ws_q;
  logic                access;
  logic [3:0][1:0]     lane_of;
  logic [3:0][RW-1:0]  row_of;
  logic [3:0]          en_of;
  logic [3:0][31:0]    wd_of;

  // wait-state counter: 0 idle/first cycle, 1 access, 2 acknowledge
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ws_q <= '0;
    else if (wb_cyc && wb_stb) ws_q <= (ws_q == 2'd2) ? 2'd0 : ws_q + 2'd1;
    else ws_q <= '0;
  end

  assign access = wb_cyc && wb_stb && (ws_q == 2'd1);
  assign wb_ack = wb_cyc && wb_stb && (ws_q == 2'd2);

  always_comb begin
    logic [AW-1:0] w;
    for (int b = 0; b < 4; b++) begin
      lane_of[b] = 2'(b) - wb_adr[1:0];
      w          = wb_adr + AW'(lane_of[b]);
      row_of[b]  = w[AW-1:2];
      en_of[b]   = wb_sel[lane_of[b]];
      wd_of[b]   = wb_dat_w[lane_of[b]];
    end
  end

  always_ff @(posedge clk) begin
    if (access) begin
      if (en_of[0]) begin if (wb_we) bank0[row_of[0]] <= wd_of[0]; else wb_dat_r[0] <= bank0[row_of[0]]; end
      if (en_of[1]) begin if (wb_we) bank1[row_of[1]] <= wd_of[1]; else wb_dat_r[1] <= bank1[row_of[1]]; end
      if (en_of[2]) begin if (wb_we) bank2[row_of[2]] <= wd_of[2]; else wb_dat_r[2] <= bank2[row_of[2]]; end
      if (en_of[3]) begin if (wb_we) bank3[row_of[3]] <= wd_of[3]; else wb_dat_r[3] <= bank3[row_of[3]]; end
    end
    if (host_we) begin
      unique case (host_addr[1:0])
        2'd0: bank0[host_addr[AW-1:2]] <= host_wdata;
        2'd1: bank1[host_addr[AW-1:2]] <= host_wdata;
        2'd2: bank2[host_addr[AW-1:2]] <= host_wdata;
        default: bank3[host_addr[AW-1:2]] <= host_wdata;
      endcase
    end
    unique case (host_addr[1:0])
      2'd0: host_rdata <= bank0[host_addr[AW-1:2]];
      2'd1: host_rdata <= bank1[host_addr[AW-1:2]];
      2'd2: host_rdata <= bank2[host_addr[AW-1:2]];
      default: host_rdata <= bank3[host_addr[AW-1:2]];
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst_n) assert (!wb_stb || wb_cyc) else $error("wishbone: stb without cyc");
  end
endmodule
