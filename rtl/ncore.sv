// ncore: one N-Core processor of the QuadroCore cluster.
//
// A 32-bit RISC with 16-bit instructions and a three-stage pipeline (fetch,
// decode, execute), a 16 x 32 local register file, a 32-bit ALU and local
// instruction and data memories (the paper's N-Core). Its own instruction
// set is not given in the paper; the encoding used here is listed in
// qc_pkg.
//
// Pipeline. Fetch reads the local instruction memory (synchronous read) into
// the decode register. Decode produces a decoded instruction (dec_o), which
// leaves the processor: the reconfigurable interconnect hands every execute
// stage its instruction (ex_i), normally its own, in SIMD mode the master's.
// Execute reads the register operands from this processor's register file,
// performs the operation and commits (writes the result, redirects on a
// taken branch) in the cycle adv_i is high. adv_i comes from the
// interconnect: in asynchronous mode it is this processor's own done_o, in
// a lock-step group (synchronous or SIMD) it is the AND of the group's done
// signals, so all members commit on the same cycle. Branches resolve in
// execute; a taken branch squashes the decode register (two-cycle penalty).
//
// Execute latencies (cycles in execute): ALU, compare, branch, NOP 1; local
// load/store 3 (paper); shared register load/store 2 (paper);
// external single access 6 alone, up to 15 under contention (paper);
// fast adjacent access 7 (paper); barrier and reconfiguration 1 when all
// partners arrive together, otherwise until the last arrives; multiply 2-9
// with early exit in asynchronous mode, always 9 in synchronous and SIMD
// mode (the paper disables early exits in lock-step operation).
//
// Extensions: BAR waits at the barrier unit; RCFG waits at the barrier unit
// for every processor of its mask and then writes the new mode into the
// interconnect in its commit cycle (this design folds the barrier that the
// paper places before a reconfiguration into the instruction); SFLG
// publishes the condition flag; SBR branches on shared flags; LDS/STS use the
// shared register file; LDV/STV use the bus's block transfer. In SIMD mode a
// slave ignores branches (control flow is the master's), does not issue the
// block transfer (the master does it for the group) and adds its processor
// number to the address of a single external access, so processor c reaches
// base + c. A slave's own fetch and decode stages stay idle in SIMD mode and
// resume where they stopped when the group returns to MIMD.
module ncore
  import qc_pkg::*;
#(
  parameter int unsigned CPU_ID     = 0,
  parameter int unsigned IMEM_WORDS = 16384,
  parameter int unsigned DMEM_WORDS = 8192
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  // program load
  input  logic        prog_we,
  input  logic [13:0] prog_addr,
  input  logic [15:0] prog_data,
  // reconfigurable interconnect
  output dec_t        dec_o,
  input  dec_t        ex_i,
  input  logic        adv_i,
  input  logic        id_take_i,
  output logic        done_o,
  input  mode_e       mode_i,
  input  logic        slave_i,
  input  logic [3:0]  group_i,
  output logic        rcfg_we_o,
  output mode_e       rcfg_mode_o,
  output logic [3:0]  rcfg_mask_o,
  // barrier unit
  output logic        bar_arrive_o,
  output logic [3:0]  bar_mask_o,
  input  logic        bar_release_i,
  // shared register file
  output logic        srf_req_o,
  output logic        srf_we_o,
  output logic [4:0]  srf_idx_o,
  output logic [31:0] srf_wdata_o,
  input  logic        srf_rvalid_i,
  input  logic [31:0] srf_rdata_i,
  // shared condition flags
  output logic        flag_we_o,
  output logic        flag_o,
  input  logic [3:0]  flags_i,
  // external memory bus
  output xreq_t       xreq_o,
  output logic [31:0] xwdata_o,
  input  logic        xrsp_valid_i,
  input  logic [31:0] xrsp_data_i,
  // status
  output logic        halted_o
);
  localparam int unsigned IAW = $clog2(IMEM_WORDS);
  localparam int unsigned DAW = $clog2(DMEM_WORDS);
  localparam logic [3:0] OWN = 4'(1 << CPU_ID);

  // ---------------- fetch and decode ----------------
  logic        running_q, halted_q;
  logic [13:0] pc_q, id_pc_q;
  logic        id_valid_q;
  logic [15:0] instr;
  logic        fetch_en, flush;
  logic [13:0] target;

  assign fetch_en = running_q && !slave_i && (!id_valid_q || id_take_i) && !flush;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc_q <= '0; id_pc_q <= '0; id_valid_q <= 1'b0;
    end else if (flush) begin
      pc_q <= target; id_valid_q <= 1'b0;
    end else if (fetch_en) begin
      pc_q <= pc_q + 14'd1; id_pc_q <= pc_q; id_valid_q <= 1'b1;
    end else if (id_take_i) begin
      id_valid_q <= 1'b0;
    end
  end

  local_imem #(.WORDS(IMEM_WORDS)) u_imem (
    .clk, .en(fetch_en), .addr(IAW'(pc_q)), .rdata(instr),
    .we(prog_we), .waddr(IAW'(prog_addr)), .wdata(prog_data)
  );

  ncore_decode u_dec (
    .valid(id_valid_q && running_q && !flush), .instr, .pc(id_pc_q), .dec(dec_o)
  );

  // ---------------- execute ----------------
  dec_t        ex_q;
  logic        first_q, fin_q, flag_q;
  logic [31:0] res_q;
  logic [31:0] rs_val, r2_val, op_b, alu_y;
  logic        alu_flag, is_store, commit, issue, done, taken;
  logic        mul_done;
  logic [31:0] mul_p;
  logic        dm_rvalid;
  logic [31:0] dm_rdata;
  logic        rf_we;
  logic [31:0] rf_wd;
  logic        cpl_pulse;
  logic [31:0] cpl_data;

  assign is_store = ex_q.kind inside {EX_STL, EX_STX, EX_STV, EX_STS};
  assign issue    = ex_q.valid && first_q && !halted_q;
  assign commit   = adv_i && ex_q.valid && !halted_q;

  ncore_regfile #(.NREGS(16), .XLEN(32)) u_rf (
    .clk, .rst_n,
    .ra1(ex_q.rs), .rd1(rs_val),
    .ra2(is_store ? ex_q.rd : ex_q.rt), .rd2(r2_val),
    .we(rf_we), .wa(ex_q.rd), .wd(rf_wd)
  );

  assign op_b = ex_q.b_imm ? ex_q.imm : r2_val;

  ncore_alu #(.XLEN(32)) u_alu (
    .op(ex_q.alu), .cmp(ex_q.cmp), .a(rs_val), .b(op_b), .y(alu_y), .flag(alu_flag)
  );

  ncore_mul #(.XLEN(32)) u_mul (
    .clk, .rst_n, .start(issue && ex_q.kind == EX_MUL), .fixed(mode_i != MODE_ASYNC),
    .a(rs_val), .b(r2_val), .done(mul_done), .p(mul_p)
  );

  local_dmem #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk, .rst_n,
    .req(issue && ex_q.kind inside {EX_LDL, EX_STL}), .we(ex_q.kind == EX_STL),
    .addr(DAW'(rs_val)), .wdata(r2_val), .rvalid(dm_rvalid), .rdata(dm_rdata)
  );

  // shared register file port
  assign srf_req_o   = issue && ex_q.kind inside {EX_LDS, EX_STS};
  assign srf_we_o    = ex_q.kind == EX_STS;
  assign srf_idx_o   = ex_q.sidx;
  assign srf_wdata_o = r2_val;

  // external memory bus port
  always_comb begin
    xreq_o       = '0;
    xreq_o.we    = ex_q.kind inside {EX_STX, EX_STV};
    xreq_o.lanes = OWN;
    if (ex_q.kind inside {EX_LDX, EX_STX}) begin
      xreq_o.valid = issue;
      xreq_o.addr  = EXT_AW'(rs_val) + ((mode_i == MODE_SIMD) ? EXT_AW'(CPU_ID) : '0);
    end else if (ex_q.kind inside {EX_LDV, EX_STV}) begin
      xreq_o.valid = issue && !slave_i;
      xreq_o.block = 1'b1;
      xreq_o.lanes = (mode_i == MODE_SIMD) ? (group_i | OWN) : OWN;
      xreq_o.addr  = EXT_AW'(rs_val);
    end
  end
  assign xwdata_o = r2_val;

  // barrier unit port (BAR, and the implicit barrier of RCFG)
  assign bar_arrive_o = issue && ex_q.kind inside {EX_BAR, EX_RCFG};
  assign bar_mask_o   = ex_q.mask | OWN;

  // completion of multi-cycle operations
  always_comb begin
    cpl_pulse = 1'b0;
    cpl_data  = '0;
    unique case (ex_q.kind)
      EX_LDL, EX_STL: begin cpl_pulse = dm_rvalid;     cpl_data = dm_rdata;    end
      EX_LDS, EX_STS: begin cpl_pulse = srf_rvalid_i;  cpl_data = srf_rdata_i; end
      EX_LDX, EX_STX, EX_LDV, EX_STV:
                      begin cpl_pulse = xrsp_valid_i;  cpl_data = xrsp_data_i; end
      EX_BAR, EX_RCFG: cpl_pulse = bar_release_i;
      default: ;
    endcase
  end

  always_comb begin
    if (!ex_q.valid || halted_q) done = 1'b1;
    else unique case (ex_q.kind)
      EX_MUL: done = !first_q && mul_done;
      EX_LDL, EX_STL, EX_LDS, EX_STS, EX_LDX, EX_STX, EX_LDV, EX_STV, EX_BAR, EX_RCFG:
              done = fin_q || cpl_pulse;
      default: done = 1'b1;
    endcase
  end
  assign done_o = done;

  // register write-back at commit
  always_comb begin
    rf_we = commit && ex_q.kind inside {EX_ALU, EX_MUL, EX_LDL, EX_LDS, EX_LDX, EX_LDV};
    unique case (ex_q.kind)
      EX_ALU:  rf_wd = alu_y;
      EX_MUL:  rf_wd = mul_p;
      default: rf_wd = fin_q ? res_q : cpl_data;
    endcase
  end

  // branches
  always_comb begin
    taken = 1'b0;
    if (ex_q.kind == EX_BR) begin
      unique case (ex_q.bcond)
        2'd0: taken = 1'b1;
        2'd1: taken = flag_q;
        2'd2: taken = !flag_q;
        default: taken = 1'b0;
      endcase
    end else if (ex_q.kind == EX_SBR) begin
      unique case (ex_q.bcond)
        2'd0: taken = flags_i[ex_q.mask[1:0]];
        2'd1: taken = !flags_i[ex_q.mask[1:0]];
        2'd2: taken = ((flags_i | ~ex_q.mask) == 4'hF);
        default: taken = ((flags_i & ex_q.mask) != 4'h0);
      endcase
    end
  end
  assign target = ex_q.pc + ex_q.imm[13:0];
  assign flush  = commit && taken && !slave_i;

  // reconfiguration and flag sharing leave at commit
  assign rcfg_we_o   = commit && ex_q.kind == EX_RCFG;
  assign rcfg_mode_o = ex_q.rmode;
  assign rcfg_mask_o = ex_q.mask | OWN;
  assign flag_we_o   = commit && ex_q.misc == EX2_SFLG;
  assign flag_o      = flag_q;
  assign halted_o    = halted_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ex_q <= '0; first_q <= 1'b0; fin_q <= 1'b0; res_q <= '0; flag_q <= 1'b0;
      running_q <= 1'b0; halted_q <= 1'b0;
    end else begin
      if (start && !halted_q) running_q <= 1'b1;
      if (commit && ex_q.kind == EX_CMP) flag_q <= alu_flag;
      if (commit && ex_q.misc == EX2_HALT) begin
        halted_q  <= 1'b1;
        running_q <= 1'b0;
      end
      if (adv_i && !halted_q && !(commit && ex_q.misc == EX2_HALT)) begin
        ex_q    <= ex_i;
        first_q <= ex_i.valid;
        fin_q   <= 1'b0;
      end else begin
        first_q <= 1'b0;
        if (commit && ex_q.misc == EX2_HALT) ex_q <= '0;
        if (cpl_pulse && !fin_q) begin
          fin_q <= 1'b1;
          res_q <= cpl_data;
        end
      end
    end
  end
endmodule
