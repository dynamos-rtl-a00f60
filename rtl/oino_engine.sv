// oino_engine: the OinO ("in-order appearing out-of-order") mode of the
// little core. It replays an issue schedule that the big core recorded in the
// schedule trace cache, with the little core's in-order, 3-wide issue.
//
// Operation, for one trace:
//   1. start (set-ID of the trace's first STC block, header PC) begins the
//      trace: both rename tables open a new trace (LLW := GLW), the fetch
//      pointer is loaded and blocks are read one per cycle.
//   2. The first block is the meta-block: the program sequence number of each
//      memory operation, listed in issue order. It is kept in a register.
//   3. Every following block is one issue group, issued in a single cycle when
//      nothing stalls. Operands Ri.j are renamed by the Level-2 rename table
//      and read from the physical register file; each lane computes its result
//      and writes it at the end of the cycle. A load or store takes the next
//      meta-block entry as its LSQ index; loads take data forwarded from an
//      older store of the trace or read the data memory. A branch evaluates its
//      condition on the renamed flags and compares it with the recorded
//      direction.
//   4. The group with the End-of-Trace marker ends issue: the ping-pong bits
//      flip (the trace's last-written registers become the next trace's
//      live-ins), the LSQ starts writing the trace's stores to memory in
//      program order and, once it is empty, the trace commits (Commit-GLW).
// A following trace may start while the previous one is still committing
// (speculative trace start). Its loads and stores wait until the older trace's
// stores have reached memory, and a register write that would overwrite the
// committed version still needed by the older trace waits too.
//
// A branch that resolves against its recorded direction, a store that finds a
// younger load to the same address, or an interrupt aborts the issuing trace:
// the LSQ is flushed, the rename tables fall back to the committed versions and
// `aborted` pulses with the trace's header PC so that in-order mode re-executes
// it from its start. An abort that arises while an older trace is still
// committing waits for that commit. While no trace is active the in-order
// pipeline reaches the architectural registers through the ino_* ports (suffix
// 0, the committed version), which is how values move between the two modes.
//
// Stalls: dm_rd_ready low with a load in the group (a data-cache miss), the
// older trace's stores still in the LSQ, a version conflict, or an End-of-Trace
// group while the older trace still commits.
//
// Following the design: schedules fetched from the STC, the meta-block, two
// level renaming with issue-time flips, LSQ alias checks, atomic commit, abort
// to in-order mode on branch divergence, alias or interrupt, at most two active
// traces. Own choices: the micro-op set and encoding (dynamos_pkg), single-cycle
// execution of a group, the stall rules above and the event outputs.
//
// The lint of the simulator reports UNOPTFLAT (circular logic) on rn_rd_ar, rn_rd_suf,
// rn_wr_conf, cc_wr_conf, ccf_rd_data, lq_hit and lq_alias. These are not real
// loops: one always_comb computes each lane's rename and LSQ inputs and also
// consumes the submodules' outputs (PR numbers, register data, forwarding and
// alias flags), and the simulator tracks dependences per whole vector. Per bit
// the chain is acyclic: slot fields -> rename -> PRF -> address -> LSQ
// -> result/stall. The code is left in one block so that each lane reads as one
// unit.
module oino_engine
  import dynamos_pkg::*;
#(
  parameter int unsigned NBLK = 204,
  localparam int unsigned BAW = $clog2(NBLK),
  localparam int unsigned PRW = $clog2(NUM_AR*POOL)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // trace start
  input  logic                      start_valid,
  input  logic [BAW-1:0]            start_set_id,
  input  logic [31:0]               start_pc,
  output logic                      start_ready,
  // STC read port
  output logic                      stc_rd_en,
  output logic [BAW-1:0]            stc_rd_addr,
  input  logic [BLK_BITS-1:0]       stc_rd_data,
  // data memory
  output logic [WIDTH-1:0]          dm_rd_req,
  output logic [WIDTH-1:0][XLEN-1:0] dm_rd_addr,
  input  logic [WIDTH-1:0][XLEN-1:0] dm_rd_data,
  input  logic                      dm_rd_ready,
  output logic                      dm_wr_valid,
  output logic [XLEN-1:0]           dm_wr_addr,
  output logic [XLEN-1:0]           dm_wr_data,
  // interrupt
  input  logic                      irq,
  // results
  output logic                      committed,
  output logic [31:0]               committed_pc,
  output logic                      aborted,
  output logic [31:0]               aborted_pc,
  output logic [1:0]                abort_cause,   // 0 branch, 1 alias, 2 interrupt
  output logic                      busy,
  // in-order mode access to the committed registers
  input  logic [1:0][AR_W-1:0]      ino_rd_ar,
  output logic [1:0][XLEN-1:0]      ino_rd_data,
  input  logic                      ino_wr_en,
  input  logic [AR_W-1:0]           ino_wr_ar,
  input  logic [XLEN-1:0]           ino_wr_data,
  output logic [3:0]                ino_flags,
  input  logic                      ino_flags_wr,
  input  logic [3:0]                ino_flags_data,
  // events
  output logic                      ev_group,
  output logic                      ev_spec_start,
  output logic                      ev_stall_mem,
  output logic                      ev_stall_lsq,
  output logic                      ev_stall_ver,
  output logic                      ev_forward
);

  localparam int unsigned W = WIDTH;

  // ---------------------------------------------------------------- state
  logic           iss_active, cm_active;
  logic [31:0]    iss_pc, cm_pc;
  logic [BAW-1:0] fptr;
  logic           fb_v, fb_meta, first_rd;
  meta_t          meta;
  logic [5:0]     memk;

  group_t grp;
  assign grp = group_t'(stc_rd_data);

  logic g_valid;   // an issue group is waiting in the fetch register
  assign g_valid = iss_active && fb_v && !fb_meta;

  // ---------------------------------------------------------------- rename
  localparam int unsigned INRD = 2*W + 3;
  localparam int unsigned CCRD = W + 2;

  logic [INRD-1:0][AR_W-1:0] rn_rd_ar;
  logic [INRD-1:0][SUF_W-1:0] rn_rd_suf;
  logic [INRD-1:0][PRW-1:0]  rn_rd_pr;
  logic [W-1:0]              rn_wr_valid, rn_wr_conf;
  logic [W-1:0][AR_W-1:0]    rn_wr_ar;
  logic [W-1:0][SUF_W-1:0]   rn_wr_suf;
  logic [W-1:0][PRW-1:0]     rn_wr_pr;
  logic [CCRD-1:0][0:0]      cc_rd_ar;
  logic [CCRD-1:0][CC_SUF_W-1:0] cc_rd_suf;
  logic [CCRD-1:0][CC_SUF_W-1:0] cc_rd_pr;
  logic [W-1:0]              cc_wr_valid, cc_wr_conf;
  logic [W-1:0][0:0]         cc_wr_ar;
  logic [W-1:0][CC_SUF_W-1:0] cc_wr_suf, cc_wr_pr;
  logic [1:0]                n_issued, cc_n_issued;

  logic fire, trace_begin, trace_issued, commit, abort;

  rename_table #(.NUM_AR(NUM_AR), .POOL(POOL), .NRD(INRD), .NWR(W)) u_rename (
    .clk, .rst_n,
    .rd_ar(rn_rd_ar), .rd_suf(rn_rd_suf), .rd_pr(rn_rd_pr),
    .wr_valid(rn_wr_valid), .wr_ar(rn_wr_ar), .wr_suf(rn_wr_suf),
    .wr_pr(rn_wr_pr), .wr_conflict(rn_wr_conf), .wr_fire(fire),
    .trace_begin, .trace_issued, .commit, .abort, .n_issued(n_issued));

  rename_table #(.NUM_AR(1), .POOL(CC_POOL), .NRD(CCRD), .NWR(W)) u_cc_rename (
    .clk, .rst_n,
    .rd_ar(cc_rd_ar), .rd_suf(cc_rd_suf), .rd_pr(cc_rd_pr),
    .wr_valid(cc_wr_valid), .wr_ar(cc_wr_ar), .wr_suf(cc_wr_suf),
    .wr_pr(cc_wr_pr), .wr_conflict(cc_wr_conf), .wr_fire(fire),
    .trace_begin, .trace_issued, .commit, .abort, .n_issued(cc_n_issued));

  // ---------------------------------------------------------------- registers
  logic [INRD-1:0][XLEN-1:0] prf_rd_data;
  logic [W:0]                prf_wr_en;
  logic [W:0][PRW-1:0]       prf_wr_addr;
  logic [W:0][XLEN-1:0]      prf_wr_data;
  logic [W:0][3:0]           ccf_rd_data;
  logic [W:0]                ccf_wr_en;
  logic [W:0][CC_SUF_W-1:0]  ccf_wr_addr;
  logic [W:0][3:0]           ccf_wr_data;
  logic [W:0][CC_SUF_W-1:0]  ccf_rd_addr;

  phys_regfile #(.NUM_PR(NUM_AR*POOL), .DW(XLEN), .NRD(INRD), .NWR(W+1)) u_prf (
    .clk, .rst_n, .rd_addr(rn_rd_pr), .rd_data(prf_rd_data),
    .wr_en(prf_wr_en), .wr_addr(prf_wr_addr), .wr_data(prf_wr_data));

  phys_regfile #(.NUM_PR(CC_POOL), .DW(4), .NRD(W+1), .NWR(W+1)) u_ccrf (
    .clk, .rst_n, .rd_addr(ccf_rd_addr), .rd_data(ccf_rd_data),
    .wr_en(ccf_wr_en), .wr_addr(ccf_wr_addr), .wr_data(ccf_wr_data));

  // ---------------------------------------------------------------- LSQ
  logic [W-1:0]                 lq_valid, lq_store, lq_hit;
  logic [W-1:0][SEQ_W-1:0]      lq_seq;
  logic [W-1:0][XLEN-1:0]       lq_addr, lq_data, lq_fwd;
  logic                         lq_alias, lq_drain, lq_done, lq_empty;

  oino_lsq #(.DEPTH(LSQ_DEPTH), .NP(W), .XW(XLEN)) u_lsq (
    .clk, .rst_n,
    .ins_valid(lq_valid), .ins_store(lq_store), .ins_seq(lq_seq),
    .ins_addr(lq_addr), .ins_data(lq_data), .ins_fire(fire),
    .fwd_hit(lq_hit), .fwd_data(lq_fwd), .alias_det(lq_alias),
    .drain(lq_drain), .mem_wr_valid(dm_wr_valid), .mem_wr_addr(dm_wr_addr),
    .mem_wr_data(dm_wr_data), .drain_done(lq_done), .empty(lq_empty),
    .flush(abort));

  // ---------------------------------------------------------------- lanes
  logic [W-1:0]           is_ld, is_st, is_mem, writes_rd, br_wrong;
  logic [W-1:0][XLEN-1:0] result;
  logic                   need_mem, stall_mem, stall_lsq, stall_ver, stall_eot;
  logic                   misspec, stall;
  logic [5:0]             nmem;

  always_comb begin
    int k;
    k         = int'(memk);
    need_mem  = 1'b0;
    stall_mem = 1'b0;
    nmem      = '0;
    for (int i = 0; i < W; i++) begin
      slot_t s;
      logic [XLEN-1:0] a, b, ea;
      s = grp.slot[i];
      is_ld[i]     = g_valid && s.valid && s.op == OP_LD;
      is_st[i]     = g_valid && s.valid && s.op == OP_ST;
      is_mem[i]    = is_ld[i] || is_st[i];
      writes_rd[i] = g_valid && s.valid &&
                     (s.op == OP_ADD || s.op == OP_SUB || s.op == OP_ADDI || s.op == OP_LD);

      rn_rd_ar[2*i]    = s.rs1.ar;
      rn_rd_suf[2*i]   = s.rs1.suf;
      rn_rd_ar[2*i+1]  = s.rs2.ar;
      rn_rd_suf[2*i+1] = s.rs2.suf;
      a  = prf_rd_data[2*i];
      b  = prf_rd_data[2*i+1];
      ea = a + XLEN'(signed'(s.imm));

      rn_wr_valid[i] = writes_rd[i];
      rn_wr_ar[i]    = s.rd.ar;
      rn_wr_suf[i]   = s.rd.suf;

      cc_wr_valid[i] = g_valid && s.valid && s.op == OP_CMP;
      cc_wr_ar[i]    = '0;
      cc_wr_suf[i]   = s.ccsuf;
      cc_rd_ar[i]    = '0;
      cc_rd_suf[i]   = s.ccsuf;
      ccf_rd_addr[i] = cc_rd_pr[i];
      br_wrong[i]    = g_valid && s.valid && s.op == OP_BR &&
                       (br_eval(s.bcond, ccf_rd_data[i]) != s.taken);

      lq_valid[i] = is_mem[i];
      lq_store[i] = is_st[i];
      lq_seq[i]   = meta[k[4:0]];
      lq_addr[i]  = ea;
      lq_data[i]  = b;
      if (is_mem[i]) begin
        k    = k + 1;
        nmem = nmem + 6'd1;
      end

      dm_rd_req[i]  = is_ld[i] && !lq_hit[i];
      dm_rd_addr[i] = ea;
      if (is_mem[i]) need_mem = 1'b1;
      if (dm_rd_req[i] && !dm_rd_ready) stall_mem = 1'b1;

      unique case (s.op)
        OP_ADD:  result[i] = a + b;
        OP_SUB:  result[i] = a - b;
        OP_ADDI: result[i] = ea;
        OP_LD:   result[i] = lq_hit[i] ? lq_fwd[i] : dm_rd_data[i];
        default: result[i] = '0;
      endcase
    end
    stall_lsq = need_mem && cm_active;
    stall_ver = (rn_wr_conf != '0) || (cc_wr_conf != '0);
    stall_eot = g_valid && grp.eot && cm_active;
    misspec   = g_valid && ((br_wrong != '0) || lq_alias);
    stall     = stall_mem || stall_lsq || stall_ver || stall_eot;
  end

  // An abort waits for an older trace's commit so that Commit-GLW is current.
  assign abort = iss_active && !cm_active && (misspec || irq);
  assign fire  = g_valid && !stall && !misspec && !irq;

  // In-order mode register ports.
  always_comb begin
    rn_rd_ar[2*W]    = ino_rd_ar[0];
    rn_rd_suf[2*W]   = '0;
    rn_rd_ar[2*W+1]  = ino_rd_ar[1];
    rn_rd_suf[2*W+1] = '0;
    rn_rd_ar[2*W+2]  = ino_wr_ar;
    rn_rd_suf[2*W+2] = '0;
    ino_rd_data[0]   = prf_rd_data[2*W];
    ino_rd_data[1]   = prf_rd_data[2*W+1];
    cc_rd_ar[W]      = '0;
    cc_rd_suf[W]     = '0;
    cc_rd_ar[W+1]    = '0;
    cc_rd_suf[W+1]   = '0;
    ccf_rd_addr[W]   = cc_rd_pr[W];
    ino_flags        = ccf_rd_data[W];

    for (int i = 0; i < W; i++) begin
      prf_wr_en[i]   = fire && writes_rd[i];
      prf_wr_addr[i] = rn_wr_pr[i];
      prf_wr_data[i] = result[i];
      ccf_wr_en[i]   = fire && cc_wr_valid[i];
      ccf_wr_addr[i] = cc_wr_pr[i];
      ccf_wr_data[i] = cmp_flags(prf_rd_data[2*i], prf_rd_data[2*i+1]);
    end
    prf_wr_en[W]   = ino_wr_en;
    prf_wr_addr[W] = rn_rd_pr[2*W+2];
    prf_wr_data[W] = ino_wr_data;
    ccf_wr_en[W]   = ino_flags_wr;
    ccf_wr_addr[W] = cc_rd_pr[W+1];
    ccf_wr_data[W] = ino_flags_data;
  end

  // ---------------------------------------------------------------- control
  logic consume, last_group;
  assign last_group   = g_valid && grp.eot;
  assign consume      = (iss_active && fb_v && fb_meta) || fire;
  assign start_ready  = !iss_active;
  assign trace_begin  = start_valid && start_ready;
  assign trace_issued = fire && last_group;
  assign lq_drain     = trace_issued;
  assign commit       = cm_active && lq_done;
  assign stc_rd_en    = iss_active && !abort && (!fb_v || (consume && !(fire && last_group)));
  assign stc_rd_addr  = fptr;
  assign busy         = iss_active || cm_active;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      iss_active <= 1'b0;
      cm_active  <= 1'b0;
      iss_pc     <= '0;
      cm_pc      <= '0;
      fptr       <= '0;
      fb_v       <= 1'b0;
      fb_meta    <= 1'b0;
      first_rd   <= 1'b0;
      meta       <= '0;
      memk       <= '0;
    end else begin
      if (stc_rd_en) begin
        fptr     <= (int'(fptr) == NBLK-1) ? '0 : fptr + 1'b1;
        first_rd <= 1'b0;
        fb_meta  <= first_rd;
        fb_v     <= 1'b1;
      end else if (consume) begin
        fb_v <= 1'b0;
      end
      if (iss_active && fb_v && fb_meta) meta <= meta_t'(stc_rd_data);
      if (fire) memk <= memk + nmem;
      if (trace_issued) begin
        iss_active <= 1'b0;
        fb_v       <= 1'b0;
        cm_active  <= 1'b1;
        cm_pc      <= iss_pc;
      end
      if (commit && !trace_issued) cm_active <= 1'b0;
      if (abort) begin
        iss_active <= 1'b0;
        fb_v       <= 1'b0;
      end
      if (trace_begin) begin
        iss_active <= 1'b1;
        iss_pc     <= start_pc;
        fptr       <= start_set_id;
        first_rd   <= 1'b1;
        fb_v       <= 1'b0;
        memk       <= '0;
      end
    end
  end

  assign committed    = commit;
  assign committed_pc = cm_pc;
  assign aborted      = abort;
  assign aborted_pc   = iss_pc;
  assign abort_cause  = (g_valid && (br_wrong != '0)) ? 2'd0 : (g_valid && lq_alias) ? 2'd1 : 2'd2;

  assign ev_group      = fire;
  assign ev_spec_start = trace_begin && cm_active;
  assign ev_stall_mem  = g_valid && stall_mem && !abort;
  assign ev_stall_lsq  = g_valid && stall_lsq && !abort;
  assign ev_stall_ver  = g_valid && stall_ver && !abort;
  assign ev_forward    = fire && ((lq_hit & is_ld) != '0);

  // In-order register writes only while no trace is in flight; a trace never
  // holds more memory operations than the LSQ has entries.
  a_ino_idle: assert property (@(posedge clk) disable iff (!rst_n)
    !((ino_wr_en || ino_flags_wr) && busy));
  a_lsq_cap: assert property (@(posedge clk) disable iff (!rst_n)
    !(fire && (memk + nmem) > 6'(LSQ_DEPTH)));
  a_one_committing: assert property (@(posedge clk) disable iff (!rst_n)
    n_issued != 2'd2 && cc_n_issued == n_issued);

endmodule
