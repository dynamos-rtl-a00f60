// dynamos_top: the schedule-memoization resources of a DynaMOS big/little
// pair, i.e. everything that lets the in-order little core replay issue
// schedules recorded by the out-of-order big core.
//
// Big side: schedule_fill_unit watches the big core's commit stream (with the
// issue cycle of every instruction), cuts it into traces, Level-1-renames and
// packs each trace into issue groups, and asks the trace_selection_table
// whether the trace's schedule has repeated often enough. If so the schedule
// goes into the schedule_trace_cache and the table's In-STC bit is set.
//
// Little side: when the little core's front end predicts a trace header PC
// (lf_valid/lf_pc) the table is looked up. On a hit the oino_engine replays the
// stored schedule (lf_oino pulses). On a miss lf_ino pulses and the little
// core's own in-order pipeline runs the trace, reading and writing the
// committed registers through the ino_* ports. A trace that misspeculates in
// OinO mode (branch divergence, memory alias, interrupt) aborts, lowers its
// confidence in the table by 3, and is reported on aborted/aborted_pc for the
// in-order pipeline to re-execute.
//
// The big and little pipelines themselves, the shared caches, the branch
// predictor and the big/little controller are outside this module: their
// connections are the ports. A header is accepted (lf_ready) when the engine can
// start a trace (a hit: the previous trace may still be committing) or, for a
// miss, when no trace is in flight, so in-order execution sees all of the
// previous trace's registers and stores. Lookup and hand-over happen in the
// cycle lf_valid and lf_ready are both high.
module dynamos_top
  import dynamos_pkg::*;
#(
  parameter int unsigned TST_ENTRIES = 256,
  localparam int unsigned NBLK       = STC_BYTES * 8 / BLK_BITS,
  localparam int unsigned BAW        = $clog2(NBLK),
  localparam int unsigned CW         = $clog2(MAX_TRACE)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // big core commit stream
  input  logic                       big_valid,
  output logic                       big_ready,
  input  logic [31:0]                big_pc,
  input  op_e                        big_op,
  input  logic [AR_W-1:0]            big_rd,
  input  logic [AR_W-1:0]            big_rs1,
  input  logic [AR_W-1:0]            big_rs2,
  input  logic [15:0]                big_imm,
  input  bcond_e                     big_bcond,
  input  logic                       big_taken,
  input  logic [31:0]                big_target,
  input  logic [CW-1:0]              big_icyc,
  // little core front end
  input  logic                       lf_valid,
  input  logic [31:0]                lf_pc,
  output logic                       lf_ready,
  output logic                       lf_oino,
  output logic                       lf_ino,
  // data memory (shared L1 data cache)
  output logic [WIDTH-1:0]           dm_rd_req,
  output logic [WIDTH-1:0][XLEN-1:0] dm_rd_addr,
  input  logic [WIDTH-1:0][XLEN-1:0] dm_rd_data,
  input  logic                       dm_rd_ready,
  output logic                       dm_wr_valid,
  output logic [XLEN-1:0]            dm_wr_addr,
  output logic [XLEN-1:0]            dm_wr_data,
  input  logic                       irq,
  // in-order pipeline register access
  input  logic [1:0][AR_W-1:0]       ino_rd_ar,
  output logic [1:0][XLEN-1:0]       ino_rd_data,
  input  logic                       ino_wr_en,
  input  logic [AR_W-1:0]            ino_wr_ar,
  input  logic [XLEN-1:0]            ino_wr_data,
  output logic [3:0]                 ino_flags,
  input  logic                       ino_flags_wr,
  input  logic [3:0]                 ino_flags_data,
  // OinO results
  output logic                       committed,
  output logic [31:0]                committed_pc,
  output logic                       aborted,
  output logic [31:0]                aborted_pc,
  output logic [1:0]                 abort_cause,
  output logic                       oino_busy,
  // events
  output logic                       ev_group,
  output logic                       ev_spec_start,
  output logic                       ev_stall_mem,
  output logic                       ev_stall_lsq,
  output logic                       ev_stall_ver,
  output logic                       ev_forward,
  output logic                       ev_stc_install,
  output logic                       ev_stc_evict,
  output logic                       ev_discard
);

  localparam int unsigned TIW = $clog2(TST_ENTRIES);

  // selection table <-> fill unit / STC / engine
  logic           lk_hit;
  logic [BAW-1:0] lk_set;
  logic           learn_valid, learn_store;
  logic [31:0]    learn_pc;
  logic [15:0]    learn_id, learn_sig;
  logic [3:0]     learn_conf;
  logic           inst_valid;
  logic [31:0]    inst_pc;
  logic [BAW-1:0] inst_set;
  logic           ev_valid;
  logic [TIW-1:0] ev_index;

  // STC ports
  logic                stc_rd_en, stc_wr_en, alloc_done;
  logic [BAW-1:0]      stc_rd_addr, stc_wr_addr, alloc_base;
  logic [BLK_BITS-1:0] stc_rd_data, stc_wr_data;
  logic [BAW:0]        alloc_len;

  logic start_ready, start_valid;

  trace_selection_table #(.ENTRIES(TST_ENTRIES), .SETW(BAW), .IDW(16), .SIGW(16)) u_tst (
    .clk, .rst_n,
    .lk_pc(lf_pc), .lk_hit, .lk_set_id(lk_set),
    .learn_valid, .learn_pc, .learn_id, .learn_sig, .learn_store, .learn_conf,
    .abort_valid(aborted), .abort_pc(aborted_pc),
    .install_valid(inst_valid), .install_pc(inst_pc), .install_set_id(inst_set),
    .evict_valid(ev_valid), .evict_index(ev_index));

  schedule_fill_unit #(.NBLK(NBLK), .IDW(16), .SIGW(16)) u_fill (
    .clk, .rst_n,
    .c_valid(big_valid), .c_ready(big_ready), .c_pc(big_pc), .c_op(big_op),
    .c_rd(big_rd), .c_rs1(big_rs1), .c_rs2(big_rs2), .c_imm(big_imm),
    .c_bcond(big_bcond), .c_taken(big_taken), .c_target(big_target),
    .c_icyc(big_icyc),
    .learn_valid, .learn_pc, .learn_id, .learn_sig, .learn_store,
    .install_valid(inst_valid), .install_pc(inst_pc), .install_set_id(inst_set),
    .stc_wr_en, .stc_wr_addr, .stc_wr_data, .alloc_base, .alloc_done, .alloc_len,
    .ev_discard);

  schedule_trace_cache #(.STC_BYTES(STC_BYTES), .BLK_BITS(BLK_BITS), .OWNW(TIW)) u_stc (
    .clk, .rst_n,
    .rd_en(stc_rd_en), .rd_addr(stc_rd_addr), .rd_data(stc_rd_data),
    .wr_en(stc_wr_en), .wr_addr(stc_wr_addr), .wr_data(stc_wr_data),
    .wr_owner(inst_pc[TIW+1:2]),
    .alloc_base, .alloc_done, .alloc_len,
    .evict_valid(ev_valid), .evict_index(ev_index));

  oino_engine #(.NBLK(NBLK)) u_engine (
    .clk, .rst_n,
    .start_valid, .start_set_id(lk_set), .start_pc(lf_pc), .start_ready,
    .stc_rd_en, .stc_rd_addr, .stc_rd_data,
    .dm_rd_req, .dm_rd_addr, .dm_rd_data, .dm_rd_ready,
    .dm_wr_valid, .dm_wr_addr, .dm_wr_data,
    .irq,
    .committed, .committed_pc, .aborted, .aborted_pc, .abort_cause,
    .busy(oino_busy),
    .ino_rd_ar, .ino_rd_data, .ino_wr_en, .ino_wr_ar, .ino_wr_data,
    .ino_flags, .ino_flags_wr, .ino_flags_data,
    .ev_group, .ev_spec_start, .ev_stall_mem, .ev_stall_lsq, .ev_stall_ver,
    .ev_forward);

  // Mode selection for a predicted trace header.
  assign lf_ready    = lk_hit ? start_ready : !oino_busy;
  assign start_valid = lf_valid && lk_hit;
  assign lf_oino     = lf_valid && lf_ready && lk_hit;
  assign lf_ino      = lf_valid && lf_ready && !lk_hit;

  assign ev_stc_install = inst_valid;
  assign ev_stc_evict   = ev_valid;

endmodule
