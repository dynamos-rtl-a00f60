// schedule_fill_unit: the big core's fill buffer that turns a committed trace
// and the order in which the big core issued it into an STC schedule.
//
// Input is the big core's commit stream, one instruction per cycle, each with
// its operation, architectural registers, branch outcome and the cycle (counted
// from the trace's first issue) in which the big core issued it. A
// trace_id_unit finds the trace boundaries and the TraceID. While the trace
// commits, in program order, the unit
//   * applies Level-1 renaming: every register field gets a 2-bit suffix, the
//     version of that register inside the trace (0 = live-in); each write takes
//     the next version. The flags get a 4-bit suffix in the same way;
//   * numbers the loads and stores (their LSQ sequence numbers);
//   * drops the instruction into the issue group of its issue cycle;
//   * folds the issue cycles into a schedule signature.
// A trace is unencodable if a register needs a fifth version (the flags a
// seventeenth), it has more than 32 memory operations, or one issue cycle holds
// more than WIDTH instructions.
//
// At the trace's last instruction the signature goes to the trace selection
// table. If the table answers that the trace has become memoizable, the unit
// (not accepting commits meanwhile, c_ready low) writes the non-empty issue
// groups to the STC one block per cycle from alloc_base+1, the last with the
// End-of-Trace marker, gathers the meta-block (sequence numbers in issue order)
// and writes it at alloc_base, then installs the trace in the table with
// alloc_base as set-ID.
//
// Level-1 suffixes, the live-in suffix 0, the four-version limit, the
// meta-block, the End-of-Trace marker and recording only committed
// instructions follow the design. Packing by issue cycle with empty cycles
// squeezed out, the signature and the one-instruction-per-cycle input are own
// choices.
module schedule_fill_unit
  import dynamos_pkg::*;
#(
  parameter int unsigned NBLK = 204,
  parameter int unsigned IDW  = 16,
  parameter int unsigned SIGW = 16,
  localparam int unsigned BAW = $clog2(NBLK),
  localparam int unsigned CW  = $clog2(MAX_TRACE)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // big-core commit stream
  input  logic                 c_valid,
  output logic                 c_ready,
  input  logic [31:0]          c_pc,
  input  op_e                  c_op,
  input  logic [AR_W-1:0]      c_rd,
  input  logic [AR_W-1:0]      c_rs1,
  input  logic [AR_W-1:0]      c_rs2,
  input  logic [15:0]          c_imm,
  input  bcond_e               c_bcond,
  input  logic                 c_taken,
  input  logic [31:0]          c_target,
  input  logic [CW-1:0]        c_icyc,
  // trace selection table
  output logic                 learn_valid,
  output logic [31:0]          learn_pc,
  output logic [IDW-1:0]       learn_id,
  output logic [SIGW-1:0]      learn_sig,
  input  logic                 learn_store,
  output logic                 install_valid,
  output logic [31:0]          install_pc,
  output logic [BAW-1:0]       install_set_id,
  // schedule trace cache
  output logic                 stc_wr_en,
  output logic [BAW-1:0]       stc_wr_addr,
  output logic [BLK_BITS-1:0]  stc_wr_data,
  input  logic [BAW-1:0]       alloc_base,
  output logic                 alloc_done,
  output logic [BAW:0]         alloc_len,
  // events
  output logic                 ev_discard
);

  localparam int unsigned W = WIDTH;

  typedef enum logic [1:0] {S_COLLECT, S_WRITE, S_META} state_e;
  state_e st;

  // trace boundaries
  logic                 t_first, t_last;
  logic [31:0]          t_head;
  logic [IDW-1:0]       t_id;
  logic [$clog2(MAX_TRACE+1)-1:0] t_len;

  trace_id_unit #(.MIN_LEN(MIN_TRACE), .MAX_LEN(MAX_TRACE), .IDW(IDW)) u_tid (
    .clk, .rst_n, .c_valid, .c_ready, .c_pc,
    .c_is_br(c_op == OP_BR), .c_taken, .c_target,
    .t_first, .t_last, .t_header_pc(t_head), .t_id, .t_len);

  // fill buffer
  slot_t                 buf_slot [MAX_TRACE][W];
  logic [SEQ_W-1:0]      buf_seq  [MAX_TRACE][W];
  logic [MAX_TRACE-1:0][1:0] cnt;
  logic [NUM_AR-1:0][SUF_W-1:0] sfx;
  logic [CC_SUF_W-1:0]   ccs;
  logic [5:0]            memcnt;
  logic [CW-1:0]         maxc;
  logic                  bad;
  logic [SIGW-1:0]       sig;
  logic [31:0]           head_q;

  // encode the incoming instruction
  slot_t           enc;
  logic            wr_rd, is_mem, bad_n, take;
  logic [SIGW-1:0] sig_n;
  logic [1:0]      lane;

  assign c_ready = (st == S_COLLECT);
  assign take    = c_valid && c_ready;

  always_comb begin
    wr_rd  = (c_op == OP_ADD || c_op == OP_SUB || c_op == OP_ADDI || c_op == OP_LD);
    is_mem = (c_op == OP_LD || c_op == OP_ST);
    lane   = cnt[c_icyc];
    enc        = '0;
    enc.valid  = 1'b1;
    enc.op     = c_op;
    enc.rs1    = '{ar: c_rs1, suf: sfx[c_rs1]};
    enc.rs2    = '{ar: c_rs2, suf: sfx[c_rs2]};
    enc.rd     = '{ar: c_rd,  suf: sfx[c_rd] + (wr_rd ? 2'd1 : 2'd0)};
    enc.imm    = c_imm;
    enc.bcond  = c_bcond;
    enc.taken  = c_taken;
    enc.ccsuf  = ccs + ((c_op == OP_CMP) ? 4'd1 : 4'd0);
    bad_n = bad
         || (wr_rd && sfx[c_rd] == 2'(POOL-1))
         || (c_op == OP_CMP && ccs == 4'(CC_POOL-1))
         || (is_mem && memcnt == 6'(LSQ_DEPTH))
         || (int'(lane) == W);
    sig_n = {sig[SIGW-4:0], sig[SIGW-1:SIGW-3]} ^ SIGW'(c_icyc);
  end

  assign learn_valid = take && t_last;
  assign learn_pc    = t_head;
  assign learn_id    = t_id;
  assign learn_sig   = sig_n;
  assign ev_discard  = take && t_last && learn_store && bad_n;

  // write-out
  logic [CW:0]   wc;      // issue cycle being written
  logic [BAW:0]  nblk;    // groups written so far
  logic [5:0]    mk;      // meta-block entries gathered
  meta_t         meta;
  group_t        g;
  logic [5:0]    mk_n;
  meta_t         meta_n;

  function automatic logic [BAW-1:0] blk_addr(logic [BAW-1:0] base, logic [BAW:0] off);
    logic [BAW+1:0] s;
    s = {2'b00, base} + {1'b0, off};
    if (s >= (BAW+2)'(NBLK)) s = s - (BAW+2)'(NBLK);
    return s[BAW-1:0];
  endfunction

  always_comb begin
    g      = '0;
    mk_n   = mk;
    meta_n = meta;
    for (int l = 0; l < W; l++)
      if (l < int'(cnt[wc[CW-1:0]])) begin
        g.slot[l] = buf_slot[wc[CW-1:0]][l];
        if (g.slot[l].op == OP_LD || g.slot[l].op == OP_ST) begin
          meta_n[mk_n[4:0]] = buf_seq[wc[CW-1:0]][l];
          mk_n = mk_n + 6'd1;
        end
      end
    g.eot = (wc[CW-1:0] == maxc);

    stc_wr_en      = 1'b0;
    stc_wr_addr    = blk_addr(alloc_base, '0);
    stc_wr_data    = BLK_BITS'(meta);
    alloc_done     = 1'b0;
    alloc_len      = nblk + 1'b1;
    install_valid  = 1'b0;
    install_pc     = head_q;
    install_set_id = alloc_base;
    if (st == S_WRITE && cnt[wc[CW-1:0]] != 2'd0) begin
      stc_wr_en   = 1'b1;
      stc_wr_addr = blk_addr(alloc_base, nblk + 1'b1);
      stc_wr_data = BLK_BITS'(g);
    end
    if (st == S_META) begin
      stc_wr_en     = 1'b1;
      alloc_done    = 1'b1;
      install_valid = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (take && !bad_n) begin
      buf_slot[c_icyc][lane] <= enc;
      buf_seq[c_icyc][lane]  <= memcnt[SEQ_W-1:0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st     <= S_COLLECT;
      cnt    <= '0;
      sfx    <= '0;
      ccs    <= '0;
      memcnt <= '0;
      maxc   <= '0;
      bad    <= 1'b0;
      sig    <= '0;
      head_q <= '0;
      wc     <= '0;
      nblk   <= '0;
      mk     <= '0;
      meta   <= '0;
    end else begin
      unique case (st)
        S_COLLECT: if (take) begin
          if (!bad_n) begin
            cnt[c_icyc] <= lane + 2'd1;
            if (wr_rd) sfx[c_rd] <= sfx[c_rd] + 2'd1;
          end
          if (c_op == OP_CMP && !bad_n) ccs <= ccs + 4'd1;
          if (is_mem) memcnt <= memcnt + 6'd1;
          if (c_icyc > maxc) maxc <= c_icyc;
          bad    <= bad_n;
          sig    <= sig_n;
          head_q <= t_head;
          if (t_last) begin
            if (learn_store && !bad_n) begin
              st   <= S_WRITE;
              wc   <= '0;
              nblk <= '0;
              mk   <= '0;
              meta <= '0;
            end else begin
              cnt    <= '0;
              sfx    <= '0;
              ccs    <= '0;
              memcnt <= '0;
              maxc   <= '0;
              bad    <= 1'b0;
              sig    <= '0;
            end
          end
        end
        S_WRITE: begin
          if (cnt[wc[CW-1:0]] != 2'd0) nblk <= nblk + 1'b1;
          mk   <= mk_n;
          meta <= meta_n;
          wc   <= wc + 1'b1;
          if (wc[CW-1:0] == maxc) st <= S_META;
        end
        default: begin
          st     <= S_COLLECT;
          cnt    <= '0;
          sfx    <= '0;
          ccs    <= '0;
          memcnt <= '0;
          maxc   <= '0;
          bad    <= 1'b0;
          sig    <= '0;
        end
      endcase
    end
  end

endmodule
