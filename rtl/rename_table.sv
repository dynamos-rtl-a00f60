// rename_table: Level-2 (rotational) register renaming of the OinO mode.
//
// Every architectural register (AR) owns a fixed circular pool of POOL physical
// registers (PRs). Per AR the table keeps two pool indices, a ping-pong bit that
// says which of the two is the Global Last-Written index (GLW, the slot of the
// trace's live-in, suffix 0) and which is the Local Last-Written index (LLW, the
// newest slot written by the trace being issued), and a Commit-GLW holding the
// slot of the last committed value. A schedule operand Ri.j is found in PR
//   i*POOL + ((GLW_i + j) mod POOL).
// Each write to an AR advances its LLW. When a trace has fully issued the
// ping-pong bit of every AR flips, so the LLW becomes the next trace's GLW
// without copying. When the oldest issued trace commits, Commit-GLW takes that
// trace's final index. On an abort the flips of uncommitted traces are undone
// and the GLW is reloaded from Commit-GLW. At most two issued-but-uncommitted
// traces are tracked (n_issued).
//
// Interface: combinational read ports (ar, suffix -> PR) and write ports
// (ar, suffix -> PR, plus a conflict flag when that slot still holds the
// committed value needed by an older uncommitted trace); wr_fire applies the
// LLW advances of the valid write ports. trace_begin, trace_issued, commit and
// abort are single-cycle pulses; all state changes on the rising clock edge.
// Reset puts every index at 0 and clears the ping-pong bits.
//
// Following the design: the pool of 4 per AR (16 for the condition codes),
// GLW/LLW/Commit-GLW/ping-pong per AR (7 bits with a pool of 4), flipping at
// issue rather than commit, and the abort sequence. Own choices: modulo
// addition rather than an XOR hash, and the LLW advancing by the number of
// writes to the AR in one issue group.
//
// Inside the oino_engine the simulator reports circular logic through pr_of;
// it comes from the engine driving rd_ar and reading rd_pr in one always_comb,
// not from a real loop (see the engine's opening comment).
module rename_table #(
  parameter int unsigned NUM_AR = 32,
  parameter int unsigned POOL   = 4,
  parameter int unsigned NRD    = 6,
  parameter int unsigned NWR    = 3,
  localparam int unsigned AW    = (NUM_AR > 1) ? $clog2(NUM_AR) : 1,
  localparam int unsigned IW    = $clog2(POOL),
  localparam int unsigned PW    = $clog2(NUM_AR*POOL)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [NRD-1:0][AW-1:0] rd_ar,
  input  logic [NRD-1:0][IW-1:0] rd_suf,
  output logic [NRD-1:0][PW-1:0] rd_pr,
  input  logic [NWR-1:0]         wr_valid,
  input  logic [NWR-1:0][AW-1:0] wr_ar,
  input  logic [NWR-1:0][IW-1:0] wr_suf,
  output logic [NWR-1:0][PW-1:0] wr_pr,
  output logic [NWR-1:0]         wr_conflict,
  input  logic                 wr_fire,
  input  logic                 trace_begin,
  input  logic                 trace_issued,
  input  logic                 commit,
  input  logic                 abort,
  output logic [1:0]           n_issued
);

  logic [NUM_AR-1:0][IW-1:0] idx0, idx1, cglw;
  logic [NUM_AR-1:0]         pp;
  logic [1:0]                nflip;

  assign n_issued = nflip;

  // Ping-pong bits with the flips of uncommitted traces undone.
  logic [NUM_AR-1:0] pp_abort;
  assign pp_abort = pp ^ {NUM_AR{nflip[0]}};

  function automatic logic [IW-1:0] glw_of(int unsigned a);
    return pp[a] ? idx1[a] : idx0[a];
  endfunction

  function automatic logic [PW-1:0] pr_of(logic [AW-1:0] a, logic [IW-1:0] s);
    logic [IW-1:0] slot;
    slot = glw_of(int'(a)) + s;
    return PW'(a) * PW'(POOL) + PW'(slot);
  endfunction

  always_comb begin
    for (int r = 0; r < NRD; r++) rd_pr[r] = pr_of(rd_ar[r], rd_suf[r]);
    for (int w = 0; w < NWR; w++) begin
      logic [IW-1:0] slot;
      slot           = glw_of(int'(wr_ar[w])) + wr_suf[w];
      wr_pr[w]       = pr_of(wr_ar[w], wr_suf[w]);
      wr_conflict[w] = wr_valid[w] && (nflip != 2'd0) && (slot == cglw[wr_ar[w]]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx0  <= '0;
      idx1  <= '0;
      cglw  <= '0;
      pp    <= '0;
      nflip <= '0;
    end else if (abort) begin
      // Undo the flips of issued-but-uncommitted traces, reload GLW.
      for (int a = 0; a < NUM_AR; a++) begin
        pp[a] <= pp_abort[a];
        if (pp_abort[a]) idx1[a] <= cglw[a];
        else             idx0[a] <= cglw[a];
      end
      nflip <= '0;
    end else begin
      for (int a = 0; a < NUM_AR; a++) begin
        logic [IW-1:0] llw;
        logic [IW-1:0] nw;
        llw = pp[a] ? idx0[a] : idx1[a];
        if (trace_begin) llw = glw_of(a);
        nw = '0;
        if (wr_fire)
          for (int w = 0; w < NWR; w++)
            if (wr_valid[w] && int'(wr_ar[w]) == a) nw = nw + 1'b1;
        llw = llw + nw;
        if (pp[a]) idx0[a] <= llw;
        else       idx1[a] <= llw;
        if (trace_issued) pp[a] <= ~pp[a];
        // The oldest issued trace's final index: GLW while it is the only
        // issued trace, the other field once a younger trace has issued too.
        if (commit) cglw[a] <= (nflip == 2'd2) ? (pp[a] ? idx0[a] : idx1[a]) : glw_of(a);
      end
      nflip <= nflip + (trace_issued ? 2'd1 : 2'd0) - (commit ? 2'd1 : 2'd0);
    end
  end

  // At most two issued traces may be awaiting commit.
  a_two_traces: assert property (@(posedge clk) disable iff (!rst_n)
    !(trace_issued && !commit && nflip == 2'd2));
  a_commit_has_trace: assert property (@(posedge clk) disable iff (!rst_n)
    !(commit && nflip == 2'd0));

endmodule
