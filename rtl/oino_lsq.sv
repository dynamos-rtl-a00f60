// oino_lsq: the simplified load/store queue of the OinO mode.
//
// A memoized schedule issues memory operations out of program order. Each one
// carries its program sequence number relative to the trace's first memory
// operation (taken from the trace's meta-block), and is written into the entry
// of that number, so the queue holds the trace's memory operations in program
// order whatever order they issue in.
//   * A store entering at index s checks the loads at higher indices (younger
//     in program order) that have already executed, and the loads entering in
//     the same cycle: a younger load to the same word read memory too early,
//     so `alias_det` is raised and the trace must abort.
//   * A load entering at index l takes its data from the youngest store at a
//     lower index with the same word address (`fwd_hit`/`fwd_data`), otherwise
//     the caller reads memory.
// When the trace has issued without alias, `drain` writes its stores to memory
// in program order, one per cycle on the mem_wr port, starting the cycle after
// `drain`; `drain_done` pulses in the cycle after the last store left, and the
// queue is empty from the next cycle on. `flush` (abort,
// interrupt) empties it at once.
//
// Interface timing: the insert ports are combinational for the checks and are
// written on the clock edge when ins_fire is high. Word addresses are compared
// in full (accesses are word-aligned). The sequence-number indexing, the
// younger-load check, the program-order store release at commit and the
// 32-entry size follow the design; forwarding from older stores, one store per
// cycle and the port shapes are own choices.
//
// Inside the oino_engine the simulator reports circular logic through the
// forwarding and alias loops here; it comes from the engine driving the insert
// ports and reading fwd_hit/alias_det in one always_comb, not from a real loop
// (see the engine's opening comment).
module oino_lsq #(
  parameter int unsigned DEPTH = 32,
  parameter int unsigned NP    = 3,
  parameter int unsigned XW    = 32,
  localparam int unsigned SW   = $clog2(DEPTH)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [NP-1:0]         ins_valid,
  input  logic [NP-1:0]         ins_store,
  input  logic [NP-1:0][SW-1:0] ins_seq,
  input  logic [NP-1:0][XW-1:0] ins_addr,
  input  logic [NP-1:0][XW-1:0] ins_data,
  input  logic                  ins_fire,
  output logic [NP-1:0]         fwd_hit,
  output logic [NP-1:0][XW-1:0] fwd_data,
  output logic                  alias_det,
  input  logic                  drain,
  output logic                  mem_wr_valid,
  output logic [XW-1:0]         mem_wr_addr,
  output logic [XW-1:0]         mem_wr_data,
  output logic                  drain_done,
  output logic                  empty,
  input  logic                  flush
);

  logic [DEPTH-1:0]         v, st;
  logic [DEPTH-1:0][XW-1:0] addr, data;
  logic                     draining;

  // Forwarding and alias checks.
  always_comb begin
    alias_det = 1'b0;
    for (int p = 0; p < NP; p++) begin
      fwd_hit[p]  = 1'b0;
      fwd_data[p] = '0;
      if (ins_valid[p] && !ins_store[p]) begin
        for (int e = 0; e < DEPTH; e++)
          if (e < int'(ins_seq[p]) && v[e] && st[e] && addr[e] == ins_addr[p]) begin
            fwd_hit[p]  = 1'b1;   // later (younger) matches override earlier ones
            fwd_data[p] = data[e];
          end
      end
      if (ins_valid[p] && ins_store[p]) begin
        for (int e = 0; e < DEPTH; e++)
          if (e > int'(ins_seq[p]) && v[e] && !st[e] && addr[e] == ins_addr[p])
            alias_det = 1'b1;
        for (int q = 0; q < NP; q++)
          if (q != p && ins_valid[q] && !ins_store[q] && ins_seq[q] > ins_seq[p] &&
              ins_addr[q] == ins_addr[p])
            alias_det = 1'b1;
      end
    end
  end

  // Oldest remaining store, for the program-order drain.
  logic          have_st;
  logic [SW-1:0] first_st;
  always_comb begin
    have_st  = 1'b0;
    first_st = '0;
    for (int e = DEPTH-1; e >= 0; e--)
      if (v[e] && st[e]) begin
        have_st  = 1'b1;
        first_st = SW'(e);
      end
  end

  assign mem_wr_valid = draining && have_st;
  assign mem_wr_addr  = addr[first_st];
  assign mem_wr_data  = data[first_st];
  assign drain_done   = draining && !have_st;
  assign empty        = (v == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v        <= '0;
      st       <= '0;
      addr     <= '0;
      data     <= '0;
      draining <= 1'b0;
    end else if (flush) begin
      v        <= '0;
      draining <= 1'b0;
    end else if (draining) begin
      if (have_st) v[first_st] <= 1'b0;
      else begin
        v        <= '0;      // loads leave with the last store
        draining <= 1'b0;
      end
    end else begin
      if (drain) draining <= 1'b1;
      if (ins_fire)
        for (int p = 0; p < NP; p++)
          if (ins_valid[p]) begin
            v[ins_seq[p]]    <= 1'b1;
            st[ins_seq[p]]   <= ins_store[p];
            addr[ins_seq[p]] <= ins_addr[p];
            data[ins_seq[p]] <= ins_data[p];
          end
    end
  end

  // Each sequence number is used once per trace.
  logic [NP-1:0] seq_used;
  always_comb
    for (int p = 0; p < NP; p++) seq_used[p] = ins_valid[p] && v[ins_seq[p]];
  a_seq_unique: assert property (@(posedge clk) disable iff (!rst_n)
    !(ins_fire && !flush && !draining && (seq_used != '0)));

endmodule
