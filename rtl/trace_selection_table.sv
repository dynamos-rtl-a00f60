// trace_selection_table: book-keeping of traces and of their memoized schedules.
//
// A direct-mapped table indexed by the trace's header PC (word address bits).
// Each entry holds the header PC as tag, the TraceID (header PC hashed with the
// directions of the trace's forward branches), a 4-bit confidence counter, the
// In-STC bit, the STC block where the trace's schedule starts (set-ID) and a
// signature of the trace's last recorded schedule.
//   * learn (big, at the end of each committed trace): a new TraceID allocates
//     the entry with confidence 3. A known TraceID whose schedule signature
//     matches the previous one gains 1 (saturating at 15), otherwise the new
//     signature replaces the old one. learn_store says, in the same cycle,
//     that the trace has become memoizable (confidence above 7) and is not yet
//     in the STC, so the schedule just recorded should be written there.
//   * lookup (little, when a trace header is predicted): combinational; hit
//     when the entry is valid, the tag matches and In-STC is set.
//   * abort (little, OinO misspeculation): confidence drops by 3 (floor 0);
//     a trace that falls to 7 or below loses its In-STC bit.
//   * install / evict (STC): set In-STC with the set-ID, or clear it for a
//     trace whose blocks were overwritten.
// All updates happen on the rising clock edge; reset invalidates every entry.
//
// The counter width, the initial value 3, +1 on a repeat, -3 on an abort and
// the threshold 7 follow the design. The direct mapping, 256 entries (the
// design reports fewer than 150 traces per application), full-PC tags, the
// schedule signature, leaving the counter alone when a schedule changes and
// dropping In-STC on a fall below the threshold are own choices.
module trace_selection_table #(
  parameter int unsigned ENTRIES = 256,
  parameter int unsigned SETW    = 8,
  parameter int unsigned IDW     = 16,
  parameter int unsigned SIGW    = 16,
  localparam int unsigned IW     = $clog2(ENTRIES)
) (
  input  logic            clk,
  input  logic            rst_n,
  // little-side lookup
  input  logic [31:0]     lk_pc,
  output logic            lk_hit,
  output logic [SETW-1:0] lk_set_id,
  // big-side learning
  input  logic            learn_valid,
  input  logic [31:0]     learn_pc,
  input  logic [IDW-1:0]  learn_id,
  input  logic [SIGW-1:0] learn_sig,
  output logic            learn_store,
  output logic [3:0]      learn_conf,
  // little-side abort
  input  logic            abort_valid,
  input  logic [31:0]     abort_pc,
  // STC installation and eviction
  input  logic            install_valid,
  input  logic [31:0]     install_pc,
  input  logic [SETW-1:0] install_set_id,
  input  logic            evict_valid,
  input  logic [IW-1:0]   evict_index
);

  typedef struct packed {
    logic            valid;
    logic [31:0]     tag;
    logic [IDW-1:0]  id;
    logic [3:0]      conf;
    logic            in_stc;
    logic [SETW-1:0] set_id;
    logic [SIGW-1:0] sig;
  } tst_entry_t;

  tst_entry_t tab [ENTRIES];

  function automatic logic [IW-1:0] index_of(logic [31:0] pc);
    return pc[IW+1:2];
  endfunction

  tst_entry_t lk_e, ln_e, ab_e;
  logic       ln_known;
  logic [4:0] ln_next;

  always_comb begin
    lk_e      = tab[index_of(lk_pc)];
    lk_hit    = lk_e.valid && lk_e.tag == lk_pc && lk_e.in_stc;
    lk_set_id = lk_e.set_id;

    ln_e     = tab[index_of(learn_pc)];
    ln_known = ln_e.valid && ln_e.tag == learn_pc && ln_e.id == learn_id;
    if (!ln_known)                 ln_next = 5'd3;
    else if (ln_e.sig == learn_sig) ln_next = (ln_e.conf == 4'd15) ? 5'd15 : {1'b0, ln_e.conf} + 5'd1;
    else                           ln_next = {1'b0, ln_e.conf};
    learn_conf  = ln_next[3:0];
    learn_store = learn_valid && ln_next > 5'd7 && !(ln_known && ln_e.in_stc);

    ab_e = tab[index_of(abort_pc)];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) tab[i] <= '0;
    end else begin
      if (learn_valid) begin
        tab[index_of(learn_pc)].valid <= 1'b1;
        tab[index_of(learn_pc)].tag   <= learn_pc;
        tab[index_of(learn_pc)].id    <= learn_id;
        tab[index_of(learn_pc)].conf  <= ln_next[3:0];
        tab[index_of(learn_pc)].sig   <= learn_sig;
        if (!ln_known) tab[index_of(learn_pc)].in_stc <= 1'b0;
      end
      if (abort_valid && ab_e.valid && ab_e.tag == abort_pc) begin
        tab[index_of(abort_pc)].conf <= (ab_e.conf > 4'd3) ? ab_e.conf - 4'd3 : 4'd0;
        if (ab_e.conf <= 4'd10) tab[index_of(abort_pc)].in_stc <= 1'b0;
      end
      if (evict_valid) tab[evict_index].in_stc <= 1'b0;
      if (install_valid) begin
        tab[index_of(install_pc)].in_stc <= 1'b1;
        tab[index_of(install_pc)].set_id <= install_set_id;
      end
    end
  end

endmodule
