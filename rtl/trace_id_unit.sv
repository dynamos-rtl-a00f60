// trace_id_unit: cuts the big core's committed instruction stream into traces
// and names each trace with its TraceID.
//
// A trace runs from a header PC (the target of the previous taken backward
// branch) up to and including the next taken backward branch. A trace that
// would end before MIN_LEN instructions is extended across that branch (a short
// loop body is unrolled into one trace), and a trace is cut at MAX_LEN
// instructions whatever comes next. The TraceID folds the header PC with the
// directions of the conditional forward branches inside the trace, so two paths
// from one header get different IDs.
//
// Interface: one committed instruction per cycle (c_valid with its PC and
// branch information), accepted when c_ready. The outputs annotate the same
// instruction combinationally: t_first marks the first instruction of a trace,
// t_last the last; with t_last come the trace's header PC, TraceID and length.
// Reset starts a new trace at the next instruction.
//
// Trace boundaries at backward branches, the 20-instruction minimum, the
// 128-instruction maximum and a TraceID formed from the header PC and the
// forward-branch outcomes follow the design. The hash itself (rotate by two,
// fold in a marker bit and the direction) is an own choice.
module trace_id_unit #(
  parameter int unsigned MIN_LEN = 20,
  parameter int unsigned MAX_LEN = 128,
  parameter int unsigned IDW     = 16,
  localparam int unsigned LW     = $clog2(MAX_LEN + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           c_valid,
  input  logic           c_ready,
  input  logic [31:0]    c_pc,
  input  logic           c_is_br,      // conditional or unconditional branch
  input  logic           c_taken,
  input  logic [31:0]    c_target,
  output logic           t_first,
  output logic           t_last,
  output logic [31:0]    t_header_pc,
  output logic [IDW-1:0] t_id,
  output logic [LW-1:0]  t_len
);

  logic           in_trace;
  logic [31:0]    head;
  logic [LW-1:0]  len;
  logic [IDW-1:0] hist;

  logic           backward;
  logic [IDW-1:0] hist_n;
  logic [LW-1:0]  len_n;

  always_comb begin
    backward = c_is_br && c_taken && (c_target <= c_pc);
    t_first  = c_valid && !in_trace;
    len_n    = (in_trace ? len : '0) + 1'b1;
    hist_n   = in_trace ? hist : '0;
    if (c_is_br && !backward)
      hist_n = {hist_n[IDW-3:0], hist_n[IDW-1:IDW-2]} ^ {{(IDW-2){1'b0}}, 1'b1, c_taken};
    t_last      = c_valid && ((backward && len_n >= LW'(MIN_LEN)) || len_n == LW'(MAX_LEN));
    t_header_pc = in_trace ? head : c_pc;
    t_len       = len_n;
    t_id        = t_header_pc[IDW+1:2] ^ hist_n;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_trace <= 1'b0;
      head     <= '0;
      len      <= '0;
      hist     <= '0;
    end else if (c_valid && c_ready) begin
      in_trace <= !t_last;
      head     <= t_header_pc;
      len      <= len_n;
      hist     <= hist_n;
    end
  end

endmodule
