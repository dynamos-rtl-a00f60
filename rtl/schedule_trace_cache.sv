// schedule_trace_cache: the Schedule Trace-Cache (STC) holding memoized
// issue schedules for the OinO mode.
//
// 4 kB of storage organised as NBLK blocks of BLK_BITS bits (204 blocks of 20
// bytes). A stored trace occupies consecutive blocks: first its meta-block,
// then one block per issue group, the last carrying the End-of-Trace marker.
// The trace selection table keeps the index of the first block (the set-ID);
// the reader walks the following blocks sequentially, wrapping at NBLK.
//
// Space is handed out as a circular log: alloc_base is where the next trace
// will start; the writer puts its blocks at alloc_base + k and then pulses
// alloc_done with the number of blocks used. Each block remembers which trace
// (selection-table index) owns it; overwriting a block of another trace reports
// that trace on evict_valid/evict_index in the same cycle so its In-STC bit can
// be cleared.
//
// Timing: synchronous read, rd_data is valid in the cycle after rd_en and is
// held while rd_en is low. Writes take effect on the rising edge.
//
// The 4 kB size, blocks reached from a set-ID and read sequentially, and the
// End-of-Trace marker follow the design. The block size and the circular-log
// replacement are own choices: the design's replacement (un-memoized traces
// first, then least recently used, with compaction) is not built.
module schedule_trace_cache #(
  parameter int unsigned STC_BYTES = 4096,
  parameter int unsigned BLK_BITS  = 160,
  parameter int unsigned OWNW      = 8,
  localparam int unsigned NBLK     = STC_BYTES * 8 / BLK_BITS,
  localparam int unsigned AW       = $clog2(NBLK)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                rd_en,
  input  logic [AW-1:0]       rd_addr,
  output logic [BLK_BITS-1:0] rd_data,
  input  logic                wr_en,
  input  logic [AW-1:0]       wr_addr,
  input  logic [BLK_BITS-1:0] wr_data,
  input  logic [OWNW-1:0]     wr_owner,
  output logic [AW-1:0]       alloc_base,
  input  logic                alloc_done,
  input  logic [AW:0]         alloc_len,
  output logic                evict_valid,
  output logic [OWNW-1:0]     evict_index
);

  logic [BLK_BITS-1:0] mem [NBLK];
  logic [NBLK-1:0]     bv;
  logic [OWNW-1:0]     owner [NBLK];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end

  assign evict_valid = wr_en && bv[wr_addr] && owner[wr_addr] != wr_owner;
  assign evict_index = owner[wr_addr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bv         <= '0;
      alloc_base <= '0;
      for (int i = 0; i < NBLK; i++) owner[i] <= '0;
    end else begin
      if (wr_en) begin
        bv[wr_addr]    <= 1'b1;
        owner[wr_addr] <= wr_owner;
      end
      if (alloc_done) begin
        if ({1'b0, alloc_base} + alloc_len >= (AW+1)'(NBLK))
          alloc_base <= AW'({1'b0, alloc_base} + alloc_len - (AW+1)'(NBLK));
        else
          alloc_base <= AW'({1'b0, alloc_base} + alloc_len);
      end
    end
  end

  a_wr_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    !(wr_en && int'(wr_addr) >= int'(NBLK)));

endmodule
