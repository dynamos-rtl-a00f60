// phys_regfile: the enlarged physical register file of the little core.
//
// NUM_PR registers of DW bits (128 x 32 by default: four physical registers
// for each of 32 architectural registers, four times the plain in-order
// register file). NRD asynchronous read ports and NWR write ports written on
// the rising clock edge; when several write ports name the same register in
// one cycle the highest-numbered port wins. A read in the cycle of a write
// returns the old value. Reset clears every register.
//
// The 128-entry size follows the design; the port counts (two reads and one
// write per issue lane plus one port pair for in-order mode) and the reset
// behaviour are own choices. The same module, at 16 x 4, holds the renamed
// condition-code registers.
module phys_regfile #(
  parameter int unsigned NUM_PR = 128,
  parameter int unsigned DW     = 32,
  parameter int unsigned NRD    = 7,
  parameter int unsigned NWR    = 4,
  localparam int unsigned PW    = $clog2(NUM_PR)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [NRD-1:0][PW-1:0] rd_addr,
  output logic [NRD-1:0][DW-1:0] rd_data,
  input  logic [NWR-1:0]         wr_en,
  input  logic [NWR-1:0][PW-1:0] wr_addr,
  input  logic [NWR-1:0][DW-1:0] wr_data
);

  logic [DW-1:0] regs [NUM_PR];

  always_comb
    for (int r = 0; r < NRD; r++) rd_data[r] = regs[rd_addr[r]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_PR; i++) regs[i] <= '0;
    end else begin
      for (int w = 0; w < NWR; w++)
        if (wr_en[w]) regs[wr_addr[w]] <= wr_data[w];
    end
  end

endmodule
