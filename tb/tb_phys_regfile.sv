// tb_phys_regfile: self-checking test of the physical register file.
//
// Random writes on all write ports (including two ports naming the same
// register in one cycle, where the higher port must win) and random reads on
// all read ports, compared every cycle with a shadow array. Also checks that
// a read in the cycle of a write still returns the old value, and the reset
// value of zero.
module tb_phys_regfile;
  localparam int NPR = 128, DW = 32, NRD = 7, NWR = 4, PW = 7;
  logic clk = 0, rst_n = 0;
  logic [NRD-1:0][PW-1:0] rd_addr;
  logic [NRD-1:0][DW-1:0] rd_data;
  logic [NWR-1:0]         wr_en;
  logic [NWR-1:0][PW-1:0] wr_addr;
  logic [NWR-1:0][DW-1:0] wr_data;

  phys_regfile dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, same_port_hits = 0;
  logic [DW-1:0] shadow [NPR];

  initial begin
    foreach (shadow[i]) shadow[i] = '0;
    wr_en = '0; wr_addr = '0; wr_data = '0; rd_addr = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      for (int r = 0; r < NRD; r++) rd_addr[r] = PW'($urandom);
      for (int w = 0; w < NWR; w++) begin
        wr_en[w]   = 1'($urandom);
        wr_addr[w] = PW'($urandom_range(0, 15));   // a small range makes same-register writes common
        wr_data[w] = $urandom;
      end
      if (wr_en[0] && wr_en[3] && wr_addr[0] == wr_addr[3]) same_port_hits++;
      #1;
      for (int r = 0; r < NRD; r++) begin
        checks++;
        if (rd_data[r] !== shadow[rd_addr[r]]) begin
          failures++;
          $display("FAIL read %0d addr %0d got %h exp %h", r, rd_addr[r], rd_data[r], shadow[rd_addr[r]]);
        end
      end
      @(posedge clk);
      for (int w = 0; w < NWR; w++) if (wr_en[w]) shadow[wr_addr[w]] = wr_data[w];
    end
    checks++;
    if (same_port_hits == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
