// tb_schedule_trace_cache: self-checking test of the schedule trace cache.
//
// Stores traces of random length (2 to 60 blocks) one after another in the
// circular log, each owned by a different selection-table index, and checks
// that (a) each trace starts at the alloc_base seen before it was written,
// (b) allocation wraps at 204 blocks, (c) overwriting blocks of an older trace
// reports that trace's owner as evicted, and (d) every block of every trace
// still held reads back, with one cycle of read latency, as written.
module tb_schedule_trace_cache;
  localparam int NBLK = 204, BB = 160, AW = 8;
  logic clk = 0, rst_n = 0;
  logic rd_en, wr_en, alloc_done, evict_valid;
  logic [AW-1:0] rd_addr, wr_addr, alloc_base;
  logic [BB-1:0] rd_data, wr_data;
  logic [7:0] wr_owner, evict_index;
  logic [AW:0] alloc_len;

  schedule_trace_cache dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_evict = 0, n_wrap = 0;
  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  logic [BB-1:0] shadow [NBLK];
  int            own    [NBLK];
  int            base_r;

  function automatic logic [BB-1:0] pattern(int t, int k);
    return {5{32'(t * 1000 + k) ^ 32'hA5A5_0000}};
  endfunction

  initial begin
    rd_en = 0; wr_en = 0; alloc_done = 0; rd_addr = '0; wr_addr = '0; wr_data = '0;
    wr_owner = '0; alloc_len = '0;
    foreach (own[i]) own[i] = -1;
    base_r = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      int len;
      len = $urandom_range(2, 60);
      @(negedge clk);
      check(int'(alloc_base) == base_r, "alloc_base");
      for (int k = 0; k < len; k++) begin
        int a;
        a = (base_r + k) % NBLK;
        wr_en = 1; wr_addr = AW'(a); wr_data = pattern(t, k); wr_owner = 8'(t % 256);
        #1;
        if (own[a] >= 0 && own[a] != t) begin
          check(evict_valid && int'(evict_index) == own[a], "eviction of overwritten trace");
          n_evict++;
        end else check(!evict_valid, "no false eviction");
        @(posedge clk);
        shadow[a] = pattern(t, k); own[a] = t;
        @(negedge clk);
      end
      wr_en = 0; alloc_done = 1; alloc_len = (AW+1)'(len);
      if (base_r + len >= NBLK) n_wrap++;
      @(posedge clk);
      base_r = (base_r + len) % NBLK;
      @(negedge clk);
      alloc_done = 0;
      // read back every held block, sequentially
      for (int a = 0; a < NBLK; a++) if (own[a] >= 0) begin
        rd_en = 1; rd_addr = AW'(a);
        @(negedge clk);
        rd_en = 0;
        rd_addr = AW'((a + 1) % NBLK);
        check(rd_data == shadow[a], "read back");
        @(negedge clk);
        check(rd_data == shadow[a], "read data held");
      end
    end
    check(n_evict > 0 && n_wrap > 0, "evictions and wrap-around seen");
    $display("evictions=%0d wraps=%0d", n_evict, n_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
