// tb_oino_lsq: self-checking test of the OinO load/store queue.
//
// Each simulated trace has up to 32 memory operations in program order; they
// are inserted in a random issue order, one to three per cycle, at the index
// of their program sequence number (as the meta-block would give it).
// Addresses come from a small set so that aliases are frequent. A reference
// model predicts, for every group, store-to-younger-load aliases (against
// loads already inserted and loads of the same group) and the data forwarded
// to each load from the youngest older store. A trace with an alias is
// flushed; otherwise it is drained and the memory writes must come out as the
// trace's stores in program order, one per cycle. Also replays the example of
// the reference alias case: a store at index 2 that finds a load at index 4 to the
// same address.
module tb_oino_lsq;
  localparam int DEPTH = 32, NP = 3, XW = 32, SW = 5;
  logic clk = 0, rst_n = 0;
  logic [NP-1:0]         ins_valid, ins_store, fwd_hit;
  logic [NP-1:0][SW-1:0] ins_seq;
  logic [NP-1:0][XW-1:0] ins_addr, ins_data, fwd_data;
  logic ins_fire, alias_det, drain, mem_wr_valid, drain_done, empty, flush;
  logic [XW-1:0] mem_wr_addr, mem_wr_data;

  oino_lsq dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_alias = 0, n_fwd = 0, n_drained = 0;

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic idle();
    ins_valid = '0; ins_store = '0; ins_seq = '0; ins_addr = '0; ins_data = '0;
    ins_fire = 0; drain = 0; flush = 0;
  endtask

  // one trace
  bit             m_st  [DEPTH];
  logic [XW-1:0]  m_ad  [DEPTH], m_da [DEPTH];
  bit             m_in  [DEPTH];

  task automatic run_trace(int n, bit refcase);
    int order[$];
    int pos;
    bit aborted;
    for (int i = 0; i < n; i++) begin
      m_st[i] = 1'($urandom);
      m_ad[i] = 32'h100 + 4 * $urandom_range(0, 5);
      m_da[i] = $urandom;
      m_in[i] = 0;
      order.push_back(i);
    end
    order.shuffle();
    if (refcase) begin
      // Ld a(0) St b(2) issued after Ld c(4) to the same address as St b
      n = 5;
      m_st = '{default: 0}; m_st[2] = 1;
      m_ad[2] = 32'h200; m_ad[4] = 32'h200; m_ad[0] = 32'h300; m_ad[1] = 32'h304; m_ad[3] = 32'h308;
      order = '{0, 4, 1, 2, 3};
    end
    pos = 0;
    aborted = 0;
    while (pos < n && !aborted) begin
      int g;
      bit exp_alias;
      g = refcase ? 1 : $urandom_range(1, NP);
      if (g > n - pos) g = n - pos;
      @(negedge clk);
      idle();
      for (int p = 0; p < g; p++) begin
        int s;
        s = order[pos + p];
        ins_valid[p] = 1; ins_store[p] = m_st[s]; ins_seq[p] = SW'(s);
        ins_addr[p] = m_ad[s]; ins_data[p] = m_da[s];
      end
      #1;
      exp_alias = 0;
      for (int p = 0; p < g; p++) begin
        int s;
        s = order[pos + p];
        if (m_st[s]) begin
          for (int e = s + 1; e < n; e++) if (m_in[e] && !m_st[e] && m_ad[e] == m_ad[s]) exp_alias = 1;
          for (int q = 0; q < g; q++) begin
            int t;
            t = order[pos + q];
            if (t > s && !m_st[t] && m_ad[t] == m_ad[s]) exp_alias = 1;
          end
        end else begin
          bit h;
          logic [XW-1:0] d;
          h = 0; d = '0;
          for (int e = 0; e < s; e++) if (m_in[e] && m_st[e] && m_ad[e] == m_ad[s]) begin h = 1; d = m_da[e]; end
          check(fwd_hit[p] == h && (!h || fwd_data[p] == d), "forwarding");
          if (h) n_fwd++;
        end
      end
      check(alias_det == exp_alias, "alias detection");
      if (refcase && pos == 3) check(alias_det, "reference case: store finds younger load");
      if (exp_alias) begin
        flush = 1; aborted = 1; n_alias++;
      end else begin
        ins_fire = 1;
        for (int p = 0; p < g; p++) m_in[order[pos + p]] = 1;
      end
      @(posedge clk);
      pos += g;
    end
    @(negedge clk);
    idle();
    if (aborted) begin
      #1 check(empty, "flush empties the queue");
      return;
    end
    // drain: stores in program order, one per cycle
    drain = 1;
    @(posedge clk);
    @(negedge clk);
    idle();
    for (int s = 0; s < n; s++) if (m_st[s]) begin
      #1 check(mem_wr_valid && mem_wr_addr == m_ad[s] && mem_wr_data == m_da[s] && !drain_done,
               "drained store in program order");
      @(negedge clk);
    end
    #1 check(drain_done && !mem_wr_valid, "drain done after last store");
    @(negedge clk);
    #1 check(empty, "queue empty after commit");
    n_drained++;
  endtask

  initial begin
    idle();
    repeat (2) @(posedge clk);
    rst_n = 1;
    run_trace(5, 1);
    for (int t = 0; t < 300; t++) run_trace($urandom_range(1, DEPTH), 0);
    check(n_alias > 0 && n_fwd > 0 && n_drained > 0, "aliases, forwards and drains all seen");
    $display("alias=%0d fwd=%0d drained=%0d", n_alias, n_fwd, n_drained);
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
