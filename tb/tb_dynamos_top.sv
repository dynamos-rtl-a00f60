// tb_dynamos_top: end-to-end test of the DynaMOS schedule-memoization path,
// at the design's default sizes.
//
// The testbench stands in for the big core (a commit stream with issue cycles),
// the little core's front end and in-order pipeline, the data cache (random
// miss cycles) and an interrupt source.
//
// Learning phase: 18 loop traces (20 to 40 instructions) each commit six times
// on the big core with an identical schedule, so each becomes memoizable and is
// written to the STC; together they overflow the 4 kB STC, so early ones are
// evicted. One more trace changes its schedule every time (never memoized) and
// one writes r1 four times (needs a fifth version: discarded).
//
// Replay phase: 80 trace executions picked at random are requested by the
// little front end. A trace found in the STC replays in OinO mode; otherwise, or
// after an abort, the testbench executes it in order through the register
// ports. Most traces branch on flags that do not depend on data (CMP r0,r0);
// "volatile" traces compare data registers and so may diverge from the
// recorded directions and abort. One stable trace has a load recorded ahead of
// an older store to the same address, so its replay aborts on the alias. The final registers, flags and memory must
// equal an in-order reference execution of the same 80 traces. Every mechanism
// (STC install, eviction, discard, OinO commit, in-order fallback, branch
// abort, alias abort, interrupt abort, speculative trace start, LSQ/memory stalls and
// store-to-load forwarding) must occur at least once.
module tb_dynamos_top
  import dynamos_pkg::*;
;
  localparam int NT = 20;   // 18 stable/volatile, 1 varying schedule, 1 unencodable
  localparam int ALIAS_T = NT - 4;  // stable trace given a load hoisted above an aliasing store
  logic clk = 0, rst_n = 0;

  logic big_valid, big_ready, big_taken;
  logic [31:0] big_pc, big_target;
  op_e big_op;
  logic [AR_W-1:0] big_rd, big_rs1, big_rs2;
  logic [15:0] big_imm;
  bcond_e big_bcond;
  logic [6:0] big_icyc;
  logic lf_valid, lf_ready, lf_oino, lf_ino;
  logic [31:0] lf_pc;
  logic [WIDTH-1:0] dm_rd_req;
  logic [WIDTH-1:0][XLEN-1:0] dm_rd_addr, dm_rd_data;
  logic dm_rd_ready, dm_wr_valid, irq;
  logic [XLEN-1:0] dm_wr_addr, dm_wr_data;
  logic [1:0][AR_W-1:0] ino_rd_ar;
  logic [1:0][XLEN-1:0] ino_rd_data;
  logic ino_wr_en, ino_flags_wr;
  logic [AR_W-1:0] ino_wr_ar;
  logic [XLEN-1:0] ino_wr_data;
  logic [3:0] ino_flags, ino_flags_data;
  logic committed, aborted, oino_busy;
  logic [31:0] committed_pc, aborted_pc;
  logic [1:0] abort_cause;
  logic ev_group, ev_spec_start, ev_stall_mem, ev_stall_lsq, ev_stall_ver, ev_forward;
  logic ev_stc_install, ev_stc_evict, ev_discard;

  dynamos_top dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // data memory
  logic [31:0] dmem [256];
  always_comb for (int i = 0; i < WIDTH; i++) dm_rd_data[i] = dmem[dm_rd_addr[i][9:2]];
  always @(posedge clk) if (rst_n && dm_wr_valid) dmem[dm_wr_addr[9:2]] <= dm_wr_data;
  always @(negedge clk) dm_rd_ready = ($urandom_range(0, 5) != 0);

  // event counters
  int n_inst = 0, n_evict = 0, n_disc = 0, n_commit = 0, n_spec = 0, n_smem = 0, n_slsq = 0;
  int n_sver = 0, n_fwd = 0, n_oino = 0, n_ino = 0, n_ab[3] = '{0, 0, 0};
  always @(posedge clk) if (rst_n) begin
    n_inst += ev_stc_install; n_evict += ev_stc_evict; n_disc += ev_discard;
    n_commit += committed; n_spec += ev_spec_start; n_smem += ev_stall_mem;
    n_slsq += ev_stall_lsq; n_sver += ev_stall_ver; n_fwd += ev_forward;
    n_oino += lf_oino; n_ino += lf_ino;
    if (aborted) n_ab[abort_cause]++;
  end

  typedef struct {
    op_e op; int rd, rs1, rs2; int imm; bcond_e bc; bit tk; int cyc;
  } ins_t;
  typedef ins_t trace_t[$];

  trace_t      traces [NT];
  logic [31:0] heads  [NT];

  logic [31:0] rreg [NUM_AR];
  logic [3:0]  rflags;
  logic [31:0] rmem [256];

  function automatic bit ref_exec(ins_t x);
    logic [31:0] a, b, ea;
    a = rreg[x.rs1]; b = rreg[x.rs2]; ea = a + 32'(signed'(16'(x.imm)));
    unique case (x.op)
      OP_ADD:  rreg[x.rd] = a + b;
      OP_SUB:  rreg[x.rd] = a - b;
      OP_ADDI: rreg[x.rd] = ea;
      OP_LD:   rreg[x.rd] = rmem[ea[9:2]];
      OP_ST:   rmem[ea[9:2]] = b;
      OP_CMP:  rflags = cmp_flags(a, b);
      OP_BR:   return br_eval(x.bc, rflags);
      default: ;
    endcase
    return 0;
  endfunction

  // Random loop trace; `volatile` compares data registers. Loads never issue
  // ahead of an older store to the same address (the big core would not
  // record such a schedule).
  function automatic trace_t build(int n, bit volatile_cmp, int four_writes_r1);
    trace_t tr;
    int ready[NUM_AR], fready, cnt[128], wr[NUM_AR], ncmp, st_cyc[32];
    foreach (ready[a]) ready[a] = 0;
    foreach (wr[a]) wr[a] = 0;
    foreach (cnt[c]) cnt[c] = 0;
    foreach (st_cyc[a]) st_cyc[a] = -1;
    fready = 0; ncmp = 0;
    for (int i = 0; i < n; i++) begin
      ins_t x;
      int e;
      x.op = op_e'($urandom_range(1, 7));
      if (i == 0) x.op = OP_CMP;
      if (i == n - 1) x.op = OP_BR;
      if (x.op == OP_CMP && ncmp >= 15) x.op = OP_ADD;
      if (x.op == OP_CMP) ncmp++;
      x.rd  = $urandom_range(2, NUM_AR - 1);
      while (wr[x.rd] >= 3) x.rd = (x.rd % (NUM_AR - 2)) + 2;
      if (four_writes_r1 && i >= 1 && i <= 4) begin x.op = OP_ADDI; x.rd = 1; end
      x.rs1 = (x.op inside {OP_LD, OP_ST}) ? 0 : $urandom_range(1, 7);
      x.rs2 = $urandom_range(1, 7);
      if (x.op == OP_CMP && !volatile_cmp) begin x.rs1 = 0; x.rs2 = 0; end
      x.imm = (x.op inside {OP_LD, OP_ST}) ? 4 * $urandom_range(0, 7) : $urandom_range(0, 99);
      x.bc  = (i == n - 1) ? BC_EQ : bcond_e'($urandom_range(0, 3));
      if (i == n - 1 && volatile_cmp) x.bc = BC_GE;
      x.tk  = 0;
      e = 0;
      if (x.op inside {OP_ADD, OP_SUB, OP_ST, OP_CMP}) e = (ready[x.rs1] > ready[x.rs2]) ? ready[x.rs1] : ready[x.rs2];
      if (x.op inside {OP_ADDI, OP_LD}) e = ready[x.rs1];
      if (x.op == OP_LD && st_cyc[x.imm / 4] >= e) e = st_cyc[x.imm / 4] + 1;
      if (x.op == OP_BR) e = fready;
      e += $urandom_range(0, 1);
      while (cnt[e] >= WIDTH) e++;
      cnt[e]++;
      x.cyc = e;
      if (x.op inside {OP_ADD, OP_SUB, OP_ADDI, OP_LD} && x.rd != 0) begin wr[x.rd]++; ready[x.rd] = e + 1; end
      if (x.op == OP_ST && e > st_cyc[x.imm / 4]) st_cyc[x.imm / 4] = e;
      if (x.op == OP_CMP) fready = e + 1;
      tr.push_back(x);
    end
    return tr;
  endfunction

  // Big core: one committed instance of a trace with the given branch outcomes.
  task automatic big_commit(int t);
    trace_t tr;
    tr = traces[t];
    for (int i = 0; i < tr.size(); i++) begin
      @(negedge clk);
      big_valid = 1; big_pc = heads[t] + 4 * i; big_op = tr[i].op;
      big_rd = AR_W'(tr[i].rd); big_rs1 = AR_W'(tr[i].rs1); big_rs2 = AR_W'(tr[i].rs2);
      big_imm = 16'(tr[i].imm); big_bcond = tr[i].bc; big_icyc = 7'(tr[i].cyc);
      big_taken = (i == tr.size() - 1) ? 1'b1 : tr[i].tk;
      big_target = (i == tr.size() - 1) ? heads[t] : big_pc + 8;
      #1 while (!big_ready) begin @(negedge clk); #1; end
      @(posedge clk);
    end
    @(negedge clk);
    big_valid = 0;
  endtask

  task automatic ino_execute(int t);
    trace_t tr;
    tr = traces[t];
    foreach (tr[i]) begin
      logic [31:0] a, b, ea;
      @(negedge clk);
      ino_rd_ar[0] = AR_W'(tr[i].rs1); ino_rd_ar[1] = AR_W'(tr[i].rs2);
      #1;
      a = ino_rd_data[0]; b = ino_rd_data[1];
      ea = a + 32'(signed'(16'(tr[i].imm)));
      case (tr[i].op)
        OP_ADD:  begin ino_wr_en = 1; ino_wr_ar = AR_W'(tr[i].rd); ino_wr_data = a + b; end
        OP_SUB:  begin ino_wr_en = 1; ino_wr_ar = AR_W'(tr[i].rd); ino_wr_data = a - b; end
        OP_ADDI: begin ino_wr_en = 1; ino_wr_ar = AR_W'(tr[i].rd); ino_wr_data = ea; end
        OP_LD:   begin ino_wr_en = 1; ino_wr_ar = AR_W'(tr[i].rd); ino_wr_data = dmem[ea[9:2]]; end
        OP_ST:   dmem[ea[9:2]] = b;
        OP_CMP:  begin ino_flags_wr = 1; ino_flags_data = cmp_flags(a, b); end
        default: ;
      endcase
      @(posedge clk);
      #1 ino_wr_en = 0; ino_flags_wr = 0;
    end
  endtask

  task automatic compare_state(string what);
    for (int a = 0; a < NUM_AR; a += 2) begin
      @(negedge clk);
      ino_rd_ar[0] = AR_W'(a); ino_rd_ar[1] = AR_W'(a + 1);
      #1 check(ino_rd_data[0] == rreg[a] && ino_rd_data[1] == rreg[a + 1], {what, ": registers"});
    end
    #1 check(ino_flags == rflags, {what, ": flags"});
    begin
      bit same;
      same = 1;
      for (int w = 0; w < 256; w++) if (dmem[w] != rmem[w]) same = 0;
      check(same, {what, ": memory"});
    end
  endtask

  initial begin
    big_valid = 0; big_pc = '0; big_op = OP_NOP; big_rd = '0; big_rs1 = '0; big_rs2 = '0;
    big_imm = '0; big_bcond = BC_EQ; big_taken = 0; big_target = '0; big_icyc = '0;
    lf_valid = 0; lf_pc = '0; irq = 0;
    ino_rd_ar = '0; ino_wr_en = 0; ino_wr_ar = '0; ino_wr_data = '0; ino_flags_wr = 0; ino_flags_data = '0;
    for (int w = 0; w < 256; w++) begin dmem[w] = $urandom; rmem[w] = dmem[w]; end
    repeat (2) @(posedge clk);
    rst_n = 1;

    // architectural state
    for (int a = 0; a < NUM_AR; a++) begin
      @(negedge clk);
      rreg[a] = (a == 0) ? 32'h100 : $urandom_range(0, 60);
      ino_wr_en = 1; ino_wr_ar = AR_W'(a); ino_wr_data = rreg[a];
      @(posedge clk);
      #1 ino_wr_en = 0;
    end
    rflags = 4'b0100;
    @(negedge clk); ino_flags_wr = 1; ino_flags_data = rflags;
    @(posedge clk); #1 ino_flags_wr = 0;

    // traces; recorded directions of stable traces follow CMP r0,r0
    for (int t = 0; t < NT; t++) begin
      heads[t] = 32'h0001_0000 + 32'h14 * t;
      traces[t] = build($urandom_range(20, 40), (t % 6 == 5), (t == NT - 1));
      begin
        logic [3:0] f;
        f = cmp_flags(32'h100, 32'h100);
        foreach (traces[t][i]) if (traces[t][i].op == OP_BR && i != traces[t].size() - 1)
          traces[t][i].tk = br_eval(traces[t][i].bc, f);
      end
    end

    // Trace ALIAS_T: its first load after a store reads the store's address
    // but was recorded issuing before it, so every replay meets an alias.
    begin
      int cnt[128], si, li;
      foreach (cnt[c]) cnt[c] = 0;
      foreach (traces[ALIAS_T][i]) cnt[traces[ALIAS_T][i].cyc]++;
      si = -1; li = -1;
      foreach (traces[ALIAS_T][i]) begin
        if (si < 0 && traces[ALIAS_T][i].op == OP_ST) si = i;
        if (si >= 0 && li < 0 && traces[ALIAS_T][i].op == OP_LD) li = i;
      end
      if (si < 0 || li < 0) begin
        // no store/load pair: turn two ALU instructions into one
        si = 1; li = 2;
        cnt[traces[ALIAS_T][si].cyc]--; cnt[traces[ALIAS_T][li].cyc]--;
        traces[ALIAS_T][si].op = OP_ST; traces[ALIAS_T][si].rs1 = 0;
        traces[ALIAS_T][li].op = OP_LD; traces[ALIAS_T][li].rs1 = 0;
        traces[ALIAS_T][li].cyc = 0; cnt[0]++;
        traces[ALIAS_T][si].cyc = 0; cnt[0]++;
      end
      traces[ALIAS_T][li].imm = traces[ALIAS_T][si].imm;
      cnt[traces[ALIAS_T][si].cyc]--;
      traces[ALIAS_T][si].cyc = traces[ALIAS_T][li].cyc + 1;
      while (cnt[traces[ALIAS_T][si].cyc] >= WIDTH) traces[ALIAS_T][si].cyc++;
      cnt[traces[ALIAS_T][si].cyc]++;
    end

    // learning on the big core
    for (int t = 0; t < NT; t++)
      for (int r = 0; r < 6; r++) begin
        if (t == NT - 2) begin
          // varying schedule: move the last group one cycle later each time
          traces[t][traces[t].size() - 1].cyc += 1;
        end
        big_commit(t);
      end
    repeat (200) @(posedge clk);
    check(n_inst >= NT - 2 && n_evict > 0 && n_disc == 1, "learning: installs, evictions and one discard");

    // replay on the little core
    for (int k = 0; k < 80; k++) begin
      int t;
      bit use_irq;
      t = (k == 3) ? ALIAS_T : $urandom_range(0, NT - 1);
      use_irq = (k % 13 == 7);
      @(negedge clk);
      lf_valid = 1; lf_pc = heads[t];
      #1 while (!lf_ready) begin @(negedge clk); #1; end
      if (lf_oino) begin
        @(posedge clk);
        #1 lf_valid = 0;
        if (use_irq) begin @(negedge clk); irq = 1; end
        forever begin
          @(posedge clk);
          if (aborted) begin
            #1 irq = 0;
            @(negedge clk);
            while (oino_busy) @(negedge clk);
            ino_execute(t);
            break;
          end
          if (dut.u_engine.trace_issued) break;
        end
        #1 irq = 0;
      end else begin
        @(posedge clk);
        #1 lf_valid = 0;
        ino_execute(t);
      end
      foreach (traces[t][i]) void'(ref_exec(traces[t][i]));
    end
    @(negedge clk);
    while (oino_busy) @(negedge clk);
    compare_state("final state");

    check(n_commit > 0 && n_oino > 0 && n_ino > 0, "OinO commits and in-order fallback");
    check(n_ab[0] > 0 && n_ab[1] > 0 && n_ab[2] > 0, "branch, alias and interrupt aborts");
    check(n_spec > 0 && n_slsq > 0 && n_smem > 0 && n_sver > 0 && n_fwd > 0, "speculative start, stalls and forwarding");
    $display("install=%0d evict=%0d discard=%0d oino=%0d ino=%0d commits=%0d aborts(br,alias,irq)=%0d,%0d,%0d",
             n_inst, n_evict, n_disc, n_oino, n_ino, n_commit, n_ab[0], n_ab[1], n_ab[2]);
    $display("spec=%0d stall(mem,lsq,ver)=%0d,%0d,%0d fwd=%0d", n_spec, n_smem, n_slsq, n_sver, n_fwd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
