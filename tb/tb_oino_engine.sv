// tb_oino_engine: end-to-end test of the OinO replay engine.
//
// The testbench plays the parts around the engine: a schedule trace cache
// (synchronous-read block array), a data memory with random miss cycles
// (dm_rd_ready low), an interrupt source, and the in-order pipeline, which
// re-executes an aborted trace through the ino_* register ports.
//
// Each random trace (20 to 40 instructions) uses r0 as a fixed base register,
// so every load and store address is known when the trace is built; other
// operations work on r1..r31 and the flags. A legal 3-wide issue schedule is
// drawn at random: every instruction issues after its producers, loads and
// stores move freely, so some loads pass older stores to the same address.
// The testbench encodes the schedule itself (suffixes, meta-block, End-of-Trace)
// and predicts the outcome: abort on an alias (a load issued no later than an
// older store to its address), on a recorded branch direction that was
// deliberately flipped, or possibly on an interrupt. The expected architectural
// state comes from executing the trace in program order.
//
// Checked: after every abort the registers and memory equal the state before
// the trace (rollback); after the run all 32 registers, the flags and the
// memory equal the in-order result; the abort cause; and, for the first trace,
// that a schedule of G groups issues in G consecutive cycles after the
// two-cycle meta-block fetch. The run must show speculative trace starts, LSQ,
// version and memory stalls, forwarding, and all three abort causes.
module tb_oino_engine
  import dynamos_pkg::*;
;
  localparam int NBLK = 204;
  logic clk = 0, rst_n = 0;

  logic start_valid, start_ready, stc_rd_en, dm_rd_ready, dm_wr_valid, irq;
  logic [7:0] start_set_id, stc_rd_addr;
  logic [31:0] start_pc, committed_pc, aborted_pc, dm_wr_addr, dm_wr_data;
  logic [BLK_BITS-1:0] stc_rd_data;
  logic [WIDTH-1:0] dm_rd_req;
  logic [WIDTH-1:0][XLEN-1:0] dm_rd_addr, dm_rd_data;
  logic committed, aborted, busy;
  logic [1:0] abort_cause;
  logic [1:0][AR_W-1:0] ino_rd_ar;
  logic [1:0][XLEN-1:0] ino_rd_data;
  logic ino_wr_en, ino_flags_wr;
  logic [AR_W-1:0] ino_wr_ar;
  logic [XLEN-1:0] ino_wr_data;
  logic [3:0] ino_flags, ino_flags_data;
  logic ev_group, ev_spec_start, ev_stall_mem, ev_stall_lsq, ev_stall_ver, ev_forward;

  oino_engine #(.NBLK(NBLK)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // ------------------------------------------------ memories around the engine
  logic [BLK_BITS-1:0] stc [NBLK];
  always @(posedge clk) if (stc_rd_en) stc_rd_data <= stc[stc_rd_addr];

  logic [31:0] dmem [256];
  always_comb for (int i = 0; i < WIDTH; i++) dm_rd_data[i] = dmem[dm_rd_addr[i][9:2]];
  always @(posedge clk) if (rst_n && dm_wr_valid) dmem[dm_wr_addr[9:2]] <= dm_wr_data;
  bit miss_mode;
  always @(negedge clk) dm_rd_ready = !miss_mode || ($urandom_range(0, 3) != 0);

  // ------------------------------------------------ event counters
  int n_group = 0, n_spec = 0, n_smem = 0, n_slsq = 0, n_sver = 0, n_fwd = 0;
  int n_commit = 0, n_ab[3] = '{0, 0, 0};
  always @(posedge clk) if (rst_n) begin
    n_group += ev_group; n_spec += ev_spec_start; n_smem += ev_stall_mem;
    n_slsq += ev_stall_lsq; n_sver += ev_stall_ver; n_fwd += ev_forward;
    n_commit += committed;
    if (aborted) n_ab[abort_cause]++;
  end

  // ------------------------------------------------ traces
  typedef struct {
    op_e op; int rd, rs1, rs2; int imm; bcond_e bc; bit tk; int cyc;
  } ins_t;

  // reference architectural state
  logic [31:0] rreg [NUM_AR];
  logic [3:0]  rflags;
  logic [31:0] rmem [256];

  // executes one instruction in program order on the reference state
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

  ins_t tr[$];
  int   ngroups;

  // Build a random trace with a legal schedule; returns 1 if an alias is expected.
  function automatic bit build(int n);
    int ready[NUM_AR], fready, cnt[128], wr[NUM_AR], ncmp;
    bit al;
    tr.delete();
    foreach (ready[a]) ready[a] = 0;
    foreach (wr[a]) wr[a] = 0;
    foreach (cnt[c]) cnt[c] = 0;
    fready = 0; ncmp = 0;
    for (int i = 0; i < n; i++) begin
      ins_t x;
      int e;
      x.op = op_e'($urandom_range(1, 7));
      if (i == n - 1) x.op = OP_BR;
      if (x.op == OP_CMP && ncmp >= 15) x.op = OP_ADD;
      if (x.op == OP_BR && ncmp == 0 && i != n - 1) x.op = OP_CMP;
      if (x.op == OP_CMP) ncmp++;
      x.rd  = $urandom_range(1, NUM_AR - 1);
      while (wr[x.rd] >= 3) x.rd = (x.rd % (NUM_AR - 1)) + 1;
      x.rs1 = (x.op inside {OP_LD, OP_ST}) ? 0 : $urandom_range(0, 7);
      x.rs2 = $urandom_range(0, 7);
      x.imm = (x.op inside {OP_LD, OP_ST}) ? 4 * $urandom_range(0, 7) : $urandom_range(0, 99);
      x.bc  = bcond_e'($urandom_range(0, 3));
      x.tk  = 0;
      e = 0;
      if (x.op inside {OP_ADD, OP_SUB, OP_ST, OP_CMP}) e = (ready[x.rs1] > ready[x.rs2]) ? ready[x.rs1] : ready[x.rs2];
      if (x.op inside {OP_ADDI, OP_LD}) e = ready[x.rs1];
      if (x.op == OP_BR) e = fready;
      e += $urandom_range(0, 1);
      while (cnt[e] >= WIDTH) e++;
      cnt[e]++;
      x.cyc = e;
      if (x.op inside {OP_ADD, OP_SUB, OP_ADDI, OP_LD}) begin wr[x.rd]++; ready[x.rd] = e + 1; end
      if (x.op == OP_CMP) fready = e + 1;
      tr.push_back(x);
    end
    al = 0;
    for (int i = 0; i < n; i++) for (int j = i + 1; j < n; j++)
      if (tr[i].op == OP_ST && tr[j].op == OP_LD && tr[i].imm == tr[j].imm && tr[j].cyc <= tr[i].cyc) al = 1;
    return al;
  endfunction

  // Encode the current trace into the STC model at `base`; returns groups.
  function automatic int encode(int base);
    int sfx[NUM_AR], ccs, memc, maxc, nb, k;
    slot_t enc[$];
    int seqn[$];
    meta_t meta;
    foreach (sfx[a]) sfx[a] = 0;
    ccs = 0; memc = 0; maxc = 0;
    foreach (tr[i]) begin
      slot_t s;
      s = '0;
      s.valid = 1; s.op = tr[i].op; s.imm = 16'(tr[i].imm); s.bcond = tr[i].bc; s.taken = tr[i].tk;
      s.rs1 = '{ar: AR_W'(tr[i].rs1), suf: SUF_W'(sfx[tr[i].rs1])};
      s.rs2 = '{ar: AR_W'(tr[i].rs2), suf: SUF_W'(sfx[tr[i].rs2])};
      if (tr[i].op inside {OP_ADD, OP_SUB, OP_ADDI, OP_LD}) sfx[tr[i].rd]++;
      s.rd = '{ar: AR_W'(tr[i].rd), suf: SUF_W'(sfx[tr[i].rd])};
      if (tr[i].op == OP_CMP) ccs++;
      s.ccsuf = CC_SUF_W'(ccs);
      enc.push_back(s);
      seqn.push_back(memc);
      if (tr[i].op inside {OP_LD, OP_ST}) memc++;
      if (tr[i].cyc > maxc) maxc = tr[i].cyc;
    end
    nb = 0; k = 0; meta = '0;
    for (int c = 0; c <= maxc; c++) begin
      group_t g;
      int l;
      g = '0; l = 0;
      foreach (tr[i]) if (tr[i].cyc == c) begin
        g.slot[l] = enc[i];
        l++;
        if (tr[i].op inside {OP_LD, OP_ST}) begin meta[k] = SEQ_W'(seqn[i]); k++; end
      end
      if (l > 0) begin
        g.eot = (c == maxc);
        nb++;
        stc[(base + nb) % NBLK] = BLK_BITS'(g);
      end
    end
    stc[base] = BLK_BITS'(meta);
    return nb;
  endfunction

  // In-order re-execution through the ino ports (one instruction per cycle).
  task automatic ino_execute();
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
    for (int w = 0; w < 256; w++) if (dmem[w] != rmem[w]) begin
      check(0, {what, ": memory"});
      break;
    end
    checks++;
  endtask

  // initial architectural state, written through the in-order ports
  task automatic init_state();
    for (int a = 0; a < NUM_AR; a++) begin
      @(negedge clk);
      rreg[a] = (a == 0) ? 32'h100 : $urandom_range(0, 60);
      ino_wr_en = 1; ino_wr_ar = AR_W'(a); ino_wr_data = rreg[a];
      @(posedge clk);
      #1 ino_wr_en = 0;
    end
    rflags = 4'b0100;
    @(negedge clk);
    ino_flags_wr = 1; ino_flags_data = rflags;
    @(posedge clk);
    #1 ino_flags_wr = 0;
  endtask

  int base = 0;
  logic [31:0] pre_reg [NUM_AR];
  logic [3:0]  pre_flags;
  logic [31:0] pre_mem [256];

  initial begin
    start_valid = 0; start_set_id = '0; start_pc = '0; irq = 0;
    ino_rd_ar = '0; ino_wr_en = 0; ino_wr_ar = '0; ino_wr_data = '0;
    ino_flags_wr = 0; ino_flags_data = '0; miss_mode = 0;
    for (int w = 0; w < 256; w++) begin dmem[w] = $urandom; rmem[w] = dmem[w]; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    init_state();
    compare_state("initial");

    for (int t = 0; t < 160; t++) begin
      bit exp_alias, flip, use_irq, was_aborted;
      int n, t0, t_iss;
      n = $urandom_range(20, 40);
      exp_alias = build(n);
      // program-order outcome: record actual branch directions
      pre_reg = rreg; pre_flags = rflags; pre_mem = rmem;
      foreach (tr[i]) if (tr[i].op == OP_BR) tr[i].tk = ref_exec(tr[i]); else void'(ref_exec(tr[i]));
      flip = (t % 7 == 3);
      if (flip) tr[n - 1].tk = !tr[n - 1].tk;
      use_irq = (t % 11 == 5);
      miss_mode = (t % 5 == 1);
      ngroups = encode(base);

      // start as soon as the engine takes a trace (possibly while the previous commits)
      @(negedge clk);
      start_valid = 1; start_set_id = 8'(base); start_pc = 32'h4000 + 32'h40 * t;
      #1 while (!start_ready) begin @(negedge clk); #1; end
      @(posedge clk);
      t0 = $time / 10;
      #1 start_valid = 0;
      base = (base + ngroups + 1 + $urandom_range(0, 3)) % NBLK;

      was_aborted = 0;
      t_iss = -1;
      if (use_irq) begin
        repeat (3) @(negedge clk);
        irq = 1;
      end
      forever begin
        @(posedge clk);
        if (aborted) begin
          was_aborted = 1;
          if (use_irq && !exp_alias && !flip) check(abort_cause == 2'd2, "interrupt abort cause");
          if (!use_irq && flip && !exp_alias) check(abort_cause == 2'd0, "branch abort cause");
          if (!use_irq && exp_alias && !flip) check(abort_cause == 2'd1, "alias abort cause");
          break;
        end
        if (dut.trace_issued) begin t_iss = $time / 10; break; end
      end
      #1 irq = 0;
      if (!use_irq) check(was_aborted == (exp_alias || flip), "abort predicted");
      if (t == 0 && !was_aborted) check(t_iss - t0 == ngroups + 2, "one issue group per cycle");
      if (was_aborted) begin
        // rollback, then in-order re-execution
        logic [31:0] post_reg [NUM_AR];
        logic [3:0]  post_flags;
        logic [31:0] post_mem [256];
        post_reg = rreg; post_flags = rflags; post_mem = rmem;
        rreg = pre_reg; rflags = pre_flags; rmem = pre_mem;
        @(negedge clk);
        compare_state("rollback after abort");
        rreg = post_reg; rflags = post_flags; rmem = post_mem;
        ino_execute();
      end
    end
    @(negedge clk);
    while (busy) @(negedge clk);
    compare_state("final");
    check(n_spec > 0 && n_slsq > 0 && n_sver > 0 && n_smem > 0 && n_fwd > 0, "stall and forwarding mechanisms seen");
    check(n_ab[0] > 0 && n_ab[1] > 0 && n_ab[2] > 0 && n_commit > 50, "all abort causes and commits seen");
    $display("groups=%0d commits=%0d aborts(br,alias,irq)=%0d,%0d,%0d spec=%0d stall(mem,lsq,ver)=%0d,%0d,%0d fwd=%0d",
             n_group, n_commit, n_ab[0], n_ab[1], n_ab[2], n_spec, n_smem, n_slsq, n_sver, n_fwd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
