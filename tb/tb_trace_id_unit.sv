// tb_trace_id_unit: self-checking test of trace boundary detection and TraceID.
//
// Drives a synthetic committed instruction stream: loops whose bodies are 3 to
// 150 instructions long, containing conditional forward branches with random
// directions and ending with a taken backward branch to the loop header. A
// reference model collects whole traces and checks, at each t_last, the header
// PC, the length, and the TraceID (header PC bits folded with the pairs
// {1, direction} of the forward branches, rotated by two per branch). It also
// checks the rules: short loop bodies are extended over their backward branch
// until at least 20 instructions, and no trace exceeds 128. Random c_ready
// stalls check that nothing advances without a handshake.
module tb_trace_id_unit;
  logic clk = 0, rst_n = 0;
  logic c_valid, c_ready, c_is_br, c_taken, t_first, t_last;
  logic [31:0] c_pc, c_target, t_header_pc;
  logic [15:0] t_id;
  logic [7:0]  t_len;

  trace_id_unit dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_ext = 0, n_cut = 0, n_traces = 0;
  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // model state
  bit          m_in = 0;
  logic [31:0] m_head;
  int          m_len, m_nback;
  logic [15:0] m_hist;

  task automatic commit_one(logic [31:0] pc, bit br, bit tk, logic [31:0] tg);
    bit back, last;
    @(negedge clk);
    c_valid = 1; c_pc = pc; c_is_br = br; c_taken = tk; c_target = tg;
    c_ready = ($urandom_range(0, 4) != 0);
    while (!c_ready) begin
      @(negedge clk);
      c_ready = ($urandom_range(0, 4) != 0);
    end
    if (!m_in) begin m_head = pc; m_len = 0; m_hist = '0; m_nback = 0; end
    back = br && tk && tg <= pc;
    m_len++;
    if (br && !back) m_hist = {m_hist[13:0], m_hist[15:14]} ^ {14'b0, 1'b1, tk};
    last = (back && m_len >= 20) || m_len == 128;
    #1;
    check(t_first == !m_in, "t_first");
    check(t_last == last, "t_last");
    if (last) begin
      check(t_header_pc == m_head && int'(t_len) == m_len &&
            t_id == (m_head[17:2] ^ m_hist), "trace header, length and TraceID");
      if (m_nback > 0) n_ext++;
      if (!back) n_cut++;
      n_traces++;
    end
    if (back && !last) m_nback++;
    m_in = !last;
    @(posedge clk);
  endtask

  initial begin
    c_valid = 0; c_ready = 1; c_pc = '0; c_is_br = 0; c_taken = 0; c_target = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int l = 0; l < 60; l++) begin
      logic [31:0] head;
      int body, iters;
      head  = 32'h1000 + 32'h400 * l;
      body  = (l % 3 == 0) ? $urandom_range(3, 12) : $urandom_range(13, 150);
      iters = $urandom_range(1, 6);
      for (int it = 0; it < iters; it++) begin
        logic [31:0] pc;
        pc = head;
        for (int i = 0; i < body - 1; i++) begin
          if ($urandom_range(0, 5) == 0) begin
            bit tk;
            tk = 1'($urandom);
            commit_one(pc, 1, tk, pc + 8);
            pc = pc + (tk ? 8 : 4);
          end else begin
            commit_one(pc, 0, 0, 0);
            pc = pc + 4;
          end
        end
        commit_one(pc, 1, 1, head);
      end
    end
    check(n_ext > 0 && n_cut > 0 && n_traces > 20, "extended and cut traces seen");
    $display("traces=%0d extended=%0d cut=%0d", n_traces, n_ext, n_cut);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
