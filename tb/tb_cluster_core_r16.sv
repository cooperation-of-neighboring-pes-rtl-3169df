// tb_cluster_core_r16: the end-to-end test of tb_cluster_core run on a core
// with 16 registers per PE (128 in all, the smallest register budget the
// design is evaluated with), where dispatch can also stall for lack of free
// registers in every PE.
//
// A reference model executes every instruction in program order on 32
// architectural registers; after each phase the core is drained and all 32
// committed registers are compared through the debug port. Directed phases
// check the pipeline timing of dependent instructions:
//   - a serial chain executes one instruction per cycle in one PE;
//   - the 2nd reader of an unready value goes to the right neighbour and
//     issues in the same cycle as the 1st reader (adjacent forwarding);
//   - a reader of a value from a non-adjacent PE issues 3 cycles after the
//     producer instead of 1 (two-cycle transfer).
// Random phases mix ALU and multiply operations; a stress phase builds a
// long multiply chain so that the issue queue fills, a PE runs out of free
// registers and instructions are reallocated. Every mechanism counted in the
// core's event outputs must occur at least once.
module tb_cluster_core_r16;
  import cpe_pkg::*;

  localparam int W = 8;
  localparam bit NREG_CHECK = 1'b1;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic [W-1:0] in_valid;
  uop_t        in_uop [W];
  logic        in_ready, idle;
  logic [$clog2(W+1)-1:0] commit_count;
  logic [AREG_W-1:0] dbg_areg;
  word_t       dbg_data;
  perf_ev_t    ev;

  cluster_core #(.NREG(16)) dut (.*);

  always #5 clk = ~clk;

  int    checks = 0, failures = 0;
  longint cycle = 0;
  word_t ref_r [NARCH];
  longint n_sent = 0, n_committed = 0;

  // totals of the event counts
  longint c_min, c_prod, c_rr, c_realloc, c_wl, c_wa, c_wr, c_rrd, c_fl, c_fa, c_mul,
          c_st_reg, c_st_iq, c_st_rob;
  // issue trace
  longint iss_cyc [$];
  int     iss_cnt [$];

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      n_committed <= n_committed + longint'(commit_count);
      c_min <= c_min + ev.steer_min_dcount;  c_prod <= c_prod + ev.steer_producer;
      c_rr <= c_rr + ev.steer_rfo_right;     c_realloc <= c_realloc + ev.steer_realloc;
      c_wl <= c_wl + ev.wake_local;          c_wa <= c_wa + ev.wake_adjacent;
      c_wr <= c_wr + ev.wake_remote;         c_rrd <= c_rrd + ev.remote_read;
      c_fl <= c_fl + ev.fwd_local;           c_fa <= c_fa + ev.fwd_adjacent;
      c_mul <= c_mul + ev.mul_issued;
      c_st_reg <= c_st_reg + ev.stall_no_reg; c_st_iq <= c_st_iq + ev.stall_iq;
      c_st_rob <= c_st_rob + ev.stall_rob;
      if (ev.issued != 0) begin
        iss_cyc.push_back(cycle);
        iss_cnt.push_back(int'(ev.issued));
      end
    end
  end

  // Independent reference of the operations.
  function automatic word_t model(op_t op, word_t a, word_t b);
    case (op)
      OP_ADD:    return a + b;
      OP_SUB:    return a - b;
      OP_AND:    return a & b;
      OP_OR:     return a | b;
      OP_XOR:    return a ^ b;
      OP_SLL:    return a << b[5:0];
      OP_SRL:    return a >> b[5:0];
      OP_SRA:    return word_t'($signed(a) >>> b[5:0]);
      OP_CMPLT:  return ($signed(a) < $signed(b)) ? 64'd1 : 64'd0;
      OP_CMPULT: return (a < b) ? 64'd1 : 64'd0;
      OP_MUL:    return a * b;
      default:   return '0;
    endcase
  endfunction

  function automatic uop_t mk(op_t op, int d, int s1, int s2, logic imm_en, int imm);
    uop_t u;
    u.op = op; u.use_imm = imm_en; u.imm = IMM_W'(imm);
    u.s1_v = 1'b1; u.s1 = AREG_W'(s1);
    u.s2_v = !imm_en; u.s2 = AREG_W'(s2);
    u.d_v = (d >= 0); u.d = (d >= 0) ? AREG_W'(d) : '0;
    return u;
  endfunction

  uop_t grp [W];
  int   grp_n;

  task automatic model_apply(uop_t u);
    word_t a, b;
    a = ref_r[u.s1];
    b = u.use_imm ? sext_imm(u.imm) : ref_r[u.s2];
    if (u.d_v) ref_r[u.d] = model(u.op, a, b);
  endtask

  // Send grp[0..grp_n-1] as one group; waits until accepted.
  task automatic send();
    @(negedge clk);
    for (int k = 0; k < W; k++) begin
      in_valid[k] = (k < grp_n);
      in_uop[k]   = grp[k];
    end
    #1;
    while (!in_ready) @(negedge clk);
    @(posedge clk);
    #1;
    in_valid = '0;
    for (int k = 0; k < grp_n; k++) model_apply(grp[k]);
    n_sent += grp_n;
    grp_n = 0;
  endtask

  task automatic push(uop_t u);
    grp[grp_n++] = u;
    if (grp_n == W) send();
  endtask

  task automatic flush();
    if (grp_n != 0) send();
  endtask

  task automatic drain();
    int t;
    t = 0;
    flush();
    repeat (2) @(posedge clk);
    while (!idle && t < 5000) begin @(posedge clk); t++; end
    repeat (2) @(posedge clk);
    #1;
  endtask

  task automatic check_regs(string tag);
    drain();
    for (int r = 0; r < NARCH; r++) begin
      dbg_areg = AREG_W'(r);
      #1;
      checks++;
      if (dbg_data !== ref_r[r]) begin
        failures++;
        $display("FAIL %s: r%0d = %h, expected %h", tag, r, dbg_data, ref_r[r]);
      end
    end
    checks++;
    if (n_committed != n_sent) begin
      failures++;
      $display("FAIL %s: committed %0d of %0d", tag, n_committed, n_sent);
    end
  endtask

  task automatic expect_eq(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic op_t rand_op();
    int x;
    x = int'($urandom_range(0, 11));
    if (x >= 10) return OP_MUL;
    return op_t'(x);
  endfunction

  initial begin
    int base;
    in_valid = '0;
    dbg_areg = '0;
    grp_n = 0;
    for (int k = 0; k < W; k++) in_uop[k] = '0;
    for (int r = 0; r < NARCH; r++) ref_r[r] = '0;
    {c_min, c_prod, c_rr, c_realloc, c_wl, c_wa, c_wr, c_rrd, c_fl, c_fa, c_mul, c_st_reg, c_st_iq, c_st_rob} = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (2) @(posedge clk);

    // ---- T1: serial chain of 8 additions: one PE, one per cycle
    for (int k = 0; k < 8; k++) push(mk(OP_ADD, 1, 1, 0, 1'b1, k + 1));
    drain();
    expect_eq("chain: issue cycles", iss_cyc.size(), 8);
    expect_eq("chain: span", iss_cyc[$] - iss_cyc[0], 7);
    check_regs("chain");

    // ---- T2: two readers of one unready value run in parallel (rFO rule + AF)
    iss_cyc.delete(); iss_cnt.delete();
    base = int'(c_rr);
    push(mk(OP_ADD, 2, 0, 0, 1'b1, 5));   // A
    push(mk(OP_ADD, 3, 2, 0, 1'b1, 1));   // B: 1st reader, PE of A
    push(mk(OP_ADD, 4, 2, 0, 1'b1, 2));   // C: 2nd reader, right of A
    drain();
    expect_eq("adjacent: rfo_right steers", c_rr - base, 1);
    expect_eq("adjacent: issue cycles", iss_cyc.size(), 2);
    expect_eq("adjacent: readers issued together", iss_cnt[1], 2);
    expect_eq("adjacent: back to back", iss_cyc[1] - iss_cyc[0], 1);
    check_regs("adjacent");

    // ---- T3: reader of a non-adjacent PE's fresh value waits 2 extra cycles
    iss_cyc.delete(); iss_cnt.delete();
    base = int'(c_wr);
    push(mk(OP_ADD, 5, 0, 0, 1'b1, 7));   // A
    push(mk(OP_ADD, 6, 0, 0, 1'b1, 9));   // X: min-DCOUNT PE, not left of A
    push(mk(OP_ADD, 7, 5, 6, 1'b0, 0));   // C: steered by A, waits for X
    drain();
    expect_eq("remote: remote wake-up", c_wr - base, 1);
    expect_eq("remote: issue cycles", iss_cyc.size(), 2);
    expect_eq("remote: delay", iss_cyc[1] - iss_cyc[0], 3);
    check_regs("remote");

    // ---- random phase: ALU and multiply mix on all registers
    for (int i = 0; i < 1500; i++) begin
      op_t o;
      logic im;
      o  = rand_op();
      im = ($urandom_range(0, 3) == 0);
      push(mk(o, int'($urandom_range(1, 31)), int'($urandom_range(0, 31)),
              int'($urandom_range(0, 31)), im, int'($urandom_range(0, 65535))));
      if ($urandom_range(0, 9) == 0) flush();
    end
    check_regs("random");

    // ---- stress: long multiply chain with independent work behind it
    for (int i = 0; i < 120; i++) begin
      push(mk(OP_MUL, 9, 9, 0, 1'b1, 3));
      push(mk(OP_ADD, 10 + (i % 8), 0, 0, 1'b1, i));
      if (i % 4 == 0) push(mk(OP_ADD, -1, 1, 2, 1'b0, 0));   // no destination
    end
    for (int i = 0; i < 400; i++)
      push(mk(OP_XOR, -1, int'($urandom_range(0, 31)), 0, 1'b1, i));
    check_regs("stress");

    // ---- every mechanism must have happened
    expect_eq("seen: Min_dcount steering", c_min > 0, 1);
    expect_eq("seen: producer steering", c_prod > 0, 1);
    expect_eq("seen: rFO right steering", c_rr > 0, 1);
    expect_eq("seen: free-register reallocation", c_realloc > 0, 1);
    expect_eq("seen: local wake-up", c_wl > 0, 1);
    expect_eq("seen: adjacent wake-up", c_wa > 0, 1);
    expect_eq("seen: remote wake-up", c_wr > 0, 1);
    expect_eq("seen: remote register read", c_rrd > 0, 1);
    expect_eq("seen: local forwarding", c_fl > 0, 1);
    expect_eq("seen: adjacent forwarding", c_fa > 0, 1);
    expect_eq("seen: multiply", c_mul > 0, 1);
    if (NREG_CHECK) expect_eq("seen: stall no free register", c_st_reg > 0, 1);
    expect_eq("seen: stall issue queue full", c_st_iq > 0, 1);
    expect_eq("seen: stall reorder buffer full", c_st_rob > 0, 1);
    $display("events: min_dcount=%0d producer=%0d rfo_right=%0d realloc=%0d wake l/a/r=%0d/%0d/%0d remote_read=%0d fwd l/a=%0d/%0d mul=%0d stall reg/iq/rob=%0d/%0d/%0d",
             c_min, c_prod, c_rr, c_realloc, c_wl, c_wa, c_wr, c_rrd, c_fl, c_fa, c_mul, c_st_reg, c_st_iq, c_st_rob);
    $display("instructions=%0d cycles=%0d", n_sent, cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
