// tb_rob: instructions are allocated in order, completed in random order,
// and must retire in order, only when done, at most COMMIT_W per cycle, each
// releasing its previous physical register; the committed map read through
// the debug port must follow the retired instructions. Runs several times
// around the 256-entry buffer and also fills it completely.
module tb_rob;
  import cpe_pkg::*;
  localparam int NPE = 8, ROB_SIZE = 256, W = 8, COMMIT_W = 8, NCMP = 2*NPE;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] alloc_v;
  rob_entry_t alloc_e [W];
  logic [ROB_W-1:0] tail;
  logic [$clog2(ROB_SIZE+1)-1:0] free_cnt;
  logic [NCMP-1:0] cmp_v;
  logic [ROB_W-1:0] cmp_idx [NCMP];
  logic [COMMIT_W-1:0] rel_v;
  ptag_t rel_t [COMMIT_W];
  logic [$clog2(COMMIT_W+1)-1:0] commit_cnt;
  logic empty;
  logic [AREG_W-1:0] dbg_areg;
  ptag_t dbg_tag;
  int checks = 0, failures = 0;

  rob #(.NPE(NPE), .ROB_SIZE(ROB_SIZE), .W(W), .COMMIT_W(COMMIT_W)) dut (.*);
  always #5 clk = ~clk;

  typedef struct { int idx; rob_entry_t e; bit done; } m_t;
  m_t    q [$];
  ptag_t cmap [NARCH];
  int    n_alloc = 0, n_ret = 0;
  bit    full_seen = 0;

  initial begin
    alloc_v = '0; cmp_v = '0; dbg_areg = '0;
    for (int k = 0; k < W; k++) alloc_e[k] = '0;
    for (int c = 0; c < NCMP; c++) cmp_idx[c] = '0;
    for (int a = 0; a < NARCH; a++) cmap[a] = '{pe: PE_W'(a / 4), idx: IDX_W'(a % 4)};
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int it = 0; it < 3000; it++) begin
      int na, nc, exp_n;
      logic [ROB_W-1:0] t;
      @(negedge clk);
      // check retirement of this cycle against the model
      begin
        exp_n = 0;
        while (exp_n < COMMIT_W && exp_n < q.size() && q[exp_n].done) exp_n++;
        checks++;
        if (int'(commit_cnt) != exp_n) begin
          failures++; $display("FAIL commit count %0d expected %0d", commit_cnt, exp_n);
        end
        for (int j = 0; j < exp_n; j++) begin
          checks++;
          if (rel_v[j] !== q[j].e.d_v || (q[j].e.d_v && rel_t[j] !== q[j].e.prevt)) begin
            failures++; $display("FAIL release %0d", j);
          end
        end
      end
      checks++;
      if (int'(free_cnt) != ROB_SIZE - q.size()) begin failures++; $display("FAIL free count"); end
      if (q.size() == ROB_SIZE) full_seen = 1;
      // allocate (fill up in the first phase)
      alloc_v = '0;
      t = tail;
      na = (it < 200 || it % 3 == 0) ? $urandom_range(0, W) : 0;
      if (na > int'(free_cnt)) na = int'(free_cnt);
      for (int k = 0; k < na; k++) begin
        alloc_v[k] = 1'b1;
        alloc_e[k].d_v   = ($urandom_range(0, 5) != 0);
        alloc_e[k].areg  = AREG_W'($urandom_range(0, 31));
        alloc_e[k].newt  = ptag_t'($urandom);
        alloc_e[k].prevt = ptag_t'($urandom);
      end
      // complete random in-flight entries (none in the fill phase)
      cmp_v = '0;
      nc = 0;
      if (it >= 60)
        for (int i = 0; i < q.size() && nc < NCMP; i++)
          if (!q[i].done && $urandom_range(0, 3) == 0) begin
            cmp_v[nc] = 1'b1; cmp_idx[nc] = ROB_W'(q[i].idx); nc++;
          end
      @(posedge clk);
      // model update: retire, complete, allocate
      for (int j = 0; j < exp_n; j++) begin
        if (q[0].e.d_v) cmap[q[0].e.areg] = q[0].e.newt;
        void'(q.pop_front());
        n_ret++;
      end
      for (int c = 0; c < NCMP; c++)
        if (cmp_v[c]) foreach (q[i]) if (q[i].idx == int'(cmp_idx[c])) q[i].done = 1;
      for (int k = 0; k < na; k++) begin
        m_t m;
        m.idx = (int'(t) + k) % ROB_SIZE; m.e = alloc_e[k]; m.done = 0;
        q.push_back(m);
        n_alloc++;
      end
      #1;
      dbg_areg = AREG_W'($urandom_range(0, 31));
      #1;
      checks++;
      if (dbg_tag !== cmap[dbg_areg]) begin failures++; $display("FAIL committed map r%0d", dbg_areg); end
    end
    checks++;
    if (!full_seen || n_ret < 1000) begin failures++; $display("FAIL coverage: full %b retired %0d", full_seen, n_ret); end
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
