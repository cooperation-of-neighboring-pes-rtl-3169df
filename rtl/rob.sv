// rob: reorder buffer with in-order retirement and register release.
//
// Entries are written in program order at dispatch (up to W per cycle, at
// tail), marked done when their result leaves a functional unit (one
// completion port per result bus), and retired from head, up to COMMIT_W per
// cycle, as long as the oldest entries are done. Retiring an instruction that
// writes architectural register r frees the physical register r was mapped
// to before it (prevt), which goes back to the free list of the PE that owns
// it, and records the new mapping in the committed map, which the debug port
// reads. This is the Alpha 21264 style of register reclamation; the commit
// width is this design's choice.
module rob
  import cpe_pkg::*;
#(
  parameter int NPE      = 8,
  parameter int ROB_SIZE = 256,
  parameter int W        = 8,
  parameter int COMMIT_W = 8,
  parameter int NCMP     = 2*NPE
)(
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic [W-1:0]                   alloc_v,
  input  rob_entry_t                     alloc_e   [W],
  output logic [ROB_W-1:0]               tail,
  output logic [$clog2(ROB_SIZE+1)-1:0]  free_cnt,
  input  logic [NCMP-1:0]                cmp_v,
  input  logic [ROB_W-1:0]               cmp_idx   [NCMP],
  output logic [COMMIT_W-1:0]            rel_v,
  output ptag_t                          rel_t     [COMMIT_W],
  output logic [$clog2(COMMIT_W+1)-1:0]  commit_cnt,
  output logic                           empty,
  input  logic [AREG_W-1:0]              dbg_areg,
  output ptag_t                          dbg_tag
);
  localparam int APE = NARCH / NPE;
  localparam int IW  = $clog2(ROB_SIZE);

  rob_entry_t          e_q    [ROB_SIZE];
  logic                done_q [ROB_SIZE];
  logic [IW-1:0]       head_q, tail_q;
  logic [IW:0]         cnt_q;
  ptag_t               cmap_q [NARCH];
  logic [COMMIT_W-1:0] ret;

  function automatic logic [IW-1:0] wrap(int x);
    return IW'(x % ROB_SIZE);
  endfunction

  assign tail     = ROB_W'(tail_q);
  assign free_cnt = ($clog2(ROB_SIZE+1))'(ROB_SIZE - int'(cnt_q));
  assign empty    = (cnt_q == '0);
  assign dbg_tag  = cmap_q[dbg_areg];

  always_comb begin
    logic go;
    int   n;
    go = 1'b1;
    n  = 0;
    for (int j = 0; j < COMMIT_W; j++) begin
      ret[j] = go && (j < int'(cnt_q)) && done_q[wrap(int'(head_q) + j)];
      go     = ret[j];
      rel_v[j] = ret[j] && e_q[wrap(int'(head_q) + j)].d_v;
      rel_t[j] = e_q[wrap(int'(head_q) + j)].prevt;
      if (ret[j]) n++;
    end
    commit_cnt = ($clog2(COMMIT_W+1))'(n);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      head_q <= '0;
      tail_q <= '0;
      cnt_q  <= '0;
      for (int a = 0; a < NARCH; a++) cmap_q[a] <= '{pe: PE_W'(a / APE), idx: IDX_W'(a % APE)};
    end else begin
      int na;
      na = 0;
      for (int j = 0; j < COMMIT_W; j++)
        if (ret[j] && e_q[wrap(int'(head_q) + j)].d_v)
          cmap_q[e_q[wrap(int'(head_q) + j)].areg] <= e_q[wrap(int'(head_q) + j)].newt;
      for (int c = 0; c < NCMP; c++)
        if (cmp_v[c]) done_q[cmp_idx[c]] <= 1'b1;
      for (int k = 0; k < W; k++)
        if (alloc_v[k]) begin
          e_q[wrap(int'(tail_q) + na)]    <= alloc_e[k];
          done_q[wrap(int'(tail_q) + na)] <= 1'b0;
          na++;
        end
      tail_q <= wrap(int'(tail_q) + na);
      head_q <= wrap(int'(head_q) + int'(commit_cnt));
      cnt_q  <= (IW+1)'(int'(cnt_q) + na - int'(commit_cnt));
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                  $countones(alloc_v) <= int'(free_cnt))
    else $error("rob: allocation beyond capacity");
  initial assert (ROB_SIZE <= (1 << ROB_W)) else $error("rob: ROB_SIZE too large for ROB_W");
endmodule
