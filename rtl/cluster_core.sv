// cluster_core: integer back end of a clustered out-of-order processor whose
// neighbouring PEs cooperate.
//
// NPE processing elements form a ring. Each owns a slice of the physical
// registers (a value lives only in the PE that produced it) and executes one
// instruction per cycle. A single issue queue is shared by all PEs.
// Cooperation between neighbours has two parts:
//   - an adjacent forwarding network: every PE's result buses also feed the
//     bypass of its right neighbour, so a consumer there runs in the cycle
//     right after its producer, as if it were local; other PEs see the value
//     two cycles later;
//   - the adjacent_rFO_freereg steering rule: the 2nd and 4th reader of a
//     not-yet-produced value go to the producer's right neighbour, so readers
//     of one value spread over two PEs without transfer delay, and an
//     instruction whose PE has no free register moves to the right neighbour.
// Flow: in_uop group -> dispatch_unit (steer, rename) -> issue_queue + rob ->
// pe (REG: operands through operand_xbar; EX: adj_bypass, ALU / multiplier)
// -> own reg_file and result buses -> rob completion -> retirement frees
// registers into the owning PE's free_list.
// Interface: in_valid/in_uop/in_ready accept a decoded group (all or nothing);
// commit_count reports retirements; dbg_areg/dbg_data read the committed value
// of an architectural register combinationally; idle is high when nothing is
// in flight; ev holds this cycle's event counts.
// The front end, caches, memory instructions and the FP PE are not part of
// this block: only integer ALU and multiply instructions are executed.
module cluster_core
  import cpe_pkg::*;
#(
  parameter int NPE               = 8,
  parameter int NREG              = 40,
  parameter int IQ_SIZE           = 64,
  parameter int ROB_SIZE          = 256,
  parameter int DISPATCH_W        = 8,
  parameter int COMMIT_W          = 8,
  parameter int MUL_LAT           = 7,
  parameter int REMOTE_FWD_DELAY  = 2,
  parameter int REMOTE_READ_DELAY = 1
)(
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic [DISPATCH_W-1:0]             in_valid,
  input  uop_t                              in_uop [DISPATCH_W],
  output logic                              in_ready,
  output logic [$clog2(COMMIT_W+1)-1:0]     commit_count,
  output logic                              idle,
  input  logic [AREG_W-1:0]                 dbg_areg,
  output word_t                             dbg_data,
  output perf_ev_t                          ev
);
  localparam int W   = DISPATCH_W;
  localparam int NRQ = 2*NPE + 1;
  localparam int APE = NARCH / NPE;

  // dispatch <-> queues
  logic [$clog2(IQ_SIZE+1)-1:0]  iq_free;
  logic [$clog2(ROB_SIZE+1)-1:0] rob_free;
  logic [ROB_W-1:0]              rob_tail;
  logic [W-1:0]                  d_valid;
  iq_entry_t                     d_iq  [W];
  rob_entry_t                    d_rob [W];
  bcast_t                        bcast [2*NPE];

  // free lists
  logic [IDX_W-1:0]              fl_head  [NPE][W];
  logic [IDX_W:0]                fl_count [NPE];
  logic [$clog2(W+1)-1:0]        fl_pop   [NPE];
  logic [COMMIT_W-1:0]           rel_v;
  ptag_t                         rel_t    [COMMIT_W];

  // issue
  logic [NPE-1:0]                iss_valid;
  iq_entry_t                     iss_entry [NPE];

  // PEs, register files, crossbar
  result_t                       res_alu [NPE], res_mul [NPE];
  ptag_t [NRQ-1:0]               rq;
  word_t [NRQ-1:0]               rsp;
  logic  [NPE-1:0][NRQ-1:0][IDX_W-1:0] rf_raddr;
  word_t [NPE-1:0][NRQ-1:0]      rf_rdata;
  logic  [NPE-1:0][1:0]          rf_we;
  logic  [NPE-1:0][1:0][IDX_W-1:0] rf_waddr;
  word_t [NPE-1:0][1:0]          rf_wdata;
  logic  [NPE-1:0][1:0]          fwd_local, fwd_adj;

  // rob completion
  logic [2*NPE-1:0]              cmp_v;
  logic [ROB_W-1:0]              cmp_idx [2*NPE];
  ptag_t                         dbg_tag;

  logic [CNT_W-1:0] ev_disp, ev_min, ev_prod, ev_rr, ev_realloc;
  logic [CNT_W-1:0] ev_wl, ev_wa, ev_wr, ev_rrd;
  logic             st_reg, st_iq, st_rob, rob_empty;

  dispatch_unit #(.NPE(NPE), .NREG(NREG), .W(W), .IQ_SIZE(IQ_SIZE), .ROB_SIZE(ROB_SIZE)) u_disp (
    .clk(clk), .rst_n(rst_n),
    .in_valid(in_valid), .in_uop(in_uop), .in_ready(in_ready),
    .iq_free(iq_free), .rob_free(rob_free), .rob_tail(rob_tail),
    .fl_head(fl_head), .fl_count(fl_count), .fl_pop(fl_pop),
    .bcast(bcast),
    .out_valid(d_valid), .out_iq(d_iq), .out_rob(d_rob),
    .ev_dispatched(ev_disp), .ev_min_dcount(ev_min), .ev_producer(ev_prod),
    .ev_rfo_right(ev_rr), .ev_realloc(ev_realloc),
    .stall_no_reg(st_reg), .stall_iq(st_iq), .stall_rob(st_rob));

  for (genvar p = 0; p < NPE; p++) begin : g_fl
    logic [COMMIT_W-1:0]             pv;
    logic [COMMIT_W-1:0][IDX_W-1:0]  pidx;
    always_comb
      for (int j = 0; j < COMMIT_W; j++) begin
        pv[j]   = rel_v[j] && int'(rel_t[j].pe) == p;
        pidx[j] = rel_t[j].idx;
      end
    free_list #(.NREG(NREG), .NINIT(APE), .NPOP(W), .NPUSH(COMMIT_W)) u_fl (
      .clk(clk), .rst_n(rst_n),
      .head(fl_head[p]), .count(fl_count[p]), .pop_cnt(fl_pop[p]),
      .push_v(pv), .push_idx(pidx));
  end

  issue_queue #(.NPE(NPE), .IQ_SIZE(IQ_SIZE), .W(W), .MUL_LAT(MUL_LAT),
                .REMOTE_FWD_DELAY(REMOTE_FWD_DELAY), .REMOTE_READ_DELAY(REMOTE_READ_DELAY)) u_iq (
    .clk(clk), .rst_n(rst_n),
    .wr_valid(d_valid), .wr_entry(d_iq), .free_cnt(iq_free),
    .iss_valid(iss_valid), .iss_entry(iss_entry), .bcast(bcast),
    .ev_wake_local(ev_wl), .ev_wake_adj(ev_wa), .ev_wake_remote(ev_wr), .ev_remote_read(ev_rrd));

  for (genvar p = 0; p < NPE; p++) begin : g_pe
    localparam int L = (p == 0) ? NPE - 1 : p - 1;   // left neighbour on the ring
    ptag_t [1:0] req;
    pe #(.MUL_LAT(MUL_LAT)) u_pe (
      .clk(clk), .rst_n(rst_n),
      .iss_valid(iss_valid[p]), .iss_entry(iss_entry[p]),
      .rd_req(req), .rd_data({rsp[2*p+1], rsp[2*p]}),
      .left_alu(res_alu[L]), .left_mul(res_mul[L]),
      .res_alu(res_alu[p]), .res_mul(res_mul[p]),
      .rf_we(rf_we[p]), .rf_waddr(rf_waddr[p]), .rf_wdata(rf_wdata[p]),
      .fwd_local(fwd_local[p]), .fwd_adj(fwd_adj[p]));
    assign rq[2*p]   = req[0];
    assign rq[2*p+1] = req[1];

    reg_file #(.NREG(NREG), .NRP(NRQ)) u_rf (
      .clk(clk), .rst_n(rst_n),
      .we(rf_we[p]), .waddr(rf_waddr[p]), .wdata(rf_wdata[p]),
      .raddr(rf_raddr[p]), .rdata(rf_rdata[p]));

    assign cmp_v[2*p]     = res_alu[p].v;
    assign cmp_idx[2*p]   = res_alu[p].rob;
    assign cmp_v[2*p+1]   = res_mul[p].v;
    assign cmp_idx[2*p+1] = res_mul[p].rob;
  end

  assign rq[2*NPE] = dbg_tag;
  assign dbg_data  = rsp[2*NPE];

  operand_xbar #(.NPE(NPE), .NRQ(NRQ)) u_xbar (
    .req(rq), .rf_raddr(rf_raddr), .rf_rdata(rf_rdata), .rsp(rsp));

  rob #(.NPE(NPE), .ROB_SIZE(ROB_SIZE), .W(W), .COMMIT_W(COMMIT_W)) u_rob (
    .clk(clk), .rst_n(rst_n),
    .alloc_v(d_valid), .alloc_e(d_rob), .tail(rob_tail), .free_cnt(rob_free),
    .cmp_v(cmp_v), .cmp_idx(cmp_idx),
    .rel_v(rel_v), .rel_t(rel_t), .commit_cnt(commit_count), .empty(rob_empty),
    .dbg_areg(dbg_areg), .dbg_tag(dbg_tag));

  assign idle = rob_empty;

  // event counts
  always_comb begin
    ev = '0;
    ev.dispatched       = ev_disp;
    ev.committed        = CNT_W'(commit_count);
    ev.steer_min_dcount = ev_min;
    ev.steer_producer   = ev_prod;
    ev.steer_rfo_right  = ev_rr;
    ev.steer_realloc    = ev_realloc;
    ev.wake_local       = ev_wl;
    ev.wake_adjacent    = ev_wa;
    ev.wake_remote      = ev_wr;
    ev.remote_read      = ev_rrd;
    ev.stall_no_reg     = st_reg;
    ev.stall_iq         = st_iq;
    ev.stall_rob        = st_rob;
    for (int p = 0; p < NPE; p++) begin
      if (iss_valid[p]) ev.issued++;
      if (iss_valid[p] && iss_entry[p].op == OP_MUL) ev.mul_issued++;
      for (int s = 0; s < 2; s++) begin
        if (fwd_local[p][s]) ev.fwd_local++;
        if (fwd_adj[p][s])   ev.fwd_adjacent++;
      end
    end
  end
endmodule
