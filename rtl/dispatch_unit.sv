// dispatch_unit: steering and renaming (MAP stage) of up to W instructions
// per cycle.
//
// Steering must precede renaming, because a destination is allocated from
// the free list of the PE that will execute the instruction. For each slot,
// in program order inside the group:
//   1. its sources are looked up in the map table, or taken from an earlier
//      slot of the same group that writes the same architectural register
//      (such a value is never ready yet);
//   2. each source gets its register fanout (rFO): how many instructions,
//      this one included, have read that register instance since it was
//      allocated. A per-register 3-bit saturating counter holds the count of
//      earlier groups; readers earlier in this group are added on top. An
//      instruction naming the same register twice counts once;
//   3. steer_logic picks the PE from operand readiness (scoreboard), producer
//      PEs, rFO, DCOUNT and the free-register counts left after the earlier
//      slots;
//   4. the destination takes the next free register of that PE.
// DCOUNT of PE p is NPE * (instructions dispatched to p) - (all dispatched),
// kept directly: a dispatch to p adds NPE-1 to p and subtracts 1 from every
// other PE (16-bit saturating). The scoreboard marks a register ready when
// its wake-up tag is broadcast and unready when it is allocated.
// Handshake: the whole group is accepted (in_ready) only if the issue queue
// and reorder buffer have room for all valid slots and every slot found a
// PE with a free register; otherwise nothing is taken. in_ready depends
// combinationally on in_valid. The grouping and all-or-nothing acceptance are
// this design's choices; the steering rules follow the adjacent_rFO_freereg
// scheme.
module dispatch_unit
  import cpe_pkg::*;
#(
  parameter int NPE      = 8,
  parameter int NREG     = 40,
  parameter int W        = 8,
  parameter int IQ_SIZE  = 64,
  parameter int ROB_SIZE = 256
)(
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic [W-1:0]                    in_valid,
  input  uop_t                            in_uop    [W],
  output logic                            in_ready,
  input  logic [$clog2(IQ_SIZE+1)-1:0]    iq_free,
  input  logic [$clog2(ROB_SIZE+1)-1:0]   rob_free,
  input  logic [ROB_W-1:0]                rob_tail,
  input  logic [IDX_W-1:0]                fl_head   [NPE][W],
  input  logic [IDX_W:0]                  fl_count  [NPE],
  output logic [$clog2(W+1)-1:0]          fl_pop    [NPE],
  input  bcast_t                          bcast     [2*NPE],
  output logic [W-1:0]                    out_valid,
  output iq_entry_t                       out_iq    [W],
  output rob_entry_t                      out_rob   [W],
  output logic [CNT_W-1:0]                ev_dispatched,
  output logic [CNT_W-1:0]                ev_min_dcount,
  output logic [CNT_W-1:0]                ev_producer,
  output logic [CNT_W-1:0]                ev_rfo_right,
  output logic [CNT_W-1:0]                ev_realloc,
  output logic                            stall_no_reg,
  output logic                            stall_iq,
  output logic                            stall_rob
);
  localparam int APE = NARCH / NPE;   // committed registers held by each PE

  // ---------------------------------------------------------------- state
  ptag_t              map_q [NARCH];
  logic               sb_q  [NPE][NREG];
  logic [2:0]         rfo_q [NPE][NREG];
  logic signed [15:0] dc_q  [NPE];

  // ------------------------------------------------------- per-slot wires
  // Copies of each slot's results for the outputs and the state update.
  // The slot-to-slot chain itself uses the signals local to g_slot[k].
  ptag_t              s1_t [W], s2_t [W], nt [W], prev_t [W];
  logic               s1_rdy [W], s2_rdy [W];
  logic [2:0]         s1_rfo [W], s2_rfo [W];
  logic [PE_W-1:0]    pe_k [W];
  logic               st_min [W], st_prod [W], st_rr [W], st_realloc [W], st_stall [W];
  logic [IDX_W:0]     fc_end [NPE];
  logic signed [15:0] dc_end [NPE];
  logic               fire;

  function automatic logic signed [15:0] sat_add(logic signed [15:0] a, int d);
    int s;
    s = int'(a) + d;
    if (s > 32767)  s = 32767;
    if (s < -32768) s = -32768;
    return 16'(s);
  endfunction

  function automatic logic [2:0] sat_rfo(int x);
    return (x > 7) ? 3'd7 : 3'(x);
  endfunction

  for (genvar k = 0; k < W; k++) begin : g_slot
    // Chain state entering this slot: registers written by earlier slots of
    // the group (gm), reads of the current instance of each architectural
    // register inside the group (grc), DCOUNT and free counts.
    logic               gm_v_in  [NARCH], gm_v_out [NARCH];
    ptag_t              gm_t_in  [NARCH], gm_t_out [NARCH];
    logic [2:0]         grc_in   [NARCH], grc_out  [NARCH];
    logic signed [15:0] dc_in    [NPE],   dc_out   [NPE];
    logic [IDX_W:0]     fc_in    [NPE],   fc_out   [NPE];

    uop_t               u;
    logic               s1v, s2v, i1, i2, r1, r2;
    ptag_t              t1, t2, tp, tn;
    logic [2:0]         f1, f2;
    logic [PE_W-1:0]    pe;
    logic               smin, sprod, srr, sre, sst;

    if (k == 0) begin : g_first
      always_comb begin
        for (int a = 0; a < NARCH; a++) begin
          gm_v_in[a] = 1'b0;
          gm_t_in[a] = '0;
          grc_in[a]  = '0;
        end
        for (int p = 0; p < NPE; p++) begin
          dc_in[p] = dc_q[p];
          fc_in[p] = fl_count[p];
        end
      end
    end else begin : g_next
      always_comb begin
        gm_v_in = g_slot[k-1].gm_v_out;
        gm_t_in = g_slot[k-1].gm_t_out;
        grc_in  = g_slot[k-1].grc_out;
        dc_in   = g_slot[k-1].dc_out;
        fc_in   = g_slot[k-1].fc_out;
      end
    end

    // Source lookup with in-group dependence check, readiness and fanout.
    always_comb begin : resolve
      u   = in_uop[k];
      s1v = u.s1_v;
      s2v = u.s2_v && !u.use_imm;
      i1  = gm_v_in[u.s1];
      i2  = gm_v_in[u.s2];
      t1  = i1 ? gm_t_in[u.s1] : map_q[u.s1];
      t2  = i2 ? gm_t_in[u.s2] : map_q[u.s2];
      tp  = gm_v_in[u.d] ? gm_t_in[u.d] : map_q[u.d];
      r1  = !i1 && sb_q[t1.pe][t1.idx];
      r2  = !i2 && sb_q[t2.pe][t2.idx];
      f1  = sat_rfo((i1 ? 0 : int'(rfo_q[t1.pe][t1.idx])) + int'(grc_in[u.s1]) + 1);
      f2  = sat_rfo((i2 ? 0 : int'(rfo_q[t2.pe][t2.idx])) + int'(grc_in[u.s2]) + 1);
    end

    steer_logic #(.NPE(NPE)) u_steer (
      .s1_v(s1v), .s1_rdy(r1), .s1_pe(t1.pe), .s1_rfo(f1),
      .s2_v(s2v), .s2_rdy(r2), .s2_pe(t2.pe), .s2_rfo(f2),
      .need_reg(u.d_v), .dcount(dc_in), .freecnt(fc_in),
      .pe(pe), .by_min_dcount(smin), .by_producer(sprod), .by_rfo_right(srr),
      .realloc(sre), .stall(sst));

    // Allocation and the chain to the next slot.
    always_comb begin : chain
      logic [IDX_W:0] used;
      used     = fl_count[pe] - fc_in[pe];
      tn       = '{pe: pe, idx: fl_head[pe][int'(used)]};
      gm_v_out = gm_v_in;
      gm_t_out = gm_t_in;
      grc_out  = grc_in;
      dc_out   = dc_in;
      fc_out   = fc_in;
      if (in_valid[k]) begin
        for (int p = 0; p < NPE; p++)
          dc_out[p] = sat_add(dc_in[p], (p == int'(pe)) ? NPE - 1 : -1);
        if (u.d_v && !sst) fc_out[pe] = fc_in[pe] - 1'b1;
        if (s1v) grc_out[u.s1] = sat_rfo(int'(grc_in[u.s1]) + 1);
        if (s2v && !(s1v && u.s2 == u.s1)) grc_out[u.s2] = sat_rfo(int'(grc_in[u.s2]) + 1);
        if (u.d_v) begin
          gm_v_out[u.d] = 1'b1;
          gm_t_out[u.d] = tn;
          grc_out[u.d]  = '0;
        end
      end
    end

    assign s1_t[k]   = t1;   assign s2_t[k]   = t2;
    assign s1_rdy[k] = r1;   assign s2_rdy[k] = r2;
    assign s1_rfo[k] = f1;   assign s2_rfo[k] = f2;
    assign nt[k]     = tn;   assign prev_t[k] = tp;
    assign pe_k[k]   = pe;
    assign st_min[k] = smin; assign st_prod[k] = sprod; assign st_rr[k] = srr;
    assign st_realloc[k] = sre; assign st_stall[k] = sst;
  end

  assign fc_end = g_slot[W-1].fc_out;
  assign dc_end = g_slot[W-1].dc_out;

  // --------------------------------------------------------- acceptance
  always_comb begin
    int nv;
    logic nostall;
    nv = 0;
    nostall = 1'b1;
    for (int k = 0; k < W; k++)
      if (in_valid[k]) begin
        nv++;
        if (st_stall[k]) nostall = 1'b0;
      end
    stall_no_reg = (nv != 0) && !nostall;
    stall_iq     = (nv != 0) && (int'(iq_free) < nv);
    stall_rob    = (nv != 0) && (int'(rob_free) < nv);
    in_ready     = !stall_no_reg && !stall_iq && !stall_rob;
    fire         = in_ready && (nv != 0);
  end

  // ----------------------------------------------------------- outputs
  always_comb begin
    int r;
    r = 0;
    ev_dispatched = '0; ev_min_dcount = '0; ev_producer = '0; ev_rfo_right = '0; ev_realloc = '0;
    for (int p = 0; p < NPE; p++)
      fl_pop[p] = fire ? ($clog2(W+1))'(int'(fl_count[p]) - int'(fc_end[p])) : '0;
    for (int k = 0; k < W; k++) begin
      out_valid[k]      = fire && in_valid[k];
      out_iq[k].op      = in_uop[k].op;
      out_iq[k].use_imm = in_uop[k].use_imm;
      out_iq[k].imm     = in_uop[k].imm;
      out_iq[k].pe      = pe_k[k];
      out_iq[k].s1_v    = in_uop[k].s1_v;
      out_iq[k].s1      = s1_t[k];
      out_iq[k].s1_rdy  = s1_rdy[k];
      out_iq[k].s2_v    = in_uop[k].s2_v && !in_uop[k].use_imm;
      out_iq[k].s2      = s2_t[k];
      out_iq[k].s2_rdy  = s2_rdy[k];
      out_iq[k].d_v     = in_uop[k].d_v;
      out_iq[k].d       = nt[k];
      out_iq[k].rob     = ROB_W'((int'(rob_tail) + r) % ROB_SIZE);
      out_rob[k].d_v    = in_uop[k].d_v;
      out_rob[k].areg   = in_uop[k].d;
      out_rob[k].newt   = nt[k];
      out_rob[k].prevt  = prev_t[k];
      if (in_valid[k]) r++;
      if (out_valid[k]) begin
        ev_dispatched++;
        if (st_min[k])     ev_min_dcount++;
        if (st_prod[k])    ev_producer++;
        if (st_rr[k])      ev_rfo_right++;
        if (st_realloc[k]) ev_realloc++;
      end
    end
  end

  // ------------------------------------------------------ state update
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int a = 0; a < NARCH; a++) map_q[a] <= '{pe: PE_W'(a / APE), idx: IDX_W'(a % APE)};
      for (int p = 0; p < NPE; p++) begin
        dc_q[p] <= '0;
        for (int i = 0; i < NREG; i++) begin
          sb_q[p][i]  <= 1'b1;
          rfo_q[p][i] <= '0;
        end
      end
    end else begin
      for (int b = 0; b < 2*NPE; b++)
        if (bcast[b].v && int'(bcast[b].t.idx) < NREG) sb_q[bcast[b].t.pe][bcast[b].t.idx] <= 1'b1;
      if (fire) begin
        for (int p = 0; p < NPE; p++) dc_q[p] <= dc_end[p];
        for (int k = 0; k < W; k++) begin
          if (in_valid[k]) begin
            if (in_uop[k].s1_v) rfo_q[s1_t[k].pe][s1_t[k].idx] <= s1_rfo[k];
            if (in_uop[k].s2_v && !in_uop[k].use_imm) rfo_q[s2_t[k].pe][s2_t[k].idx] <= s2_rfo[k];
            if (in_uop[k].d_v) begin
              map_q[in_uop[k].d]          <= nt[k];
              sb_q[nt[k].pe][nt[k].idx]   <= 1'b0;
              rfo_q[nt[k].pe][nt[k].idx]  <= '0;
            end
          end
        end
      end
    end
  end
endmodule
