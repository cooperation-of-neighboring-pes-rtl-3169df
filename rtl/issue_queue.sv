// issue_queue: single issue queue shared by all PEs, with wake-up and select.
//
// Each entry records the PE it was steered to. Every cycle the queue selects
// at most one ready entry per PE (one issue per PE per cycle; the lowest
// numbered ready entry wins, a choice of this design). The selected entry
// leaves on iss_* combinationally and the PE latches it into its REG stage.
//
// Wake-up. When an instruction is selected, the name of its result is
// broadcast so that a consumer can be selected in time to execute in the
// cycle right after the producer's last EX cycle: an ALU result is broadcast
// in the cycle of select (lane 2p), a multiply result MUL_LAT-1 cycles later
// (lane 2p+1, from a delay line). A waiting source that sees its name then
// becomes usable after a delay that depends on where the value is:
//   - 0 cycles if the producer is the consumer's own PE (local forwarding) or
//     its left neighbour (adjacent forwarding network);
//   - REMOTE_FWD_DELAY (2) cycles for any other PE (inter-PE transfer).
// A source that is already ready at dispatch is read from a register file in
// REG; if that file belongs to another PE the read costs REMOTE_READ_DELAY (1)
// extra cycle, which is applied here as a select delay. An entry written in
// the same cycle as a matching broadcast is woken as if it had been waiting.
// Write: up to W entries per cycle into the lowest free slots; free_cnt
// counts the empty entries at the start of the cycle.
module issue_queue
  import cpe_pkg::*;
#(
  parameter int NPE               = 8,
  parameter int IQ_SIZE           = 64,
  parameter int W                 = 8,
  parameter int MUL_LAT           = 7,
  parameter int REMOTE_FWD_DELAY  = 2,
  parameter int REMOTE_READ_DELAY = 1
)(
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [W-1:0]                  wr_valid,
  input  iq_entry_t                     wr_entry  [W],
  output logic [$clog2(IQ_SIZE+1)-1:0]  free_cnt,
  output logic [NPE-1:0]                iss_valid,
  output iq_entry_t                     iss_entry [NPE],
  output bcast_t                        bcast     [2*NPE],
  output logic [CNT_W-1:0]              ev_wake_local,
  output logic [CNT_W-1:0]              ev_wake_adj,
  output logic [CNT_W-1:0]              ev_wake_remote,
  output logic [CNT_W-1:0]              ev_remote_read
);
  localparam int DW = 2;   // width of the delay counters

  iq_entry_t        e_q   [IQ_SIZE];
  logic             v_q   [IQ_SIZE];
  logic             r1_q  [IQ_SIZE], r2_q [IQ_SIZE];   // source value known
  logic [DW-1:0]    d1_q  [IQ_SIZE], d2_q [IQ_SIZE];   // cycles still to wait
  bcast_t           mdl_q [NPE][MUL_LAT-1];            // multiply wake-up delay line

  logic             sel   [IQ_SIZE];
  int               slot  [W];

  // Delay a source must wait once its value is known, seen from PE cpe.
  function automatic logic [DW-1:0] fwd_delay(ptag_t t, logic [PE_W-1:0] cpe);
    if (t.pe == cpe || t.pe == ring_left(cpe, NPE)) return '0;
    return DW'(REMOTE_FWD_DELAY);
  endfunction

  function automatic logic tag_hit(ptag_t t);
    for (int b = 0; b < 2*NPE; b++)
      if (bcast[b].v && bcast[b].t == t) return 1'b1;
    return 1'b0;
  endfunction

  // ------------------------------------------------------------ select
  always_comb begin
    for (int i = 0; i < IQ_SIZE; i++) sel[i] = 1'b0;
    for (int p = 0; p < NPE; p++) begin
      iss_valid[p] = 1'b0;
      iss_entry[p] = '0;
      for (int i = 0; i < IQ_SIZE; i++) begin
        if (!iss_valid[p] && v_q[i] && int'(e_q[i].pe) == p &&
            (!e_q[i].s1_v || (r1_q[i] && d1_q[i] == '0)) &&
            (!e_q[i].s2_v || (r2_q[i] && d2_q[i] == '0))) begin
          iss_valid[p] = 1'b1;
          iss_entry[p] = e_q[i];
          sel[i]       = 1'b1;
        end
      end
    end
  end

  // ------------------------------------------------------- broadcasts
  always_comb begin
    for (int p = 0; p < NPE; p++) begin
      bcast[2*p].v   = iss_valid[p] && iss_entry[p].d_v && iss_entry[p].op != OP_MUL;
      bcast[2*p].t   = iss_entry[p].d;
      bcast[2*p+1]   = mdl_q[p][MUL_LAT-2];
    end
  end

  // -------------------------------------------------- free slot search
  always_comb begin
    logic taken [IQ_SIZE];
    int   n;
    n = 0;
    for (int i = 0; i < IQ_SIZE; i++) begin
      taken[i] = v_q[i];
      if (!v_q[i]) n++;
    end
    free_cnt = ($clog2(IQ_SIZE+1))'(n);
    for (int k = 0; k < W; k++) begin
      slot[k] = IQ_SIZE;
      for (int i = IQ_SIZE-1; i >= 0; i--)
        if (!taken[i]) slot[k] = i;
      if (wr_valid[k] && slot[k] < IQ_SIZE) taken[slot[k]] = 1'b1;
    end
  end

  // ------------------------------------------------- wake-up counters
  always_comb begin
    ev_wake_local = '0; ev_wake_adj = '0; ev_wake_remote = '0; ev_remote_read = '0;
    for (int i = 0; i < IQ_SIZE; i++) begin
      if (v_q[i] && e_q[i].s1_v && !r1_q[i] && tag_hit(e_q[i].s1)) begin
        if (e_q[i].s1.pe == e_q[i].pe)                  ev_wake_local++;
        else if (e_q[i].s1.pe == ring_left(e_q[i].pe, NPE)) ev_wake_adj++;
        else                                             ev_wake_remote++;
      end
      if (v_q[i] && e_q[i].s2_v && !r2_q[i] && tag_hit(e_q[i].s2)) begin
        if (e_q[i].s2.pe == e_q[i].pe)                  ev_wake_local++;
        else if (e_q[i].s2.pe == ring_left(e_q[i].pe, NPE)) ev_wake_adj++;
        else                                             ev_wake_remote++;
      end
    end
    for (int k = 0; k < W; k++) begin
      if (wr_valid[k] && wr_entry[k].s1_v && wr_entry[k].s1_rdy && wr_entry[k].s1.pe != wr_entry[k].pe)
        ev_remote_read++;
      if (wr_valid[k] && wr_entry[k].s2_v && wr_entry[k].s2_rdy && wr_entry[k].s2.pe != wr_entry[k].pe)
        ev_remote_read++;
    end
  end

  // ------------------------------------------------------- state update
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < IQ_SIZE; i++) v_q[i] <= 1'b0;
      for (int p = 0; p < NPE; p++)
        for (int s = 0; s < MUL_LAT-1; s++) mdl_q[p][s] <= '0;
    end else begin
      // multiply wake-up delay line
      for (int p = 0; p < NPE; p++) begin
        mdl_q[p][0].v <= iss_valid[p] && iss_entry[p].d_v && iss_entry[p].op == OP_MUL;
        mdl_q[p][0].t <= iss_entry[p].d;
        for (int s = 1; s < MUL_LAT-1; s++) mdl_q[p][s] <= mdl_q[p][s-1];
      end
      // waiting entries: wake-up and countdown
      for (int i = 0; i < IQ_SIZE; i++) begin
        if (sel[i]) v_q[i] <= 1'b0;
        if (!r1_q[i] && tag_hit(e_q[i].s1)) begin
          r1_q[i] <= 1'b1; d1_q[i] <= fwd_delay(e_q[i].s1, e_q[i].pe);
        end else if (r1_q[i] && d1_q[i] != '0) d1_q[i] <= d1_q[i] - 1'b1;
        if (!r2_q[i] && tag_hit(e_q[i].s2)) begin
          r2_q[i] <= 1'b1; d2_q[i] <= fwd_delay(e_q[i].s2, e_q[i].pe);
        end else if (r2_q[i] && d2_q[i] != '0) d2_q[i] <= d2_q[i] - 1'b1;
      end
      // new entries
      for (int k = 0; k < W; k++) begin
        if (wr_valid[k] && slot[k] < IQ_SIZE) begin
          e_q[slot[k]] <= wr_entry[k];
          v_q[slot[k]] <= 1'b1;
          if (wr_entry[k].s1_rdy) begin
            r1_q[slot[k]] <= 1'b1;
            d1_q[slot[k]] <= (wr_entry[k].s1.pe == wr_entry[k].pe) ? '0 : DW'(REMOTE_READ_DELAY);
          end else if (tag_hit(wr_entry[k].s1)) begin
            r1_q[slot[k]] <= 1'b1;
            d1_q[slot[k]] <= fwd_delay(wr_entry[k].s1, wr_entry[k].pe);
          end else begin
            r1_q[slot[k]] <= 1'b0;
            d1_q[slot[k]] <= '0;
          end
          if (wr_entry[k].s2_rdy) begin
            r2_q[slot[k]] <= 1'b1;
            d2_q[slot[k]] <= (wr_entry[k].s2.pe == wr_entry[k].pe) ? '0 : DW'(REMOTE_READ_DELAY);
          end else if (tag_hit(wr_entry[k].s2)) begin
            r2_q[slot[k]] <= 1'b1;
            d2_q[slot[k]] <= fwd_delay(wr_entry[k].s2, wr_entry[k].pe);
          end else begin
            r2_q[slot[k]] <= 1'b0;
            d2_q[slot[k]] <= '0;
          end
        end
      end
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                  $countones(wr_valid) <= int'(free_cnt))
    else $error("issue_queue: write without a free entry");
  initial assert (MUL_LAT >= 2 && REMOTE_FWD_DELAY < 4 && REMOTE_READ_DELAY < 4)
    else $error("issue_queue: unsupported latency parameters");
endmodule
