// tb_dispatch_unit: steering and renaming of whole groups against hand-worked
// expectations. A simple free-list model (next registers 4, 5, ... of each
// PE) sits behind the free-list ports.
//   group 1: A r1=r0+1 (ready operands -> Min_dcount -> PE0), then B, C, D, E
//            reading A's unready r1: fanout 1 -> PE0, 2 -> PE1, 3 -> PE0,
//            E reads r1 twice and counts once: fanout 4 -> PE1;
//            F r6=r0+5 -> Min_dcount after the group's own DCOUNT updates -> PE2.
//   group 2: G reads r1 again: fanout 5 (counter kept across groups) -> PE0.
//   after A's tag is broadcast, H reading r1 sees it ready -> Min_dcount.
//   free registers: chosen PE empty -> next PE to the right; all empty ->
//   in_ready low; issue queue or ROB without room -> in_ready low.
module tb_dispatch_unit;
  import cpe_pkg::*;
  localparam int NPE = 8, NREG = 40, W = 8, IQ_SIZE = 64, ROB_SIZE = 256;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] in_valid;
  uop_t in_uop [W];
  logic in_ready;
  logic [$clog2(IQ_SIZE+1)-1:0] iq_free;
  logic [$clog2(ROB_SIZE+1)-1:0] rob_free;
  logic [ROB_W-1:0] rob_tail;
  logic [IDX_W-1:0] fl_head [NPE][W];
  logic [IDX_W:0] fl_count [NPE];
  logic [$clog2(W+1)-1:0] fl_pop [NPE];
  bcast_t bcast [2*NPE];
  logic [W-1:0] out_valid;
  iq_entry_t out_iq [W];
  rob_entry_t out_rob [W];
  logic [CNT_W-1:0] ev_dispatched, ev_min_dcount, ev_producer, ev_rfo_right, ev_realloc;
  logic stall_no_reg, stall_iq, stall_rob;
  int checks = 0, failures = 0;

  dispatch_unit #(.NPE(NPE), .NREG(NREG), .W(W), .IQ_SIZE(IQ_SIZE), .ROB_SIZE(ROB_SIZE)) dut (.*);
  always #5 clk = ~clk;

  int nxt [NPE];
  always_comb
    for (int p = 0; p < NPE; p++)
      for (int i = 0; i < W; i++) fl_head[p][i] = IDX_W'(4 + (nxt[p] + i) % 36);
  always @(posedge clk)
    if (rst_n) for (int p = 0; p < NPE; p++) nxt[p] <= nxt[p] + int'(fl_pop[p]);

  function automatic uop_t mk(int d, int s1, int s2, logic imm_en);
    uop_t u;
    u = '0;
    u.op = OP_ADD; u.use_imm = imm_en; u.imm = 16'd1;
    u.s1_v = 1; u.s1 = AREG_W'(s1); u.s2_v = !imm_en; u.s2 = AREG_W'(s2);
    u.d_v = 1; u.d = AREG_W'(d);
    return u;
  endfunction

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic ptag_t tg(int p, int i);
    return '{pe: PE_W'(p), idx: IDX_W'(i)};
  endfunction

  task automatic present(uop_t u [$]);
    @(negedge clk);
    in_valid = '0;
    for (int k = 0; k < u.size(); k++) begin in_valid[k] = 1; in_uop[k] = u[k]; end
    #1;
  endtask

  initial begin
    in_valid = '0; iq_free = 7'(IQ_SIZE); rob_free = 9'(ROB_SIZE); rob_tail = '0;
    for (int p = 0; p < NPE; p++) begin nxt[p] = 0; fl_count[p] = 7'd36; end
    for (int b = 0; b < 2*NPE; b++) bcast[b] = '0;
    for (int k = 0; k < W; k++) in_uop[k] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;

    // group 1
    present('{mk(1, 0, 0, 1), mk(2, 1, 0, 1), mk(3, 1, 0, 1), mk(4, 1, 0, 1),
              mk(5, 1, 1, 0), mk(6, 0, 0, 1)});
    chk("group 1 accepted", in_ready && out_valid == 8'b0011_1111);
    chk("A -> PE0, new r1 = {0,4}", out_iq[0].pe == 0 && out_iq[0].d == tg(0, 4));
    chk("A source r0 ready in PE0", out_iq[0].s1 == tg(0, 0) && out_iq[0].s1_rdy);
    chk("A previous mapping of r1", out_rob[0].prevt == tg(0, 1));
    chk("B (fanout 1) -> PE0", out_iq[1].pe == 0 && out_iq[1].d == tg(0, 5));
    chk("B reads A's new r1, not ready", out_iq[1].s1 == tg(0, 4) && !out_iq[1].s1_rdy);
    chk("C (fanout 2) -> PE1", out_iq[2].pe == 1 && out_iq[2].d == tg(1, 4));
    chk("D (fanout 3) -> PE0", out_iq[3].pe == 0 && out_iq[3].d == tg(0, 6));
    chk("E (fanout 4) -> PE1", out_iq[4].pe == 1 && out_iq[4].d == tg(1, 5));
    chk("F (Min_dcount) -> PE2", out_iq[5].pe == 2 && out_iq[5].d == tg(2, 4));
    chk("ROB indices", out_iq[0].rob == 0 && out_iq[5].rob == 5);
    chk("free-list pops", fl_pop[0] == 3 && fl_pop[1] == 2 && fl_pop[2] == 1 && fl_pop[3] == 0);
    chk("event counts", ev_dispatched == 6 && ev_min_dcount == 2 && ev_rfo_right == 2 && ev_producer == 2);
    @(posedge clk); #1;
    in_valid = '0;
    rob_tail = 8'd6;

    // group 2: fanout counter survives the group boundary
    present('{mk(7, 1, 0, 1)});
    chk("G (fanout 5) -> PE0", in_ready && out_iq[0].pe == 0 && out_iq[0].s1 == tg(0, 4));
    chk("G ROB index", out_iq[0].rob == 6);
    @(posedge clk); #1;
    in_valid = '0;
    rob_tail = 8'd7;

    // broadcast of A's result marks r1 ready
    @(negedge clk);
    bcast[0].v = 1; bcast[0].t = tg(0, 4);
    @(negedge clk);
    bcast[0] = '0;
    present('{mk(8, 1, 0, 1)});
    chk("H: r1 ready after broadcast", out_iq[0].s1_rdy && out_iq[0].s1 == tg(0, 4));
    chk("H: Min_dcount", ev_min_dcount == 1);

    // free-register reallocation: every PE but PE5 empty
    for (int p = 0; p < NPE; p++) fl_count[p] = (p == 5) ? 7'd3 : 7'd0;
    present('{mk(9, 0, 0, 1)});
    chk("reallocated right to PE5", in_ready && out_iq[0].pe == 5 && ev_realloc == 1);
    for (int p = 0; p < NPE; p++) fl_count[p] = 7'd0;
    #1;
    chk("no free register anywhere: stall", !in_ready && stall_no_reg && out_valid == '0);
    for (int p = 0; p < NPE; p++) fl_count[p] = 7'd30;
    iq_free = 7'd0; #1;
    chk("issue queue full: stall", !in_ready && stall_iq);
    iq_free = 7'(IQ_SIZE); rob_free = 9'd0; #1;
    chk("ROB full: stall", !in_ready && stall_rob);
    rob_free = 9'(ROB_SIZE); #1;
    chk("accepted again", in_ready);
    @(negedge clk);
    in_valid = '0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
