// tb_issue_queue: directed timing of select and wake-up in the shared queue.
// Cycle numbers are relative to the cycle in which the entries are written.
//   producer with no sources                 -> selected in cycle 1
//   consumer in the same PE                  -> cycle 2 (back to back)
//   consumer in the right neighbour (AF)     -> cycle 2
//   consumer in another PE                   -> cycle 4 (2-cycle transfer)
//   ready operand in the own register file   -> cycle 1
//   ready operand in another PE's file       -> cycle 2 (1-cycle remote read)
//   consumer of a multiply (MUL_LAT = 7)     -> cycle 1 + 7
//   consumer written while its producer's tag is broadcast -> next cycle
//   three ready entries of one PE            -> one per cycle
// Also the free count and the one-issue-per-PE rule.
module tb_issue_queue;
  import cpe_pkg::*;
  localparam int NPE = 8, IQ_SIZE = 64, W = 8, MUL_LAT = 7;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] wr_valid;
  iq_entry_t wr_entry [W];
  logic [$clog2(IQ_SIZE+1)-1:0] free_cnt;
  logic [NPE-1:0] iss_valid;
  iq_entry_t iss_entry [NPE];
  bcast_t bcast [2*NPE];
  logic [CNT_W-1:0] ev_wake_local, ev_wake_adj, ev_wake_remote, ev_remote_read;
  int checks = 0, failures = 0;
  longint cyc = 0;
  longint sel_cyc [256];

  issue_queue #(.NPE(NPE), .IQ_SIZE(IQ_SIZE), .W(W), .MUL_LAT(MUL_LAT)) dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    for (int p = 0; p < NPE; p++)
      if (rst_n && iss_valid[p]) begin
        sel_cyc[iss_entry[p].rob] = cyc;
        checks++;
        if (int'(iss_entry[p].pe) != p) begin failures++; $display("FAIL entry issued to wrong PE"); end
      end
  end

  function automatic iq_entry_t mk(int id, int pe, op_t op, int d_pe, int d_idx,
                                   logic s1v, int s1pe, int s1idx, logic s1r);
    iq_entry_t e;
    e = '0;
    e.op = op; e.pe = PE_W'(pe); e.rob = ROB_W'(id);
    e.d_v = 1'b1; e.d = '{pe: PE_W'(d_pe), idx: IDX_W'(d_idx)};
    e.s1_v = s1v; e.s1 = '{pe: PE_W'(s1pe), idx: IDX_W'(s1idx)}; e.s1_rdy = s1r;
    return e;
  endfunction

  longint t0;
  int n;

  task automatic write(iq_entry_t e [$]);
    @(negedge clk);
    wr_valid = '0;
    for (int k = 0; k < e.size(); k++) begin wr_valid[k] = 1'b1; wr_entry[k] = e[k]; end
    t0 = cyc;
    @(posedge clk); #1;
    wr_valid = '0;
  endtask

  task automatic expect_at(string what, int id, int rel);
    checks++;
    if (sel_cyc[id] - t0 != rel) begin
      failures++;
      $display("FAIL %s: selected in cycle %0d, expected %0d", what, sel_cyc[id] - t0, rel);
    end
  endtask

  initial begin
    wr_valid = '0;
    for (int k = 0; k < W; k++) wr_entry[k] = '0;
    for (int i = 0; i < 256; i++) sel_cyc[i] = -100;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    checks++; if (free_cnt != IQ_SIZE) begin failures++; $display("FAIL free count after reset"); end

    // producer in PE 0 and three consumers
    write('{mk(1, 0, OP_ADD, 0, 5, 0, 0, 0, 0),
            mk(2, 0, OP_ADD, 0, 6, 1, 0, 5, 0),
            mk(3, 1, OP_ADD, 1, 6, 1, 0, 5, 0),
            mk(4, 3, OP_ADD, 3, 6, 1, 0, 5, 0),
            mk(5, 4, OP_ADD, 4, 7, 1, 4, 1, 1),
            mk(6, 2, OP_ADD, 2, 7, 1, 5, 1, 1)});
    checks++; if (free_cnt != IQ_SIZE - 6) begin failures++; $display("FAIL free count %0d", free_cnt); end
    repeat (8) @(posedge clk);
    expect_at("producer", 1, 1);
    expect_at("local consumer", 2, 2);
    expect_at("adjacent consumer", 3, 2);
    expect_at("remote consumer", 4, 4);
    expect_at("local ready operand", 5, 1);
    expect_at("remote ready operand", 6, 2);

    // multiply producer and its consumer
    write('{mk(7, 5, OP_MUL, 5, 7, 0, 0, 0, 0), mk(8, 5, OP_ADD, 5, 8, 1, 5, 7, 0)});
    repeat (12) @(posedge clk);
    expect_at("multiply", 7, 1);
    expect_at("multiply consumer", 8, 1 + MUL_LAT);

    // consumer written in the cycle its producer is selected
    write('{mk(9, 6, OP_ADD, 6, 9, 0, 0, 0, 0)});
    write('{mk(10, 6, OP_ADD, 6, 10, 1, 6, 9, 0)});
    repeat (4) @(posedge clk);
    checks++;
    if (sel_cyc[10] - sel_cyc[9] != 1) begin
      failures++; $display("FAIL write-time wake-up: %0d", sel_cyc[10] - sel_cyc[9]);
    end

    // three ready entries of PE 7: one issue per cycle
    write('{mk(11, 7, OP_ADD, 7, 11, 0, 0, 0, 0), mk(12, 7, OP_ADD, 7, 12, 0, 0, 0, 0),
            mk(13, 7, OP_ADD, 7, 13, 0, 0, 0, 0)});
    repeat (5) @(posedge clk);
    n = 0;
    for (int i = 11; i <= 13; i++) n += (sel_cyc[i] - t0 >= 1 && sel_cyc[i] - t0 <= 3) ? 1 : 0;
    checks++;
    if (n != 3 || sel_cyc[11] == sel_cyc[12] || sel_cyc[12] == sel_cyc[13] || sel_cyc[11] == sel_cyc[13]) begin
      failures++; $display("FAIL one issue per PE per cycle");
    end
    checks++; if (free_cnt != IQ_SIZE) begin failures++; $display("FAIL queue not empty at end"); end
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
