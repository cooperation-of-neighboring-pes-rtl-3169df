// tb_steer_logic: directed cases of the adjacent_rFO_freereg table (the
// producer example with readers B, C, D and fanouts 1..4, Min_dcount ties,
// reallocation to the right and the all-full stall), then random inputs
// against an independent model of the rules.
module tb_steer_logic;
  import cpe_pkg::*;
  localparam int NPE = 8;
  logic s1_v, s1_rdy, s2_v, s2_rdy, need_reg;
  logic [PE_W-1:0] s1_pe, s2_pe, pe;
  logic [2:0] s1_rfo, s2_rfo;
  logic signed [15:0] dcount [NPE];
  logic [IDX_W:0] freecnt [NPE];
  logic by_min_dcount, by_producer, by_rfo_right, realloc, stall;
  int checks = 0, failures = 0;

  steer_logic #(.NPE(NPE)) dut (.*);

  task automatic expect_pe(string what, int exp_pe, logic exp_stall);
    #1;
    checks++;
    if (stall !== exp_stall || (!exp_stall && int'(pe) != exp_pe)) begin
      failures++;
      $display("FAIL %s: pe %0d stall %b, expected %0d stall %b", what, pe, stall, exp_pe, exp_stall);
    end
  endtask

  // Model: independent restatement of the steering rules.
  function automatic int model(output logic st);
    int base, minp, c;
    logic ur;
    minp = 0;
    for (int p = 0; p < NPE; p++) if (dcount[p] < dcount[minp]) minp = p;
    ur = 1;
    if (s1_v && !s1_rdy)      base = (s1_rfo == 2 || s1_rfo == 4) ? (s1_pe + 1) % NPE : s1_pe;
    else if (s2_v && !s2_rdy) base = (s2_rfo == 2 || s2_rfo == 4) ? (s2_pe + 1) % NPE : s2_pe;
    else begin base = minp; ur = 0; end
    st = 0;
    if (!need_reg || freecnt[base] != 0) return base;
    for (c = 1; c < NPE; c++) if (freecnt[(base + c) % NPE] != 0) return (base + c) % NPE;
    st = 1;
    return 0;
  endfunction

  initial begin
    for (int p = 0; p < NPE; p++) begin dcount[p] = '0; freecnt[p] = 7'd10; end
    need_reg = 1;
    // Example: B, C, D read the unready result of A (A in PE 3).
    s2_v = 0; s2_rdy = 1; s2_pe = 0; s2_rfo = 1;
    s1_v = 1; s1_rdy = 0; s1_pe = 3;
    s1_rfo = 1; expect_pe("B (rFO=1)", 3, 0);
    s1_rfo = 2; expect_pe("C (rFO=2)", 4, 0);
    checks++; if (!by_rfo_right) begin failures++; $display("FAIL flag by_rfo_right"); end
    s1_rfo = 3; expect_pe("D (rFO=3)", 3, 0);
    s1_rfo = 4; expect_pe("rFO=4", 4, 0);
    s1_rfo = 5; expect_pe("rFO=5", 3, 0);
    s1_pe = 7; s1_rfo = 2; expect_pe("ring wrap", 0, 0);
    // in2 unready, in1 ready
    s1_rdy = 1; s2_v = 1; s2_rdy = 0; s2_pe = 5; s2_rfo = 1; expect_pe("in2 producer", 5, 0);
    // both unready: in1 decides
    s1_rdy = 0; s1_pe = 2; s1_rfo = 1; expect_pe("in1 priority", 2, 0);
    // all ready: Min_dcount
    s1_rdy = 1; s2_rdy = 1;
    for (int p = 0; p < NPE; p++) dcount[p] = 16'(8 - p);
    dcount[6] = -3; expect_pe("min dcount", 6, 0);
    checks++; if (!by_min_dcount) begin failures++; $display("FAIL flag by_min_dcount"); end
    dcount[2] = -3; expect_pe("min dcount tie", 2, 0);
    // reallocation to the right
    freecnt[2] = 0; expect_pe("realloc right", 3, 0);
    checks++; if (!realloc) begin failures++; $display("FAIL flag realloc"); end
    freecnt[3] = 0; freecnt[4] = 0; expect_pe("realloc skip", 5, 0);
    need_reg = 0; expect_pe("no destination needs no register", 2, 0);
    need_reg = 1;
    for (int p = 0; p < NPE; p++) freecnt[p] = 0;
    expect_pe("all full", 0, 1);
    // random
    for (int i = 0; i < 5000; i++) begin
      logic st;
      int e;
      s1_v = $urandom_range(0, 1); s1_rdy = $urandom_range(0, 1);
      s2_v = $urandom_range(0, 1); s2_rdy = $urandom_range(0, 1);
      s1_pe = PE_W'($urandom_range(0, 7)); s2_pe = PE_W'($urandom_range(0, 7));
      s1_rfo = 3'($urandom_range(1, 7)); s2_rfo = 3'($urandom_range(1, 7));
      need_reg = ($urandom_range(0, 7) != 0);
      for (int p = 0; p < NPE; p++) begin
        dcount[p] = 16'($urandom_range(0, 40)) - 16'sd20;
        freecnt[p] = ($urandom_range(0, 2) == 0) ? 7'd0 : 7'($urandom_range(1, 36));
      end
      e = model(st);
      expect_pe("random", e, st);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
