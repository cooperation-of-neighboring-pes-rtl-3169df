// tb_free_list: random pops (never more than are free) and pushes of
// registers previously popped, checked against a queue model: the shown
// heads, the count, and the initial contents NINIT..NREG-1.
module tb_free_list;
  import cpe_pkg::*;
  localparam int NREG = 40, NINIT = 4, NPOP = 8, NPUSH = 8;
  logic clk = 0, rst_n = 0;
  logic [IDX_W-1:0] head [NPOP];
  logic [IDX_W:0] count;
  logic [$clog2(NPOP+1)-1:0] pop_cnt;
  logic [NPUSH-1:0] push_v;
  logic [NPUSH-1:0][IDX_W-1:0] push_idx;
  int checks = 0, failures = 0;
  int fq [$];     // free registers in order
  int used [$];   // registers handed out

  free_list #(.NREG(NREG), .NINIT(NINIT), .NPOP(NPOP), .NPUSH(NPUSH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    pop_cnt = '0; push_v = '0; push_idx = '0;
    for (int i = NINIT; i < NREG; i++) fq.push_back(i);
    for (int i = 0; i < NINIT; i++) used.push_back(i);
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int it = 0; it < 2000; it++) begin
      int np;
      @(negedge clk);
      checks++;
      if (int'(count) != fq.size()) begin
        failures++; $display("FAIL count %0d expected %0d", count, fq.size());
      end
      for (int i = 0; i < NPOP && i < fq.size(); i++) begin
        checks++;
        if (int'(head[i]) != fq[i]) begin
          failures++; $display("FAIL head[%0d]=%0d expected %0d", i, head[i], fq[i]);
        end
      end
      np = $urandom_range(0, (fq.size() < NPOP) ? fq.size() : NPOP);
      if (it % 200 < 100 && np > 2) np = 2;   // phases that drain / refill
      pop_cnt = ($clog2(NPOP+1))'(np);
      push_v = '0;
      for (int j = 0; j < NPUSH; j++)
        if (used.size() > 0 && $urandom_range(0, (it % 200 < 100) ? 1 : 4) == 0) begin
          push_v[j] = 1'b1;
          push_idx[j] = IDX_W'(used.pop_front());
        end
      @(posedge clk);
      for (int i = 0; i < np; i++) used.push_back(fq.pop_front());
      for (int j = 0; j < NPUSH; j++) if (push_v[j]) fq.push_back(int'(push_idx[j]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
