// free_list: list of free physical registers of one PE.
//
// Each PE renames destinations only from its own free list, so the steering
// decision (which PE) must come before the allocation. The list is a circular
// FIFO of register indices. At reset it holds NINIT..NREG-1; registers
// 0..NINIT-1 hold this PE's share of the committed architectural registers.
// Per cycle up to NPOP registers are taken (the next ones are shown on
// head[0..NPOP-1] and pop_cnt says how many were used) and up to NPUSH are
// returned (any subset of the push ports, appended in port order). count is
// the number of free registers at the start of the cycle. A pop beyond count
// is a caller error and is asserted against.
module free_list
  import cpe_pkg::*;
#(
  parameter int NREG  = 40,
  parameter int NINIT = 4,
  parameter int NPOP  = 8,
  parameter int NPUSH = 8
)(
  input  logic                         clk,
  input  logic                         rst_n,
  output logic [IDX_W-1:0]             head [NPOP],
  output logic [IDX_W:0]               count,
  input  logic [$clog2(NPOP+1)-1:0]    pop_cnt,
  input  logic [NPUSH-1:0]             push_v,
  input  logic [NPUSH-1:0][IDX_W-1:0]  push_idx
);
  localparam int PW = $clog2(NREG);

  logic [IDX_W-1:0] fifo [NREG];
  logic [PW-1:0]    rd_q, wr_q;
  logic [IDX_W:0]   cnt_q;

  function automatic logic [PW-1:0] wrap(int x);
    return PW'(x % NREG);
  endfunction

  always_comb
    for (int i = 0; i < NPOP; i++) head[i] = fifo[wrap(int'(rd_q) + i)];

  assign count = cnt_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NREG; i++) fifo[i] <= IDX_W'((i + NINIT) % NREG);
      rd_q  <= '0;
      wr_q  <= wrap(NREG - NINIT);
      cnt_q <= (IDX_W+1)'(NREG - NINIT);
    end else begin
      int n;
      n = 0;
      for (int j = 0; j < NPUSH; j++)
        if (push_v[j]) begin
          fifo[wrap(int'(wr_q) + n)] <= push_idx[j];
          n++;
        end
      wr_q  <= wrap(int'(wr_q) + n);
      rd_q  <= wrap(int'(rd_q) + int'(pop_cnt));
      cnt_q <= (IDX_W+1)'(int'(cnt_q) + n - int'(pop_cnt));
    end
  end

  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) int'(pop_cnt) <= int'(cnt_q))
    else $error("free_list: pop beyond free count");
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) int'(cnt_q) <= NREG)
    else $error("free_list: more free registers than exist");
endmodule
