// mul_pipe: pipelined integer multiplier of one PE (low XLEN bits of a*b).
//
// An operation entering at EX cycle 1 leaves on the out_* outputs during EX
// cycle MUL_LAT, i.e. MUL_LAT-1 register stages after the input; the PE
// writes the result into its register file at the end of that cycle, exactly
// as it does for a single-cycle ALU result. A new operation may enter every
// cycle. The latency of 7 follows the Alpha 21264 integer multiplier, which
// the clustered PEs inherit; the product is formed in the first stage and
// then carried down the pipeline (a synthesis tool may retime it).
module mul_pipe
  import cpe_pkg::*;
#(
  parameter int MUL_LAT = 7   // must be at least 2
)(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_v,
  input  logic             in_dv,
  input  ptag_t            in_t,
  input  logic [ROB_W-1:0] in_rob,
  input  word_t            a,
  input  word_t            b,
  output logic             out_v,
  output logic             out_dv,
  output ptag_t            out_t,
  output logic [ROB_W-1:0] out_rob,
  output word_t            out_data
);
  localparam int NST = MUL_LAT - 1;

  logic             v_q  [NST];
  logic             dv_q [NST];
  ptag_t            t_q  [NST];
  logic [ROB_W-1:0] rob_q[NST];
  word_t            p_q  [NST];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NST; i++) v_q[i] <= 1'b0;
    end else begin
      v_q[0] <= in_v;
      for (int i = 1; i < NST; i++) v_q[i] <= v_q[i-1];
    end
  end

  always_ff @(posedge clk) begin
    dv_q[0]  <= in_dv;
    t_q[0]   <= in_t;
    rob_q[0] <= in_rob;
    p_q[0]   <= a * b;
    for (int i = 1; i < NST; i++) begin
      dv_q[i]  <= dv_q[i-1];
      t_q[i]   <= t_q[i-1];
      rob_q[i] <= rob_q[i-1];
      p_q[i]   <= p_q[i-1];
    end
  end

  assign out_v    = v_q[NST-1];
  assign out_dv   = dv_q[NST-1];
  assign out_t    = t_q[NST-1];
  assign out_rob  = rob_q[NST-1];
  assign out_data = p_q[NST-1];

  initial assert (MUL_LAT >= 2) else $error("mul_pipe: MUL_LAT must be >= 2");
endmodule
