// pe: one integer processing element of the cluster ring.
//
// Pipeline after select in the shared issue queue:
//   REG  the instruction latched from the issue queue sends its two source
//        names to the operand crossbar, which returns the values from
//        whichever PE's register file holds them;
//   EX   operands pass through adj_bypass (results of this PE or of the left
//        neighbour that finished in the previous cycle override the register
//        file value), then the ALU (1 cycle) or the pipelined multiplier
//        (MUL_LAT cycles) computes. The result is written into this PE's own
//        register file at the end of the last EX cycle and, in the same edge,
//        into the result register res_alu / res_mul, which drives the local
//        bypass, the right neighbour's bypass (adjacent forwarding) and the
//        completion port of the reorder buffer.
// One instruction enters per cycle (issue width 1 per PE). The ALU and the
// multiplier have separate write ports, so no write-back conflict arises.
module pe
  import cpe_pkg::*;
#(
  parameter int MUL_LAT = 7
)(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  iss_valid,
  input  iq_entry_t             iss_entry,
  output ptag_t [1:0]           rd_req,
  input  word_t [1:0]           rd_data,
  input  result_t               left_alu,
  input  result_t               left_mul,
  output result_t               res_alu,
  output result_t               res_mul,
  output logic [1:0]            rf_we,
  output logic [1:0][IDX_W-1:0] rf_waddr,
  output word_t [1:0]           rf_wdata,
  output logic [1:0]            fwd_local,
  output logic [1:0]            fwd_adj
);
  logic      reg_v, ex_v;
  iq_entry_t reg_e, ex_e;
  word_t     ex_a_rf, ex_b_rf;
  word_t     a, b, b_reg, alu_y;
  logic      is_mul;
  logic      m_v, m_dv;
  ptag_t     m_t;
  logic [ROB_W-1:0] m_rob;
  word_t     m_data;

  // REG stage
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      reg_v <= 1'b0;
      ex_v  <= 1'b0;
    end else begin
      reg_v <= iss_valid;
      ex_v  <= reg_v;
    end
  end

  always_ff @(posedge clk) begin
    reg_e   <= iss_entry;
    ex_e    <= reg_e;
    ex_a_rf <= rd_data[0];
    ex_b_rf <= rd_data[1];
  end

  assign rd_req[0] = reg_e.s1;
  assign rd_req[1] = reg_e.s2;

  // EX stage
  adj_bypass u_byp_a (
    .src_v(ex_e.s1_v), .src(ex_e.s1), .rf_val(ex_a_rf),
    .loc_alu(res_alu), .loc_mul(res_mul), .left_alu(left_alu), .left_mul(left_mul),
    .val(a), .hit_local(fwd_local[0]), .hit_adj(fwd_adj[0]));

  adj_bypass u_byp_b (
    .src_v(ex_e.s2_v), .src(ex_e.s2), .rf_val(ex_b_rf),
    .loc_alu(res_alu), .loc_mul(res_mul), .left_alu(left_alu), .left_mul(left_mul),
    .val(b_reg), .hit_local(fwd_local[1]), .hit_adj(fwd_adj[1]));

  assign b      = ex_e.use_imm ? sext_imm(ex_e.imm) : b_reg;
  assign is_mul = (ex_e.op == OP_MUL);

  alu u_alu (.op(ex_e.op), .a(a), .b(b), .y(alu_y));

  mul_pipe #(.MUL_LAT(MUL_LAT)) u_mul (
    .clk(clk), .rst_n(rst_n),
    .in_v(ex_v && is_mul), .in_dv(ex_e.d_v), .in_t(ex_e.d), .in_rob(ex_e.rob),
    .a(a), .b(b),
    .out_v(m_v), .out_dv(m_dv), .out_t(m_t), .out_rob(m_rob), .out_data(m_data));

  // Write-back into the own register file
  assign rf_we[0]    = ex_v && !is_mul && ex_e.d_v;
  assign rf_waddr[0] = ex_e.d.idx;
  assign rf_wdata[0] = alu_y;
  assign rf_we[1]    = m_v && m_dv;
  assign rf_waddr[1] = m_t.idx;
  assign rf_wdata[1] = m_data;

  // Result registers (bypass sources and completion)
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      res_alu.v <= 1'b0;
      res_mul.v <= 1'b0;
    end else begin
      res_alu.v <= ex_v && !is_mul;
      res_mul.v <= m_v;
    end
  end

  always_ff @(posedge clk) begin
    res_alu.d_v  <= ex_e.d_v;
    res_alu.t    <= ex_e.d;
    res_alu.rob  <= ex_e.rob;
    res_alu.data <= alu_y;
    res_mul.d_v  <= m_dv;
    res_mul.t    <= m_t;
    res_mul.rob  <= m_rob;
    res_mul.data <= m_data;
  end
endmodule
