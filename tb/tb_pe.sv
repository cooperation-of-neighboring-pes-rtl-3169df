// tb_pe: one PE with a model register file behind its read and write ports.
// Checks: an ALU result appears on res_alu 3 cycles after issue (REG, EX,
// result register) and is written to the register file in its EX cycle; a
// dependent instruction issued in the next cycle gets the value through the
// local bypass; an operand produced by the left neighbour one cycle earlier
// is taken from the adjacent forwarding bus although the register file still
// holds an old value; a multiply appears on res_mul MUL_LAT+2 cycles after
// issue and its consumer can use it through the bypass; immediates replace
// the second operand.
module tb_pe;
  import cpe_pkg::*;
  localparam int MUL_LAT = 7;
  logic clk = 0, rst_n = 0;
  logic iss_valid;
  iq_entry_t iss_entry;
  ptag_t [1:0] rd_req;
  word_t [1:0] rd_data;
  result_t left_alu, left_mul, res_alu, res_mul;
  logic [1:0] rf_we;
  logic [1:0][IDX_W-1:0] rf_waddr;
  word_t [1:0] rf_wdata;
  logic [1:0] fwd_local, fwd_adj;
  int checks = 0, failures = 0;
  longint cyc = 0;
  int n_fl = 0, n_fa = 0;

  pe #(.MUL_LAT(MUL_LAT)) dut (.*);
  always #5 clk = ~clk;

  // model register files of all PEs; this PE is PE 2
  word_t rf [8][64];
  always_comb for (int i = 0; i < 2; i++) rd_data[i] = rf[rd_req[i].pe][rd_req[i].idx];
  always @(posedge clk) begin
    cyc <= cyc + 1;
    for (int w = 0; w < 2; w++) if (rf_we[w]) rf[2][rf_waddr[w]] <= rf_wdata[w];
    n_fl <= n_fl + fwd_local[0] + fwd_local[1];
    n_fa <= n_fa + fwd_adj[0] + fwd_adj[1];
  end

  longint res_cyc [256];
  word_t  res_val [256];
  always @(posedge clk) begin
    if (rst_n && res_alu.v) begin res_cyc[res_alu.rob] = cyc; res_val[res_alu.rob] = res_alu.data; end
    if (rst_n && res_mul.v) begin res_cyc[res_mul.rob] = cyc; res_val[res_mul.rob] = res_mul.data; end
  end

  function automatic iq_entry_t mk(int id, op_t op, int d, int s1pe, int s1, int s2pe, int s2, logic imm_en, int imm);
    iq_entry_t e;
    e = '0;
    e.op = op; e.pe = 3'd2; e.rob = ROB_W'(id);
    e.d_v = 1; e.d = '{pe: 3'd2, idx: IDX_W'(d)};
    e.s1_v = 1; e.s1 = '{pe: PE_W'(s1pe), idx: IDX_W'(s1)};
    e.s2_v = !imm_en; e.s2 = '{pe: PE_W'(s2pe), idx: IDX_W'(s2)};
    e.use_imm = imm_en; e.imm = IMM_W'(imm);
    return e;
  endfunction

  longint iss_at [256];
  task automatic issue(iq_entry_t e);
    @(negedge clk);
    iss_valid = 1; iss_entry = e; iss_at[e.rob] = cyc;
    @(negedge clk);
    iss_valid = 0;
  endtask

  task automatic expect_res(string what, int id, word_t v, int lat);
    checks++;
    if (res_val[id] !== v || res_cyc[id] - iss_at[id] != lat) begin
      failures++;
      $display("FAIL %s: %h after %0d cycles, expected %h after %0d", what, res_val[id], res_cyc[id] - iss_at[id], v, lat);
    end
  endtask

  initial begin
    iss_valid = 0; iss_entry = '0; left_alu = '0; left_mul = '0;
    for (int p = 0; p < 8; p++) for (int i = 0; i < 64; i++) rf[p][i] = word_t'(p * 1000 + i);
    for (int i = 0; i < 256; i++) res_cyc[i] = -1;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;

    // remote operands from PE 5 and PE 0
    issue(mk(1, OP_ADD, 10, 5, 3, 0, 7, 0, 0));
    repeat (4) @(posedge clk);
    expect_res("ALU with remote operands", 1, 5003 + 7, 3);
    checks++; if (rf[2][10] !== 64'd5010) begin failures++; $display("FAIL register file write"); end

    // back-to-back chain through the local bypass
    @(negedge clk);
    iss_valid = 1; iss_entry = mk(2, OP_ADD, 11, 2, 1, 0, 0, 1, 100); iss_at[2] = cyc;   // r11 = 2001 + 100
    @(negedge clk);
    iss_entry = mk(3, OP_SUB, 12, 2, 11, 0, 0, 1, 1); iss_at[3] = cyc;                  // r12 = r11 - 1
    @(negedge clk);
    iss_entry = mk(4, OP_ADD, 13, 2, 12, 2, 11, 0, 0); iss_at[4] = cyc;                 // r13 = r12 + r11
    @(negedge clk);
    iss_valid = 0;
    repeat (5) @(posedge clk);
    expect_res("chain 1", 2, 2101, 3);
    expect_res("chain 2 (bypass)", 3, 2100, 3);
    expect_res("chain 3 (bypass + register file)", 4, 4201, 3);
    checks++; if (n_fl != 2) begin failures++; $display("FAIL local forwarding count %0d", n_fl); end

    // adjacent forwarding from the left neighbour (PE 1): the register file
    // still holds 1020 for {1,20}; the new value 777 is on the left bus
    @(negedge clk);
    iss_valid = 1; iss_entry = mk(5, OP_ADD, 14, 1, 20, 0, 0, 1, 1); iss_at[5] = cyc;
    @(negedge clk);
    iss_valid = 0;
    @(negedge clk);   // instruction 5 is in EX now
    left_alu.v = 1; left_alu.d_v = 1; left_alu.t = '{pe: 3'd1, idx: 6'd20}; left_alu.data = 64'd777;
    left_alu.rob = '0;
    @(negedge clk);
    left_alu = '0;
    repeat (3) @(posedge clk);
    expect_res("adjacent forwarding", 5, 778, 3);
    checks++; if (n_fa != 1) begin failures++; $display("FAIL adjacent forwarding count %0d", n_fa); end

    // multiply and its consumer through the bypass
    @(negedge clk);
    iss_valid = 1; iss_entry = mk(6, OP_MUL, 15, 3, 2, 0, 0, 1, 3); iss_at[6] = cyc;    // 3002 * 3
    @(negedge clk);
    iss_valid = 0;
    repeat (MUL_LAT - 1) @(negedge clk);   // consumer selected MUL_LAT cycles after the multiply
    iss_valid = 1; iss_entry = mk(7, OP_ADD, 16, 2, 15, 0, 0, 1, 4); iss_at[7] = cyc;   // r16 = r15 + 4
    @(negedge clk);
    iss_valid = 0;
    repeat (MUL_LAT + 4) @(posedge clk);
    expect_res("multiply", 6, 9006, MUL_LAT + 2);
    expect_res("multiply consumer", 7, 9010, 3);
    checks++; if (rf[2][15] !== 64'd9006) begin failures++; $display("FAIL multiply write-back"); end
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
