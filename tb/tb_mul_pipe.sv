// tb_mul_pipe: a new multiplication every cycle; each product and its tag
// must appear on the outputs exactly MUL_LAT-1 cycles after entering, i.e.
// in the MUL_LAT-th EX cycle.
module tb_mul_pipe;
  import cpe_pkg::*;
  localparam int MUL_LAT = 7;
  logic clk = 0, rst_n = 0;
  logic in_v, in_dv, out_v, out_dv;
  ptag_t in_t, out_t;
  logic [ROB_W-1:0] in_rob, out_rob;
  word_t a, b, out_data;
  int checks = 0, failures = 0;

  mul_pipe #(.MUL_LAT(MUL_LAT)) dut (.*);
  always #5 clk = ~clk;

  typedef struct { longint cyc; word_t p; logic [ROB_W-1:0] rob; } exp_t;
  exp_t q [$];
  longint cyc = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && out_v) begin
      exp_t e;
      checks++;
      if (q.size() == 0) begin
        failures++; $display("FAIL unexpected output");
      end else begin
        e = q.pop_front();
        if (out_data !== e.p || out_rob !== e.rob || cyc - e.cyc != MUL_LAT - 1) begin
          failures++;
          $display("FAIL product %h (exp %h) rob %0d (exp %0d) after %0d cycles", out_data, e.p, out_rob, e.rob, cyc - e.cyc);
        end
      end
    end
  end

  initial begin
    in_v = 0; in_dv = 1; in_t = '0; in_rob = '0; a = '0; b = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      in_v = ($urandom_range(0, 3) != 0);
      a = {$urandom, $urandom}; b = (i % 5 == 0) ? word_t'($urandom) : {$urandom, $urandom};
      in_rob = ROB_W'(i);
      if (in_v) begin
        exp_t e;
        e.cyc = cyc; e.p = a * b; e.rob = in_rob;
        q.push_back(e);
      end
    end
    @(negedge clk) in_v = 0;
    repeat (MUL_LAT + 2) @(posedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL %0d products missing", q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
