// tb_reg_file: every register reads zero after reset; random writes on both
// ports become visible on all read ports from the next cycle on.
module tb_reg_file;
  import cpe_pkg::*;
  localparam int NREG = 40, NRP = 17;
  logic clk = 0, rst_n = 0;
  logic [1:0] we;
  logic [1:0][IDX_W-1:0] waddr;
  word_t [1:0] wdata;
  logic [NRP-1:0][IDX_W-1:0] raddr;
  word_t [NRP-1:0] rdata;
  word_t model [NREG];
  int checks = 0, failures = 0;

  reg_file #(.NREG(NREG), .NRP(NRP)) dut (.*);
  always #5 clk = ~clk;

  task automatic check_all();
    for (int r = 0; r < NRP; r++) raddr[r] = IDX_W'($urandom_range(0, NREG-1));
    #1;
    for (int r = 0; r < NRP; r++) begin
      checks++;
      if (rdata[r] !== model[raddr[r]]) begin
        failures++;
        $display("FAIL port %0d reg %0d = %h expected %h", r, raddr[r], rdata[r], model[raddr[r]]);
      end
    end
  endtask

  initial begin
    we = '0; waddr = '0; wdata = '0; raddr = '0;
    for (int i = 0; i < NREG; i++) model[i] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check_all();
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      we = 2'($urandom_range(0, 3));
      waddr[0] = IDX_W'($urandom_range(0, NREG-1));
      do waddr[1] = IDX_W'($urandom_range(0, NREG-1)); while (waddr[1] == waddr[0]);
      wdata[0] = {$urandom, $urandom};
      wdata[1] = {$urandom, $urandom};
      @(posedge clk);
      for (int w = 0; w < 2; w++) if (we[w]) model[waddr[w]] = wdata[w];
      #1;
      we = '0;
      check_all();
    end
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
