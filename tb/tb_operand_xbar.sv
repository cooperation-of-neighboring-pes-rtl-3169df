// tb_operand_xbar: each requester must get read port q of the register file
// named in its request, and that file's port q must carry the request's
// index (other files see index 0).
module tb_operand_xbar;
  import cpe_pkg::*;
  localparam int NPE = 8, NRQ = 2*NPE + 1;
  ptag_t [NRQ-1:0] req;
  logic  [NPE-1:0][NRQ-1:0][IDX_W-1:0] rf_raddr;
  word_t [NPE-1:0][NRQ-1:0] rf_rdata;
  word_t [NRQ-1:0] rsp;
  int checks = 0, failures = 0;

  operand_xbar #(.NPE(NPE), .NRQ(NRQ)) dut (.*);

  initial begin
    for (int i = 0; i < 500; i++) begin
      for (int q = 0; q < NRQ; q++) begin
        req[q].pe  = PE_W'($urandom_range(0, NPE-1));
        req[q].idx = IDX_W'($urandom_range(0, 39));
        for (int p = 0; p < NPE; p++) rf_rdata[p][q] = {$urandom, $urandom};
      end
      #1;
      for (int q = 0; q < NRQ; q++) begin
        checks++;
        if (rsp[q] !== rf_rdata[req[q].pe][q] || rf_raddr[req[q].pe][q] !== req[q].idx) begin
          failures++;
          $display("FAIL requester %0d", q);
        end
        for (int p = 0; p < NPE; p++)
          if (p != int'(req[q].pe)) begin
            checks++;
            if (rf_raddr[p][q] !== '0) begin failures++; $display("FAIL idle port %0d/%0d", p, q); end
          end
      end
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
