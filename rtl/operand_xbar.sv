// operand_xbar: fully connected register-read network between the PEs.
//
// Requester q (two operand ports per PE, plus one debug port) names a physical
// register {pe, idx}. The crossbar steers the index to read port q of the
// register file of PE pe (the other register files see index 0 on that port)
// and returns that file's data to the requester. Every register file thus
// has one read port per requester, so the network never blocks; its timing
// cost (one extra cycle for a value held by another PE) is accounted for by
// the issue queue, not here. Combinational.
module operand_xbar
  import cpe_pkg::*;
#(
  parameter int NPE = 8,
  parameter int NRQ = 2*NPE + 1
)(
  input  ptag_t [NRQ-1:0]                    req,
  output logic  [NPE-1:0][NRQ-1:0][IDX_W-1:0] rf_raddr,
  input  word_t [NPE-1:0][NRQ-1:0]           rf_rdata,
  output word_t [NRQ-1:0]                    rsp
);
  always_comb begin
    for (int p = 0; p < NPE; p++)
      for (int q = 0; q < NRQ; q++)
        rf_raddr[p][q] = (int'(req[q].pe) == p) ? req[q].idx : '0;
    for (int q = 0; q < NRQ; q++)
      rsp[q] = (int'(req[q].pe) < NPE) ? rf_rdata[req[q].pe][q] : '0;
  end
endmodule
