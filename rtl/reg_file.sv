// reg_file: physical register file of one PE.
//
// NREG words of XLEN bits. Values are not replicated: a result is written only
// into the register file of the PE that produced it, and other PEs read it
// through the operand crossbar. Two write ports (ALU and multiplier results of
// this PE, written at the end of their last EX cycle) and NRP asynchronous
// read ports (one per requester of the crossbar). A write is visible to reads
// from the next cycle on. Every register resets to zero, so the architectural
// registers start at zero. The two write ports never target the same register
// in one cycle (a register has a single producer); port 1 wins if they do.
module reg_file
  import cpe_pkg::*;
#(
  parameter int NREG = 40,
  parameter int NRP  = 17
)(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [1:0]              we,
  input  logic [1:0][IDX_W-1:0]   waddr,
  input  word_t [1:0]             wdata,
  input  logic [NRP-1:0][IDX_W-1:0] raddr,
  output word_t [NRP-1:0]         rdata
);
  word_t mem [NREG];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NREG; i++) mem[i] <= '0;
    end else begin
      for (int w = 0; w < 2; w++)
        if (we[w] && int'(waddr[w]) < NREG) mem[waddr[w]] <= wdata[w];
    end
  end

  always_comb
    for (int r = 0; r < NRP; r++)
      rdata[r] = (int'(raddr[r]) < NREG) ? mem[raddr[r]] : '0;
endmodule
