// steer_logic: adjacent_rFO_freereg steering decision for one instruction.
//
// Step 1, operand status (adjacent_rFO table). Unready operands take priority:
//   - if in1 is a register whose value is not yet produced, steer by in1;
//   - else if in2 is such a register, steer by in2;
//   - otherwise (operands ready or absent) steer to the PE with the smallest
//     DCOUNT (Min_dcount; the lowest-numbered PE wins a tie).
//   Steering "by operand X" uses X's register fanout: rfo is the position of
//   this instruction among the consumers of X's register instance (1 for the
//   first reader). Fanout 2 or 4 goes to the right neighbour of X's producer
//   PE, any other fanout to the producer PE itself.
// Step 2, free registers (freereg extension). If the instruction writes a
//   register and the chosen PE has no free register, move one PE to the right;
//   if that one has none either, keep moving right (the document gives only the
//   first move). stall is raised when no PE has a free register.
// Purely combinational. The flags tell which rule decided.
module steer_logic
  import cpe_pkg::*;
#(
  parameter int NPE = 8
)(
  input  logic                      s1_v,
  input  logic                      s1_rdy,
  input  logic [PE_W-1:0]           s1_pe,
  input  logic [2:0]                s1_rfo,
  input  logic                      s2_v,
  input  logic                      s2_rdy,
  input  logic [PE_W-1:0]           s2_pe,
  input  logic [2:0]                s2_rfo,
  input  logic                      need_reg,
  input  logic signed [15:0]        dcount  [NPE],
  input  logic [IDX_W:0]            freecnt [NPE],
  output logic [PE_W-1:0]           pe,
  output logic                      by_min_dcount,
  output logic                      by_producer,
  output logic                      by_rfo_right,
  output logic                      realloc,
  output logic                      stall
);
  logic [PE_W-1:0] min_pe, base_pe, first_pe;
  logic [PE_W-1:0] prod_pe;
  logic [2:0]      rfo;
  logic            unready;

  // Min_dcount: first PE with the smallest DCOUNT.
  always_comb begin
    min_pe = '0;
    for (int p = 1; p < NPE; p++)
      if (dcount[p] < dcount[min_pe]) min_pe = PE_W'(p);
  end

  always_comb begin
    unready = 1'b0;
    prod_pe = '0;
    rfo     = '0;
    if (s1_v && !s1_rdy) begin
      unready = 1'b1; prod_pe = s1_pe; rfo = s1_rfo;
    end else if (s2_v && !s2_rdy) begin
      unready = 1'b1; prod_pe = s2_pe; rfo = s2_rfo;
    end

    by_min_dcount = !unready;
    by_rfo_right  = unready && (rfo == 3'd2 || rfo == 3'd4);
    by_producer   = unready && !by_rfo_right;
    if (!unready)          first_pe = min_pe;
    else if (by_rfo_right) first_pe = ring_right(prod_pe, NPE);
    else                   first_pe = prod_pe;
    base_pe = first_pe;

    // Reallocation to the right when the chosen PE has no free register.
    pe      = first_pe;
    realloc = 1'b0;
    stall   = 1'b0;
    if (need_reg && freecnt[first_pe] == '0) begin
      realloc = 1'b1;
      stall   = 1'b1;
      for (int h = 1; h < NPE; h++) begin
        if (stall && freecnt[(int'(base_pe) + h) % NPE] != '0) begin
          pe    = PE_W'((int'(base_pe) + h) % NPE);
          stall = 1'b0;
        end
      end
    end
  end
endmodule
