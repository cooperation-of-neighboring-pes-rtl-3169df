// adj_bypass: operand bypass of one PE, the end point of the adjacent
// forwarding network.
//
// At the start of EX an operand may still be missing from the value read in
// the REG stage, because its producer finished only in the previous cycle.
// Such a value is picked up from one of four result buses, each holding the
// result a functional unit produced one cycle earlier: the PE's own ALU and
// multiplier (local forwarding) and the ALU and multiplier of the left
// neighbour on the PE ring (adjacent forwarding: a result travels one way,
// to the right neighbour only). Results of other PEs are never bypassed;
// the issue queue delays their consumers until the value can be read from
// the producer's register file. The match is on the physical register name.
// Combinational; hit_local / hit_adj report which path was used.
module adj_bypass
  import cpe_pkg::*;
(
  input  logic    src_v,      // operand is a register (not unused / immediate)
  input  ptag_t   src,
  input  word_t   rf_val,     // value read from a register file in REG
  input  result_t loc_alu,
  input  result_t loc_mul,
  input  result_t left_alu,
  input  result_t left_mul,
  output word_t   val,
  output logic    hit_local,
  output logic    hit_adj
);
  function automatic logic hit(result_t r, logic v, ptag_t t);
    return v && r.v && r.d_v && (r.t == t);
  endfunction

  always_comb begin
    val       = rf_val;
    hit_local = 1'b0;
    hit_adj   = 1'b0;
    if (hit(loc_alu, src_v, src)) begin
      val = loc_alu.data;  hit_local = 1'b1;
    end else if (hit(loc_mul, src_v, src)) begin
      val = loc_mul.data;  hit_local = 1'b1;
    end else if (hit(left_alu, src_v, src)) begin
      val = left_alu.data; hit_adj = 1'b1;
    end else if (hit(left_mul, src_v, src)) begin
      val = left_mul.data; hit_adj = 1'b1;
    end
  end
endmodule
