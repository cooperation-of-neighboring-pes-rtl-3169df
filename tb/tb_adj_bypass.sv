// tb_adj_bypass: the operand must come from the own PE's result buses, else
// from the left neighbour's, else from the register file; invalid buses,
// results without a destination and unused operands never match.
module tb_adj_bypass;
  import cpe_pkg::*;
  logic    src_v;
  ptag_t   src;
  word_t   rf_val, val;
  result_t loc_alu, loc_mul, left_alu, left_mul;
  logic    hit_local, hit_adj;
  int checks = 0, failures = 0;

  adj_bypass dut (.*);

  function automatic result_t mk(logic v, logic dv, ptag_t t, word_t d);
    result_t r;
    r.v = v; r.d_v = dv; r.t = t; r.rob = '0; r.data = d;
    return r;
  endfunction

  initial begin
    for (int i = 0; i < 3000; i++) begin
      ptag_t tg [4];
      logic  vv [4], dd [4];
      word_t dat [4];
      word_t exp_v;
      logic  el, ea;
      src   = ptag_t'($urandom_range(0, 7));
      src_v = ($urandom_range(0, 7) != 0);
      rf_val = {$urandom, $urandom};
      for (int j = 0; j < 4; j++) begin
        tg[j]  = ptag_t'($urandom_range(0, 7));
        vv[j]  = $urandom_range(0, 1);
        dd[j]  = ($urandom_range(0, 5) != 0);
        dat[j] = {$urandom, $urandom};
      end
      loc_alu = mk(vv[0], dd[0], tg[0], dat[0]);
      loc_mul = mk(vv[1], dd[1], tg[1], dat[1]);
      left_alu = mk(vv[2], dd[2], tg[2], dat[2]);
      left_mul = mk(vv[3], dd[3], tg[3], dat[3]);
      exp_v = rf_val; el = 0; ea = 0;
      for (int j = 3; j >= 0; j--)
        if (src_v && vv[j] && dd[j] && tg[j] == src) begin
          exp_v = dat[j]; el = (j < 2); ea = (j >= 2);
        end
      #1;
      checks++;
      if (val !== exp_v || hit_local !== el || hit_adj !== ea) begin
        failures++;
        $display("FAIL case %0d: val %h exp %h local %b/%b adj %b/%b", i, val, exp_v, hit_local, el, hit_adj, ea);
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
