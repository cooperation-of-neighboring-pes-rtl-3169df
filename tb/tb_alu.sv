// tb_alu: random operands for every ALU operation, compared with a reference
// written independently, plus shift and compare corner cases.
module tb_alu;
  import cpe_pkg::*;
  op_t   op;
  word_t a, b, y;
  int    checks = 0, failures = 0;

  alu dut (.*);

  function automatic word_t ref_op(op_t o, word_t x, word_t z);
    logic [5:0] sh;
    sh = z[5:0];
    case (o)
      OP_ADD:    return x + z;
      OP_SUB:    return x + ~z + 1;
      OP_AND:    return x & z;
      OP_OR:     return x | z;
      OP_XOR:    return x ^ z;
      OP_SLL:    return x << sh;
      OP_SRL:    return x >> sh;
      OP_SRA:    begin
                   word_t r;
                   r = x >> sh;
                   if (x[63] && sh != 0) r |= ~(64'hFFFF_FFFF_FFFF_FFFF >> sh);
                   return r;
                 end
      OP_CMPLT:  return ((x[63] && !z[63]) || (x[63] == z[63] && x < z)) ? 1 : 0;
      OP_CMPULT: return (x < z) ? 1 : 0;
      default:   return 0;
    endcase
  endfunction

  task automatic t1(op_t o, word_t x, word_t z);
    op = o; a = x; b = z;
    #1;
    checks++;
    if (y !== ref_op(o, x, z)) begin
      failures++;
      $display("FAIL %s %h %h -> %h expected %h", o.name(), x, z, y, ref_op(o, x, z));
    end
  endtask

  initial begin
    for (int i = 0; i < 2000; i++)
      t1(op_t'($urandom_range(0, 9)), {$urandom, $urandom}, {$urandom, $urandom});
    t1(OP_SRA, 64'h8000_0000_0000_0000, 64'd63);
    t1(OP_SRA, 64'h8000_0000_0000_0000, 64'd0);
    t1(OP_CMPLT, 64'hFFFF_FFFF_FFFF_FFFF, 64'd0);
    t1(OP_CMPULT, 64'hFFFF_FFFF_FFFF_FFFF, 64'd0);
    t1(OP_SLL, 64'd1, 64'd127);
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
