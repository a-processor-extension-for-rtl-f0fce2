// tb_rtp_alu: self-checking test of the 16-bit ALU.
// Applies directed corner cases and random operands to every operation and
// compares with results computed here from the operation's definition.
module tb_rtp_alu;
  import rtp_pkg::*;

  alu_op_t     op;
  logic [15:0] a, b, y;
  int checks = 0, failures = 0;

  rtp_alu dut (.op(op), .a(a), .b(b), .y(y));

  function automatic logic [15:0] model(alu_op_t o, logic [15:0] x, logic [15:0] z);
    int s = int'(z & 16'hf);
    case (o)
      ALU_ADD:  return 16'((int'(x) + int'(z)) % 65536);
      ALU_SUB:  return 16'((int'(x) - int'(z) + 65536) % 65536);
      ALU_AND:  return x & z;
      ALU_OR:   return x | z;
      ALU_NAND: return ~(x & z);
      ALU_NOR:  return ~(x | z);
      ALU_XOR:  return x ^ z;
      ALU_XNOR: return ~(x ^ z);
      ALU_SLL:  return 16'((int'(x) * (1 << s)) % 65536);
      ALU_SRL:  return 16'(int'(x) / (1 << s));
      default:  return 16'h0;
    endcase
  endfunction

  task automatic apply(alu_op_t o, logic [15:0] x, logic [15:0] z);
    logic [15:0] e;
    op = o; a = x; b = z;
    #1;
    e = model(o, x, z);
    checks++;
    if (y !== e) begin
      failures++;
      $display("FAIL op=%0d a=%h b=%h y=%h expected %h", o, x, z, y, e);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    alu_op_t ops [10] = '{ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_NAND,
                          ALU_NOR, ALU_XOR, ALU_XNOR, ALU_SLL, ALU_SRL};
    apply(ALU_ADD, 16'hffff, 16'h0001);   // wrap to 0
    apply(ALU_SUB, 16'h0000, 16'h0001);   // wrap to ffff
    apply(ALU_SLL, 16'h0001, 16'h000f);
    apply(ALU_SRL, 16'h8000, 16'h000f);
    apply(ALU_SLL, 16'h1234, 16'h0010);   // only low 4 bits count
    foreach (ops[k])
      for (int i = 0; i < 200; i++)
        apply(ops[k], 16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
