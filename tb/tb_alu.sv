// tb_alu: every ALU operation on corner and random operands, compared with
// results computed here from integer arithmetic; the zero flag is checked
// with each.
module tb_alu;
  import risc8_pkg::*;
  logic [7:0] a, b, y;
  alu_op_e op;
  logic zero;
  int checks = 0, failures = 0;

  alu dut (.a(a), .b(b), .op(op), .y(y), .zero(zero));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] ref_y(input alu_op_e o, input int x, input int z);
    int sx, sz;
    sx = (x > 127) ? x - 256 : x;
    sz = (z > 127) ? z - 256 : z;
    case (o)
      ALU_AND: return 8'(x & z);
      ALU_OR:  return 8'(x | z);
      ALU_ADD: return 8'((x + z) % 256);
      ALU_XOR: return 8'(x ^ z);
      ALU_SUB: return 8'((x - z + 256) % 256);
      ALU_SLT: return (sx < sz) ? 8'd1 : 8'd0;
      ALU_NOR: return 8'(255 - (x | z));
      default: return 8'h00;
    endcase
  endfunction

  task automatic one(input alu_op_e o, input int x, input int z);
    logic [7:0] e;
    op = o; a = 8'(x); b = 8'(z); #1;
    e = ref_y(o, x, z);
    checks++;
    if (y !== e || zero !== (e == 0)) begin
      failures++;
      $display("op %s a=%0d b=%0d: got %0d/%b expected %0d", o.name(), x, z, y, zero, e);
    end
  endtask

  initial begin
    automatic alu_op_e ops [7] = '{ALU_AND, ALU_OR, ALU_ADD, ALU_XOR, ALU_SUB, ALU_SLT, ALU_NOR};
    automatic int corners [6] = '{0, 1, 127, 128, 200, 255};
    foreach (ops[i])
      foreach (corners[j])
        foreach (corners[k]) one(ops[i], corners[j], corners[k]);
    for (int n = 0; n < 3000; n++)
      one(ops[$urandom_range(6, 0)], int'($urandom_range(255, 0)), int'($urandom_range(255, 0)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
