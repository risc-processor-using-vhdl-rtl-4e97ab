// tb_execution_unit: random R-type, I-type, branch and jump operand sets,
// checked against a reference model of each instruction's result, the zero
// flag, the branch target PC+4+imm*4 and the jump target.
module tb_execution_unit;
  import risc8_pkg::*;
  logic [7:0] a, b, imm, result, pc_plus4, branch_target, jump_target;
  logic [4:0] shamt;
  logic [5:0] funct;
  logic [25:0] target;
  aluop_e alu_op;
  logic alu_src, zero;
  ex_sel_e ex_sel;
  int checks = 0, failures = 0;

  execution_unit dut (.a(a), .b(b), .imm(imm), .shamt(shamt), .funct(funct), .target(target),
                      .alu_op(alu_op), .alu_src(alu_src), .pc_plus4(pc_plus4), .result(result),
                      .zero(zero), .ex_sel(ex_sel), .branch_target(branch_target),
                      .jump_target(jump_target));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sgn(input int v);
    return (v > 127) ? v - 256 : v;
  endfunction

  function automatic int rot(input int v, input int n, input bit left);
    int r = v;
    for (int i = 0; i < n; i++)
      r = left ? (((r << 1) | (r >> 7)) & 255) : (((r >> 1) | ((r & 1) << 7)) & 255);
    return r;
  endfunction

  initial begin
    automatic logic [5:0] functs [12] = '{F_ADD, F_SUB, F_AND, F_OR, F_XOR, F_NOR, F_SLT,
                                F_SHL, F_SHR, F_LOAD, F_ROL, F_ROR};
    for (int k = 0; k < 5000; k++) begin
      int x, y, i, e, kind;
      x = int'($urandom_range(255, 0)); y = int'($urandom_range(255, 0));
      i = int'($urandom_range(255, 0));
      a = 8'(x); b = 8'(y); imm = 8'(i);
      shamt = 5'($urandom); target = 26'($urandom); pc_plus4 = 8'($urandom);
      funct = functs[$urandom_range(11, 0)];
      kind = int'($urandom_range(2, 0));
      case (kind)
        0: begin alu_op = ALUOP_FUNCT; alu_src = 1'b0; end
        1: begin alu_op = ALUOP_ADD;   alu_src = 1'b1; end
        default: begin alu_op = ALUOP_SUB; alu_src = 1'b0; end
      endcase
      #1;
      if (kind == 1) e = (x + i) & 255;
      else if (kind == 2) e = (x - y) & 255;
      else case (funct)
        F_ADD:  e = (x + y) & 255;
        F_SUB:  e = (x - y) & 255;
        F_AND:  e = x & y;
        F_OR:   e = x | y;
        F_XOR:  e = x ^ y;
        F_NOR:  e = 255 - (x | y);
        F_SLT:  e = (sgn(x) < sgn(y)) ? 1 : 0;
        F_SHL:  e = (x * 2) & 255;
        F_SHR:  e = x / 2;
        F_LOAD: e = x;
        F_ROL:  e = rot(x, int'(shamt) % 8, 1'b1);
        default: e = rot(x, int'(shamt) % 8, 1'b0);
      endcase
      checks++;
      if (int'(result) != e) begin
        failures++;
        $display("kind %0d funct %h a=%0d b=%0d imm=%0d shamt=%0d: got %0d expected %0d",
                 kind, funct, x, y, i, shamt, result, e);
      end
      if (kind == 2) begin
        checks++;
        if (zero !== (x == y)) begin failures++; $display("zero wrong a=%0d b=%0d", x, y); end
      end
      checks++;
      if (int'(branch_target) != ((int'(pc_plus4) + sgn(i) * 4) & 255)) begin
        failures++;
        $display("branch target: pc4=%0d imm=%0d got %0d", pc_plus4, i, branch_target);
      end
      checks++;
      if (int'(jump_target) != ((int'(target) * 4) & 255)) begin
        failures++;
        $display("jump target: got %0d", jump_target);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
