// tb_decode_unit: random instruction words; checks the field split, the
// immediate (bits [7:0], not extended), the RegDst choice, and the
// register file reads after write-back writes steered by the MemtoReg
// multiplexer, against a model register array.
module tb_decode_unit;
  logic clk = 1'b0, rst = 1'b1;
  logic [31:0] instr = '0;
  logic reg_dst = 1'b0, wb_reg_write = 1'b0, wb_mem_to_reg = 1'b0;
  logic [4:0] wb_write_reg = '0, rs, rt, dest_reg, shamt, dbg_ra = '0;
  logic [7:0] wb_result = '0, wb_read_data = '0, wb_write_data, imm, read_data1, read_data2, dbg_rd;
  logic [5:0] opcode, funct;
  logic [25:0] target;
  logic [7:0] model [32];
  int checks = 0, failures = 0;

  decode_unit dut (.clk(clk), .rst(rst), .instr(instr), .reg_dst(reg_dst),
                   .wb_reg_write(wb_reg_write), .wb_mem_to_reg(wb_mem_to_reg),
                   .wb_write_reg(wb_write_reg), .wb_result(wb_result), .wb_read_data(wb_read_data),
                   .wb_write_data(wb_write_data), .opcode(opcode), .rs(rs), .rt(rt),
                   .dest_reg(dest_reg), .shamt(shamt), .funct(funct), .imm(imm), .target(target),
                   .read_data1(read_data1), .read_data2(read_data2), .dbg_ra(dbg_ra), .dbg_rd(dbg_rd));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: got %0h expected %0h (instr %h)", what, got, exp, instr);
    end
  endtask

  initial begin
    logic [7:0] wdat;
    for (int i = 0; i < 32; i++) model[i] = 8'h00;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      instr         = $urandom;
      reg_dst       = 1'($urandom);
      wb_reg_write  = 1'($urandom);
      wb_mem_to_reg = 1'($urandom);
      wb_write_reg  = 5'($urandom);
      wb_result     = 8'($urandom);
      wb_read_data  = 8'($urandom);
      #1;
      wdat = wb_mem_to_reg ? wb_result : wb_read_data;
      chk("opcode", int'(opcode), int'(instr[31:26]));
      chk("rs", int'(rs), int'(instr[25:21]));
      chk("rt", int'(rt), int'(instr[20:16]));
      chk("shamt", int'(shamt), int'(instr[10:6]));
      chk("funct", int'(funct), int'(instr[5:0]));
      chk("target", int'(target), int'(instr[25:0]));
      chk("imm", int'(imm), int'(instr & 32'hFF));
      chk("dest", int'(dest_reg), reg_dst ? int'(instr[15:11]) : int'(instr[20:16]));
      chk("wb data", int'(wb_write_data), int'(wdat));
      // Registers as they were before this cycle's write; write-through aside.
      chk("rd1", int'(read_data1), (instr[25:21] == 0) ? 0 :
          (wb_reg_write && wb_write_reg == instr[25:21]) ? int'(wdat) : int'(model[instr[25:21]]));
      chk("rd2", int'(read_data2), (instr[20:16] == 0) ? 0 :
          (wb_reg_write && wb_write_reg == instr[20:16]) ? int'(wdat) : int'(model[instr[20:16]]));
      @(posedge clk);
      if (wb_reg_write && wb_write_reg != 0) model[wb_write_reg] = wdat;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
