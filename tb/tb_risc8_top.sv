// tb_risc8_top: end-to-end test of the pipelined processor at its default
// sizes.
//
// The testbench holds its own instruction-set model of the processor: it
// executes each program one instruction at a time, with no pipeline, and
// records every register write in order. The processor runs the same
// program and every register write it retires is compared with that list;
// at the end the register file and the whole data memory are compared too.
//
// Programs: first a directed one (a counting loop with a backward branch,
// a load used by the very next instruction, shifts and rotates, stores),
// then random programs over registers r0..r7 with forward-only branches and
// jumps, each ending in a jump-to-self that stops the run.
//
// Timing checks: the first instruction writes back three clocks after reset
// is released, and a program of D executed instructions with R taken
// branches or jumps before its last one retires in exactly D + 2R cycles
// (one instruction per clock, two bubbles per redirect).
//
// Mechanism counts (each must occur at least once): forwarding from write
// back to execute, forwarding of a loaded value, register-file write-through,
// taken branch flush, untaken branch, jump flush, load, store, shifter and
// rotator results.
module tb_risc8_top;
  import risc8_pkg::*;

  localparam int NPROG = 40;

  logic clk = 1'b0, rst = 1'b1;
  logic prog_we = 1'b0;
  logic [5:0] prog_addr = '0;
  logic [31:0] prog_data = '0;
  logic [3:0] phase;
  logic [7:0] pc;
  logic wb_valid, wb_we;
  logic [4:0] wb_reg;
  logic [7:0] wb_data;
  logic [4:0] dbg_raddr = '0;
  logic [7:0] dbg_rdata;
  logic [7:0] dmem_dbg_addr = '0;
  logic [7:0] dmem_dbg_data;

  risc8_top dut (.clk(clk), .rst(rst), .prog_we(prog_we), .prog_addr(prog_addr),
                 .prog_data(prog_data), .phase(phase), .pc(pc), .wb_valid(wb_valid),
                 .wb_we(wb_we), .wb_reg(wb_reg), .wb_data(wb_data), .dbg_raddr(dbg_raddr),
                 .dbg_rdata(dbg_rdata), .dmem_dbg_addr(dmem_dbg_addr),
                 .dmem_dbg_data(dmem_dbg_data));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------ instruction encoders
  function automatic logic [31:0] r_op(input logic [5:0] f, input int rd, input int rs,
                                       input int rt, input int sh = 0);
    return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'(sh), f};
  endfunction
  function automatic logic [31:0] i_op(input logic [5:0] op, input int rt, input int rs, input int imm);
    return {op, 5'(rs), 5'(rt), 16'(imm & 255)};
  endfunction
  function automatic logic [31:0] j_op(input int word);
    return {6'h02, 26'(word)};
  endfunction

  // ------------------------------------------------------ reference model
  logic [31:0] prog [64];
  logic [7:0]  m_regs [32];
  logic [7:0]  m_dmem [256];
  int exp_reg [$];
  int exp_dat [$];
  int m_dyn, m_redirects;

  function automatic logic [7:0] rotl(input logic [7:0] v, input int n);
    logic [7:0] r = v;
    for (int i = 0; i < n; i++) r = {r[6:0], r[7]};
    return r;
  endfunction

  task automatic model_run();
    int p = 0;
    exp_reg.delete();
    exp_dat.delete();
    for (int i = 0; i < 32; i++) m_regs[i] = 8'h00;
    m_dyn = 0;
    m_redirects = 0;
    forever begin
      logic [31:0] ins;
      logic [7:0] va, vb, imm, res;
      int rd, rt, rs, next, wr;
      ins = prog[p];
      rs = int'(ins[25:21]); rt = int'(ins[20:16]); rd = int'(ins[15:11]);
      va = m_regs[rs]; vb = m_regs[rt]; imm = ins[7:0];
      next = (p + 1) % 64;
      wr = -1;
      m_dyn++;
      case (ins[31:26])
        6'h00: begin
          case (ins[5:0])
            F_ADD:  res = va + vb;
            F_SUB:  res = va - vb;
            F_AND:  res = va & vb;
            F_OR:   res = va | vb;
            F_XOR:  res = va ^ vb;
            F_NOR:  res = ~(va | vb);
            F_SLT:  res = ($signed(va) < $signed(vb)) ? 8'd1 : 8'd0;
            F_SHL:  res = va << 1;
            F_SHR:  res = va >> 1;
            F_LOAD: res = va;
            F_ROL:  res = rotl(va, int'(ins[8:6]));
            F_ROR:  res = rotl(va, (8 - int'(ins[8:6])) % 8);
            default: res = va + vb;
          endcase
          wr = rd;
        end
        6'h08: begin res = va + imm; wr = rt; end
        6'h23: begin res = m_dmem[va + imm]; wr = rt; end
        6'h2B: m_dmem[va + imm] = vb;
        6'h04: if (va == vb) begin
                 next = (p + 1 + int'($signed(imm))) % 64;
                 m_redirects++;
               end
        6'h02: begin
                 if (int'(ins[5:0]) == p) break;  // jump-to-self: the end
                 next = int'(ins[5:0]);
                 m_redirects++;
               end
        default: ;
      endcase
      if (wr > 0) begin
        m_regs[wr] = res;
        exp_reg.push_back(wr);
        exp_dat.push_back(int'(res));
      end
      p = next;
      if (m_dyn > 5000) begin
        $display("model: program does not end");
        break;
      end
    end
  endtask

  // ------------------------------------------------------ program builders
  task automatic directed_prog();
    for (int i = 0; i < 64; i++) prog[i] = j_op(i);
    prog[0]  = i_op(OP_ADDI, 1, 0, 5);          // r1 = 5 (loop count)
    prog[1]  = i_op(OP_ADDI, 2, 0, 0);          // r2 = 0
    prog[2]  = r_op(F_ADD, 2, 2, 1);            // loop: r2 += r1
    prog[3]  = i_op(OP_ADDI, 1, 1, 'hFF);      // r1 -= 1
    prog[4]  = i_op(OP_BEQ, 0, 1, 1);           // if r1 == 0 skip the jump
    prog[5]  = j_op(2);
    prog[6]  = i_op(OP_SW, 2, 0, 'h40);        // mem[0x40] = r2 (15)
    prog[7]  = i_op(OP_LW, 3, 0, 'h40);        // r3 = mem[0x40]
    prog[8]  = r_op(F_ADD, 4, 3, 3);            // r4 = r3 + r3 (load forwarded)
    prog[9]  = r_op(F_SHL, 5, 4, 0);            // r5 = r4 << 1
    prog[10] = r_op(F_SHR, 6, 5, 0);            // r6 = r5 >> 1
    prog[11] = r_op(F_ROL, 7, 4, 0, 3);         // r7 = rol(r4, 3)
    prog[12] = r_op(F_ROR, 6, 7, 0, 3);         // r6 = ror(r7, 3)
    prog[13] = r_op(F_LOAD, 5, 6, 0);           // r5 = r6
    prog[14] = r_op(F_SLT, 1, 0, 4);            // r1 = (0 < r4)
    prog[15] = i_op(OP_SW, 7, 1, 'h41);        // mem[0x42] = r7
    prog[16] = j_op(16);                        // stop
  endtask

  task automatic random_prog();
    logic [5:0] functs [12] = '{F_ADD, F_SUB, F_AND, F_OR, F_XOR, F_NOR, F_SLT,
                                F_SHL, F_SHR, F_LOAD, F_ROL, F_ROR};
    int last = 48 + int'($urandom_range(14, 0));
    for (int i = 0; i < 64; i++) prog[i] = j_op(i);
    for (int p = 0; p < last; p++) begin
      int r1 = int'($urandom_range(7, 0));
      int r2 = int'($urandom_range(7, 0));
      int r3 = int'($urandom_range(7, 0));
      int k = int'($urandom_range(99, 0));
      if (k < 35)      prog[p] = r_op(functs[$urandom_range(11, 0)], r1, r2, r3,
                                      int'($urandom_range(31, 0)));
      else if (k < 55) prog[p] = i_op(OP_ADDI, r1, r2, int'($urandom_range(255, 0)));
      else if (k < 70) prog[p] = i_op(OP_LW, r1, r2, int'($urandom_range(255, 0)));
      else if (k < 82) prog[p] = i_op(OP_SW, r1, r2, int'($urandom_range(255, 0)));
      else if (k < 94) prog[p] = i_op(OP_BEQ, r1, ($urandom_range(1, 0) == 1) ? r1 : r2,
                                      int'($urandom_range(last - p - 1, 0)));
      else             prog[p] = j_op(int'($urandom_range(last, p + 1)));
    end
  endtask

  // ------------------------------------------------------ mechanism counters
  int n_fwd = 0, n_fwd_load = 0, n_wt = 0, n_br_taken = 0, n_br_not = 0, n_jump = 0;
  int n_load = 0, n_store = 0, n_shift = 0, n_rot = 0;
  logic [3:0] last_phase = 4'b1000;
  int n_phase_err = 0;
  logic was_rst = 1'b1;

  always @(posedge clk) if (!rst) begin
    if (dut.fwd_a || dut.fwd_b) n_fwd++;
    if ((dut.fwd_a || dut.fwd_b) && !dut.ex_wb.mem_to_reg) n_fwd_load++;
    if (dut.u_decode.u_rf.we && dut.u_decode.u_rf.wa != 0 && dut.if_id.valid &&
        (dut.u_decode.u_rf.ra1 == dut.u_decode.u_rf.wa ||
         dut.u_decode.u_rf.ra2 == dut.u_decode.u_rf.wa)) n_wt++;
    if (dut.id_ex.valid && dut.id_ex.ctrl.branch && dut.ex_take_branch) n_br_taken++;
    if (dut.id_ex.valid && dut.id_ex.ctrl.branch && !dut.ex_take_branch) n_br_not++;
    if (dut.ex_take_jump) n_jump++;
    if (dut.id_ex.valid && dut.id_ex.ctrl.mem_read) n_load++;
    if (dut.id_ex.valid && dut.id_ex.ctrl.mem_write) n_store++;
    if (dut.id_ex.valid && dut.id_ex.ctrl.reg_write && dut.ex_sel == EX_SHIFT) n_shift++;
    if (dut.id_ex.valid && dut.id_ex.ctrl.reg_write && dut.ex_sel == EX_ROT) n_rot++;
    // The timing generator must step t1 -> t2 -> t3 -> t4 -> t1.
    if (!was_rst && phase != {last_phase[2:0], last_phase[3]}) n_phase_err++;
  end
  always @(posedge clk) begin
    last_phase <= phase;
    was_rst    <= rst;
  end

  // ------------------------------------------------------ one program run
  task automatic run_prog(input int id);
    int got = 0, cyc = 0, first = -1, lastc = -1, wb_count = 0;
    // Load the program while the core is held in reset.
    rst = 1'b1;
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      prog_we = 1'b1; prog_addr = 6'(i); prog_data = prog[i];
    end
    @(negedge clk) prog_we = 1'b0;
    // The model starts from the memory contents the processor has.
    for (int a = 0; a < 256; a++) begin
      dmem_dbg_addr = 8'(a); #1;
      m_dmem[a] = dmem_dbg_data;
    end
    model_run();
    @(negedge clk) rst = 1'b0;
    while (wb_count < m_dyn && cyc < 20000) begin
      @(posedge clk);
      #1;
      cyc++;
      if (wb_valid) begin
        wb_count++;
        if (first < 0) first = cyc;
        lastc = cyc;
      end
      if (wb_we && wb_reg != 0) begin
        checks++;
        if (got >= exp_reg.size()) begin
          failures++;
          $display("prog %0d: unexpected write r%0d=%h", id, wb_reg, wb_data);
        end else if (int'(wb_reg) != exp_reg[got] || int'(wb_data) != exp_dat[got]) begin
          failures++;
          $display("prog %0d write %0d: got r%0d=%h expected r%0d=%h", id, got, wb_reg,
                   wb_data, exp_reg[got], exp_dat[got]);
        end
        got++;
      end
    end
    checks++;
    if (got != exp_reg.size()) begin
      failures++;
      $display("prog %0d: %0d register writes, expected %0d", id, got, exp_reg.size());
    end
    // Latency: first write-back three clocks after reset release.
    checks++;
    if (first != 3) begin
      failures++;
      $display("prog %0d: first write-back in cycle %0d, expected 3", id, first);
    end
    // Rate: one instruction per clock plus two bubbles per redirect.
    checks++;
    if (lastc - first + 1 != m_dyn + 2 * m_redirects) begin
      failures++;
      $display("prog %0d: %0d instructions, %0d redirects took %0d cycles, expected %0d", id,
               m_dyn, m_redirects, lastc - first + 1, m_dyn + 2 * m_redirects);
    end
    repeat (4) @(posedge clk);
    #1;
    for (int r = 1; r < 32; r++) begin
      dbg_raddr = 5'(r); #1;
      checks++;
      if (dbg_rdata !== m_regs[r]) begin
        failures++;
        $display("prog %0d: r%0d = %h expected %h", id, r, dbg_rdata, m_regs[r]);
      end
    end
    for (int a = 0; a < 256; a++) begin
      dmem_dbg_addr = 8'(a); #1;
      checks++;
      if (dmem_dbg_data !== m_dmem[a]) begin
        failures++;
        $display("prog %0d: mem[%0d] = %h expected %h", id, a, dmem_dbg_data, m_dmem[a]);
      end
    end
  endtask

  task automatic need(input string what, input int n);
    checks++;
    $display("  %-28s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    directed_prog();
    run_prog(0);
    checks++;
    if (m_regs[2] != 8'd15 || m_dmem[8'h40] != 8'd15) begin
      failures++;
      $display("directed program: loop sum r2=%0d, expected 15", m_regs[2]);
    end
    for (int id = 1; id < NPROG; id++) begin
      random_prog();
      run_prog(id);
    end
    $display("mechanism counts:");
    need("forward WB->EX", n_fwd);
    need("forward of a loaded value", n_fwd_load);
    need("register write-through", n_wt);
    need("branch taken (flush)", n_br_taken);
    need("branch not taken", n_br_not);
    need("jump (flush)", n_jump);
    need("load", n_load);
    need("store", n_store);
    need("universal shifter", n_shift);
    need("barrel rotator", n_rot);
    checks++;
    if (n_phase_err != 0) begin
      failures++;
      $display("timing generator out of sequence %0d times", n_phase_err);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
