// tb_mjava: end-to-end test of the MJava processor at its default sizes.
//
// The testbench plays the external programmer: it writes bytecode programs
// into the processor through write / byte_in and lets them run. An
// instruction-level reference model of the same machine (JVM integer
// semantics, an 8-word circular operand stack with the same overflow and
// underflow rules, a return stack, five local variables, byte addresses)
// lives in the testbench and executes one instruction each time the
// processor reports instr_done; the top of stack, the byte address, the
// finished opcode, the flags and the branch / error pulses are compared
// every time. After each program the local variables are read back with
// iload and compared the same way.
//
// Programs, in order:
//   1. the demonstration stream bipush, bipush, sipush, sipush, iadd, ishl,
//      ior, swap, nop (15 bytes), loaded whole before it runs, with the
//      cycle count of every instruction checked (2 clocks + 1 per
//      immediate byte, +1 for swap)
//   2. a counting loop using istore, iload, if_icmpge, iinc and goto, then
//      each of the six if_icmp<cond> on equal, smaller and larger operands
//      and on operand pairs whose difference overflows
//   3. a subroutine called with jsr and left with ret
//   4. a subroutine whose return address is changed before ret
//      (ret_mismatch)
//   5. 600 random straight-line instructions streamed while they execute,
//      with random pauses of the programmer (load mode in the middle of
//      execution) and the FIFO running dry (stalls)
//   6. 17 nops written into the 16-byte FIFO: the last one is refused
// At the end every mechanism (stall, load-mode pause, taken and untaken
// branch, jsr/ret, two-cycle swap/dup2, operand stack overflow and
// underflow, ALU overflow flag, FIFO full / half / refused write, unknown
// opcode, return mismatch) must have happened at least once.
module tb_mjava;
  import mjava_pkg::*;

  logic        clk = 0, reset = 1, write = 0;
  logic [7:0]  byte_in = '0;
  logic [31:0] out_stream;
  logic        pc_full, pc_empty, pc_half, fz, fv, fn;
  logic [15:0] pc_addr;
  logic        instr_done, stall, branch_taken, bad_opcode, ret_mismatch;
  logic [7:0]  done_opcode;
  logic        st_overflow, st_underflow, pc_overflow, pc_underflow;
  logic [4:0]  pc_count;
  logic [3:0]  st_depth;

  mjava dut (
    .clk(clk), .reset(reset), .write(write), .byte_in(byte_in),
    .out_stream(out_stream), .pc_full(pc_full), .pc_empty(pc_empty),
    .pc_half(pc_half), .pc_count(pc_count), .st_depth(st_depth), .pc_addr(pc_addr), .flag_z(fz), .flag_v(fv), .flag_n(fn),
    .instr_done(instr_done), .done_opcode(done_opcode), .stall(stall),
    .branch_taken(branch_taken), .bad_opcode(bad_opcode),
    .ret_mismatch(ret_mismatch), .st_overflow(st_overflow),
    .st_underflow(st_underflow), .pc_overflow(pc_overflow),
    .pc_underflow(pc_underflow));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  // ------------------------------------------------------------ program
  logic [7:0] prog [8192];
  int prog_len = 0;

  task automatic emit(logic [7:0] b);
    prog[prog_len] = b;
    prog_len++;
  endtask

  // ------------------------------------------------------ reference model
  localparam int SD = 8, NL = 5;
  logic [31:0] m_st [SD];
  int          m_sp, m_cnt;
  logic [31:0] m_rs [SD];
  int          m_rsp, m_rcnt;
  logic [31:0] m_lv [NL];
  int          m_pc;
  logic        m_z, m_v, m_n;
  bit          e_ovf, e_unf, e_taken, e_bad, e_mis;

  function automatic logic [31:0] m_tos();
    return m_st[m_sp];
  endfunction
  function automatic logic [31:0] m_nos();
    return m_st[(m_sp + SD - 1) % SD];
  endfunction
  task automatic m_pop(int n);
    if (n > m_cnt) begin e_unf = 1; m_cnt = 0; end
    else m_cnt -= n;
    m_sp = (m_sp - n + 2 * SD) % SD;
  endtask
  task automatic m_push(logic [31:0] v);
    m_sp = (m_sp + 1) % SD;
    m_st[m_sp] = v;
    if (m_cnt == SD) e_ovf = 1; else m_cnt++;
  endtask
  function automatic logic [31:0] m_lv_rd(int i);
    return (i < NL) ? m_lv[i] : 32'd0;
  endfunction
  task automatic m_lv_wr(int i, logic [31:0] v);
    if (i < NL) m_lv[i] = v;
  endtask
  task automatic m_flags(logic [31:0] r, logic v);
    m_z = (r == 0); m_n = r[31]; m_v = v;
  endtask
  function automatic logic ovf_add(logic [31:0] a, logic [31:0] b, logic [31:0] r);
    return (a[31] == b[31]) && (r[31] != a[31]);
  endfunction
  function automatic logic ovf_sub(logic [31:0] a, logic [31:0] b, logic [31:0] r);
    return (a[31] != b[31]) && (r[31] != a[31]);
  endfunction

  int m_ncycles;  // clocks the instruction needs when nothing stalls it

  // Execute one instruction at m_pc; returns its opcode.
  task automatic m_step(output logic [7:0] op);
    logic [7:0]  b1, b2;
    logic [31:0] v1, v2, r;
    int          opc, idx, nb;
    longint      s1;
    opc = m_pc;
    op  = prog[m_pc];
    nb  = int'(operand_bytes(op));
    b1  = prog[m_pc + 1];
    b2  = prog[m_pc + 2];
    m_pc += 1 + nb;
    m_ncycles = 2 + nb + ((op == OP_SWAP || op == OP_DUP2) ? 1 : 0);
    e_ovf = 0; e_unf = 0; e_taken = 0; e_bad = 0; e_mis = 0;
    v2 = m_tos(); v1 = m_nos();
    case (op)
      OP_NOP: ;
      OP_ICONST_M1, OP_ICONST_0, OP_ICONST_1, OP_ICONST_2, OP_ICONST_3,
      OP_ICONST_4, OP_ICONST_5: m_push(32'(int'(op) - 3));
      OP_BIPUSH: m_push(32'(int'($signed(b1))));
      OP_SIPUSH: m_push(32'(int'($signed({b1, b2}))));
      OP_ILOAD:  m_push(m_lv_rd(int'(b1)));
      OP_ILOAD_0, OP_ILOAD_1, OP_ILOAD_2, OP_ILOAD_3: m_push(m_lv_rd(int'(op) - 8'h1a));
      OP_ISTORE: begin m_lv_wr(int'(b1), v2); m_pop(1); end
      OP_ISTORE_0, OP_ISTORE_1, OP_ISTORE_2, OP_ISTORE_3: begin
        m_lv_wr(int'(op) - 8'h3b, v2); m_pop(1);
      end
      OP_IINC: m_lv_wr(int'(b1), m_lv_rd(int'(b1)) + 32'(int'($signed(b2))));
      OP_POP:  m_pop(1);
      OP_POP2: m_pop(2);
      OP_DUP:  m_push(v2);
      OP_DUP2: begin m_push(v1); m_push(v2); end
      OP_SWAP: begin m_pop(2); m_push(v2); m_push(v1); end
      OP_IADD: begin r = v1 + v2; m_flags(r, ovf_add(v1, v2, r)); m_pop(2); m_push(r); end
      OP_ISUB: begin r = v1 - v2; m_flags(r, ovf_sub(v1, v2, r)); m_pop(2); m_push(r); end
      OP_INEG: begin r = -v2; m_flags(r, 0); m_pop(1); m_push(r); end
      OP_ISHL: begin r = v1 << v2[4:0]; m_flags(r, 0); m_pop(2); m_push(r); end
      OP_ISHR: begin
        s1 = longint'($signed(v1));
        for (int k = 0; k < int'(v2[4:0]); k++) s1 = (s1 < 0) ? -((-s1 + 1) / 2) : s1 / 2;
        r = s1[31:0]; m_flags(r, 0); m_pop(2); m_push(r);
      end
      OP_IAND: begin r = v1 & v2; m_flags(r, 0); m_pop(2); m_push(r); end
      OP_IOR:  begin r = v1 | v2; m_flags(r, 0); m_pop(2); m_push(r); end
      OP_IXOR: begin r = v1 ^ v2; m_flags(r, 0); m_pop(2); m_push(r); end
      OP_IF_ICMPEQ, OP_IF_ICMPNE, OP_IF_ICMPLT, OP_IF_ICMPGE, OP_IF_ICMPGT, OP_IF_ICMPLE: begin
        r = v1 - v2; m_flags(r, ovf_sub(v1, v2, r));
        case (op)
          OP_IF_ICMPEQ: e_taken = (v1 == v2);
          OP_IF_ICMPNE: e_taken = (v1 != v2);
          OP_IF_ICMPLT: e_taken = ($signed(v1) <  $signed(v2));
          OP_IF_ICMPGE: e_taken = ($signed(v1) >= $signed(v2));
          OP_IF_ICMPGT: e_taken = ($signed(v1) >  $signed(v2));
          default:      e_taken = ($signed(v1) <= $signed(v2));
        endcase
        m_pop(2);
        if (e_taken) m_pc = opc + int'($signed({b1, b2}));
      end
      OP_GOTO: begin e_taken = 1; m_pc = opc + int'($signed({b1, b2})); end
      OP_JSR: begin
        m_push(32'(m_pc));
        m_rsp = (m_rsp + 1) % SD; m_rs[m_rsp] = 32'(m_pc); if (m_rcnt < SD) m_rcnt++;
        e_taken = 1; m_pc = opc + int'($signed({b1, b2}));
      end
      OP_RET: begin
        e_taken = 1;
        idx = int'(b1);
        e_mis = (m_rcnt == 0) || (m_rs[m_rsp][15:0] != m_lv_rd(idx)[15:0]);
        m_rsp = (m_rsp + SD - 1) % SD; if (m_rcnt > 0) m_rcnt--;
        m_pc = int'(m_lv_rd(idx)[15:0]);
      end
      default: e_bad = 1;
    endcase
  endtask

  // ------------------------------------------------ per-instruction compare
  int n_instr = 0, n_stall = 0, n_pause = 0, n_taken = 0, n_untaken = 0;
  int n_jsr = 0, n_ret = 0, n_two = 0, n_sovf = 0, n_sunf = 0, n_vflag = 0;
  int n_full = 0, n_half = 0, n_pcovf = 0, n_bad = 0, n_mis = 0;
  bit timing_on = 0;
  // Top of stack after the first seven instructions of the demonstration
  // stream, worked out by hand: bytes sign-extended, ishl shifts value1
  // 0xffffffbb by the low five bits (28) of value2 0xffffbbdc.
  localparam logic [31:0] DEMO_TOS [7] = '{32'hffff_ffaa, 32'hffff_ffbb,
      32'hffff_ccdd, 32'hffff_eeff, 32'hffff_bbdc, 32'hb000_0000, 32'hffff_ffaa};
  longint last_done = 0;
  bit ovf_seen, unf_seen, taken_seen, bad_seen, mis_seen;

  always @(posedge clk) begin
    if (!reset) begin
      if (stall) n_stall++;
      if (write && m_pc < loaded) n_pause++;
      if (pc_full) n_full++;
      check(pc_full == (pc_count == 5'd16) && pc_empty == (pc_count == 5'd0), "FIFO flags disagree with the byte count");
      if (pc_half) n_half++;
      if (pc_overflow) n_pcovf++;
    end
  end

  always @(posedge clk) begin
    logic [7:0] op;
    if (!reset) begin
      // pulses that come from the same clock as instr_done
      if (st_overflow)  ovf_seen = 1;
      if (st_underflow) unf_seen = 1;
      if (branch_taken) taken_seen = 1;
      if (bad_opcode)   bad_seen = 1;
      if (ret_mismatch) mis_seen = 1;
      if (instr_done) begin
        m_step(op);
        n_instr++;
        check(done_opcode == op, $sformatf("opcode %h, model %h", done_opcode, op));
        check(out_stream == m_tos(), $sformatf("op %h: top of stack %h, model %h", op, out_stream, m_tos()));
        check(int'(st_depth) == m_cnt, $sformatf("op %h: stack depth %0d, model %0d", op, st_depth, m_cnt));
        check(int'(pc_addr) == m_pc, $sformatf("op %h: pc %0d, model %0d", op, pc_addr, m_pc));
        check({fz, fv, fn} == {m_z, m_v, m_n}, $sformatf("op %h: flags zvn %b%b%b, model %b%b%b", op, fz, fv, fn, m_z, m_v, m_n));
        check(taken_seen == e_taken, $sformatf("op %h: branch taken %0d, model %0d", op, taken_seen, e_taken));
        check(ovf_seen == e_ovf && unf_seen == e_unf, $sformatf("op %h: stack ovf/unf %0d%0d, model %0d%0d", op, ovf_seen, unf_seen, e_ovf, e_unf));
        check(bad_seen == e_bad, $sformatf("op %h: bad opcode %0d, model %0d", op, bad_seen, e_bad));
        check(mis_seen == e_mis, $sformatf("op %h: ret mismatch %0d, model %0d", op, mis_seen, e_mis));
        if (timing_on) check(cycle - last_done == longint'(m_ncycles),
                             $sformatf("op %h took %0d clocks, expected %0d", op, cycle - last_done, m_ncycles));
        last_done = cycle;
        if (n_instr <= 7)
          check(out_stream == DEMO_TOS[n_instr - 1],
                $sformatf("demonstration step %0d: top %h, hand-worked %h", n_instr, out_stream, DEMO_TOS[n_instr - 1]));
        if (e_taken && (op >= OP_IF_ICMPEQ && op <= OP_IF_ICMPLE)) n_taken++;
        if (!e_taken && (op >= OP_IF_ICMPEQ && op <= OP_IF_ICMPLE)) n_untaken++;
        if (op == OP_JSR) n_jsr++;
        if (op == OP_RET) n_ret++;
        if (op == OP_SWAP || op == OP_DUP2) n_two++;
        if (e_ovf) n_sovf++;
        if (e_unf) n_sunf++;
        if (m_v) n_vflag++;
        if (e_bad) n_bad++;
        if (e_mis) n_mis++;
        ovf_seen = 0; unf_seen = 0; taken_seen = 0; bad_seen = 0; mis_seen = 0;
      end
    end
  end

  // ------------------------------------------------------------- loading
  int loaded = 0;

  // Write prog[loaded .. upto-1]; random pauses if `gaps`, never into a
  // full FIFO.
  task automatic load(int upto, bit gaps);
    while (loaded < upto) begin
      @(negedge clk);
      if (!pc_full && (!gaps || ($urandom % 4 != 0))) begin
        write = 1; byte_in = prog[loaded]; loaded++;
      end else begin
        write = 0;
      end
    end
    @(negedge clk);
    write = 0;
  endtask

  // Wait until the model has run to `upto` and the processor waits for bytes.
  task automatic run_to(int upto, int limit);
    int n;
    n = 0;
    while (!(m_pc == upto && stall) && n < limit) begin
      @(negedge clk);
      n++;
    end
    check(m_pc == upto && stall, $sformatf("program did not finish at %0d (model pc %0d)", upto, m_pc));
  endtask

  // Read every local variable back through the stack (iload i pushes it,
  // and each push is compared with the model), then drop the five words.
  task automatic check_locals(string name);
    int n0;
    n0 = n_instr;
    for (int i = 0; i < NL; i++) begin emit(8'h15); emit(8'(i)); end
    emit(8'h58); emit(8'h58); emit(8'h57);
    load(prog_len, 0);
    run_to(prog_len, 200);
    check(n_instr == n0 + NL + 3, $sformatf("%s: local read-back did not run", name));
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int start;
    for (int i = 0; i < SD; i++) begin m_st[i] = '0; m_rs[i] = '0; end
    for (int i = 0; i < NL; i++) m_lv[i] = '0;
    m_sp = SD - 1; m_cnt = 0; m_rsp = SD - 1; m_rcnt = 0; m_pc = 0;
    m_z = 0; m_v = 0; m_n = 0;
    repeat (3) @(negedge clk);
    reset = 0;

    // 1. demonstration stream, loaded whole, timed
    start = prog_len;
    emit(8'h10); emit(8'haa); emit(8'h10); emit(8'hbb);
    emit(8'h11); emit(8'hcc); emit(8'hdd); emit(8'h11); emit(8'hee); emit(8'hff);
    emit(8'h60); emit(8'h78); emit(8'h80); emit(8'h5f); emit(8'h00);
    load(prog_len, 0);
    last_done = cycle;
    timing_on = 1;
    run_to(prog_len, 200);
    timing_on = 0;
    check(n_instr == 9, $sformatf("demonstration ran %0d instructions, expected 9", n_instr));

    // 2. counting loop: i = 0; while (i < 5) i++; push i
    start = prog_len;
    emit(8'h03); emit(8'h3c);                   // iconst_0, istore_1
    emit(8'h1b); emit(8'h08);                   // loop: iload_1, iconst_5
    emit(8'ha2); emit(8'h00); emit(8'h09);      // if_icmpge +9
    emit(8'h84); emit(8'h01); emit(8'h01);      // iinc 1, 1
    emit(8'ha7); emit(8'hff); emit(8'hf8);      // goto -8
    emit(8'h1b); emit(8'h00);                   // iload_1, nop
    load(prog_len, 0);
    run_to(prog_len, 400);
    check(out_stream == 32'd5, $sformatf("loop result %0d, expected 5", out_stream));
    check_locals("loop");

    // 2b. every if_icmp<cond> with equal, smaller and larger operands, and
    //     two comparisons whose subtraction overflows
    for (int i = 0; i < 36; i++) begin
      logic [7:0] x, y;
      x = 8'($urandom);
      case ((i / 6) % 3)
        0:       y = x;
        1:       y = x + 8'd1 + 8'($urandom % 8);
        default: y = x - 8'd1 - 8'($urandom % 8);
      endcase
      emit(8'h10); emit(x); emit(8'h10); emit(y);
      emit(8'(8'h9f + i % 6)); emit(8'h00); emit(8'h05);   // if_icmp<cond> +5
      emit(8'h10); emit(8'h01);                            // bipush 1 (skipped if taken)
      emit(8'h00);
      load(prog_len, 0);
      run_to(prog_len, 200);
    end
    emit(8'h04); emit(8'h10); emit(8'h1f); emit(8'h78);     // MIN_INT
    emit(8'h04); emit(8'ha1); emit(8'h00); emit(8'h05);     // MIN < 1 ?
    emit(8'h10); emit(8'h01); emit(8'h00);
    load(prog_len, 0);
    run_to(prog_len, 200);
    emit(8'h04); emit(8'h04); emit(8'h10); emit(8'h1f); emit(8'h78);
    emit(8'ha3); emit(8'h00); emit(8'h05);                  // 1 > MIN ?
    emit(8'h10); emit(8'h01); emit(8'h00);
    load(prog_len, 0);
    run_to(prog_len, 200);

    // 3. jsr / ret
    start = prog_len;
    emit(8'ha8); emit(8'h00); emit(8'h07);      // jsr +7
    emit(8'h1c);                                // iload_2
    emit(8'ha7); emit(8'h00); emit(8'h08);      // goto +8
    emit(8'h3e); emit(8'h07); emit(8'h3d);      // sub: istore_3, iconst_4, istore_2
    emit(8'ha9); emit(8'h03);                   // ret 3
    emit(8'h00);                                // nop
    load(prog_len, 0);
    run_to(prog_len, 400);
    check(out_stream == 32'd4, $sformatf("subroutine result %0d, expected 4", out_stream));
    check_locals("jsr/ret");

    // 4. return address altered before ret
    start = prog_len;
    emit(8'ha8); emit(8'h00); emit(8'h07);      // jsr +7
    emit(8'h1c);                                // iload_2 (skipped on return)
    emit(8'ha7); emit(8'h00); emit(8'h0b);      // goto +11
    emit(8'h3e); emit(8'h07); emit(8'h3d);      // istore_3, iconst_4, istore_2
    emit(8'h84); emit(8'h03); emit(8'h01);      // iinc 3, 1
    emit(8'ha9); emit(8'h03);                   // ret 3
    emit(8'h00);
    load(prog_len, 0);
    run_to(prog_len, 400);
    check_locals("altered return");

    // 5. random straight-line code streamed while running
    start = prog_len;
    for (int i = 0; i < 600; i++) begin
      int k;
      k = $urandom % 24;
      case (k)
        0:  begin emit(8'h10); emit(8'($urandom)); end
        1:  begin emit(8'h11); emit(8'($urandom)); emit(8'($urandom)); end
        2:  emit(8'(8'h02 + $urandom % 7));
        3:  begin emit(8'h15); emit(8'($urandom % 7)); end
        4:  emit(8'(8'h1a + $urandom % 4));
        5:  begin emit(8'h36); emit(8'($urandom % 7)); end
        6:  emit(8'(8'h3b + $urandom % 4));
        7:  begin emit(8'h84); emit(8'($urandom % 6)); emit(8'($urandom)); end
        8:  emit(8'h57);
        9:  emit(8'h58);
        10: emit(8'h59);
        11: emit(8'h5c);
        12: emit(8'h5f);
        13: emit(8'h60);
        14: emit(8'h64);
        15: emit(8'h74);
        16: emit(8'h78);
        17: emit(8'h7a);
        18: emit(8'h7e);
        19: emit(8'h80);
        20: emit(8'h82);
        21: emit(8'h01);                        // aconst_null: not supported
        22: begin emit(8'h11); emit(8'h7f); emit(8'hff); end
        default: emit(8'h00);
      endcase
    end
    load(prog_len, 1);
    run_to(prog_len, 20000);
    check_locals("random");

    // 6. seventeen nops into a 16-byte FIFO: the seventeenth is refused
    start = prog_len;
    for (int i = 0; i < 16; i++) emit(8'h00);
    @(negedge clk);
    write = 1;
    for (int i = 0; i < 17; i++) begin
      byte_in = 8'h00;
      @(negedge clk);
    end
    write = 0;
    loaded = prog_len;
    run_to(prog_len, 400);

    $display("instructions %0d, stall clocks %0d, paused clocks %0d, taken %0d, untaken %0d, jsr %0d, ret %0d",
             n_instr, n_stall, n_pause, n_taken, n_untaken, n_jsr, n_ret);
    $display("swap/dup2 %0d, stack overflow %0d, underflow %0d, V flag %0d, FIFO full %0d, half %0d, refused %0d, bad opcode %0d, ret mismatch %0d",
             n_two, n_sovf, n_sunf, n_vflag, n_full, n_half, n_pcovf, n_bad, n_mis);
    check(n_stall > 0,   "no stall on an empty FIFO");
    check(n_pause > 0,   "no load-mode pause during execution");
    check(n_taken > 0,   "no taken conditional branch");
    check(n_untaken > 0, "no untaken conditional branch");
    check(n_jsr > 0 && n_ret > 0, "no jsr/ret");
    check(n_two > 0,     "no two-cycle swap/dup2");
    check(n_sovf > 0,    "no operand stack overflow");
    check(n_sunf > 0,    "no operand stack underflow");
    check(n_vflag > 0,   "ALU overflow flag never set");
    check(n_full > 0,    "FIFO never full");
    check(n_half > 0,    "FIFO never half full");
    check(n_pcovf > 0,   "no refused write into a full FIFO");
    check(n_bad > 0,     "no unknown opcode");
    check(n_mis > 0,     "no return-address mismatch");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
