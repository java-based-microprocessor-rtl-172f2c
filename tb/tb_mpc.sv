// tb_mpc: self-checking test of the bytecode FIFO (program counter).
//
// A reference model in the testbench (array, pointers, counter) follows
// directed and random sequences of writes, reads, simultaneous read+write and
// relative jumps. After every clock the fall-through output byte, the count
// and the full / empty / half / overflow / underflow flags are compared with
// the model. The directed part writes past full, reads past empty and jumps
// back over bytes already read (they must reappear), and out of range.
module tb_mpc;
  localparam int D = 16;

  logic clk = 0, reset_n = 0;
  logic [7:0] din, dout;
  logic rd, wr, jmp;
  logic signed [15:0] joff;
  logic full, empty, half, ovf, unf;
  logic [$clog2(D+1)-1:0] cnt;
  int checks = 0, failures = 0;
  int n_full = 0, n_empty = 0, n_half = 0, n_ovf = 0, n_unf = 0, n_jmp = 0;

  mpc #(.WIDTH(8), .DEPTH(D), .OFFW(16)) dut (
    .clk(clk), .reset_n(reset_n), .data_in(din), .read(rd), .write(wr),
    .jump(jmp), .jump_off(joff), .data_out(dout), .full(full), .empty(empty),
    .half(half), .count(cnt), .overflow(ovf), .underflow(unf));

  always #5 clk = ~clk;

  logic [7:0] m_mem [D];
  int m_rd, m_wr, m_cnt;
  logic e_ovf, e_unf;

  task automatic model_step(logic r, logic w, logic j, int off, logic [7:0] d);
    logic rok, wok;
    int c;
    rok = r && (m_cnt != 0);
    wok = w && ((m_cnt != D) || rok);
    c = m_cnt + (wok ? 1 : 0) - (rok ? 1 : 0) - (j ? off : 0);
    e_ovf = (w && !wok) || (c > D);
    e_unf = (r && !rok) || (c < 0);
    if (wok) begin m_mem[m_wr] = d; m_wr = (m_wr + 1) % D; end
    m_rd = (((m_rd + (rok ? 1 : 0) + (j ? off : 0)) % D) + D) % D;
    m_cnt = (c < 0) ? 0 : (c > D) ? D : c;
  endtask

  task automatic op(logic r, logic w, logic j, int off, logic [7:0] d);
    rd = r; wr = w; jmp = j; joff = 16'(off); din = d;
    @(posedge clk);
    model_step(r, w, j, off, d);
    #1;
    rd = 0; wr = 0; jmp = 0;
    checks++;
    if (dout !== m_mem[m_rd] || int'(cnt) != m_cnt || full !== (m_cnt == D) ||
        empty !== (m_cnt == 0) || half !== (m_cnt >= D / 2) ||
        ovf !== e_ovf || unf !== e_unf) begin
      failures++;
      if (failures < 10)
        $display("FAIL t=%0t r%0d w%0d j%0d(%0d): dout=%h/%h cnt=%0d/%0d ovf%0d/%0d unf%0d/%0d",
                 $time, r, w, j, off, dout, m_mem[m_rd], cnt, m_cnt, ovf, e_ovf, unf, e_unf);
    end
    if (full) n_full++;
    if (empty) n_empty++;
    if (half) n_half++;
    if (ovf) n_ovf++;
    if (unf) n_unf++;
    if (j) n_jmp++;
  endtask

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rd = 0; wr = 0; jmp = 0; joff = '0; din = '0;
    for (int i = 0; i < D; i++) m_mem[i] = '0;
    m_rd = 0; m_wr = 0; m_cnt = 0;
    repeat (2) @(posedge clk);
    reset_n = 1;
    @(posedge clk); #1;
    // load 18 bytes: the last two are refused (overflow)
    for (int i = 0; i < D + 2; i++) op(0, 1, 0, 0, 8'h10 + 8'(i));
    // read five, jump back three, read again
    for (int i = 0; i < 5; i++) op(1, 0, 0, 0, '0);
    op(0, 0, 1, -3, '0);
    for (int i = 0; i < 4; i++) op(1, 0, 0, 0, '0);
    // forward jump, then read past empty
    op(0, 0, 1, 4, '0);
    for (int i = 0; i < 12; i++) op(1, 0, 0, 0, '0);
    // jump out of range both ways
    op(0, 0, 1, 3, '0);
    op(0, 1, 0, 0, 8'h77);
    op(0, 0, 1, -20, '0);
    // simultaneous read and write on a full buffer
    op(1, 1, 0, 0, 8'h55);
    for (int i = 0; i < 4000; i++) begin
      int k;
      k = $urandom % 8;
      case (k)
        0, 1, 2: op(0, 1, 0, 0, 8'($urandom));
        3, 4:    op(1, 0, 0, 0, '0);
        5:       op(1, 1, 0, 0, 8'($urandom));
        6:       op(0, 0, 1, int'($urandom % 9) - 4, '0);
        default: op(1, 0, 1, int'($urandom % 5) - 4, '0);
      endcase
    end
    if (n_full == 0 || n_empty == 0 || n_half == 0 || n_ovf == 0 || n_unf == 0 || n_jmp == 0) begin
      failures++;
      $display("FAIL a flag never seen: full %0d empty %0d half %0d ovf %0d unf %0d jump %0d",
               n_full, n_empty, n_half, n_ovf, n_unf, n_jmp);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
