// tb_mstack: self-checking test of the circular LIFO stack.
//
// A reference model (an array, a pointer and a count with the same wrap
// rules, kept in the testbench) follows a directed sequence, then 3000
// random operations mixing push, pop, double pop and pop-then-push. After
// every clock the two read ports, the count and the pushed / popped /
// overflow / underflow pulses are compared with the model. The directed part
// fills the stack past its depth so the oldest word is overwritten, and
// empties it past the bottom.
module tb_mstack;
  localparam int W = 32;
  localparam int D = 8;

  logic clk = 0, reset_n = 0;
  logic [W-1:0] din, out1, out2;
  logic rd, wr, p2;
  logic pushed, popped, ovf, unf;
  logic [$clog2(D+1)-1:0] cnt;
  int checks = 0, failures = 0, n_ovf = 0, n_unf = 0;

  mstack #(.WIDTH(W), .DEPTH(D)) dut (
    .clk(clk), .reset_n(reset_n), .data_in(din), .read(rd), .write(wr),
    .pop_2(p2), .data_out1(out1), .data_out2(out2), .pushed(pushed),
    .popped(popped), .overflow(ovf), .underflow(unf), .count(cnt));

  always #5 clk = ~clk;

  // reference model
  logic [W-1:0] m_mem [D];
  int m_sp, m_cnt;
  logic e_pushed, e_popped, e_ovf, e_unf;

  task automatic model_step(logic r, logic w, logic two, logic [W-1:0] d);
    int n;
    n = r ? (two ? 2 : 1) : 0;
    e_unf = (n > m_cnt);
    m_cnt = e_unf ? 0 : m_cnt - n;
    m_sp  = (m_sp - n + 2 * D) % D;
    e_ovf = w && (m_cnt == D);
    if (w) begin
      m_sp = (m_sp + 1) % D;
      m_mem[m_sp] = d;
      if (!e_ovf) m_cnt++;
    end
    e_pushed = w;
    e_popped = r;
  endtask

  task automatic op(logic r, logic w, logic two, logic [W-1:0] d);
    rd = r; wr = w; p2 = two; din = d;
    @(posedge clk);
    model_step(r, w, two, d);
    #1;
    rd = 0; wr = 0; p2 = 0;
    checks++;
    if (out1 !== m_mem[m_sp] || out2 !== m_mem[(m_sp + D - 1) % D] ||
        int'(cnt) != m_cnt || pushed !== e_pushed || popped !== e_popped ||
        ovf !== e_ovf || unf !== e_unf) begin
      failures++;
      if (failures < 10)
        $display("FAIL t=%0t r%0d w%0d p2%0d: out1=%h/%h out2=%h/%h cnt=%0d/%0d ovf%0d/%0d unf%0d/%0d",
                 $time, r, w, two, out1, m_mem[m_sp], out2, m_mem[(m_sp + D - 1) % D],
                 cnt, m_cnt, ovf, e_ovf, unf, e_unf);
    end
    if (ovf) n_ovf++;
    if (unf) n_unf++;
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rd = 0; wr = 0; p2 = 0; din = '0;
    for (int i = 0; i < D; i++) m_mem[i] = '0;
    m_sp = D - 1; m_cnt = 0;
    repeat (2) @(posedge clk);
    reset_n = 1;
    @(posedge clk); #1;
    // fill past the depth: the ninth and tenth pushes overwrite the oldest
    for (int i = 0; i < D + 2; i++) op(0, 1, 0, 32'h100 + i);
    // double pops until empty and beyond
    for (int i = 0; i < 6; i++) op(1, 0, 1, '0);
    // binary-operation pattern: pop two, push one
    op(0, 1, 0, 32'hAAAA); op(0, 1, 0, 32'hBBBB); op(1, 1, 1, 32'hCCCC);
    op(1, 1, 0, 32'hDDDD);
    for (int i = 0; i < 3000; i++) begin
      int k;
      k = $urandom % 6;
      case (k)
        0, 1: op(0, 1, 0, $urandom);
        2:    op(1, 0, 0, '0);
        3:    op(1, 0, 1, '0);
        4:    op(1, 1, 1, $urandom);
        default: op(1, 1, 0, $urandom);
      endcase
    end
    if (n_ovf == 0 || n_unf == 0) begin
      failures++;
      $display("FAIL overflow (%0d) or underflow (%0d) never happened", n_ovf, n_unf);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
