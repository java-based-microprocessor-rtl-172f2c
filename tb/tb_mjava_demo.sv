// tb_mjava_demo: runs the processor's demonstration bytecode stream and
// checks it against values worked out by hand.
//
// Stream (15 bytes, loaded whole into the 16-byte FIFO before it runs):
//   10 aa  bipush 0xaa        -> 0xffffffaa
//   10 bb  bipush 0xbb        -> 0xffffffbb
//   11 cc dd  sipush 0xccdd   -> 0xffffccdd
//   11 ee ff  sipush 0xeeff   -> 0xffffeeff
//   60     iadd               -> 0xffffbbdc
//   78     ishl               -> 0xffffffbb << 28 = 0xb0000000
//   80     ior                -> 0xffffffaa | 0xb0000000 = 0xffffffaa
//   5f     swap               only one word is left: the stack underflows,
//                             the top becomes the cleared entry below (0)
//                             and 0xffffffaa moves under it
//   00     nop
// Every instruction takes 2 clocks plus one per immediate byte, swap one
// more: 25 clocks from the first fetch to the end of the nop.
module tb_mjava_demo;
  logic        clk = 0, reset = 1, write = 0;
  logic [7:0]  byte_in = '0;
  logic [31:0] out_stream;
  logic        instr_done, st_underflow, flag_z, flag_v, flag_n, stall;
  logic [7:0]  done_opcode;
  logic [3:0]  st_depth;

  mjava dut (
    .clk(clk), .reset(reset), .write(write), .byte_in(byte_in),
    .out_stream(out_stream), .pc_full(), .pc_empty(), .pc_half(),
    .pc_count(), .st_depth(st_depth), .pc_addr(), .flag_z(flag_z),
    .flag_v(flag_v), .flag_n(flag_n), .instr_done(instr_done),
    .done_opcode(done_opcode), .stall(stall), .branch_taken(),
    .bad_opcode(), .ret_mismatch(), .st_overflow(),
    .st_underflow(st_underflow), .pc_overflow(), .pc_underflow());

  always #5 clk = ~clk;

  localparam logic [7:0] STREAM [15] = '{8'h10, 8'haa, 8'h10, 8'hbb, 8'h11,
      8'hcc, 8'hdd, 8'h11, 8'hee, 8'hff, 8'h60, 8'h78, 8'h80, 8'h5f, 8'h00};
  localparam logic [7:0]  OPS [9] = '{8'h10, 8'h10, 8'h11, 8'h11, 8'h60,
                                      8'h78, 8'h80, 8'h5f, 8'h00};
  localparam logic [31:0] TOS [9] = '{32'hffff_ffaa, 32'hffff_ffbb,
      32'hffff_ccdd, 32'hffff_eeff, 32'hffff_bbdc, 32'hb000_0000,
      32'hffff_ffaa, 32'h0000_0000, 32'h0000_0000};
  localparam int DEPTH [9] = '{1, 2, 3, 4, 3, 2, 1, 2, 2};

  int checks = 0, failures = 0;
  int n = 0, cyc = 0, start_cyc = 0, end_cyc = 0, n_unf = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!reset && st_underflow) n_unf++;
    if (instr_done && n < 9) begin
      check(done_opcode == OPS[n], $sformatf("instruction %0d opcode %h, expected %h", n, done_opcode, OPS[n]));
      check(out_stream == TOS[n], $sformatf("instruction %0d top %h, expected %h", n, out_stream, TOS[n]));
      check(int'(st_depth) == DEPTH[n], $sformatf("instruction %0d depth %0d, expected %0d", n, st_depth, DEPTH[n]));
      n <= n + 1;
      end_cyc <= cyc;
    end
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    reset = 0;
    write = 1;
    foreach (STREAM[i]) begin
      byte_in = STREAM[i];
      @(negedge clk);
    end
    write = 0;
    start_cyc = cyc;
    wait (n == 9);
    @(negedge clk);
    check(end_cyc - start_cyc == 25,
          $sformatf("stream took %0d clocks, expected 25", end_cyc - start_cyc));
    check(n_unf == 1, $sformatf("%0d stack underflows, expected 1 (the swap)", n_unf));
    // ior leaves flags of 0xffffffaa: negative, not zero, no overflow
    check({flag_z, flag_v, flag_n} == 3'b001, "flags after ior");
    repeat (3) @(negedge clk);
    check(stall, "processor is not waiting for more bytes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
