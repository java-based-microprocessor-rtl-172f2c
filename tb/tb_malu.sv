// tb_malu: self-checking test of the opcode-selected ALU.
//
// Drives directed corner cases (overflow at the signed limits, shifts by 0,
// 31 and amounts above 31, negation of the most negative value) and 4000
// random operand pairs for every implemented opcode, plus a few opcodes the
// ALU does not implement. Expected results and flags are computed here from
// the JVM definitions with 64-bit arithmetic, independently of the ALU.
module tb_malu;
  import mjava_pkg::*;

  logic [31:0] a, b, result;
  logic [7:0]  instr;
  logic        cout, fz, fv, fn;
  int checks = 0, failures = 0;
  int vcount = 0;

  malu dut (.a(a), .b(b), .instr(instr), .cout(cout), .result(result),
            .flag_z(fz), .flag_v(fv), .flag_n(fn));

  localparam logic [7:0] OPS [9] = '{OP_IADD, OP_ISUB, OP_INEG, OP_ISHL,
                                     OP_ISHR, OP_IAND, OP_IOR, OP_IXOR, OP_IINC};

  task automatic check_one(logic [7:0] op, logic [31:0] x, logic [31:0] y);
    longint sa, sb, wide;
    logic [31:0] exp_r;
    logic        exp_v, exp_c;
    sa = longint'($signed(x));
    sb = longint'($signed(y));
    exp_v = 1'b0;
    exp_c = 1'b0;
    case (op)
      OP_IADD, OP_IINC: begin
        wide  = sa + sb;
        exp_r = wide[31:0];
        exp_v = (wide > 64'sd2147483647) || (wide < -64'sd2147483648);
        exp_c = ({32'd0, x} + {32'd0, y}) >= 64'h1_0000_0000;
      end
      OP_ISUB: begin
        wide  = sa - sb;
        exp_r = wide[31:0];
        exp_v = (wide > 64'sd2147483647) || (wide < -64'sd2147483648);
        exp_c = (x < y);
      end
      OP_INEG: begin wide = -sa; exp_r = wide[31:0]; end
      OP_ISHL: begin wide = sa * (64'sd1 << y[4:0]); exp_r = wide[31:0]; end
      OP_ISHR: begin
        // floor(value1 / 2^s)
        wide = sa;
        for (int k = 0; k < int'(y[4:0]); k++)
          wide = (wide < 0) ? -((-wide + 1) / 2) : wide / 2;
        exp_r = wide[31:0];
      end
      OP_IAND: exp_r = x & y;
      OP_IOR:  exp_r = x | y;
      OP_IXOR: exp_r = x ^ y;
      default: exp_r = '0;
    endcase
    a = x; b = y; instr = op;
    #1;
    checks++;
    if (result !== exp_r || fv !== exp_v || fz !== (exp_r == 0) ||
        fn !== exp_r[31] || cout !== exp_c) begin
      failures++;
      if (failures < 10)
        $display("FAIL op=%h a=%h b=%h: got r=%h z%0d v%0d n%0d c%0d, expected r=%h v%0d c%0d",
                 op, x, y, result, fz, fv, fn, cout, exp_r, exp_v, exp_c);
    end
    if (fv) vcount++;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // directed corners
    check_one(OP_IADD, 32'h7fff_ffff, 32'h0000_0001);
    check_one(OP_IADD, 32'h8000_0000, 32'h8000_0000);
    check_one(OP_IADD, 32'hffff_ffff, 32'h0000_0001);
    check_one(OP_ISUB, 32'h8000_0000, 32'h0000_0001);
    check_one(OP_ISUB, 32'h7fff_ffff, 32'hffff_ffff);
    check_one(OP_ISUB, 32'h0000_0005, 32'h0000_0005);
    check_one(OP_INEG, 32'h8000_0000, 32'h0);
    check_one(OP_INEG, 32'h0000_0001, 32'h0);
    check_one(OP_ISHL, 32'h0001_bbdc, 32'h0000_001b);
    check_one(OP_ISHL, 32'h0000_0001, 32'h0000_0021);
    check_one(OP_ISHR, 32'h8000_0000, 32'h0000_001f);
    check_one(OP_ISHR, 32'hffff_fff0, 32'h0000_0002);
    check_one(OP_ISHR, 32'h4000_0000, 32'h0000_0040);
    check_one(OP_IINC, 32'h0000_0010, 32'hffff_ffff);
    check_one(OP_NOP,  32'h1234_5678, 32'h1);
    check_one(8'h68,   32'h1234_5678, 32'h2);   // imul: not implemented
    for (int i = 0; i < 4000; i++) begin
      logic [31:0] x, y;
      x = $urandom;
      y = (i % 3 == 0) ? ($urandom % 64) : $urandom;
      check_one(OPS[i % 9], x, y);
    end
    if (vcount == 0) begin
      failures++;
      $display("FAIL overflow flag never seen");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
