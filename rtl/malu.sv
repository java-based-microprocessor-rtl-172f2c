// malu: combinational integer ALU of the MJava processor.
//
// The operation is selected directly by the JVM opcode on `instr`, so the
// controller only forwards the opcode it decoded. Operands follow the JVM
// stack order: A is value1 (the word below the top of the stack) and B is
// value2 (the top of the stack); ineg negates A. Implemented: iadd, isub,
// ineg, ishl, ishr (arithmetic), iand, ior, ixor, and iinc (A + B, used for
// the local-variable increment). Any other opcode gives a zero result, which
// plays the role of "no operation".
//
// Flags, all combinational:
//   flag_z  result is zero
//   flag_n  result is negative (its most significant bit)
//   flag_v  signed overflow; only additions (iadd, iinc) and subtraction
//           (isub) can set it
//   cout    bit 32 of the unsigned addition / subtraction (a borrow for isub)
//
// The opcode-selected operation set, the three flags and the rule that V
// comes only from adding like signs or subtracting unlike signs follow the
// processor description. The shift amount is masked to five bits inside the
// ALU, as the JVM defines it.
module malu
  import mjava_pkg::*;
#(
  parameter int unsigned LOP = 32,   // operand width
  parameter int unsigned LOC = 8     // opcode (selector) width
) (
  input  logic [LOP-1:0] a,
  input  logic [LOP-1:0] b,
  input  logic [LOC-1:0] instr,
  output logic           cout,
  output logic [LOP-1:0] result,
  output logic           flag_z,
  output logic           flag_v,
  output logic           flag_n
);

  localparam int unsigned SHW = $clog2(LOP);

  logic [LOP:0]   sum_ext;
  logic [LOP:0]   dif_ext;
  logic [SHW-1:0] shamt;

  assign sum_ext = {1'b0, a} + {1'b0, b};
  assign dif_ext = {1'b0, a} - {1'b0, b};
  assign shamt   = b[SHW-1:0];

  always_comb begin
    result = '0;
    cout   = 1'b0;
    flag_v = 1'b0;
    case (instr)
      LOC'(OP_IADD), LOC'(OP_IINC): begin
        {cout, result} = sum_ext;
        flag_v = (a[LOP-1] == b[LOP-1]) && (result[LOP-1] != a[LOP-1]);
      end
      LOC'(OP_ISUB): begin
        {cout, result} = dif_ext;
        flag_v = (a[LOP-1] != b[LOP-1]) && (result[LOP-1] != a[LOP-1]);
      end
      LOC'(OP_INEG): result = '0 - a;
      LOC'(OP_ISHL): result = a << shamt;
      LOC'(OP_ISHR): result = LOP'($signed(a) >>> shamt);
      LOC'(OP_IAND): result = a & b;
      LOC'(OP_IOR):  result = a | b;
      LOC'(OP_IXOR): result = a ^ b;
      default:       result = '0;
    endcase
  end

  assign flag_z = (result == '0);
  assign flag_n = result[LOP-1];

endmodule
