// mjava_pkg: opcodes and shared constants of the MJava bytecode processor.
//
// The opcode values are the standard JVM encodings of the integer subset the
// processor executes (constants, local-variable loads and stores, stack
// manipulation, integer arithmetic and logic, compare-and-branch, goto,
// jsr/ret). The ALU is selected directly by these opcode values, so the same
// enum is used by the ALU and by the controller.
package mjava_pkg;

  typedef enum logic [7:0] {
    OP_NOP       = 8'h00,
    OP_ICONST_M1 = 8'h02,
    OP_ICONST_0  = 8'h03,
    OP_ICONST_1  = 8'h04,
    OP_ICONST_2  = 8'h05,
    OP_ICONST_3  = 8'h06,
    OP_ICONST_4  = 8'h07,
    OP_ICONST_5  = 8'h08,
    OP_BIPUSH    = 8'h10,
    OP_SIPUSH    = 8'h11,
    OP_ILOAD     = 8'h15,
    OP_ILOAD_0   = 8'h1a,
    OP_ILOAD_1   = 8'h1b,
    OP_ILOAD_2   = 8'h1c,
    OP_ILOAD_3   = 8'h1d,
    OP_ISTORE    = 8'h36,
    OP_ISTORE_0  = 8'h3b,
    OP_ISTORE_1  = 8'h3c,
    OP_ISTORE_2  = 8'h3d,
    OP_ISTORE_3  = 8'h3e,
    OP_POP       = 8'h57,
    OP_POP2      = 8'h58,
    OP_DUP       = 8'h59,
    OP_DUP2      = 8'h5c,
    OP_SWAP      = 8'h5f,
    OP_IADD      = 8'h60,
    OP_ISUB      = 8'h64,
    OP_INEG      = 8'h74,
    OP_ISHL      = 8'h78,
    OP_ISHR      = 8'h7a,
    OP_IAND      = 8'h7e,
    OP_IOR       = 8'h80,
    OP_IXOR      = 8'h82,
    OP_IINC      = 8'h84,
    OP_IF_ICMPEQ = 8'h9f,
    OP_IF_ICMPNE = 8'ha0,
    OP_IF_ICMPLT = 8'ha1,
    OP_IF_ICMPGE = 8'ha2,
    OP_IF_ICMPGT = 8'ha3,
    OP_IF_ICMPLE = 8'ha4,
    OP_GOTO      = 8'ha7,
    OP_JSR       = 8'ha8,
    OP_RET       = 8'ha9
  } opcode_e;

  // Number of immediate operand bytes that follow an opcode in the stream.
  function automatic logic [1:0] operand_bytes(logic [7:0] op);
    case (op)
      OP_BIPUSH, OP_ILOAD, OP_ISTORE, OP_RET:              return 2'd1;
      OP_SIPUSH, OP_IINC, OP_GOTO, OP_JSR,
      OP_IF_ICMPEQ, OP_IF_ICMPNE, OP_IF_ICMPLT,
      OP_IF_ICMPGE, OP_IF_ICMPGT, OP_IF_ICMPLE:            return 2'd2;
      default:                                             return 2'd0;
    endcase
  endfunction

endpackage
