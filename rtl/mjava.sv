// mjava: top level of the MJava processor, a small core that executes the
// integer subset of Java bytecode directly in hardware.
//
// Blocks: a byte FIFO that buffers the bytecode stream (mpc), an operand
// stack and a return stack built from one circular LIFO design (mstack), an
// opcode-selected ALU (malu), a file of N_LOCALS local variables and the
// sequencer below that ties them together.
//
// Operating modes. While `write` is high the processor is in load mode: an
// external programmer pushes bytecode into the FIFO through byte_in, one
// byte per clock, and the sequencer holds still. When `write` drops, it
// executes the buffered stream; raising `write` again pauses it anywhere.
//
// Sequencer. Every instruction passes through
//   FETCH  read the opcode byte from the FIFO (waits while the FIFO is empty)
//   OPER   read the 1 or 2 immediate bytes the opcode carries, one per clock
//          (waits while the FIFO is empty)
//   EXEC   one clock: stack, ALU, local-variable and branch actions
//   EXEC2  a second execute clock, only for swap and dup2, which push twice
// so an instruction takes 2 + (immediate bytes) clocks, plus one for swap and
// dup2, when the FIFO never runs dry. instr_done pulses with the opcode on
// done_opcode in the clock after EXEC (or EXEC2) has taken effect.
//
// Instructions: nop, iconst_m1..5, bipush, sipush, iload, iload_0..3,
// istore, istore_0..3, iinc, pop, pop2, dup, dup2, swap, iadd, isub, ineg,
// ishl, ishr, iand, ior, ixor, if_icmpeq/ne/lt/ge/gt/le, goto, jsr, ret.
// Any other opcode is treated as a one-byte nop and pulses bad_opcode.
// Semantics are those of the JVM: for a binary operation value2 is the top
// of the stack and value1 the word below it, result = value1 op value2.
// if_icmp<cond> subtracts in the ALU and decides from its Z, N and V flags.
//
// Branch addressing. `pc_addr` counts bytes of the stream (16 bits, starting
// at 0 after reset) and is the JVM pc of the next byte to read. A taken
// branch moves both pc_addr and the FIFO read pointer by the same signed
// distance, so a branch target must still be held in the FIFO (within
// PC_DEPTH bytes of the current position, and not yet overwritten).
// jsr pushes the address of the next instruction onto the operand stack (the
// program stores it into a local variable with istore) and also onto the
// return stack; ret jumps to the address in the named local variable and pops
// the return stack, pulsing ret_mismatch if the two addresses disagree.
//
// out_stream shows the top of the operand stack. The ALU flags of the last
// arithmetic instruction or comparison are held on flag_z / flag_v / flag_n.
// reset is active high and asynchronous. The stacks' pushed / popped
// confirmations, the return stack's status and the ALU carry are left
// unconnected: every stack action here completes in the clock it is issued.
//
// From the processor description: the four blocks and their roles, the
// 32-bit words, the 8-entry stacks, the 16-byte FIFO, five local variables,
// load mode versus run mode, the instruction list and the opcode-selected
// ALU. This implementation's own choices: the FETCH/OPER/EXEC sequencing and
// its cycle counts, the byte-address jump mechanism, the use of the return
// stack as a jsr/ret cross-check, bad_opcode, and the status outputs.
module mjava
  import mjava_pkg::*;
#(
  parameter int unsigned INT_WIDTH  = 32,  // word width of stacks, ALU, locals
  parameter int unsigned BYTE_WIDTH = 8,   // bytecode stream width
  parameter int unsigned PC_DEPTH   = 16,  // bytes held by the FIFO
  parameter int unsigned ST_DEPTH   = 8,   // words per stack
  parameter int unsigned N_LOCALS   = 5    // local variables
) (
  input  logic                  clk,
  input  logic                  reset,
  input  logic                  write,
  input  logic [BYTE_WIDTH-1:0] byte_in,
  output logic [INT_WIDTH-1:0]  out_stream,
  // status
  output logic                  pc_full,
  output logic                  pc_empty,
  output logic                  pc_half,
  output logic [$clog2(PC_DEPTH+1)-1:0] pc_count,
  output logic [$clog2(ST_DEPTH+1)-1:0] st_depth,
  output logic [15:0]           pc_addr,
  output logic                  flag_z,
  output logic                  flag_v,
  output logic                  flag_n,
  output logic                  instr_done,
  output logic [7:0]            done_opcode,
  output logic                  stall,
  output logic                  branch_taken,
  output logic                  bad_opcode,
  output logic                  ret_mismatch,
  output logic                  st_overflow,
  output logic                  st_underflow,
  output logic                  pc_overflow,
  output logic                  pc_underflow
);

  typedef enum logic [1:0] {S_FETCH, S_OPER, S_EXEC, S_EXEC2} state_e;

  localparam int unsigned LIW = (N_LOCALS > 1) ? $clog2(N_LOCALS) : 1;

  // ---------------------------------------------------------------- state
  state_e                state;
  logic [7:0]            opcode;
  logic [BYTE_WIDTH-1:0] byte1, byte2;
  logic [1:0]            op_need, op_got;
  logic [15:0]           jpc;        // address of the next stream byte
  logic [15:0]           opc_addr;   // address of the current opcode
  logic [INT_WIDTH-1:0]  buffA;      // holds value1 across swap
  logic [INT_WIDTH-1:0]  local_var [N_LOCALS];
  logic                  reset_n;

  assign reset_n = ~reset;
  assign pc_addr = jpc;

  // ------------------------------------------------------------ FIFO (PC)
  logic [BYTE_WIDTH-1:0] byte_out;
  logic                  pc_read;
  logic                  pc_jump;
  logic signed [15:0]    pc_jump_off;

  mpc #(.WIDTH(BYTE_WIDTH), .DEPTH(PC_DEPTH), .OFFW(16)) pcounter (
    .clk      (clk),
    .reset_n  (reset_n),
    .data_in  (byte_in),
    .read     (pc_read),
    .write    (write),
    .jump     (pc_jump),
    .jump_off (pc_jump_off),
    .data_out (byte_out),
    .full     (pc_full),
    .empty    (pc_empty),
    .half     (pc_half),
    .count    (pc_count),
    .overflow (pc_overflow),
    .underflow(pc_underflow)
  );

  // -------------------------------------------------------- operand stack
  logic [INT_WIDTH-1:0] st_in, st_out1, st_out2;
  logic                 st_read, st_write, st_pop2;
  logic                 st_pushed, st_popped;

  mstack #(.WIDTH(INT_WIDTH), .DEPTH(ST_DEPTH)) opstack (
    .clk      (clk),
    .reset_n  (reset_n),
    .data_in  (st_in),
    .read     (st_read),
    .write    (st_write),
    .pop_2    (st_pop2),
    .data_out1(st_out1),
    .data_out2(st_out2),
    .pushed   (st_pushed),
    .popped   (st_popped),
    .overflow (st_overflow),
    .underflow(st_underflow),
    .count    (st_depth)
  );

  // --------------------------------------------------------- return stack
  logic [INT_WIDTH-1:0] rs_out1, rs_out2;
  logic                 rs_read, rs_write;
  logic                 rs_pushed, rs_popped, rs_over, rs_under;
  logic [$clog2(ST_DEPTH+1)-1:0] rs_count;

  mstack #(.WIDTH(INT_WIDTH), .DEPTH(ST_DEPTH)) retstack (
    .clk      (clk),
    .reset_n  (reset_n),
    .data_in  (INT_WIDTH'(jpc)),
    .read     (rs_read),
    .write    (rs_write),
    .pop_2    (1'b0),
    .data_out1(rs_out1),
    .data_out2(rs_out2),
    .pushed   (rs_pushed),
    .popped   (rs_popped),
    .overflow (rs_over),
    .underflow(rs_under),
    .count    (rs_count)
  );

  // ------------------------------------------------------------------ ALU
  logic [INT_WIDTH-1:0] alu_a, alu_b, alu_result;
  logic [7:0]           alu_op;
  logic                 alu_cout, alu_z, alu_v, alu_n;

  malu #(.LOP(INT_WIDTH), .LOC(8)) arith (
    .a     (alu_a),
    .b     (alu_b),
    .instr (alu_op),
    .cout  (alu_cout),
    .result(alu_result),
    .flag_z(alu_z),
    .flag_v(alu_v),
    .flag_n(alu_n)
  );

  // ------------------------------------------------------ decode helpers
  logic [7:0]           lv_index;     // local variable named by the opcode
  logic                 lv_valid;
  logic [INT_WIDTH-1:0] lv_value;
  logic [INT_WIDTH-1:0] imm_byte;     // sign-extended byte1
  logic [INT_WIDTH-1:0] imm_short;    // sign-extended {byte1, byte2}
  logic signed [15:0]   br_off;       // branch offset from the opcode
  logic [15:0]          ret_target;

  always_comb begin
    case (opcode)
      OP_ILOAD_0, OP_ISTORE_0: lv_index = 8'd0;
      OP_ILOAD_1, OP_ISTORE_1: lv_index = 8'd1;
      OP_ILOAD_2, OP_ISTORE_2: lv_index = 8'd2;
      OP_ILOAD_3, OP_ISTORE_3: lv_index = 8'd3;
      default:                 lv_index = 8'(byte1);
    endcase
  end

  assign lv_valid   = (32'(lv_index) < N_LOCALS);
  assign lv_value   = lv_valid ? local_var[LIW'(lv_index)] : '0;
  assign imm_byte   = INT_WIDTH'(signed'(byte1));
  assign imm_short  = INT_WIDTH'(signed'({byte1, byte2}));
  assign br_off     = signed'(16'({byte1, byte2}));
  assign ret_target = lv_value[15:0];

  // Signed comparison value1 ? value2 from the flags of value1 - value2.
  logic cmp_lt, cmp_eq, cond_true;
  assign cmp_eq = alu_z;
  assign cmp_lt = alu_n ^ alu_v;

  always_comb begin
    case (opcode)
      OP_IF_ICMPEQ: cond_true = cmp_eq;
      OP_IF_ICMPNE: cond_true = !cmp_eq;
      OP_IF_ICMPLT: cond_true = cmp_lt;
      OP_IF_ICMPGE: cond_true = !cmp_lt;
      OP_IF_ICMPGT: cond_true = !cmp_lt && !cmp_eq;
      OP_IF_ICMPLE: cond_true = cmp_lt || cmp_eq;
      default:      cond_true = 1'b0;
    endcase
  end

  // ------------------------------------------------------ execute control
  logic                 run;          // not in load mode
  logic                 do_jump;
  logic [15:0]          jump_target;
  logic                 lv_write;
  logic [INT_WIDTH-1:0] lv_wdata;
  logic                 flags_load;
  logic                 is_known;
  logic                 goes_exec2;

  assign run = !write;

  always_comb begin
    st_read     = 1'b0;
    st_write    = 1'b0;
    st_pop2     = 1'b0;
    st_in       = '0;
    rs_read     = 1'b0;
    rs_write    = 1'b0;
    alu_a       = st_out2;
    alu_b       = st_out1;
    alu_op      = OP_NOP;
    do_jump     = 1'b0;
    jump_target = jpc;
    lv_write    = 1'b0;
    lv_wdata    = st_out1;
    flags_load  = 1'b0;
    is_known    = 1'b1;
    goes_exec2  = 1'b0;
    pc_read     = 1'b0;

    if (run) begin
      case (state)
        S_FETCH, S_OPER: pc_read = !pc_empty;

        S_EXEC: begin
          case (opcode)
            OP_NOP: ;
            OP_ICONST_M1, OP_ICONST_0, OP_ICONST_1, OP_ICONST_2,
            OP_ICONST_3, OP_ICONST_4, OP_ICONST_5: begin
              st_write = 1'b1;
              st_in    = INT_WIDTH'(signed'(opcode - 8'(OP_ICONST_0)));
            end
            OP_BIPUSH: begin st_write = 1'b1; st_in = imm_byte;  end
            OP_SIPUSH: begin st_write = 1'b1; st_in = imm_short; end
            OP_ILOAD, OP_ILOAD_0, OP_ILOAD_1, OP_ILOAD_2, OP_ILOAD_3: begin
              st_write = 1'b1;
              st_in    = lv_value;
            end
            OP_ISTORE, OP_ISTORE_0, OP_ISTORE_1, OP_ISTORE_2, OP_ISTORE_3: begin
              st_read  = 1'b1;
              lv_write = 1'b1;
              lv_wdata = st_out1;
            end
            OP_IINC: begin
              alu_op   = OP_IINC;
              alu_a    = lv_value;
              alu_b    = INT_WIDTH'(signed'(byte2));
              lv_write = 1'b1;
              lv_wdata = alu_result;
            end
            OP_POP:  st_read = 1'b1;
            OP_POP2: begin st_read = 1'b1; st_pop2 = 1'b1; end
            OP_DUP:  begin st_write = 1'b1; st_in = st_out1; end
            OP_DUP2: begin st_write = 1'b1; st_in = st_out2; goes_exec2 = 1'b1; end
            OP_SWAP: begin
              st_read    = 1'b1;
              st_pop2    = 1'b1;
              st_write   = 1'b1;
              st_in      = st_out1;
              goes_exec2 = 1'b1;
            end
            OP_IADD, OP_ISUB, OP_ISHL, OP_ISHR, OP_IAND, OP_IOR, OP_IXOR: begin
              alu_op     = opcode;
              st_read    = 1'b1;
              st_pop2    = 1'b1;
              st_write   = 1'b1;
              st_in      = alu_result;
              flags_load = 1'b1;
            end
            OP_INEG: begin
              alu_op     = opcode;
              alu_a      = st_out1;
              st_read    = 1'b1;
              st_write   = 1'b1;
              st_in      = alu_result;
              flags_load = 1'b1;
            end
            OP_IF_ICMPEQ, OP_IF_ICMPNE, OP_IF_ICMPLT,
            OP_IF_ICMPGE, OP_IF_ICMPGT, OP_IF_ICMPLE: begin
              alu_op      = OP_ISUB;
              st_read     = 1'b1;
              st_pop2     = 1'b1;
              flags_load  = 1'b1;
              do_jump     = cond_true;
              jump_target = opc_addr + br_off;
            end
            OP_GOTO: begin
              do_jump     = 1'b1;
              jump_target = opc_addr + br_off;
            end
            OP_JSR: begin
              st_write    = 1'b1;
              st_in       = INT_WIDTH'(jpc);
              rs_write    = 1'b1;
              do_jump     = 1'b1;
              jump_target = opc_addr + br_off;
            end
            OP_RET: begin
              rs_read     = 1'b1;
              do_jump     = 1'b1;
              jump_target = ret_target;
            end
            default: is_known = 1'b0;
          endcase
        end

        S_EXEC2: begin
          // second push of dup2 (old top, now second) or swap (saved value1)
          st_write = 1'b1;
          st_in    = (opcode == OP_SWAP) ? buffA : st_out2;
        end

        default: ;
      endcase
    end
  end

  assign pc_jump     = do_jump;
  assign pc_jump_off = signed'(jump_target - jpc);

  // ------------------------------------------------------------ sequencer
  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      state        <= S_FETCH;
      opcode       <= OP_NOP;
      byte1        <= '0;
      byte2        <= '0;
      op_need      <= '0;
      op_got       <= '0;
      jpc          <= '0;
      opc_addr     <= '0;
      buffA        <= '0;
      flag_z       <= 1'b0;
      flag_v       <= 1'b0;
      flag_n       <= 1'b0;
      instr_done   <= 1'b0;
      done_opcode  <= OP_NOP;
      branch_taken <= 1'b0;
      bad_opcode   <= 1'b0;
      ret_mismatch <= 1'b0;
      for (int i = 0; i < N_LOCALS; i++) local_var[i] <= '0;
    end else begin
      instr_done   <= 1'b0;
      branch_taken <= 1'b0;
      bad_opcode   <= 1'b0;
      ret_mismatch <= 1'b0;
      if (run) begin
        case (state)
          S_FETCH: if (!pc_empty) begin
            opcode   <= byte_out;
            opc_addr <= jpc;
            jpc      <= jpc + 16'd1;
            op_need  <= operand_bytes(byte_out);
            op_got   <= '0;
            state    <= (operand_bytes(byte_out) == 2'd0) ? S_EXEC : S_OPER;
          end
          S_OPER: if (!pc_empty) begin
            if (op_got == 2'd0) byte1 <= byte_out;
            else                byte2 <= byte_out;
            jpc    <= jpc + 16'd1;
            op_got <= op_got + 2'd1;
            if (op_got + 2'd1 == op_need) state <= S_EXEC;
          end
          S_EXEC: begin
            if (lv_write && lv_valid) local_var[LIW'(lv_index)] <= lv_wdata;
            if (flags_load) begin
              flag_z <= alu_z;
              flag_v <= alu_v;
              flag_n <= alu_n;
            end
            if (do_jump) jpc <= jump_target;
            if (opcode == OP_SWAP) buffA <= st_out2;
            branch_taken <= do_jump;
            bad_opcode   <= !is_known;
            ret_mismatch <= (opcode == OP_RET) &&
                            ((rs_count == '0) || (rs_out1[15:0] != ret_target));
            if (goes_exec2) begin
              state <= S_EXEC2;
            end else begin
              state       <= S_FETCH;
              instr_done  <= 1'b1;
              done_opcode <= opcode;
            end
          end
          S_EXEC2: begin
            state       <= S_FETCH;
            instr_done  <= 1'b1;
            done_opcode <= opcode;
          end
          default: state <= S_FETCH;
        endcase
      end
    end
  end

  assign stall      = run && (state == S_FETCH || state == S_OPER) && pc_empty;
  assign out_stream = st_out1;

  // ----------------------------------------------------------- assertions
  // The FIFO is never read while the programmer is loading it.
  a_no_read_in_load: assert property (@(posedge clk)
    write |-> !pc_read);
  // A stack is never popped and pushed in a way the sequencer does not use:
  // a double pop always comes with a pop.
  a_pop2_needs_pop: assert property (@(posedge clk)
    st_pop2 |-> st_read);

endmodule
