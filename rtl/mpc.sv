// mpc: the MJava "program counter", a byte-wide FIFO that holds the bytecode
// stream close to the processor core.
//
// An external programmer writes the bytecode stream one byte per clock while
// `write` is high; the controller then consumes it one byte per clock with
// `read`. DEPTH bytes are held in a register array addressed by a write
// pointer and a read pointer that both wrap around, and an occupancy counter
// drives the status flags:
//   full   counter == DEPTH        empty  counter == 0
//   half   counter >= DEPTH/2
// A write into a full buffer is dropped and a read of an empty buffer is
// ignored; either pulses `overflow` / `underflow` in the next cycle.
//
// Branches: `jump` moves the read pointer by the signed byte distance
// `jump_off` (relative to the byte the read pointer points at now), and the
// counter changes by the same amount, so a backward jump makes bytes that were
// already consumed readable again. A jump that would leave the counter
// outside 0..DEPTH is clamped and flagged as overflow / underflow: the target
// must lie among bytes still held in the array.
//
// Timing: data_out shows the byte at the read pointer combinationally
// (first-word fall-through); `read` advances past it at the clock edge.
// Write, read and jump may all happen in one cycle. reset_n is active low.
// The FIFO organisation, its 16-byte size, the three flags and the refusal
// of reads when empty / writes when full follow the processor description.
// Fall-through output, the relative jump port and the one-cycle error pulses
// are choices of this implementation. DEPTH must be a power of two.
module mpc #(
  parameter int unsigned WIDTH = 8,    // byte width of the stream
  parameter int unsigned DEPTH = 16,   // bytes held
  parameter int unsigned OFFW  = 16    // width of the signed jump distance
) (
  input  logic                       clk,
  input  logic                       reset_n,
  input  logic [WIDTH-1:0]           data_in,
  input  logic                       read,
  input  logic                       write,
  input  logic                       jump,
  input  logic signed [OFFW-1:0]     jump_off,
  output logic [WIDTH-1:0]           data_out,
  output logic                       full,
  output logic                       empty,
  output logic                       half,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic                       overflow,
  output logic                       underflow
);

  localparam int unsigned PW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic [WIDTH-1:0] pc_mem [DEPTH];
  logic [PW-1:0]    rd_pointer;
  logic [PW-1:0]    wr_pointer;
  logic             rd_ok;
  logic             wr_ok;
  logic signed [OFFW+1:0] cnt_calc;
  logic [PW-1:0]    rd_next;
  logic [CW-1:0]    cnt_next;
  logic             over_next;
  logic             under_next;

  localparam logic signed [OFFW+1:0] DEPTH_S = (OFFW+2)'(DEPTH);

  assign full  = (count == CW'(DEPTH));
  assign empty = (count == '0);
  assign half  = (count >= CW'(DEPTH / 2));

  assign data_out = pc_mem[rd_pointer];

  always_comb begin
    rd_ok    = read && !empty;
    wr_ok    = write && (!full || rd_ok);
    cnt_calc = (OFFW+2)'(signed'({1'b0, count}))
             + (wr_ok ? (OFFW+2)'(1) : '0)
             - (rd_ok ? (OFFW+2)'(1) : '0)
             - (jump  ? (OFFW+2)'(jump_off) : '0);
    rd_next  = rd_pointer + (rd_ok ? PW'(1) : '0) + (jump ? PW'(jump_off) : '0);
    over_next  = (write && !wr_ok) || (cnt_calc > DEPTH_S);
    under_next = (read && !rd_ok) || (cnt_calc < 0);
    if (cnt_calc < 0)                        cnt_next = '0;
    else if (cnt_calc > DEPTH_S)    cnt_next = CW'(DEPTH);
    else                                     cnt_next = CW'(cnt_calc);
  end

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      rd_pointer <= '0;
      wr_pointer <= '0;
      count      <= '0;
      overflow   <= 1'b0;
      underflow  <= 1'b0;
      for (int i = 0; i < DEPTH; i++) pc_mem[i] <= '0;
    end else begin
      rd_pointer <= rd_next;
      count      <= cnt_next;
      overflow   <= over_next;
      underflow  <= under_next;
      if (wr_ok) begin
        pc_mem[wr_pointer] <= data_in;
        wr_pointer         <= wr_pointer + 1'b1;
      end
    end
  end

  // The occupancy never exceeds the depth, and full and empty exclude
  // each other.
  a_count_range: assert property (@(posedge clk) !reset_n || count <= CW'(DEPTH));
  a_full_empty:  assert property (@(posedge clk) !reset_n || !(full && empty));

  // (Verilator notes that reset_n is used both as an asynchronous reset and,
  // in the assertions above, as a sampled signal; that is intended.)

endmodule
