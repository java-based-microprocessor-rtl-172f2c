// mstack: circular LIFO stack of words, used as the operand stack and as the
// return stack of the MJava processor.
//
// DEPTH words are kept in a register array filled from the bottom (index 0)
// up. The stack pointer `sp` points at the current top entry; after reset it
// is DEPTH-1, so the first push lands in entry 0. The array is a circular
// buffer: pushing past the top entry wraps the pointer to entry 0, and
// popping below entry 0 wraps it to the top entry. An occupancy counter
// (`count`, 0..DEPTH) tells the controller how deep the stack is: a push on a
// full stack overwrites the oldest word and pulses `overflow`, a pop of more
// words than are held still moves the pointer (returning stale words) and
// pulses `underflow`. All entries are cleared by reset.
//
// Interface and timing (all on the rising clock edge, reset_n active low):
//   data_out1  the top word (value2 in JVM terms), combinational
//   data_out2  the word below it (value1), combinational
//   read       pop: removes one word, or two words when pop_2 is also high
//   write      push data_in. Together with read, the pop happens first and
//              the pushed word replaces the popped top, so "pop two, push
//              one" executes a binary operation in a single cycle.
//   pushed / popped  one-cycle pulses, the cycle after a push / pop.
//   overflow / underflow  one-cycle pulses, the cycle after the operation.
// Push, single pop, double pop with two output ports, the pointer starting at
// the top entry and the circular wrap follow the processor description; the
// combinational read ports, the same-cycle pop-then-push, the occupancy
// counter and the overflow / underflow pulses are choices of this
// implementation.
module mstack #(
  parameter int unsigned WIDTH = 32,  // word width
  parameter int unsigned DEPTH = 8    // number of words
) (
  input  logic             clk,
  input  logic             reset_n,
  input  logic [WIDTH-1:0] data_in,
  input  logic             read,
  input  logic             write,
  input  logic             pop_2,
  output logic [WIDTH-1:0] data_out1,
  output logic [WIDTH-1:0] data_out2,
  output logic             pushed,
  output logic             popped,
  output logic             overflow,
  output logic             underflow,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned SPW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW  = $clog2(DEPTH + 1);

  logic [WIDTH-1:0] st_mem [DEPTH];
  logic [SPW-1:0]   sp;
  logic [SPW-1:0]   sp_after_pop;
  logic [SPW-1:0]   sp_next;
  logic [CW-1:0]    n_pop;
  logic [CW-1:0]    cnt_after_pop;
  logic [CW-1:0]    cnt_next;
  logic             under_next;
  logic             over_next;

  // Pointer arithmetic modulo DEPTH (DEPTH need not be a power of two).
  function automatic logic [SPW-1:0] dec_mod(logic [SPW-1:0] p);
    return (p == '0) ? SPW'(DEPTH - 1) : p - 1'b1;
  endfunction
  function automatic logic [SPW-1:0] inc_mod(logic [SPW-1:0] p);
    return (p == SPW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  assign data_out1 = st_mem[sp];
  assign data_out2 = st_mem[dec_mod(sp)];

  always_comb begin
    sp_after_pop = sp;
    n_pop        = '0;
    if (read) begin
      n_pop        = pop_2 ? CW'(2) : CW'(1);
      sp_after_pop = pop_2 ? dec_mod(dec_mod(sp)) : dec_mod(sp);
    end
    under_next    = (n_pop > count);
    cnt_after_pop = under_next ? '0 : count - n_pop;
    sp_next       = write ? inc_mod(sp_after_pop) : sp_after_pop;
    over_next     = write && (cnt_after_pop == CW'(DEPTH));
    if (write && !over_next) cnt_next = cnt_after_pop + 1'b1;
    else                     cnt_next = cnt_after_pop;
  end

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      sp        <= SPW'(DEPTH - 1);
      count     <= '0;
      pushed    <= 1'b0;
      popped    <= 1'b0;
      overflow  <= 1'b0;
      underflow <= 1'b0;
      for (int i = 0; i < DEPTH; i++) st_mem[i] <= '0;
    end else begin
      sp        <= sp_next;
      count     <= cnt_next;
      pushed    <= write;
      popped    <= read;
      overflow  <= over_next;
      underflow <= under_next;
      if (write) st_mem[sp_next] <= data_in;
    end
  end

  // The occupancy never exceeds the depth.
  a_count_range: assert property (@(posedge clk) !reset_n || count <= CW'(DEPTH));

  // (Verilator notes that reset_n is used both as an asynchronous reset and,
  // in the assertions above, as a sampled signal; that is intended.)

endmodule
