// sr_flipflop: set/reset flip-flop, the behaviour of two cross-coupled NOR gates.
//
// s = 1 sets q to 1, r = 1 resets it to 0; with both at 0 the loop holds the
// last value. q_n is the second NOR output: the complement of q, except that
// with s and r both 1 (the unused input combination) both outputs are 0 and
// r wins. Level-sensitive, no clock: the stored bit is written as a latch
// (always_latch) so that the simulator sees a clean storage element rather
// than a zero-delay gate loop; a latch is therefore the intended circuit here.
// In the CPU it is the run/halt bit: the RUN switch sets it, a halt
// instruction or reset clears it.
module sr_flipflop (
  input  logic s,
  input  logic r,
  output logic q,
  output logic q_n
);
  logic state;
  always_latch begin
    if (s || r) state = s & ~r;
  end
  assign q   = state;
  assign q_n = ~(s | state);
endmodule
