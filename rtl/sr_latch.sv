// sr_latch: 1-bit level-sensitive set/reset latch.
// The printed cell is two cross-coupled NOR gates, each an n-type transistor
// pair with a resistor pull-up. Here it is written as one level-sensitive
// storage element: while s is high q becomes 1, while r is high q becomes 0,
// and with both low the stored value is kept. Both high is not a valid input;
// as in the NOR pair, q and qb then both read 0 and the stored state is cleared.
// There is no clock: outputs follow the inputs combinationally plus the stored
// bit. The latch that synthesis reports for this module is the intended
// storage element.
module sr_latch (
  input  logic s,
  input  logic r,
  output logic q,
  output logic qb
);
  logic state;

  always_latch begin
    if (s || r) state = s && !r;
  end

  // NOR outputs: q = NOR(r, qb), qb = NOR(s, q)
  assign q  = !r && (s || state);
  assign qb = !s && (r || !state);
endmodule
