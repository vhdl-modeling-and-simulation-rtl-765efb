// ~S/~R latch with active-low set and reset.
//
// ~S low sets the latch (Q=1, QN=0), ~R low resets it (Q=0, QN=1), both high
// hold the stored state. The state table leaves (~S,~R)=(0,0) undefined; like
// the document's behavioural description, this model then drives Q and QN
// both high. Set has priority over reset for the stored state, so the latch
// is set when both inputs return high together.
//
// In the DIS it remembers that the last self-test vector was generated: the
// comparator's Equal sets it, and its QN output drives Operate/Maintenance
// low to freeze the synthesised signature. The latch is a deliberate
// level-sensitive storage element, as in the document, and so is reported as
// a latch by synthesis.
module sr_latch_n (
  input  logic s_n,
  input  logic r_n,
  output logic q,
  output logic qn
);
  logic state;

  always_latch begin
    if (!s_n)      state = 1'b1;
    else if (!r_n) state = 1'b0;
  end

  assign q  = state | ~s_n;
  assign qn = ~state | ~r_n;
endmodule
