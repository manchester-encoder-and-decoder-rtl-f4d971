// Transition detector: data recovery of the Manchester decoder.
//
// The recovered bit is the direction of the mid-bit transition: 01 (rise)
// gives 1 and 10 (fall) gives 0. The bit is held in a level-sensitive latch,
// with no clock input: the latch is transparent while the active decoder sees
// a valid transition, or while reset is low (which clears it to 0), and keeps
// its value through 00, 11 and inactive periods. data therefore follows a
// valid symbol with no latency.
//
// The document describes a clockless transition detector built from latches
// and flip-flops that recovers data from the transition; the hold on invalid
// symbols matches the recovered-clock values it shows. The single-latch form
// and the reset value 0 are this design's choices. The latch reported by
// lint and synthesis is intended: it is the storage of this unit.
module mdec_transition_detector
  import manchester_pkg::*;
(
  input  logic  rst_n,   // clears the held bit, active low
  input  logic  active,  // decoder active, from the control unit
  input  code_t code,    // gated coded symbol
  output logic  data     // recovered bit
);

  logic load;   // latch enable
  logic d;      // value loaded

  always_comb begin
    load = !rst_n || (active && (code[1] ^ code[0]));
    d    = rst_n && code[0];   // 01 -> 1, 10 -> 0
  end

  always_latch begin
    if (load) data = d;
  end

endmodule
