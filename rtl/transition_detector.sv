// transition_detector: finds adjacent wires that switch in the same cycle.
//
// The two code words that follow each other on the wires are XORed bit by
// bit, which marks every wire that toggles. Each pair of neighbouring XOR
// bits is then ANDed: `pair_sw[i]` is 1 when wires i and i+1 both toggle.
// For the MRFC code no adjacent pair toggles in opposite directions, so a
// set flag means the two wires move the same way, the case that couples
// inductively. `xtalk` is the OR of the flags (flags all zero = no
// crosstalk). The XOR-then-AND structure and the three pair flags follow
// the CODEC's detector; making it purely combinational, with the previous
// word held by the caller, is this design's choice.
module transition_detector
  import mrfc_pkg::*;
(
  input  code_t prev_word,  // word currently on the wires
  input  code_t next_word,  // word about to be driven
  output pair_t pair_sw,    // per adjacent pair: both wires toggle
  output logic  xtalk
);

  code_t toggle;  // per-wire transitions

  always_comb begin
    toggle = prev_word ^ next_word;
    for (int i = 0; i < CODE_W - 1; i++)
      pair_sw[i] = toggle[i] & toggle[i+1];
    xtalk = |pair_sw;
  end

endmodule
