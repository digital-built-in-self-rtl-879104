// comparator: behavioural model of one current comparator of the output
// interface.  It compares the two probability currents of a decoded bit,
// I1 (probability of a 1) and I0, and decides 1 when I1 exceeds I0.  OFFSET
// models an input-referred offset in probability codes (positive values
// favour a 0); the default of zero is an ideal comparator.  The SR latch that
// holds the decision is modelled in out_shift_reg.  Combinational.
module comparator
  import hamming_pkg::*;
#(
  parameter int OFFSET = 0
) (
  input  prob_t p1,
  output logic  d
);

  assign d = (longint'(p1) - (longint'(IU) - longint'(p1))) > longint'(OFFSET);

endmodule
