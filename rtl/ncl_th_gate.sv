// ncl_th_gate: NCL threshold gate TH<M>_<N> with hysteresis.
//
// The output is asserted once at least M of the N inputs are high, and then
// stays asserted until all N inputs are low again; between those two
// conditions it keeps its value. This is the state-holding gate from which
// NCL circuits are built: THNN (M = N) is the C-element used for completion
// detection, TH1N is a plain OR. The hold is written as a level-sensitive
// latch; there is no clock and no reset, the gate settles to 0 whenever all
// inputs are NULL (low). Timing: purely combinational plus the hold. For
// M = 1 the two conditions cover every input value, so a TH1_N instance has
// nothing to hold and lint tools report that no latch was inferred.
module ncl_th_gate #(
  parameter int unsigned N = 4,
  parameter int unsigned M = 4
) (
  input  logic [N-1:0] a,
  output logic         z
);

  always_latch begin
    if ($countones(a) >= M) z = 1'b1;
    else if (a == '0)       z = 1'b0;
  end

endmodule
