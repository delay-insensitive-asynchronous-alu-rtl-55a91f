// ncl_completion: completion detection for a set of N dual-rail signals.
//
// Each signal is reduced to "has DATA" by ORing its two rails (a TH1_2 gate),
// and the N results feed one THN_N gate with hysteresis. The output `done`
// rises only when every signal holds DATA and falls only when every signal
// has returned to NULL, so it flags a complete DATA wavefront and then a
// complete NULL wavefront. In the ALU chip this output is Ko: high after a
// complete DATA set, low after a complete NULL set. A single wide THN_N gate
// stands in for the gate tree a cell library would use; this is this
// design's choice. No clock, no reset.
module ncl_completion
  import ncl_pkg::*;
#(
  parameter int unsigned N = 19
) (
  input  dr_t [N-1:0] sig,
  output logic        done
);

  logic [N-1:0] has_data;

  for (genvar i = 0; i < N; i++) begin : g_or
    ncl_th_gate #(.N(2), .M(1)) u_th12 (.a({sig[i].t, sig[i].f}), .z(has_data[i]));
  end

  ncl_th_gate #(.N(N), .M(N)) u_thnn (.a(has_data), .z(done));

endmodule
