// ncl_alu_chip: the complete NCL ALU test chip with serial input and output.
//
// An 8-bit delay-insensitive 8051 ALU sits between two shift registers that
// keep the pin count low: a 48-bit serial-in register holds the ALU's 24
// dual-rail input signals and a 38-bit serial-out register captures its 19
// dual-rail output signals. One operation runs as follows (Clock is low
// whenever Nullcontrol changes):
//   1. Nullcontrol = 0: the ALU sees NULL; Ko falls once NULL has reached its
//      outputs.
//   2. With Ko low, 48 Clock cycles shift the next input set in through
//      data_in (first bit ends in the most significant wire). The same clocks
//      shift the previous result out on data_out.
//   3. Nullcontrol = 1: the DATA set enters the ALU; Ko rises once every
//      output is DATA. Ko stops the input register's clock.
//   4. Two Clock cycles with Ko high load the output register in parallel.
//   5. Back to step 1; after Ko falls the 38 result wires leave on data_out,
//      most significant wire first, one per clock.
// Wire order in both registers: signal i of ncl_pkg's Boolean views on wires
// 2i+1 (rail 1) and 2i (rail 0). The structure follows the chip's block
// diagram; bringing Ko out as a pin is this design's choice. An assertion
// checks at every clock edge that Ko high comes with complete DATA.
module ncl_alu_chip
  import ncl_pkg::*;
#(
  parameter int unsigned IN_BITS  = 48,
  parameter int unsigned OUT_BITS = 38
) (
  input  logic clock,
  input  logic data_in,
  input  logic nullcontrol,
  output logic data_out,
  output logic ko
);

  // The register sizes must match the ALU's 24 input and 19 output signals.
  if (IN_BITS != 2 * IN_SIGNALS || OUT_BITS != 2 * OUT_SIGNALS) begin : g_size_check
    $error("IN_BITS/OUT_BITS must be 2x the ALU input/output signal counts");
  end

  logic [IN_BITS-1:0] sipo_q, alu_in_wires;
  logic               sipo_clk;
  alu_out_dr_t        alu_out;

  sipo_shift_register #(.N(IN_BITS)) u_sipo (
    .clk (sipo_clk),
    .din (data_in),
    .q   (sipo_q)
  );

  ncl_input_control #(.N(IN_BITS)) u_ctrl (
    .clock       (clock),
    .nullcontrol (nullcontrol),
    .ko          (ko),
    .sipo_q      (sipo_q),
    .alu_in      (alu_in_wires),
    .sipo_clk    (sipo_clk)
  );

  ncl_alu u_alu (
    .in  (alu_in_dr_t'(alu_in_wires)),
    .out (alu_out),
    .ko  (ko)
  );

  piso_shift_register #(.N(OUT_BITS)) u_piso (
    .clk  (clock),
    .load (ko),
    .d    (OUT_BITS'(alu_out)),
    .dout (data_out)
  );

  // Handshake rule: whenever the output register loads (Ko high at a clock
  // edge), every ALU output pair must hold a legal DATA code.
  function automatic logic out_complete(alu_out_dr_t o);
    logic ok = 1'b1;
    for (int i = 0; i < OUT_SIGNALS; i++) ok &= o[i].t ^ o[i].f;
    return ok;
  endfunction

  a_load_complete_data: assert property (@(posedge clock) ko |-> out_complete(alu_out))
    else $error("output register loaded while the ALU outputs were not complete DATA");

endmodule
