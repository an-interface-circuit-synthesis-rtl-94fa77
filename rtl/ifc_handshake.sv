// ifc_handshake: HANDSHAKE of the IFC.
//
// Answers the processor core's coprocessor handshake. While nCPI is low the
// core is executing a coprocessor instruction; if the instruction at the head
// of INST_QUEUE belongs to this IFC, CPA goes low (present). CPB stays high
// (busy) while the CONTROLLER reports HANDSHAKE_RUN (the IP is working) or
// HANDSHAKE_TR (a bus transfer is running), so the core waits. In a cycle with
// the instruction ours and the CONTROLLER free, CPB is low and the instruction
// is accepted: start pulses, the CONTROLLER loads the head vector at the clock
// edge, and INST_QUEUE is told to drop it. When the instruction is not ours,
// or nCPI is high, both CPA and CPB are high, so an AND of all IFCs' lines
// gives the core the answer of the one IFC that owns the instruction.
// The handshake protocol itself is fixed (the ARM7TDMI coprocessor
// interface); the busy rule from RUN/TR is this design's reading of the
// CONTROLLER's HANDSHAKE_RUN and HANDSHAKE_TR lines.
//
// Combinational; start is meant to be sampled at the next clock edge.
module ifc_handshake
  import ifc_pkg::*;
(
  input  logic nCPI,
  input  dec_t head,
  input  logic hs_run,
  input  logic hs_tr,
  output logic CPA,
  output logic CPB,
  output logic start
);

  logic own;

  always_comb begin
    own   = !nCPI && head.valid;
    CPA   = !own;
    CPB   = !(own && !hs_run && !hs_tr);
    start = own && !hs_run && !hs_tr;
  end

endmodule
