// ifc_inst_queue: INST_QUEUE of the IFC, a pipeline follower.
//
// The processor core fetches instructions over the shared bus and executes a
// coprocessor instruction, with the nCPI handshake, when it reaches the last
// of its pipeline stages. INST_QUEUE keeps one decoded bit vector per fetched
// word, in fetch order, so that the vector of the instruction now being
// executed is always at the head: DEPTH is the number of fetches between an
// instruction's own fetch and its handshake, PIPE_STAGES - 1 for a core that
// fetches one word per cycle (4 for the 5-stage RISC core, 2 for the 3-stage
// DSP core). Sizing the queue from the pipeline depth follows the method;
// handshaking in the last stage is this design's choice.
//
// Timing: on a clock edge with push = 1 every entry moves one place towards
// the head and push_dec enters at the tail. On an edge with pop = 1 (the
// instruction at the head was accepted) the head entry is marked used so it
// cannot start the CONTROLLER twice; pop and push may come together.
module ifc_inst_queue
  import ifc_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic push,
  input  dec_t push_dec,
  input  logic pop,
  output dec_t head
);

  dec_t q [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(DEPTH); i++) q[i] <= '0;
    end else if (push) begin
      q[0] <= push_dec;
      for (int i = 1; i < int'(DEPTH); i++) q[i] <= q[i-1];
    end else if (pop) begin
      q[DEPTH-1].valid <= 1'b0;
    end
  end

  assign head = q[DEPTH-1];

endmodule
