// ifc_decoder: DECODER of the IFC.
//
// Turns one fetched instruction word into the decoded bit vector (dec_t) that
// INST_QUEUE keeps. A word is marked valid only when it is a coprocessor
// instruction (CDP, LDC, STC, MCR or MRC) whose coprocessor number, bits
// [11:8], equals CP_NUM; everything else decodes to valid = 0. The DECODER
// depends only on the processor core's instruction encoding, not on the
// hardware IP. The encoding (see ifc_pkg) follows the ARM coprocessor formats
// and is this design's choice; the condition field [31:28] is left to the core.
//
// Purely combinational: the vector is ready in the cycle the word is on the bus.
module ifc_decoder
  import ifc_pkg::*;
#(
  parameter int unsigned CP_NUM = 1
) (
  input  logic [31:0] instr,
  output dec_t        dec
);

  always_comb begin
    dec        = '0;
    dec.opcode = instr[23:20];
    dec.crn    = instr[19:16];
    dec.count  = instr[7:0];
    if (instr[11:8] == 4'(CP_NUM)) begin
      if (instr[27:24] == 4'b1110) begin
        dec.valid = 1'b1;
        if (!instr[4])     dec.op = OP_CDP;
        else if (instr[20]) dec.op = OP_MRC;
        else                dec.op = OP_MCR;
      end else if (instr[27:25] == 3'b110) begin
        dec.valid = 1'b1;
        dec.op    = instr[20] ? OP_LDC : OP_STC;
      end
    end
  end

endmodule
