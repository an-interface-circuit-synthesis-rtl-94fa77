// ifc_pkg: types and constants shared by the interface circuit (IFC) units.
//
// The IFC sits between a configurable processor core and one hardware IP and
// speaks an ARM7TDMI-style coprocessor protocol with the core: nCPI from the
// core, CPA (absent) and CPB (busy) back to it. Hardware-IP instructions are
// coprocessor instructions of four kinds: CDP (operate on data in the IP),
// LDC/STC (move a block between memory and the IFC registers) and MCR/MRC (move
// one word between the core and the IFC registers).
//
// The instruction encoding is this design's choice, modelled on the ARM
// coprocessor formats (bits [11:8] name the coprocessor):
//   CDP     : [27:24]=1110, [4]=0, opcode [23:20], CRn [19:16]
//   MCR/MRC : [27:24]=1110, [4]=1, L=[20] (1 = MRC), CRn [19:16]
//   LDC/STC : [27:25]=110,  L=[20] (1 = LDC), word count [7:0]
// The LDC/STC count field carries the transfer length, because the
// instructions name the number of words they move ("LDC 1, 16, ...").
package ifc_pkg;

  typedef enum logic [2:0] {
    OP_NONE = 3'd0,
    OP_CDP  = 3'd1,
    OP_LDC  = 3'd2,
    OP_STC  = 3'd3,
    OP_MCR  = 3'd4,
    OP_MRC  = 3'd5
  } op_e;

  // Decoded bit vector carried by INST_QUEUE.
  typedef struct packed {
    logic       valid;   // instruction is for this IFC's coprocessor number
    op_e        op;
    logic [3:0] opcode;  // CDP opcode, selects the IP operation
    logic [3:0] crn;     // register index for MCR/MRC
    logic [7:0] count;   // words moved by LDC/STC
  } dec_t;

  // Control lines of one CONTROLLER sub-state (names follow the IFC port list:
  // BUS_IO_S, HANDSHAKE_RUN, HANDSHAKE_TR, REG_EN, IP_EN, IP_CONT).
  typedef struct packed {
    logic       bus_io_s;  // 0: bus -> IFC, 1: IFC -> bus
    logic       hs_run;    // IP operation in progress (core sees CPB)
    logic       hs_tr;     // bus transfer in progress
    logic       in_we;     // write bus word into input register
    logic       res_we;    // write IP word into result register
    logic [3:0] in_idx;    // input register word (write from bus, read to IP)
    logic [3:0] res_idx;   // result register word (write from IP, read to bus)
    logic       ip_en;
    logic [1:0] ip_cont;
  } ctrl_t;

  // IP control codes from the example IP's alphabet.
  localparam logic [1:0] CONT_N = 2'b00;  // N: no operation / wait
  localparam logic [1:0] CONT_I = 2'b01;  // I
  localparam logic [1:0] CONT_R = 2'b10;  // R(Xa): address in
  localparam logic [1:0] CONT_O = 2'b11;  // O(Xd): data out

endpackage
