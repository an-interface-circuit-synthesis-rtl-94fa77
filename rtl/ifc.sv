// ifc: one interface circuit (IFC) between the processor core and one
// hardware IP.
//
// Six units, wired as in the IFC block diagram:
//   BUS_I/O    steers the shared bus (instructions, input data, results)
//   DECODER    decodes each fetched instruction word into a bit vector
//   INST_QUEUE keeps the vectors while their instructions move down the
//              core's pipeline (DEPTH = PIPE_STAGES - 1)
//   HANDSHAKE  answers nCPI with CPA/CPB and starts the CONTROLLER
//   REGISTER   input words for the IP, result words from the IP
//   CONTROLLER one state per hardware-IP instruction, sub-states from the
//              IP's interface description; drives all units and the IP
//
// The core side is the coprocessor handshake (nCPI in, CPA/CPB out, both
// active-high "absent" and "busy") and the shared bus, split into bus_din and
// bus_dout/bus_doe. bus_ifetch marks a cycle in which the core fetches an
// instruction word from bus_din; bus_dstb marks a coprocessor data cycle, in
// which an accepted LDC/MCR word is on bus_din, or the IFC must put an STC/MRC
// word on bus_dout in the same cycle. The IP side is the example IP's CWL port
// list: EN, CONT[1:0], ADR[7:0] out of the IFC and DATA[31:0] into it.
//
// Timing: an instruction is accepted at the clock edge that ends the cycle
// with nCPI low, the instruction ours and the IFC free (CPB low). Its first
// CONTROLLER sub-state starts in the following cycle. While the IP works
// (CDP) or a transfer runs, CPB is high to any further instruction for
// this IFC, so the core waits.
module ifc
  import ifc_pkg::*;
#(
  parameter int unsigned CP_NUM      = 1,
  parameter int unsigned PIPE_STAGES = 5,
  parameter int unsigned BUS_W       = 32,
  parameter int unsigned IN_WORDS    = 16,
  parameter int unsigned RES_WORDS   = 16,
  parameter int unsigned PROC_REPS   = 2,
  parameter int unsigned PROC_WAIT   = 2,
  parameter int unsigned PROC_OUTS   = 3
) (
  input  logic             clk,
  input  logic             rst_n,
  // processor core: handshake and shared bus
  input  logic             nCPI,
  output logic             CPA,
  output logic             CPB,
  input  logic             bus_ifetch,
  input  logic             bus_dstb,
  input  logic [BUS_W-1:0] bus_din,
  output logic [BUS_W-1:0] bus_dout,
  output logic             bus_doe,
  // hardware IP
  output logic             ip_en,
  output logic [1:0]       ip_cont,
  output logic [7:0]       ip_adr,
  input  logic [31:0]      ip_data,
  // status
  output logic             busy
);

  localparam int unsigned QDEPTH = (PIPE_STAGES > 1) ? PIPE_STAGES - 1 : 1;

  ctrl_t            ctrl;
  logic             xfer, instr_valid, in_valid, start, ctl_idle;
  logic [31:0]      instr;
  logic [BUS_W-1:0] in_data, res_data;
  dec_t             dec, head;

  ifc_bus_io #(.BUS_W(BUS_W)) u_bus_io (
    .bus_din_ifetch(bus_ifetch), .bus_dstb(bus_dstb), .bus_din(bus_din),
    .bus_dout(bus_dout), .bus_doe(bus_doe),
    .bus_io_s(ctrl.bus_io_s), .hs_tr(ctrl.hs_tr), .xfer(xfer),
    .instr_valid(instr_valid), .instr(instr),
    .in_valid(in_valid), .in_data(in_data), .res_data(res_data)
  );

  ifc_decoder #(.CP_NUM(CP_NUM)) u_decoder (.instr(instr), .dec(dec));

  ifc_inst_queue #(.DEPTH(QDEPTH)) u_inst_queue (
    .clk(clk), .rst_n(rst_n), .push(instr_valid), .push_dec(dec),
    .pop(start), .head(head)
  );

  ifc_handshake u_handshake (
    .nCPI(nCPI), .head(head), .hs_run(ctrl.hs_run), .hs_tr(ctrl.hs_tr),
    .CPA(CPA), .CPB(CPB), .start(start)
  );

  ifc_controller #(
    .PROC_REPS(PROC_REPS), .PROC_WAIT(PROC_WAIT), .PROC_OUTS(PROC_OUTS)
  ) u_controller (
    .clk(clk), .rst_n(rst_n), .start(start), .inst(head), .xfer(xfer),
    .ctrl(ctrl), .idle(ctl_idle)
  );

  ifc_register #(
    .BUS_W(BUS_W), .IP_W(32), .ADR_W(8), .IN_WORDS(IN_WORDS), .RES_WORDS(RES_WORDS)
  ) u_register (
    .clk(clk), .rst_n(rst_n),
    .in_we(in_valid && ctrl.in_we), .in_idx(ctrl.in_idx), .in_wdata(in_data),
    .ip_adr(ip_adr),
    .res_we(ctrl.res_we), .res_idx(ctrl.res_idx), .res_wdata(ip_data),
    .res_rdata(res_data)
  );

  assign ip_en   = ctrl.ip_en;
  assign ip_cont = ctrl.ip_cont;
  assign busy    = !ctl_idle;

  // Coprocessor handshake rules: the IFC claims an instruction (CPA low) only
  // while the core executes one (nCPI low), and never says "not busy" to an
  // instruction it has not claimed.
  a_cpa_needs_ncpi: assert property (@(posedge clk) disable iff (!rst_n) !CPA |-> !nCPI);
  a_cpb_needs_cpa:  assert property (@(posedge clk) disable iff (!rst_n) !CPB |-> !CPA);

endmodule
