// ifc_bus_io: BUS_I/O of the IFC.
//
// Controls the data flow between the shared bus and the IFC: (1) an
// instruction word being fetched goes to the DECODER, (2) a data word of a
// bus-to-IFC transfer (LDC, MCR) goes to the input register, (3) a word of the
// result register goes onto the bus for an IFC-to-bus transfer (STC, MRC).
// The direction is the CONTROLLER's BUS_IO_S line (0: bus to IFC, 1: IFC to
// bus); a transfer cycle is one with bus_dstb high while the CONTROLLER is in
// a transfer sub-state (HANDSHAKE_TR). The block depends only on the bus
// width. The bus is split into an inbound word (bus_din) and an outbound word
// with an enable (bus_dout, bus_doe) instead of a tri-state bus: this design's
// choice.
//
// Combinational: every output follows its inputs in the same cycle.
module ifc_bus_io #(
  parameter int unsigned BUS_W = 32
) (
  // shared bus
  input  logic             bus_din_ifetch,  // bus_din holds an instruction fetch
  input  logic             bus_dstb,        // coprocessor data transfer cycle
  input  logic [BUS_W-1:0] bus_din,
  output logic [BUS_W-1:0] bus_dout,
  output logic             bus_doe,
  // CONTROLLER
  input  logic             bus_io_s,
  input  logic             hs_tr,
  output logic             xfer,            // a transfer word moves this cycle
  // DECODER
  output logic             instr_valid,
  output logic [31:0]      instr,
  // REGISTER
  output logic             in_valid,
  output logic [BUS_W-1:0] in_data,
  input  logic [BUS_W-1:0] res_data
);

  always_comb begin
    instr_valid = bus_din_ifetch;
    instr       = 32'(bus_din);
    xfer        = bus_dstb && hs_tr;
    in_valid    = xfer && !bus_io_s;
    in_data     = bus_din;
    bus_doe     = xfer && bus_io_s;
    bus_dout    = bus_doe ? res_data : '0;
  end

endmodule
