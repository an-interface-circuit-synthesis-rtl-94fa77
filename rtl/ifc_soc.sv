// ifc_soc: the processor-side fabric of an IP-based SoC with NUM_IFC hardware
// IPs, each behind its own interface circuit (ifc).
//
// The processor core, the memory and the hardware IPs are outside this
// module. All IFCs watch the same shared bus and the core's nCPI line. The
// core gets one CPA and one CPB: the AND of the IFCs' lines, so the core sees
// "present" or "not busy" as soon as the IFC that owns the instruction says
// so (an IFC that does not own it holds both lines high). The outbound bus
// word is the OR of the IFCs' words, each zero unless its IFC drives the bus;
// at most one IFC does, since the core runs one coprocessor transfer at a
// time. IFC i answers to coprocessor number i+1.
//
// Each IP's port set (EN, CONT[1:0], ADR[7:0] out, DATA[31:0] in) is brought
// out as arrays indexed by IFC. Every IFC carries the CONTROLLER generated for
// the example IP description (one IP word, proc); IPs with other descriptions
// would get other CONTROLLERs. Timing is that of ifc: CPA/CPB are
// combinational from nCPI and the IFC state, bus_dout from bus_dstb.
module ifc_soc #(
  parameter int unsigned NUM_IFC     = 3,
  parameter int unsigned BUS_W       = 32,
  parameter int unsigned PIPE_STAGES = 5
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             nCPI,
  output logic             CPA,
  output logic             CPB,
  input  logic             bus_ifetch,
  input  logic             bus_dstb,
  input  logic [BUS_W-1:0] bus_din,
  output logic [BUS_W-1:0] bus_dout,
  output logic             bus_doe,
  output logic             ip_en   [NUM_IFC],
  output logic [1:0]       ip_cont [NUM_IFC],
  output logic [7:0]       ip_adr  [NUM_IFC],
  input  logic [31:0]      ip_data [NUM_IFC],
  output logic [NUM_IFC-1:0] ifc_busy
);

  logic [NUM_IFC-1:0] cpa, cpb, doe;
  logic [BUS_W-1:0]   dout [NUM_IFC];

  for (genvar i = 0; i < int'(NUM_IFC); i++) begin : g_ifc
    ifc #(.CP_NUM(i + 1), .PIPE_STAGES(PIPE_STAGES), .BUS_W(BUS_W)) u_ifc (
      .clk(clk), .rst_n(rst_n),
      .nCPI(nCPI), .CPA(cpa[i]), .CPB(cpb[i]),
      .bus_ifetch(bus_ifetch), .bus_dstb(bus_dstb), .bus_din(bus_din),
      .bus_dout(dout[i]), .bus_doe(doe[i]),
      .ip_en(ip_en[i]), .ip_cont(ip_cont[i]), .ip_adr(ip_adr[i]), .ip_data(ip_data[i]),
      .busy(ifc_busy[i])
    );
  end

  always_comb begin
    CPA      = &cpa;
    CPB      = &cpb;
    bus_doe  = |doe;
    bus_dout = '0;
    for (int i = 0; i < int'(NUM_IFC); i++) bus_dout |= dout[i];
  end

  // Only one IFC may claim an instruction or drive the bus.
  a_one_owner: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(~cpa));
  a_one_driver: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(doe));

endmodule
