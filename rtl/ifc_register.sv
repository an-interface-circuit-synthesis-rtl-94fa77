// ifc_register: REGISTER of the IFC.
//
// Two word arrays. The input register holds IN_WORDS words written from the
// shared bus (by LDC, one word per transfer cycle, or by MCR) and read by the
// hardware IP; its port to the IP carries the low ADR_W bits of the selected
// word, the address Xa of the IP's R(Xa) symbol. The result register holds
// RES_WORDS words written from the IP's DATA output (O(Xd) symbols) and read
// onto the bus (by STC or MRC). The sizes come from the transfer lengths of
// the hardware-IP instructions (16 words for "LDC 1, 16" and "STC 1, 16").
//
// Writes take effect at the clock edge; reads are combinational. Indices are
// four bits wide, so each array holds at most 16 words. Reset clears both.
module ifc_register #(
  parameter int unsigned BUS_W     = 32,
  parameter int unsigned IP_W      = 32,
  parameter int unsigned ADR_W     = 8,
  parameter int unsigned IN_WORDS  = 16,
  parameter int unsigned RES_WORDS = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  // input register
  input  logic             in_we,
  input  logic [3:0]       in_idx,
  input  logic [BUS_W-1:0] in_wdata,
  output logic [ADR_W-1:0] ip_adr,
  // result register
  input  logic             res_we,
  input  logic [3:0]       res_idx,
  input  logic [IP_W-1:0]  res_wdata,
  output logic [BUS_W-1:0] res_rdata
);

  logic [BUS_W-1:0] in_reg  [IN_WORDS];
  logic [IP_W-1:0]  res_reg [RES_WORDS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(IN_WORDS); i++) in_reg[i] <= '0;
    end else if (in_we && 32'(in_idx) < IN_WORDS) begin
      in_reg[in_idx] <= in_wdata;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(RES_WORDS); i++) res_reg[i] <= '0;
    end else if (res_we && 32'(res_idx) < RES_WORDS) begin
      res_reg[res_idx] <= res_wdata;
    end
  end

  always_comb begin
    ip_adr    = '0;
    res_rdata = '0;
    if (32'(in_idx) < IN_WORDS)  ip_adr    = in_reg[in_idx][ADR_W-1:0];
    if (32'(res_idx) < RES_WORDS) res_rdata = BUS_W'(res_reg[res_idx]);
  end

endmodule
