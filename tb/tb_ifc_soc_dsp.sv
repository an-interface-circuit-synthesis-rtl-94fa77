// tb_ifc_soc_dsp: the end-to-end program of tb_ifc_soc on ifc_soc set for a
// 3-stage core pipeline (the DSP core), so INST_QUEUE is two entries deep.
//
// A behavioural core (cpu_model) runs one program that uses every
// hardware-IP instruction on three example IPs (proc_ip_model): a 16-word
// LDC, CDP operations on two IPs at once, an STC and an MRC that must wait
// for a busy IFC, MCR/MRC register moves, the CDP that issues the IP's I
// symbol, a zero-length LDC and an instruction for a coprocessor number no
// IFC owns. Memory and register contents are then compared with values
// computed here from the IP's result table, and each mechanism is counted.
module tb_ifc_soc_dsp;
  import ifc_tb_pkg::*;

  localparam int N = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        nCPI, CPA, CPB, bus_ifetch, bus_dstb, bus_doe, finished;
  logic [31:0] bus_din, bus_dout;
  logic        ip_en [N];
  logic [1:0]  ip_cont [N];
  logic [7:0]  ip_adr [N];
  logic [31:0] ip_data [N];
  logic [N-1:0] ifc_busy;

  ifc_soc #(.PIPE_STAGES(3)) dut (
    .clk, .rst_n, .nCPI, .CPA, .CPB, .bus_ifetch, .bus_dstb, .bus_din,
    .bus_dout, .bus_doe, .ip_en, .ip_cont, .ip_adr, .ip_data, .ifc_busy
  );

  cpu_model #(.PIPE_STAGES(3)) cpu (
    .clk, .rst_n, .nCPI, .CPA, .CPB, .bus_ifetch, .bus_dstb, .bus_din,
    .bus_dout, .bus_doe, .finished
  );

  for (genvar i = 0; i < N; i++) begin : g_ip
    proc_ip_model ip (.clk, .rst_n, .EN(ip_en[i]), .CONT(ip_cont[i]), .ADR(ip_adr[i]), .DATA(ip_data[i]));
  end

  int checks = 0, failures = 0;
  int cyc = 0;
  int parallel_cycles = 0, ldc_words = 0, stc_words = 0;

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic happened(input string what, input int count);
    checks++;
    $display("mechanism %-28s %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism %s never happened", what);
    end
  endtask

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (ifc_busy[0] && ifc_busy[1]) parallel_cycles <= parallel_cycles + 1;
    if (bus_dstb && !bus_doe) ldc_words <= ldc_words + 1;
    if (bus_dstb && bus_doe) stc_words <= stc_words + 1;
  end

  function automatic logic [31:0] mem_init(input int i);
    return {8'hA5, 8'(i), 8'(i * 3), 8'(i * 7 + 5)};
  endfunction

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] r1 [3], r2 [3];
    for (int i = 0; i < 256; i++) cpu.mem[i] = mem_init(i);
    for (int i = 0; i < 16; i++) cpu.regs[i] = 32'h1000 + 32'(i * 37);
    cpu.prog[0]  = enc_ldc(1, 1, 16);
    cpu.prog[1]  = enc_ldc(2, 2, 2);
    cpu.prog[2]  = enc_cdp(1, 2);
    cpu.prog[3]  = enc_cdp(2, 2);
    cpu.prog[4]  = enc_stc(1, 4, 16);
    cpu.prog[5]  = enc_mrc(2, 2, 3);
    cpu.prog[6]  = enc_mcr(3, 0, 4);
    cpu.prog[7]  = enc_mcr(3, 1, 5);
    cpu.prog[8]  = enc_cdp(3, 2);
    cpu.prog[9]  = enc_cdp(3, 1);
    cpu.prog[10] = enc_mrc(3, 0, 6);
    cpu.prog[11] = enc_cdp(7, 2);
    cpu.prog[12] = enc_mrc(3, 1, 7);
    cpu.prog[13] = enc_stc(2, 5, 3);
    cpu.prog[14] = enc_ldc(1, 6, 0);
    cpu.prog[15] = 32'h0;
    cpu.prog[16] = enc_mrc(1, 2, 8);
    cpu.prog_len = 17;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (finished);
    repeat (2) @(posedge clk);

    r1[0] = ip_table(mem_init(16)[7:0]);
    r1[1] = ip_table(mem_init(17)[7:0]);
    r1[2] = r1[0] ^ r1[1];
    r2[0] = ip_table(mem_init(32)[7:0]);
    r2[1] = ip_table(mem_init(33)[7:0]);
    r2[2] = r2[0] ^ r2[1];
    for (int k = 0; k < 16; k++)
      check($sformatf("STC cp1 word %0d", k), cpu.mem[64 + k], (k < 3) ? r1[k] : 32'h0);
    for (int k = 0; k < 3; k++)
      check($sformatf("STC cp2 word %0d", k), cpu.mem[80 + k], r2[k]);
    check("memory after STC cp2", cpu.mem[83], mem_init(83));
    check("MRC cp2 CRn2", cpu.regs[3], r2[2]);
    check("MRC cp3 CRn0", cpu.regs[6], ip_table(8'(32'h1000 + 4 * 37)));
    check("MRC cp3 CRn1", cpu.regs[7], ip_table(8'(32'h1000 + 5 * 37)));
    check("MRC cp1 CRn2", cpu.regs[8], r1[2]);
    check("I symbols on IP3", 32'(g_ip[2].ip.init_count), 32'd1);
    check("I symbols on IP1", 32'(g_ip[0].ip.init_count), 32'd0);
    check("traps", 32'(cpu.traps), 32'd1);
    check("accepted instructions", 32'(cpu.accepts), 32'd15);
    check("transfer words", 32'(cpu.xfer_words), 32'(16 + 2 + 16 + 1 + 1 + 1 + 1 + 1 + 3 + 1));
    check("R symbols IP1", 32'(g_ip[0].ip.r_count), 32'd2);
    check("O symbols IP2", 32'(g_ip[1].ip.o_count), 32'd3);

    happened("LDC words into IFC", ldc_words);
    happened("STC/MRC words out of IFC", stc_words);
    happened("busy stall (CPB)", cpu.stall_cycles);
    happened("absent coprocessor (CPA)", cpu.traps);
    happened("two IPs working at once", parallel_cycles);
    happened("CDP proc (R/N/O)", g_ip[2].ip.o_count);
    happened("CDP init (I)", g_ip[2].ip.init_count);
    $display("cycles %0d", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
