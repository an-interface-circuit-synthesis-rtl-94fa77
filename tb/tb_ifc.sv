// tb_ifc: one IFC (coprocessor 1, 5-stage core) with the behavioural core
// and one example IP. Checks the data path LDC -> CDP proc -> STC/MRC,
// the busy handshake (an MRC right after CDP 1, 2 waits until the nine-cycle
// IP operation is over) and the absent answer to another coprocessor number.
module tb_ifc;
  import ifc_tb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic        nCPI, CPA, CPB, bus_ifetch, bus_dstb, bus_doe, finished, busy;
  logic [31:0] bus_din, bus_dout, ip_data;
  logic        ip_en;
  logic [1:0]  ip_cont;
  logic [7:0]  ip_adr;
  int checks = 0, failures = 0;
  int busy_len = 0, busy_max = 0;

  ifc #(.CP_NUM(1)) dut (
    .clk, .rst_n, .nCPI, .CPA, .CPB, .bus_ifetch, .bus_dstb, .bus_din,
    .bus_dout, .bus_doe, .ip_en, .ip_cont, .ip_adr, .ip_data, .busy
  );
  cpu_model #(.PIPE_STAGES(5)) cpu (
    .clk, .rst_n, .nCPI, .CPA, .CPB, .bus_ifetch, .bus_dstb, .bus_din,
    .bus_dout, .bus_doe, .finished
  );
  proc_ip_model ip (.clk, .rst_n, .EN(ip_en), .CONT(ip_cont), .ADR(ip_adr), .DATA(ip_data));

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  // length of the longest IP run (consecutive ip_en cycles)
  always @(posedge clk) begin
    if (ip_en) busy_len <= busy_len + 1;
    else busy_len <= 0;
    if (ip_en && busy_len + 1 > busy_max) busy_max <= busy_len + 1;
  end

  initial begin : watchdog
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] t0, t1;
    for (int i = 0; i < 256; i++) cpu.mem[i] = 32'h5A00_0000 + 32'(i * 13);
    for (int i = 0; i < 16; i++) cpu.regs[i] = '0;
    cpu.prog[0] = enc_ldc(1, 2, 2);
    cpu.prog[1] = enc_cdp(1, 2);
    cpu.prog[2] = enc_mrc(1, 1, 1);
    cpu.prog[3] = enc_mrc(1, 2, 2);
    cpu.prog[4] = enc_cdp(4, 2);
    cpu.prog[5] = enc_stc(1, 3, 4);
    cpu.prog_len = 6;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    wait (finished);
    repeat (2) @(posedge clk);
    t0 = ip_table(8'(32'h5A00_0000 + 32 * 13));
    t1 = ip_table(8'(32'h5A00_0000 + 33 * 13));
    check("MRC CRn1", cpu.regs[1], t1);
    check("MRC CRn2", cpu.regs[2], t0 ^ t1);
    check("STC word 0", cpu.mem[48], t0);
    check("STC word 1", cpu.mem[49], t1);
    check("STC word 2", cpu.mem[50], t0 ^ t1);
    check("STC word 3", cpu.mem[51], 32'h0);
    check("IP operation length (cycles)", 32'(busy_max), 32'd9);
    check("busy stall cycles of the MRC after CDP", 32'(cpu.stall_cycles), 32'd9);
    check("absent answer for coprocessor 4", 32'(cpu.traps), 32'd1);
    check("accepted", 32'(cpu.accepts), 32'd5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
