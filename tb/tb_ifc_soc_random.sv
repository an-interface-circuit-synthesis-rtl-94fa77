// tb_ifc_soc_random: random programs on ifc_soc at its default parameters.
//
// Each round resets the system, fills memory and core registers with random
// words and runs a random 60-instruction program mixing LDC, STC, MCR, MRC,
// CDP 1/2 and other CDP opcodes for the three IFCs, plus instructions for
// coprocessor numbers no IFC owns and plain no-ops. Because the core runs
// instructions in order and an IFC refuses new work while busy, the result
// must equal that of executing the program one instruction at a time; the
// testbench does exactly that on its own copy of memory, core registers and
// the IFCs' input and result registers, and compares memory and registers
// after each round. Stalls, absent answers and parallel IP activity are
// counted and must all occur.
module tb_ifc_soc_random;
  import ifc_tb_pkg::*;

  localparam int N = 3;
  localparam int ROUNDS = 25;
  localparam int LEN = 60;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        nCPI, CPA, CPB, bus_ifetch, bus_dstb, bus_doe, finished;
  logic [31:0] bus_din, bus_dout;
  logic        ip_en [N];
  logic [1:0]  ip_cont [N];
  logic [7:0]  ip_adr [N];
  logic [31:0] ip_data [N];
  logic [N-1:0] ifc_busy;

  ifc_soc dut (
    .clk, .rst_n, .nCPI, .CPA, .CPB, .bus_ifetch, .bus_dstb, .bus_din,
    .bus_dout, .bus_doe, .ip_en, .ip_cont, .ip_adr, .ip_data, .ifc_busy
  );
  cpu_model #(.PIPE_STAGES(5)) cpu (
    .clk, .rst_n, .nCPI, .CPA, .CPB, .bus_ifetch, .bus_dstb, .bus_din,
    .bus_dout, .bus_doe, .finished
  );
  for (genvar i = 0; i < N; i++) begin : g_ip
    proc_ip_model ip (.clk, .rst_n, .EN(ip_en[i]), .CONT(ip_cont[i]), .ADR(ip_adr[i]), .DATA(ip_data[i]));
  end

  int checks = 0, failures = 0;
  int parallel_cycles = 0, stalls = 0, traps = 0;

  always @(posedge clk) if ($countones(ifc_busy) > 1) parallel_cycles <= parallel_cycles + 1;

  // reference state
  logic [31:0] g_mem [256];
  logic [31:0] g_regs [16];
  logic [31:0] g_in  [N][16];
  logic [31:0] g_res [N][16];

  function automatic logic [31:0] rand_instr();
    int cp = 1 + int'($urandom % 3);
    int k  = int'($urandom % 20);
    if (k < 3)  return enc_ldc(cp, int'($urandom % 16), int'($urandom % 17));
    if (k < 6)  return enc_stc(cp, int'($urandom % 16), int'($urandom % 17));
    if (k < 8)  return enc_mcr(cp, int'($urandom % 16), int'($urandom % 16));
    if (k < 11) return enc_mrc(cp, int'($urandom % 16), int'($urandom % 16));
    if (k < 15) return enc_cdp(cp, 2);
    if (k < 16) return enc_cdp(cp, 1);
    if (k < 17) return enc_cdp(cp, 3 + int'($urandom % 13));
    if (k < 18) return enc_cdp(4 + int'($urandom % 12), 2);
    return 32'h0;
  endfunction

  task automatic ref_exec(input logic [31:0] w);
    int cp = int'(w[11:8]);
    int i = cp - 1;
    int base = int'({w[19:16], 4'b0});
    if (w[27:24] != 4'b1110 && w[27:25] != 3'b110) return;  // not a coprocessor instruction
    if (cp < 1 || cp > N) return;                            // absent coprocessor
    if (w[27:25] == 3'b110) begin
      for (int k = 0; k < int'(w[7:0]); k++) begin
        if (w[20]) g_in[i][k % 16] = g_mem[(base + k) % 256];
        else       g_mem[(base + k) % 256] = g_res[i][k % 16];
      end
    end else if (w[4]) begin
      if (w[20]) g_regs[w[15:12]] = g_res[i][w[19:16]];
      else       g_in[i][w[19:16]] = g_regs[w[15:12]];
    end else if (w[23:20] == 4'd2) begin
      logic [31:0] t0 = ip_table(g_in[i][0][7:0]);
      logic [31:0] t1 = ip_table(g_in[i][1][7:0]);
      g_res[i][0] = t0; g_res[i][1] = t1; g_res[i][2] = t0 ^ t1;
    end
  endtask

  initial begin : watchdog
    repeat (ROUNDS * 3000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < ROUNDS; r++) begin
      rst_n = 1'b0;
      for (int a = 0; a < 256; a++) begin cpu.mem[a] = $urandom; g_mem[a] = cpu.mem[a]; end
      for (int a = 0; a < 16; a++) begin cpu.regs[a] = $urandom; g_regs[a] = cpu.regs[a]; end
      for (int i = 0; i < N; i++) for (int a = 0; a < 16; a++) begin g_in[i][a] = '0; g_res[i][a] = '0; end
      for (int p = 0; p < LEN; p++) begin
        cpu.prog[p] = rand_instr();
        ref_exec(cpu.prog[p]);
      end
      cpu.prog_len = LEN;
      repeat (2) @(posedge clk);
      rst_n = 1'b1;
      wait (finished);
      repeat (2) @(posedge clk);
      for (int a = 0; a < 256; a++) begin
        checks++;
        if (cpu.mem[a] !== g_mem[a]) begin
          failures++; $display("FAIL round %0d mem[%0d] %h expected %h", r, a, cpu.mem[a], g_mem[a]);
        end
      end
      for (int a = 0; a < 16; a++) begin
        checks++;
        if (cpu.regs[a] !== g_regs[a]) begin
          failures++; $display("FAIL round %0d regs[%0d] %h expected %h", r, a, cpu.regs[a], g_regs[a]);
        end
      end
      stalls += cpu.stall_cycles;
      traps  += cpu.traps;
    end
    checks += 3;
    if (stalls == 0) begin failures++; $display("FAIL no busy stall"); end
    if (traps == 0) begin failures++; $display("FAIL no absent answer"); end
    if (parallel_cycles == 0) begin failures++; $display("FAIL IPs never ran in parallel"); end
    $display("busy stall cycles %0d, absent answers %0d, parallel IP cycles %0d", stalls, traps, parallel_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
