// cpu_model: behavioural stand-in for the processor core and its memory
// (testbench only; the real core comes from a processor synthesis system).
//
// A pipeline of PIPE_STAGES stages that fetches one word per cycle over the
// shared bus (bus_ifetch high, word on bus_din) and executes an instruction
// when it reaches the last stage. A coprocessor instruction there lowers nCPI
// and waits: CPA high means no coprocessor claims it (counted in traps, then
// skipped), CPA low with CPB high means busy (the core stalls, counted in
// stall_cycles), CPA and CPB low accepts it. After an accepted LDC/STC the
// core runs count data cycles (bus_dstb high), an MCR/MRC one: LDC takes words
// from mem[{Rn,4'b0} + k] and MCR from regs[Rd], STC stores bus_dout into
// mem[{Rn,4'b0} + k] and MRC into regs[Rd]. Other words execute as one-cycle
// no-ops. The program is in prog[0 .. prog_len-1]; once it has run out the core
// fetches zeros until finished rises.
module cpu_model #(
  parameter int unsigned PIPE_STAGES = 5
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic        nCPI,
  input  logic        CPA,
  input  logic        CPB,
  output logic        bus_ifetch,
  output logic        bus_dstb,
  output logic [31:0] bus_din,
  input  logic [31:0] bus_dout,
  input  logic        bus_doe,
  output logic        finished
);
  localparam int D = (PIPE_STAGES > 1) ? PIPE_STAGES - 1 : 1;

  logic [31:0] prog [64];
  int          prog_len;
  logic [31:0] mem  [256];
  logic [31:0] regs [16];

  logic [31:0] pw [D];
  logic        pv [D];
  logic        done_e;      // instruction in the last stage has completed
  logic        xmode;       // running data transfer cycles
  int          xleft, xk;
  int          pc;
  int          stall_cycles, traps, accepts, retired, xfer_words;

  logic [31:0] e;
  logic        e_cp, advance, accept;
  logic        is_ldc, is_stc, is_mcr, is_mrc;

  always_comb begin
    e      = pw[D-1];
    e_cp   = pv[D-1] && !done_e && !xmode &&
             (e[27:24] == 4'b1110 || e[27:25] == 3'b110);
    is_ldc = e[27:25] == 3'b110 && e[20];
    is_stc = e[27:25] == 3'b110 && !e[20];
    is_mcr = e[27:24] == 4'b1110 && e[4] && !e[20];
    is_mrc = e[27:24] == 4'b1110 && e[4] && e[20];
    nCPI   = !e_cp;
    accept = e_cp && !CPA && !CPB;
    advance = !xmode && (!e_cp || CPA || (accept && !(is_ldc || is_stc || is_mcr || is_mrc)));
    bus_ifetch = advance;
    bus_dstb   = xmode;
    bus_din    = '0;
    if (advance) bus_din = (pc < prog_len) ? prog[pc] : 32'd0;
    else if (xmode && is_ldc) bus_din = mem[8'({e[19:16], 4'b0}) + 8'(xk)];
    else if (xmode && is_mcr) bus_din = regs[e[15:12]];
    finished = !xmode && pc >= prog_len + D + 1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < D; i++) begin pw[i] <= '0; pv[i] <= 1'b0; end
      done_e <= 1'b0; xmode <= 1'b0; xleft <= 0; xk <= 0; pc <= 0;
      stall_cycles <= 0; traps <= 0; accepts <= 0; retired <= 0; xfer_words <= 0;
    end else begin
      if (e_cp && !CPA && CPB) stall_cycles <= stall_cycles + 1;
      if (e_cp && CPA) traps <= traps + 1;
      if (accept) accepts <= accepts + 1;
      if (accept && (is_ldc || is_stc || is_mcr || is_mrc)) begin
        done_e <= 1'b1;
        xk     <= 0;
        xleft  <= (is_mcr || is_mrc) ? 1 : int'(e[7:0]);
        xmode  <= (is_mcr || is_mrc) ? 1'b1 : (e[7:0] != 0);
      end
      if (xmode) begin
        if (is_stc) mem[8'({e[19:16], 4'b0}) + 8'(xk)] <= bus_doe ? bus_dout : 32'hDEAD_BEEF;
        if (is_mrc) regs[e[15:12]] <= bus_doe ? bus_dout : 32'hDEAD_BEEF;
        xk    <= xk + 1;
        xleft <= xleft - 1;
        xfer_words <= xfer_words + 1;
        if (xleft == 1) xmode <= 1'b0;
      end
      if (advance) begin
        pw[0] <= bus_din;
        pv[0] <= 1'b1;
        for (int i = 1; i < D; i++) begin pw[i] <= pw[i-1]; pv[i] <= pv[i-1]; end
        done_e <= 1'b0;
        pc <= pc + 1;
        if (pv[D-1]) retired <= retired + 1;
      end
    end
  end
endmodule
