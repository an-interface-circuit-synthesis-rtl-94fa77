// tb_ifc_controller: drives ifc_controller (PROC_REPS 2, PROC_WAIT 2,
// PROC_OUTS 3) with one instruction of each kind and compares its control
// lines cycle by cycle with the expected sub-state sequences:
//   CDP 1, 2 : R N N R N N O O O (9 cycles, input words 0 and 1 as address,
//              result words 0..2 written), HANDSHAKE_RUN throughout
//   CDP 1, 1 : one I cycle
//   LDC n    : HANDSHAKE_TR until n transfer cycles, words 0..n-1 written
//   STC n    : BUS_IO_S = 1, result words 0..n-1 selected
//   MCR/MRC  : one transfer to/from register CRn
// xfer cycles are spaced randomly to check that transfers wait for them.
module tb_ifc_controller;
  import ifc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic  start = 1'b0, xfer = 1'b0, idle;
  dec_t  inst = '0;
  ctrl_t ctrl;
  int checks = 0, failures = 0;

  ifc_controller dut (.clk, .rst_n, .start, .inst, .xfer, .ctrl, .idle);

  task automatic chk(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t: ctrl=%p", what, $time, ctrl); end
  endtask

  task automatic issue(input op_e op, input int opcode, input int crn, input int count);
    @(negedge clk);
    chk("idle before start", idle);
    inst = '{valid: 1'b1, op: op, opcode: 4'(opcode), crn: 4'(crn), count: 8'(count)};
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    inst = dec_t'($urandom);  // must not matter once started
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    string seq;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    chk("reset idle", idle && ctrl == '0);

    // CDP 1, 2: the proc word
    issue(OP_CDP, 2, 0, 0);
    seq = "RNNRNNOOO";
    for (int c = 0; c < 9; c++) begin
      logic [1:0] exp_cont;
      case (seq[c]) "R": exp_cont = CONT_R; "N": exp_cont = CONT_N; default: exp_cont = CONT_O; endcase
      chk($sformatf("proc cycle %0d symbol %s", c, seq[c]),
          ctrl.ip_en && ctrl.ip_cont == exp_cont && ctrl.hs_run && !ctrl.hs_tr && !idle);
      if (seq[c] == "R") chk("R address word", ctrl.in_idx == ((c < 3) ? 4'd0 : 4'd1));
      if (seq[c] == "O") chk("O result word", ctrl.res_we && ctrl.res_idx == 4'(c - 6));
      else chk("no result write", !ctrl.res_we);
      @(negedge clk);
    end
    chk("proc ends after 9 cycles", idle && !ctrl.ip_en && !ctrl.hs_run);

    // CDP 1, 1: one I symbol
    issue(OP_CDP, 1, 0, 0);
    chk("I cycle", ctrl.ip_en && ctrl.ip_cont == CONT_I && ctrl.hs_run);
    @(negedge clk);
    chk("I is one cycle", idle);

    // CDP with an unused opcode: accepted, nothing happens
    issue(OP_CDP, 5, 0, 0);
    chk("unknown CDP does nothing", idle && !ctrl.ip_en);

    // LDC 5 with gaps between transfer cycles
    issue(OP_LDC, 0, 0, 5);
    for (int k = 0; k < 5; ) begin
      xfer = ($urandom % 2) == 1;
      #1;
      chk("LDC transfer state", ctrl.hs_tr && !ctrl.bus_io_s && !ctrl.hs_run && !idle &&
          ctrl.in_idx == 4'(k) && ctrl.in_we == xfer);
      if (xfer) k++;
      @(negedge clk);
    end
    xfer = 1'b0;
    chk("LDC done", idle && !ctrl.hs_tr);

    // STC 16
    issue(OP_STC, 0, 0, 16);
    xfer = 1'b1;
    for (int k = 0; k < 16; k++) begin
      chk("STC transfer state", ctrl.hs_tr && ctrl.bus_io_s && ctrl.res_idx == 4'(k) && !ctrl.in_we);
      @(negedge clk);
    end
    xfer = 1'b0;
    chk("STC done", idle);

    // MCR to CRn 7, MRC from CRn 9
    issue(OP_MCR, 0, 7, 0);
    chk("MCR waits", ctrl.hs_tr && ctrl.in_idx == 4'd7 && !ctrl.in_we);
    @(negedge clk);
    xfer = 1'b1; #1;
    chk("MCR write", ctrl.in_we && ctrl.in_idx == 4'd7 && !ctrl.bus_io_s);
    @(negedge clk);
    xfer = 1'b0;
    chk("MCR done", idle);
    issue(OP_MRC, 0, 9, 0);
    xfer = 1'b1; #1;
    chk("MRC read", ctrl.hs_tr && ctrl.bus_io_s && ctrl.res_idx == 4'd9);
    @(negedge clk);
    xfer = 1'b0;
    chk("MRC done", idle);

    // LDC with count 0 is accepted and does nothing
    issue(OP_LDC, 0, 0, 0);
    chk("LDC 0 done", idle);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
