// ifc_controller: CONTROLLER of the IFC.
//
// A state machine with one state per hardware-IP instruction and, inside it,
// sub-states that each fix every control line of the IFC units and of the
// hardware IP for one clock cycle. The states and sub-states are those the
// synthesis method derives from the example IP's CWL description:
//
//   port    : CLK, EN, CONT[1:0], ADR[7:0] in; DATA[31:0] out
//   alphabet: I = {EN=1, CONT=01}, N = {EN=1, CONT=00},
//             R(Xa) = {EN=1, CONT=10, ADR=Xa}, O(Xd) = {EN=1, CONT=11, DATA=Xd}
//   word    : proc(Xa,Xd) = (R(Xa) N[2])[1,2] O(Xd)[3]
//
// "CDP 1, 2" runs proc in state S_CDP_2 with three sub-states: S_CDP_2_1
// drives R with an address from the input register, S_CDP_2_2 drives N and
// waits, S_CDP_2_3 drives O and stores DATA in the result register. A cycle
// counter, 1 in the first R cycle and counting every cycle, steers the
// transitions: in S_CDP_2_2 it returns to S_CDP_2_1 at PERIOD*(k+1) for the
// next repetition and moves to S_CDP_2_3 after the last; S_CDP_2_3 repeats
// PROC_OUTS times. With the defaults (two repetitions, the ones printed in the
// method's example trace R N N R N N O O O) the changes fall at counts 3 and 6.
// Repetition k uses input register word k as its address Xa; output j goes to
// result register word j.
//
// This design's own choices: "CDP 1, 1" issues the single symbol I (the
// alphabet defines I but the example word does not use it); other CDP opcodes
// are accepted and do nothing. LDC and STC move count words between the bus
// and register words 0, 1, ... (wrapping at 16), MCR and MRC move one word to
// input register CRn or from result register CRn. The bus transfer states
// assert HANDSHAKE_TR, the IP states HANDSHAKE_RUN; either makes the IFC busy.
//
// Timing: start and the instruction vector are sampled at a clock edge; the
// first sub-state's outputs appear in the next cycle. A transfer word moves
// in each cycle with xfer high. CDP 1, 2 takes PROC_REPS*(1+PROC_WAIT) +
// PROC_OUTS cycles (9 with the defaults), CDP 1, 1 one cycle.
module ifc_controller
  import ifc_pkg::*;
#(
  parameter int unsigned PROC_REPS = 2,
  parameter int unsigned PROC_WAIT = 2,
  parameter int unsigned PROC_OUTS = 3,
  parameter logic [3:0]  OPC_INIT  = 4'd1,
  parameter logic [3:0]  OPC_PROC  = 4'd2
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  dec_t  inst,
  input  logic  xfer,
  output ctrl_t ctrl,
  output logic  idle
);

  localparam int unsigned PERIOD = 1 + PROC_WAIT;

  typedef enum logic [3:0] {
    S_IDLE, S_CDP_1_1, S_CDP_2_1, S_CDP_2_2, S_CDP_2_3,
    S_LDC_1, S_STC_1, S_MCR_1, S_MRC_1
  } state_e;

  state_e     state, next_state;
  logic [7:0] cnt_q;      // cycle count inside S_CDP_2
  logic [3:0] rep_q;      // current repetition of (R N[WAIT])
  logic [3:0] out_q;      // current O output
  logic [7:0] left_q;     // transfer words still to move
  logic [3:0] idx_q;      // register word of the next transfer
  logic [3:0] crn_q;

  logic last_rep;
  assign last_rep = 32'(rep_q) == PROC_REPS - 1;

  always_comb begin
    next_state = state;
    unique case (state)
      S_IDLE: if (start) begin
        unique case (inst.op)
          OP_CDP:  next_state = (inst.opcode == OPC_PROC) ? S_CDP_2_1 :
                                (inst.opcode == OPC_INIT) ? S_CDP_1_1 : S_IDLE;
          OP_LDC:  next_state = (inst.count != 0) ? S_LDC_1 : S_IDLE;
          OP_STC:  next_state = (inst.count != 0) ? S_STC_1 : S_IDLE;
          OP_MCR:  next_state = S_MCR_1;
          OP_MRC:  next_state = S_MRC_1;
          default: next_state = S_IDLE;
        endcase
      end
      S_CDP_1_1: next_state = S_IDLE;
      S_CDP_2_1: begin
        if (PROC_WAIT != 0)  next_state = S_CDP_2_2;
        else if (last_rep)   next_state = S_CDP_2_3;
        else                 next_state = S_CDP_2_1;
      end
      S_CDP_2_2: begin
        if (32'(cnt_q) == PERIOD * (32'(rep_q) + 1))
          next_state = last_rep ? S_CDP_2_3 : S_CDP_2_1;
      end
      S_CDP_2_3: if (32'(out_q) == PROC_OUTS - 1) next_state = S_IDLE;
      S_LDC_1, S_STC_1: if (xfer && left_q == 8'd1) next_state = S_IDLE;
      S_MCR_1, S_MRC_1: if (xfer) next_state = S_IDLE;
      default: next_state = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      cnt_q  <= '0;
      rep_q  <= '0;
      out_q  <= '0;
      left_q <= '0;
      idx_q  <= '0;
      crn_q  <= '0;
    end else begin
      state <= next_state;
      if (state == S_IDLE) begin
        cnt_q  <= 8'd1;
        rep_q  <= '0;
        out_q  <= '0;
        left_q <= inst.count;
        idx_q  <= '0;
        crn_q  <= inst.crn;
      end else begin
        cnt_q <= cnt_q + 8'd1;
        if ((state == S_CDP_2_2 || (state == S_CDP_2_1 && PROC_WAIT == 0)) &&
            next_state == S_CDP_2_1)
          rep_q <= rep_q + 4'd1;
        if (state == S_CDP_2_3) out_q <= out_q + 4'd1;
        if (xfer && (state == S_LDC_1 || state == S_STC_1)) begin
          left_q <= left_q - 8'd1;
          idx_q  <= idx_q + 4'd1;
        end
      end
    end
  end

  always_comb begin
    ctrl = '0;
    unique case (state)
      S_CDP_1_1: begin
        ctrl.hs_run  = 1'b1;
        ctrl.ip_en   = 1'b1;
        ctrl.ip_cont = CONT_I;
      end
      S_CDP_2_1: begin
        ctrl.hs_run  = 1'b1;
        ctrl.ip_en   = 1'b1;
        ctrl.ip_cont = CONT_R;
        ctrl.in_idx  = rep_q;
      end
      S_CDP_2_2: begin
        ctrl.hs_run  = 1'b1;
        ctrl.ip_en   = 1'b1;
        ctrl.ip_cont = CONT_N;
      end
      S_CDP_2_3: begin
        ctrl.hs_run  = 1'b1;
        ctrl.ip_en   = 1'b1;
        ctrl.ip_cont = CONT_O;
        ctrl.res_we  = 1'b1;
        ctrl.res_idx = out_q;
      end
      S_LDC_1: begin
        ctrl.hs_tr  = 1'b1;
        ctrl.in_we  = xfer;
        ctrl.in_idx = idx_q;
      end
      S_STC_1: begin
        ctrl.hs_tr    = 1'b1;
        ctrl.bus_io_s = 1'b1;
        ctrl.res_idx  = idx_q;
      end
      S_MCR_1: begin
        ctrl.hs_tr  = 1'b1;
        ctrl.in_we  = xfer;
        ctrl.in_idx = crn_q;
      end
      S_MRC_1: begin
        ctrl.hs_tr    = 1'b1;
        ctrl.bus_io_s = 1'b1;
        ctrl.res_idx  = crn_q;
      end
      default: ;
    endcase
  end

  assign idle = state == S_IDLE;

  // A new instruction may only start from S_IDLE (HANDSHAKE keeps CPB high).
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> idle);

endmodule
