// tb_ifc_inst_queue: random push/pop traffic into ifc_inst_queue (DEPTH 4)
// against a reference shift register kept in the testbench; the head is
// compared after every clock edge. Also checks that a vector reaches the head
// exactly DEPTH pushes after it entered.
module tb_ifc_inst_queue;
  import ifc_pkg::*;

  localparam int D = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic push = 1'b0, pop = 1'b0;
  dec_t push_dec = '0, head;
  dec_t model [D];
  int checks = 0, failures = 0;

  ifc_inst_queue #(.DEPTH(D)) dut (.clk, .rst_n, .push, .push_dec, .pop, .head);

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < D; i++) model[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // latency: a marked vector reaches the head after exactly D pushes
    @(negedge clk);
    push = 1'b1; push_dec = '{valid: 1'b1, op: OP_CDP, opcode: 4'd9, crn: 4'd3, count: 8'd77};
    for (int n = 1; n <= D; n++) begin
      @(posedge clk); #1;
      for (int i = D - 1; i > 0; i--) model[i] = model[i-1];
      model[0] = push_dec;
      push_dec = '0;
      checks++;
      if ((head.count == 8'd77) != (n == D)) begin
        failures++; $display("FAIL marked vector at head after %0d pushes: %p", n, head);
      end
    end
    push = 1'b0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      push = ($urandom % 3) != 0;
      pop  = ($urandom % 4) == 0;
      push_dec = dec_t'($urandom);
      @(posedge clk); #1;
      if (push) begin
        for (int i = D - 1; i > 0; i--) model[i] = model[i-1];
        model[0] = push_dec;
      end else if (pop) begin
        model[D-1].valid = 1'b0;
      end
      checks++;
      if (head !== model[D-1]) begin
        failures++; $display("FAIL t=%0d head %p expected %p", t, head, model[D-1]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
