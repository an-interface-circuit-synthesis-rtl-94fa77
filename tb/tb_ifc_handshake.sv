// tb_ifc_handshake: every combination of nCPI, head.valid, HANDSHAKE_RUN and
// HANDSHAKE_TR, with random other head bits, checked against the coprocessor
// handshake rules: CPA low only for our instruction under nCPI low, CPB low
// only when ours and the CONTROLLER is free, start exactly then.
module tb_ifc_handshake;
  import ifc_pkg::*;

  logic nCPI, hs_run, hs_tr, CPA, CPB, start;
  dec_t head;
  int checks = 0, failures = 0;

  ifc_handshake dut (.nCPI, .head, .hs_run, .hs_tr, .CPA, .CPB, .start);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 20; rep++) begin
      for (int v = 0; v < 16; v++) begin
        logic ours, free;
        head = dec_t'($urandom);
        {nCPI, head.valid, hs_run, hs_tr} = 4'(v);
        #1;
        ours = (nCPI == 1'b0) && head.valid;
        free = !hs_run && !hs_tr;
        checks++;
        if (CPA !== !ours || CPB !== !(ours && free) || start !== (ours && free)) begin
          failures++;
          $display("FAIL nCPI=%b valid=%b run=%b tr=%b: CPA=%b CPB=%b start=%b",
                   nCPI, head.valid, hs_run, hs_tr, CPA, CPB, start);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
