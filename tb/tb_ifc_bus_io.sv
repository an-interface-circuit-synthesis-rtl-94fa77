// tb_ifc_bus_io: every combination of the bus strobes and the CONTROLLER's
// direction and transfer lines, with random data, checked against the three
// BUS_I/O paths (instruction to DECODER, bus to input register, result
// register to bus).
module tb_ifc_bus_io;
  logic        ifetch, dstb, io_s, tr, xfer, instr_valid, in_valid, doe;
  logic [31:0] din, dout, instr, in_data, res_data;
  int checks = 0, failures = 0;

  ifc_bus_io #(.BUS_W(32)) dut (
    .bus_din_ifetch(ifetch), .bus_dstb(dstb), .bus_din(din), .bus_dout(dout),
    .bus_doe(doe), .bus_io_s(io_s), .hs_tr(tr), .xfer, .instr_valid, .instr,
    .in_valid, .in_data, .res_data
  );

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 20; rep++) begin
      for (int v = 0; v < 16; v++) begin
        {ifetch, dstb, io_s, tr} = 4'(v);
        din = $urandom; res_data = $urandom;
        #1;
        checks++;
        if (instr_valid !== ifetch || (ifetch && instr !== din) ||
            in_valid !== (dstb && tr && !io_s) || (in_valid && in_data !== din) ||
            doe !== (dstb && tr && io_s) || dout !== (doe ? res_data : 32'h0) ||
            xfer !== (dstb && tr)) begin
          failures++;
          $display("FAIL ifetch=%b dstb=%b io_s=%b tr=%b", ifetch, dstb, io_s, tr);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
