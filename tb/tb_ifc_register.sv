// tb_ifc_register: random writes to both arrays of ifc_register (16 + 16
// words) compared with a reference copy; the IP address port (low 8 bits of
// the selected input word) and the bus read port are checked every cycle,
// including the values right after reset.
module tb_ifc_register;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic        in_we = 0, res_we = 0;
  logic [3:0]  in_idx = 0, res_idx = 0;
  logic [31:0] in_wdata = 0, res_wdata = 0, res_rdata;
  logic [7:0]  ip_adr;
  logic [31:0] m_in [16], m_res [16];
  int checks = 0, failures = 0;

  ifc_register dut (.clk, .rst_n, .in_we, .in_idx, .in_wdata, .ip_adr,
                    .res_we, .res_idx, .res_wdata, .res_rdata);

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin m_in[i] = 0; m_res[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      in_we = $urandom % 2; res_we = $urandom % 2;
      in_idx = 4'($urandom); res_idx = 4'($urandom);
      in_wdata = $urandom; res_wdata = $urandom;
      #1;
      checks++;
      if (ip_adr !== m_in[in_idx][7:0] || res_rdata !== m_res[res_idx]) begin
        failures++;
        $display("FAIL t=%0d adr %h/%h rdata %h/%h", t, ip_adr, m_in[in_idx][7:0], res_rdata, m_res[res_idx]);
      end
      @(posedge clk);
      if (in_we) m_in[in_idx] = in_wdata;
      if (res_we) m_res[res_idx] = res_wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
