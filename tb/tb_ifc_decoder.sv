// tb_ifc_decoder: checks ifc_decoder (CP_NUM = 1) on every instruction kind,
// on other coprocessor numbers and on random words, against a reference
// decode written with bit masks.
module tb_ifc_decoder;
  import ifc_pkg::*;
  import ifc_tb_pkg::*;

  logic [31:0] instr;
  dec_t        dec;
  int checks = 0, failures = 0;

  ifc_decoder #(.CP_NUM(1)) dut (.instr, .dec);

  function automatic dec_t ref_decode(input logic [31:0] w);
    dec_t d = '0;
    d.opcode = w[23:20]; d.crn = w[19:16]; d.count = w[7:0];
    if (w[11:8] != 4'd1) return d;
    if ((w & 32'h0F00_0010) == 32'h0E00_0000) begin d.valid = 1; d.op = OP_CDP; end
    else if ((w & 32'h0F10_0010) == 32'h0E00_0010) begin d.valid = 1; d.op = OP_MCR; end
    else if ((w & 32'h0F10_0010) == 32'h0E10_0010) begin d.valid = 1; d.op = OP_MRC; end
    else if ((w & 32'h0E10_0000) == 32'h0C10_0000) begin d.valid = 1; d.op = OP_LDC; end
    else if ((w & 32'h0E10_0000) == 32'h0C00_0000) begin d.valid = 1; d.op = OP_STC; end
    return d;
  endfunction

  task automatic try(input logic [31:0] w, input string what);
    dec_t e;
    instr = w;
    #1;
    e = ref_decode(w);
    checks++;
    if (dec.valid !== e.valid || (e.valid && (dec.op !== e.op || dec.opcode !== e.opcode ||
        dec.crn !== e.crn || dec.count !== e.count))) begin
      failures++;
      $display("FAIL %s %h: got %p expected %p", what, w, dec, e);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    try(enc_cdp(1, 2), "CDP 1,2");
    checks++; if (!(dec.valid && dec.op == OP_CDP && dec.opcode == 4'd2)) failures++;
    try(enc_cdp(1, 1), "CDP 1,1");
    try(enc_ldc(1, 3, 16), "LDC 1,16");
    checks++; if (!(dec.valid && dec.op == OP_LDC && dec.count == 8'd16)) failures++;
    try(enc_stc(1, 3, 16), "STC 1,16");
    checks++; if (!(dec.valid && dec.op == OP_STC)) failures++;
    try(enc_mcr(1, 5, 2), "MCR");
    checks++; if (!(dec.valid && dec.op == OP_MCR && dec.crn == 4'd5)) failures++;
    try(enc_mrc(1, 6, 2), "MRC");
    checks++; if (!(dec.valid && dec.op == OP_MRC && dec.crn == 4'd6)) failures++;
    try(enc_cdp(2, 2), "CDP 2,2");
    checks++; if (dec.valid) failures++;
    try(enc_ldc(3, 0, 4), "LDC 3");
    try(32'hE0810002, "ADD");
    checks++; if (dec.valid) failures++;
    for (int i = 0; i < 2000; i++) begin
      logic [31:0] w = $urandom;
      if (i % 2 == 0) w[11:8] = 4'd1;
      try(w, "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
