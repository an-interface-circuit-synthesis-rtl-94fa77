// ifc_tb_pkg: instruction encoders for the IFC testbenches, following the
// encoding described in ifc_pkg (ARM coprocessor formats, condition "always").
package ifc_tb_pkg;
  function automatic logic [31:0] enc_cdp(input int cp, input int opc);
    return {4'hE, 4'b1110, 4'(opc), 4'h0, 4'h0, 4'(cp), 3'b000, 1'b0, 4'h0};
  endfunction
  function automatic logic [31:0] enc_mcr(input int cp, input int crn, input int rd);
    return {4'hE, 4'b1110, 3'b000, 1'b0, 4'(crn), 4'(rd), 4'(cp), 3'b000, 1'b1, 4'h0};
  endfunction
  function automatic logic [31:0] enc_mrc(input int cp, input int crn, input int rd);
    return {4'hE, 4'b1110, 3'b000, 1'b1, 4'(crn), 4'(rd), 4'(cp), 3'b000, 1'b1, 4'h0};
  endfunction
  function automatic logic [31:0] enc_ldc(input int cp, input int rn, input int cnt);
    return {4'hE, 3'b110, 4'b1100, 1'b1, 4'(rn), 4'h0, 4'(cp), 8'(cnt)};
  endfunction
  function automatic logic [31:0] enc_stc(input int cp, input int rn, input int cnt);
    return {4'hE, 3'b110, 4'b1100, 1'b0, 4'(rn), 4'h0, 4'(cp), 8'(cnt)};
  endfunction
  // Result table of the example IP model.
  function automatic logic [31:0] ip_table(input logic [7:0] x);
    return (32'(x) + 32'd1) * 32'h9E3779B9;
  endfunction
endpackage
