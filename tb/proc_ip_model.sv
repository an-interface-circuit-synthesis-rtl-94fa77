// proc_ip_model: behavioural stand-in for a hardware IP with the example
// interface description (testbench only; the real IPs come from an IP library).
//
// Ports: EN, CONT[1:0], ADR[7:0] in; DATA[31:0] out, all on CLK.
// Symbols: I (CONT=01) clears the IP and counts itself in init_count;
// R(Xa) (CONT=10) captures address Xa; N (CONT=00) waits; O(Xd) (CONT=11)
// puts result word j of the current operation on DATA in the same cycle.
// An R after an O starts a new operation. Result j is table(a0), table(a1),
// table(a0) ^ table(a1) for j = 0, 1, 2, where a0, a1 are the captured
// addresses and table(x) = (x + 1) * 32'h9E3779B9; with one address a1 = a0.
module proc_ip_model (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        EN,
  input  logic [1:0]  CONT,
  input  logic [7:0]  ADR,
  output logic [31:0] DATA
);
  logic [7:0]  a [2];
  logic [1:0]  n_addr;
  logic [3:0]  j;
  logic        in_out;
  int          init_count;
  int          r_count;
  int          o_count;

  function automatic logic [31:0] table_f(input logic [7:0] x);
    return (32'(x) + 32'd1) * 32'h9E3779B9;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a[0] <= '0; a[1] <= '0; n_addr <= '0; j <= '0; in_out <= 1'b0;
      init_count <= 0; r_count <= 0; o_count <= 0;
    end else if (EN) begin
      case (CONT)
        2'b01: begin n_addr <= '0; j <= '0; in_out <= 1'b0; init_count <= init_count + 1; end
        2'b10: begin
          r_count <= r_count + 1;
          if (in_out || n_addr == 2'd0) begin
            a[0] <= ADR; a[1] <= ADR; n_addr <= 2'd1; j <= '0; in_out <= 1'b0;
          end else begin
            a[1] <= ADR; n_addr <= 2'd2;
          end
        end
        2'b11: begin j <= j + 4'd1; in_out <= 1'b1; o_count <= o_count + 1; end
        default: ;
      endcase
    end
  end

  always_comb begin
    DATA = '0;
    if (EN && CONT == 2'b11) begin
      case (j)
        4'd0:    DATA = table_f(a[0]);
        4'd1:    DATA = table_f(a[1]);
        default: DATA = table_f(a[0]) ^ table_f(a[1]);
      endcase
    end
  end
endmodule
