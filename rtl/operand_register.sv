// Operand register at the input of the multiplier.
//
// Captures the multiplicand a, the multiplier b and a valid flag on the rising
// clock edge and presents them to the systolic array, so that the array
// starts from registered operands. When `en` is low (the correction unit is
// holding the pipeline) the register keeps its contents and the source must
// keep its operands too: `en` is the ready signal of the input handshake.
//
// The register between the inputs a, b and the array follows the design; the
// valid flag, the hold enable and the asynchronous active-low reset are this
// implementation's choices. One cycle of latency.
module operand_register #(
  parameter int unsigned N = sysmul_pkg::MUL_N
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,       // load; low holds
  input  logic [N-1:0] a_i,
  input  logic [N-1:0] b_i,
  input  logic         valid_i,
  output logic [N-1:0] a_o,
  output logic [N-1:0] b_o,
  output logic         valid_o
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_o     <= '0;
      b_o     <= '0;
      valid_o <= 1'b0;
    end else if (en) begin
      a_o     <= a_i;
      b_o     <= b_i;
      valid_o <= valid_i;
    end
  end
endmodule
