// Correction unit: turns the Razor error into a pipeline hold.
//
// When the Razor bank at the array output reports a late-arriving product
// (`error_i`), the bank restores the value from its shadow flip-flops in the
// next clock period and cannot accept a new value in that period. This unit
// closes the loop back into the systolic array: it drops `en_o` for the
// operand register and the array for every clock edge at which the error is
// high, so no product is lost or duplicated, and it exposes `ready_o` (equal
// to `en_o`) to the operand source. It also counts the corrections
// (saturating counter `corr_count_o`, one per error pulse) so that a
// controller can observe how often the supply/clock margin was exceeded.
//
// Timing: en_o/ready_o are combinational from error_i; the counter updates
// on the rising clock edge at which it sees the first cycle of an error pulse.
//
// That an error signal from the Razor flip-flops feeds a correction unit which
// acts on the systolic array follows the design; holding the pipeline and
// counting corrections is this implementation's reading of that feedback.
module correction_unit #(
  parameter int unsigned CNT_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             error_i,       // Razor error, in the clk domain
  output logic             en_o,          // pipeline enable (low = hold)
  output logic             ready_o,       // operand source may present new operands
  output logic [CNT_W-1:0] corr_count_o   // number of corrected errors, saturating
);
  logic error_q;

  always_comb begin
    en_o    = !error_i;
    ready_o = !error_i;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      error_q      <= 1'b0;
      corr_count_o <= '0;
    end else begin
      error_q <= error_i;
      if (error_i && !error_q && corr_count_o != '1)
        corr_count_o <= corr_count_o + 1'b1;
    end
  end
endmodule
