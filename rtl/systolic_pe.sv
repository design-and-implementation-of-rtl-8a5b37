// Processing element of the systolic array.
//
// Each PE holds one MDA cell (mux_adder) and its own local registers. In a
// clock cycle with `en` high it adds (sel ? a_in : 0) to the partial-sum bit
// s_in and the carry c_in, and registers the resulting sum and carry; it also
// registers the multiplicand bit a_in and passes it to the PE of the same
// column in the next row. With `en` low all three registers hold (array stall).
//
// Interface: a_in/b_in/s_in/c_in arrive from the previous row (b_in is the
// multiplier bit of this row); a_out/s_out/c_out go to the next row one clock
// later. Asynchronous active-low reset clears the registers.
//
// That each PE has local registers and an adder cell follows the design; the
// exact register set (sum, carry, pass-through multiplicand bit) and the
// reset/enable behaviour are this implementation's choices.
module systolic_pe (
  input  logic clk,
  input  logic rst_n,
  input  logic en,     // advance; low holds the registers
  input  logic a_in,   // multiplicand bit of this column
  input  logic b_in,   // multiplier bit of this row (mux select)
  input  logic s_in,   // partial-sum bit from the previous row
  input  logic c_in,   // carry bit from the previous row
  output logic a_out,  // registered multiplicand bit to the next row
  output logic s_out,  // registered sum bit
  output logic c_out   // registered carry bit
);
  logic sum, cout;

  mux_adder u_mda (
    .x   (s_in),
    .y   (a_in),
    .sel (b_in),
    .cin (c_in),
    .sum (sum),
    .cout(cout)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_out <= 1'b0;
      s_out <= 1'b0;
      c_out <= 1'b0;
    end else if (en) begin
      a_out <= a_in;
      s_out <= sum;
      c_out <= cout;
    end
  end
endmodule
