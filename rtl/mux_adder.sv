// Multiplexer-dependent adder (MDA), the arithmetic cell of the array.
//
// The cell is a 2-to-1 multiplexer feeding a full adder. The multiplexer,
// selected by `sel` (a multiplier bit), offers the full adder either the
// multiplicand bit `y` or zero; the full adder adds that to the incoming
// partial-sum bit `x` and the carry `cin`. With sel=1 the cell is a plain full
// adder, so the same cell also serves in the vector-merging row.
//
// Building the cell from one 2:1 mux and one full adder is the design's own
// definition of the MDA; which full-adder input the mux drives, and that the
// other mux input is the constant 0, is this implementation's choice.
//
// Purely combinational: sum/cout settle one cell delay after the inputs.
module mux_adder (
  input  logic x,     // incoming partial-sum bit
  input  logic y,     // multiplicand bit
  input  logic sel,   // multiplexer select: 1 = add y, 0 = add zero
  input  logic cin,   // carry in
  output logic sum,   // sum bit
  output logic cout   // carry out
);
  logic y_mux;

  // 2-to-1 multiplexer
  always_comb y_mux = sel ? y : 1'b0;

  // full adder
  always_comb begin
    sum  = x ^ y_mux ^ cin;
    cout = (x & y_mux) | (x & cin) | (y_mux & cin);
  end
endmodule
