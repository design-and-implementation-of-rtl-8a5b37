// Shared constants of the systolic multiplier.
//
// MUL_N is the operand width of the multiplier (the product is 2*MUL_N bits).
// The value 32 is the operand size the design is evaluated at; every module
// that needs a width takes it from here as its parameter default.
package sysmul_pkg;
  localparam int unsigned MUL_N = 32;
endpackage
