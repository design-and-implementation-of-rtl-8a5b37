// Systolic multiplier with multiplexer-dependent adders and Razor error
// correction (top level).
//
// Data path: operand register -> systolic array (N rows of MDA processing
// elements plus a vector-merging row) -> Razor flip-flop bank -> product.
// Feedback: the Razor bank's error output drives the correction unit, which
// holds the operand register and the array for the clock period in which the
// Razor bank restores a late-arriving product from its shadow flip-flops.
//
// Clocking: the operand register and the array run on the rising edge of
// `clk`. The Razor bank's main flip-flops run on the falling edge of `clk`
// and its shadow flip-flops on the falling edge of `clk_del`, a copy of `clk`
// delayed by less than half a period. The array's output therefore has half a
// period to reach the main flip-flops, and the window up to the delayed edge
// is where a late arrival is caught.
//
// Interface and timing: present a_i, b_i with valid_i at a rising edge of clk
// at which ready_o is high (ready_o low means hold the operands). The product
// is valid on product_o/valid_o at the rising edge N+2 edges later (N+2 cycles
// of latency, one new product per cycle), plus one cycle for every Razor
// correction in between. Sample the outputs on the rising edge of clk:
// valid_o is low while error_o flags a product being corrected. Operands are
// unsigned; corr_count_o counts corrections.
//
// The block structure and connections (register, systolic array, Razor FF,
// error feedback through the correction unit into the array) follow the
// design; the clocking, handshake and hold mechanism are this
// implementation's choices.
module systolic_multiplier #(
  parameter int unsigned N     = sysmul_pkg::MUL_N,  // operand width
  parameter int unsigned CNT_W = 16                  // correction counter width
) (
  input  logic             clk,
  input  logic             clk_del,      // clk delayed for the Razor shadow flip-flops
  input  logic             rst_n,        // asynchronous, active low
  input  logic [N-1:0]     a_i,          // multiplicand
  input  logic [N-1:0]     b_i,          // multiplier
  input  logic             valid_i,
  output logic             ready_o,      // operands are taken at this edge
  output logic [2*N-1:0]   product_o,    // a*b
  output logic             valid_o,
  output logic             error_o,      // Razor error (product being corrected)
  output logic [CNT_W-1:0] corr_count_o  // corrections so far (saturating)
);
  logic           en;
  logic [N-1:0]   a_r, b_r;
  logic           v_r;
  logic [2*N-1:0] arr_product;
  logic           arr_valid;
  logic [2*N:0]   razor_d, razor_q;
  logic           razor_error;
  logic           razor_clk, razor_clk_del;

  operand_register #(.N(N)) u_reg (
    .clk    (clk),
    .rst_n  (rst_n),
    .en     (en),
    .a_i    (a_i),
    .b_i    (b_i),
    .valid_i(valid_i),
    .a_o    (a_r),
    .b_o    (b_r),
    .valid_o(v_r)
  );

  systolic_array #(.N(N)) u_array (
    .clk      (clk),
    .rst_n    (rst_n),
    .en       (en),
    .a_i      (a_r),
    .b_i      (b_r),
    .valid_i  (v_r),
    .product_o(arr_product),
    .valid_o  (arr_valid)
  );

  // The Razor stage samples on the falling edges of clk and clk_del.
  assign razor_clk     = ~clk;
  assign razor_clk_del = ~clk_del;
  assign razor_d       = {arr_valid, arr_product};

  razor_ff #(.W(2 * N + 1)) u_razor (
    .clk    (razor_clk),
    .clk_del(razor_clk_del),
    .rst_n  (rst_n),
    .d      (razor_d),
    .q      (razor_q),
    .error  (razor_error)
  );

  correction_unit #(.CNT_W(CNT_W)) u_corr (
    .clk         (clk),
    .rst_n       (rst_n),
    .error_i     (razor_error),
    .en_o        (en),
    .ready_o     (ready_o),
    .corr_count_o(corr_count_o)
  );

  assign product_o = razor_q[2*N-1:0];
  assign valid_o   = razor_q[2*N] & ~razor_error;
  assign error_o   = razor_error;
endmodule
