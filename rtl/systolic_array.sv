// Systolic array of the multiplier: N x N processing elements in carry-save
// form plus a vector-merging row.
//
// Row j (j = 0..N-1) holds N PEs. PE (j,i) adds the partial product a[i]&b[j]
// (formed by the mux of its MDA cell) to the sum bit it receives from PE
// (j-1,i+1) and the carry from PE (j-1,i), all of weight 2^(i+j). Rows pass
// sums and carries to the next row without rippling, so each row is one
// pipeline stage whose critical path is a single MDA cell. The least
// significant sum bit leaving row j is product bit j; it is collected in a
// per-stage register so that all low bits of one operand pair stay together.
// After the last row the remaining sum and carry vectors (weights N..2N-1) are
// added by one registered row of MDA cells with the mux fixed to "add" (a
// ripple-carry vector-merging adder), giving the upper product half.
//
// The multiplier bits b, the collected low product bits and a valid flag
// travel with the data through per-row registers; the multiplicand bits
// travel inside the PEs. Every register advances only when `en` is high, so
// the correction unit can hold the whole array.
//
// Timing: an operand pair presented on a_i/b_i with valid_i in an enabled
// cycle appears on product_o with valid_o N enabled cycles later; a new
// pair may enter every enabled cycle. Operands are unsigned.
//
// The grid of PEs with local registers and data flowing row to row follows
// the design; carry-save rows, row-level pipelining with a row-wide multiplier
// bit, the registered ripple merging row and unsigned operands are this
// implementation's choices.
module systolic_array #(
  parameter int unsigned N = sysmul_pkg::MUL_N   // operand width, N >= 2
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           en,        // advance the pipeline; low holds it
  input  logic [N-1:0]   a_i,       // multiplicand
  input  logic [N-1:0]   b_i,       // multiplier
  input  logic           valid_i,   // a_i/b_i hold an operand pair
  output logic [2*N-1:0] product_o, // a*b, N enabled cycles after entry
  output logic           valid_o
);
  // Stage k values: k = 0 is the array input, k = j+1 is after row j.
  logic [N-1:0] a_s [N+1];   // multiplicand bits (registered inside the PEs)
  logic [N-1:0] s_s [N+1];   // sum vector, bit i of stage j+1 has weight 2^(i+j)
  logic [N-1:0] c_s [N+1];   // carry vector, bit i of stage j+1 has weight 2^(i+j+1)
  logic [N-1:0] b_s [N+1];   // multiplier bits
  logic [N-1:0] lo_s [N+1];  // product bits already complete (bits 0..k-2)
  logic         v_s [N+1];   // valid flag

  assign a_s[0]  = a_i;
  assign b_s[0]  = b_i;
  assign s_s[0]  = '0;
  assign c_s[0]  = '0;
  assign lo_s[0] = '0;
  assign v_s[0]  = valid_i;

  for (genvar j = 0; j < N; j++) begin : g_row
    for (genvar i = 0; i < N; i++) begin : g_pe
      logic s_in;
      if (i == N - 1) begin : g_top
        assign s_in = 1'b0;
      end else begin : g_mid
        assign s_in = s_s[j][i+1];
      end
      systolic_pe u_pe (
        .clk  (clk),
        .rst_n(rst_n),
        .en   (en),
        .a_in (a_s[j][i]),
        .b_in (b_s[j][j]),
        .s_in (s_in),
        .c_in (c_s[j][i]),
        .a_out(a_s[j+1][i]),
        .s_out(s_s[j+1][i]),
        .c_out(c_s[j+1][i])
      );
    end

    // Side registers of row j: multiplier bits, finished low product bits,
    // valid flag. The bit leaving row j-1 at position 0 is product bit j-1.
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        b_s[j+1]  <= '0;
        lo_s[j+1] <= '0;
        v_s[j+1]  <= 1'b0;
      end else if (en) begin
        b_s[j+1]  <= b_s[j];
        lo_s[j+1] <= lo_s[j];
        if (j > 0) lo_s[j+1][j-1] <= s_s[j][0];
        v_s[j+1]  <= v_s[j];
      end
    end
  end

  // Vector-merging row: upper product bit N+k = s[k+1] + c[k] + carry.
  logic [N:0]   mcarry;
  logic [N-1:0] hi;
  assign mcarry[0] = 1'b0;

  for (genvar k = 0; k < N; k++) begin : g_merge
    logic x_in;
    if (k == N - 1) begin : g_top
      assign x_in = 1'b0;
    end else begin : g_mid
      assign x_in = s_s[N][k+1];
    end
    mux_adder u_mda (
      .x   (x_in),
      .y   (c_s[N][k]),
      .sel (1'b1),
      .cin (mcarry[k]),
      .sum (hi[k]),
      .cout(mcarry[k+1])
    );
  end
  // mcarry[N] is always 0: the product of two N-bit numbers fits in 2N bits.
  assert property (@(posedge clk) disable iff (!rst_n) (en && v_s[N]) |-> !mcarry[N])
    else $error("systolic_array: carry out of the merging row");

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      product_o <= '0;
      valid_o   <= 1'b0;
    end else if (en) begin
      product_o <= {hi, s_s[N][0], lo_s[N][N-2:0]};
      valid_o   <= v_s[N];
    end
  end

  initial begin
    if (N < 2) $fatal(1, "systolic_array: N must be at least 2");
  end
endmodule
