// Razor flip-flop bank: timing-error detection and local correction.
//
// Each of the W bits has a main flip-flop clocked by `clk` and a shadow
// flip-flop clocked by `clk_del`, a copy of `clk` delayed by less than the
// time the data path upstream needs at minimum (the Razor hold constraint).
// A signal that arrives late, after the main edge but before the delayed
// edge, leaves the main flip-flop with a stale value and the shadow with the
// correct one. At the delayed edge the bank compares the data input with the
// main flip-flop and registers `error` for one clock period. At the next main
// edge, while `error` is high, the main flip-flops load the shadow value
// instead of `d`, which restores the correct result; the following delayed
// edge clears `error` (no comparison is made in a restore cycle). The value
// on `d` during the restore cycle is not captured, so the stage feeding the
// bank must hold `d` for that cycle: `error` is its stall request.
//
// Timing: q follows d one `clk` edge later; after a late arrival q is wrong
// for one period (with error high during it, from the delayed edge on) and is
// corrected at the next `clk` edge. A consumer that samples q on the `clk`
// edge after the one that loaded it sees error high exactly when q is wrong.
//
// Main/shadow flip-flops and the error flag follow the Razor scheme the design
// uses; comparing at the delayed edge, restoring from the shadow and the reset
// are this implementation's choices. Two clocks are used on purpose.
module razor_ff #(
  parameter int unsigned W = 2 * sysmul_pkg::MUL_N + 1
) (
  input  logic         clk,      // main clock
  input  logic         clk_del,  // delayed clock for the shadow flip-flops
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q,        // main flip-flop outputs
  output logic         error     // late arrival detected, q being restored
);
  logic [W-1:0] shadow;

  // main flip-flops
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     q <= '0;
    else if (error) q <= shadow;
    else            q <= d;
  end

  // shadow flip-flops and comparator
  always_ff @(posedge clk_del or negedge rst_n) begin
    if (!rst_n) begin
      shadow <= '0;
      error  <= 1'b0;
    end else begin
      shadow <= d;
      // In a restore cycle q holds the shadow, not d: no comparison then.
      error  <= !error && (d != q);
    end
  end
endmodule
