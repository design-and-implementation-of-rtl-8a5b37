// End-to-end test of the systolic multiplier at its default width (N = 32).
//
// Clocking: period 10, clk rises at 5 mod 10 and falls at 0 mod 10; clk_del
// is clk delayed by 2, so the Razor main flip-flops sample at 0 mod 10 and
// the shadows at 2 mod 10. The test acts at 3 mod 10: it reads the outputs
// (stable until the next falling edge) and ready_o, and drives the operands
// for the rising edge at 5 mod 10.
//
// Operands: corner values (0, all ones, 1, the top bit) and random values,
// with random gaps in valid_i; operands are held while ready_o is low.
// Late arrivals: at 9 mod 10 the test sometimes forces the Razor bank's data
// input to a corrupted copy of a valid product and releases it at 1 mod 10,
// i.e. after the main edge and before the shadow edge, which is what a path
// that misses its clock edge looks like to the bank.
//
// Checks: every product leaving with valid_o equals a*b of the matching
// operands, in order, none lost or doubled; the latency is N+2 cycles plus one
// per pipeline hold in between; each injected late arrival raises error_o and
// holds the pipeline once; corr_count_o counts them. The mechanisms Razor
// error, restore from shadow and pipeline hold must each occur.
module systolic_multiplier_tb;
  localparam int unsigned N = sysmul_pkg::MUL_N;
  localparam int NUM_OPS = 2000;

  logic clk = 1'b0, clk_del = 1'b0, rst_n = 1'b1;
  logic [N-1:0] a_i = '0, b_i = '0;
  logic valid_i = 1'b0, ready_o, valid_o, error_o;
  logic [2*N-1:0] product_o;
  logic [15:0] corr_count_o;

  systolic_multiplier dut (.*);

  always #5 clk = ~clk;
  always @(clk) clk_del <= #2 clk;

  int checks = 0, failures = 0;
  int sent = 0, got = 0, cycle = 0, hold_cycles = 0;
  int injected = 0, error_cycles = 0, restored = 0;
  longint unsigned exp_q[$];
  int acc_cycle_q[$], acc_hold_q[$];
  logic restore_pending = 1'b0;

  initial begin : watchdog
    #(10 * (NUM_OPS * 4 + 1000));
    failures++;
    $display("watchdog expired: sent=%0d got=%0d", sent, got);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N-1:0] pick(int n);
    case (n)
      0: return '0;
      1: return '1;
      2: return N'(1);
      3: return {1'b1, {(N-1){1'b0}}};
      default: return N'({$urandom, $urandom});
    endcase
  endfunction

  initial begin
    logic [2*N:0] snap, mask;
    #1 rst_n = 1'b0;
    #2 rst_n = 1'b1;                 // time 3: first action point
    while (got < NUM_OPS && cycle < NUM_OPS * 4) begin
      // ---- at 3 mod 10 -------------------------------------------------
      if (valid_o) begin
        longint unsigned e;
        int lat;
        got++;
        checks += 2;
        if (exp_q.size() == 0) begin
          failures += 2;
          $display("FAIL output without input");
        end else begin
          e = exp_q.pop_front();
          lat = cycle - acc_cycle_q.pop_front();
          if (product_o != e) begin
            failures++;
            $display("FAIL cycle %0d product %h exp %h", cycle, product_o, e);
          end
          if (lat != N + 2 + (hold_cycles - acc_hold_q.pop_front())) begin
            failures++;
            $display("FAIL cycle %0d latency %0d holds %0d", cycle, lat, hold_cycles);
          end
        end
      end
      if (error_o) begin
        error_cycles++;
        restore_pending = 1'b1;
      end else if (restore_pending) begin
        restore_pending = 1'b0;
        restored++;
      end
      // the rising edge at 5 mod 10 takes what is driven now if ready_o
      if (!ready_o) begin
        hold_cycles++;
      end else begin
        valid_i = (sent < NUM_OPS) && ($urandom_range(4) != 0);
        a_i = pick($urandom_range(11));
        b_i = pick($urandom_range(11));
        if (valid_i) begin
          exp_q.push_back(longint'(a_i) * longint'(b_i));
          acc_cycle_q.push_back(cycle);
          acc_hold_q.push_back(hold_cycles);
          sent++;
        end
      end
      #6;
      // ---- at 9 mod 10: maybe inject a late arrival --------------------
      snap = dut.razor_d;
      if (snap[2*N] && !dut.razor_error && $urandom_range(15) == 0) begin
        mask = {1'b0, N'({$urandom, $urandom}), N'({$urandom, $urandom})};
        if (mask == '0) mask = 1;
        force dut.razor_d = snap ^ mask;
        injected++;
        #2 release dut.razor_d;
        #2;
      end else begin
        #4;
      end
      cycle++;
    end
    checks += 4;
    if (got != sent || exp_q.size() != 0) begin
      failures++;
      $display("FAIL sent=%0d got=%0d", sent, got);
    end
    if (int'(corr_count_o) != injected || error_cycles != injected) begin
      failures++;
      $display("FAIL injected=%0d errors=%0d count=%0d", injected, error_cycles, corr_count_o);
    end
    if (injected == 0 || restored == 0) begin
      failures++;
      $display("FAIL no Razor error/restore exercised");
    end
    if (hold_cycles == 0) begin
      failures++;
      $display("FAIL no pipeline hold exercised");
    end
    $display("ops=%0d late_arrivals=%0d errors=%0d restores=%0d holds=%0d cycles=%0d",
             got, injected, error_cycles, restored, hold_cycles, cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
