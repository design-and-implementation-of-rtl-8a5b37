// Test of the systolic array at full width: corner operands and random
// operands enter with random gaps and random pipeline holds (en=0). Every
// output must equal the 64-bit product of its operands, appear in order, and
// leave exactly N enabled cycles after it entered.
module systolic_array_tb;
  localparam int unsigned N = 32;
  logic clk = 1'b0, rst_n = 1'b1, en = 1'b0, valid_i = 1'b0, valid_o;
  logic [N-1:0] a_i = '0, b_i = '0;
  logic [2*N-1:0] product_o;
  int checks = 0, failures = 0, holds = 0, sent = 0, got = 0;
  longint unsigned exp_q[$];
  int entry_q[$];
  int en_cycles = 0;

  systolic_array #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N-1:0] pick(int n);
    case (n)
      0: return '0;
      1: return '1;
      2: return 32'd1;
      3: return 32'h8000_0000;
      default: return $urandom;
    endcase
  endfunction

  initial begin
    #1 rst_n = 1'b0;
    #11 rst_n = 1'b1;
    while (got < 600) begin
      @(negedge clk);
      en = ($urandom_range(4) != 0);
      valid_i = (sent < 600) && ($urandom_range(3) != 0);
      a_i = pick($urandom_range(9));
      b_i = pick($urandom_range(9));
      @(posedge clk);
      if (en) begin
        en_cycles++;
        if (valid_i) begin
          exp_q.push_back(longint'(a_i) * longint'(b_i));
          entry_q.push_back(en_cycles);
          sent++;
        end
      end else begin
        holds++;
      end
      #1;
      // output registered at this edge (only an enabled edge can change it)
      if (en && valid_o) begin
        longint unsigned e;
        int t0;
        got++;
        checks += 2;
        if (exp_q.size() == 0) begin
          failures += 2;
          $display("FAIL unexpected output");
        end else begin
          e = exp_q.pop_front();
          t0 = entry_q.pop_front();
          if (product_o != e) begin
            failures++;
            $display("FAIL product %h exp %h", product_o, e);
          end
          if (en_cycles - t0 != N) begin
            failures++;
            $display("FAIL latency %0d exp %0d", en_cycles - t0, N);
          end
        end
      end
    end
    checks++;
    if (holds == 0) failures++;
    $display("holds=%0d outputs=%0d", holds, got);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
