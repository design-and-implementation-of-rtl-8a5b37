// Random test of one processing element: registered sum/carry of
// s_in + (b_in ? a_in : 0) + c_in, pass-through of a_in, and hold while en=0.
module systolic_pe_tb;
  logic clk = 1'b0, rst_n = 1'b1, en = 1'b0;
  logic a_in = 1'b0, b_in = 1'b0, s_in = 1'b0, c_in = 1'b0;
  logic a_out, s_out, c_out;
  logic [2:0] exp_q;   // {a, c, s}
  int checks = 0, failures = 0, holds = 0;

  systolic_pe dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    exp_q = '0;
    #1 rst_n = 1'b0;
    #11 rst_n = 1'b1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      {en, a_in, b_in, s_in, c_in} = 5'($urandom);
      if ($urandom_range(3) != 0) en = 1'b1;
      @(posedge clk);
      if (en) begin
        int t;
        t = int'(s_in) + (b_in ? int'(a_in) : 0) + int'(c_in);
        exp_q = {a_in, t[1], t[0]};
      end else begin
        holds++;
      end
      #1;
      checks++;
      if ({a_out, c_out, s_out} != exp_q) begin
        failures++;
        $display("FAIL n=%0d got a,c,s=%b%b%b exp %b", n, a_out, c_out, s_out, exp_q);
      end
    end
    if (holds == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
