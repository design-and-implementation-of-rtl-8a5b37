// Test of the operand register: loads a, b and valid when en=1, holds them
// when en=0, and clears on reset.
module operand_register_tb;
  localparam int unsigned N = 32;
  logic clk = 1'b0, rst_n = 1'b1, en = 1'b0, valid_i = 1'b0, valid_o;
  logic [N-1:0] a_i = '0, b_i = '0, a_o, b_o;
  logic [2*N:0] exp_q;
  int checks = 0, failures = 0;

  operand_register #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 1'b0;
    #1;
    checks++;
    if ({valid_o, a_o, b_o} != '0) failures++;   // reset clears
    exp_q = '0;
    #10 rst_n = 1'b1;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      a_i = $urandom; b_i = $urandom; valid_i = 1'($urandom); en = ($urandom_range(2) != 0);
      @(posedge clk);
      if (en) exp_q = {valid_i, a_i, b_i};
      #1;
      checks++;
      if ({valid_o, a_o, b_o} != exp_q) begin
        failures++;
        $display("FAIL n=%0d en=%0b", n, en);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
