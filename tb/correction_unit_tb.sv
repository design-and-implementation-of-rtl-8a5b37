// Test of the correction unit: en_o/ready_o must be low exactly while
// error_i is high, the counter must count error pulses (not cycles) and
// saturate (CNT_W = 3 here).
module correction_unit_tb;
  localparam int unsigned CNT_W = 3;
  logic clk = 1'b0, rst_n = 1'b1, error_i = 1'b0, en_o, ready_o;
  logic [CNT_W-1:0] corr_count_o;
  int checks = 0, failures = 0, pulses = 0;
  logic prev_err = 1'b0;

  correction_unit #(.CNT_W(CNT_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 1'b0;
    #11 rst_n = 1'b1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      error_i = ($urandom_range(3) == 0);
      #1;
      checks++;
      if (en_o != !error_i || ready_o != !error_i) begin
        failures++;
        $display("FAIL en/ready with error=%0b", error_i);
      end
      @(posedge clk);
      if (error_i && !prev_err) pulses++;
      prev_err = error_i;
      #1;
      checks++;
      if (int'(corr_count_o) != ((pulses > 7) ? 7 : pulses)) begin
        failures++;
        $display("FAIL count %0d exp %0d", corr_count_o, pulses);
      end
    end
    checks++;
    if (pulses <= 7) failures++;   // saturation must have been reached
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
