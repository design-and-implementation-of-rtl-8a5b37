// Exhaustive test of the multiplexer-dependent adder cell: all 16 input
// combinations, compared with the integer sum x + (sel ? y : 0) + cin.
module mux_adder_tb;
  logic x, y, sel, cin, sum, cout;
  int checks = 0, failures = 0;

  mux_adder dut (.x(x), .y(y), .sel(sel), .cin(cin), .sum(sum), .cout(cout));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      int exp_total;
      {x, y, sel, cin} = 4'(v);
      #1;
      exp_total = int'(x) + (sel ? int'(y) : 0) + int'(cin);
      checks++;
      if ({cout, sum} != 2'(exp_total)) begin
        failures++;
        $display("FAIL x=%0b y=%0b sel=%0b cin=%0b -> cout,sum=%0b%0b exp %0d",
                 x, y, sel, cin, cout, sum, exp_total);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
