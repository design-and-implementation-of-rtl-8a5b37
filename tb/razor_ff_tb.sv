// Test of the Razor flip-flop bank. The clock period is 10, the shadow clock
// is the main clock delayed by 2. A value that settles on time is applied 3
// after a main edge (after the delayed edge) and captured at the next main
// edge. A late value is applied 1 after the main edge it was meant for:
// the main flip-flops keep the stale value, the shadow catches the new one,
// error must rise and q must be correct one edge later. d is disturbed just
// before that restore edge, to show the value comes from the shadow. Every
// captured value is checked, and errors must occur exactly for the late
// values.
module razor_ff_tb;
  localparam int unsigned W = 16;
  logic clk = 1'b0, clk_del = 1'b0, rst_n = 1'b1;
  logic [W-1:0] d = '0, q;
  logic error;
  int checks = 0, failures = 0, late = 0, errors_seen = 0;

  razor_ff #(.W(W)) dut (.*);

  always #5 clk = ~clk;
  always @(clk) clk_del <= #2 clk;

  initial begin : watchdog
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] v, prev;
    prev = '0;
    #1 rst_n = 1'b0;
    #3 rst_n = 1'b1;       // time 4
    @(posedge clk);         // time 5
    for (int n = 0; n < 400; n++) begin
      v = W'($urandom);
      if (v == prev) v = ~v;
      if ($urandom_range(4) == 0) begin
        // late arrival: value for this edge shows up 1 after it
        @(posedge clk); #1 d = v;   // main captured prev
        #2;                          // after delayed edge
        checks += 2;
        if (q != prev)  begin failures++; $display("FAIL stale q %h exp %h", q, prev); end
        if (!error)     begin failures++; $display("FAIL no error on late arrival"); end
        late++;
        if (error) errors_seen++;
        d = ~v;                      // bank must restore from its shadow,
        @(posedge clk); #1;          // not from d, at this edge
        d = v;
        checks++;
        if (q != v) begin failures++; $display("FAIL restore q %h exp %h", q, v); end
        #2;
        checks++;
        if (error) begin failures++; $display("FAIL error not cleared"); end
      end else begin
        // on time: value applied after the delayed edge, captured next edge
        #3 d = v;
        @(posedge clk); #3;
        checks += 2;
        if (q != v)  begin failures++; $display("FAIL q %h exp %h", q, v); end
        if (error)   begin failures++; $display("FAIL false error"); end
      end
      prev = v;
    end
    checks++;
    if (late == 0 || errors_seen != late) failures++;
    $display("late=%0d errors=%0d", late, errors_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
