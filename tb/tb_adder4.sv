// tb_adder4: exhaustive self-checking testbench of the 4-bit ripple-carry
// adder: all 512 combinations of a, b and cin are applied and {cout, sum}
// compared with the integer sum a + b + cin.
module tb_adder4;
  logic [3:0] a, b, sum;
  logic       cin, cout;
  int         checks = 0, failures = 0;
  logic       done = 1'b0;

  adder4 dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin : watchdog
    #100000;
    if (!done) begin
      failures++;
      $display("FAIL watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    for (int i = 0; i < 512; i++) begin
      {a, b, cin} = 9'(i);
      #1;
      checks++;
      if ({cout, sum} !== 5'(int'(a) + int'(b) + int'(cin))) begin
        failures++;
        $display("FAIL %0d + %0d + %0d gave %0d", a, b, cin, {cout, sum});
      end
    end
    done = 1'b1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
