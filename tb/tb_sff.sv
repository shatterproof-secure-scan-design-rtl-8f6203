// tb_sff: self-checking testbench of the traditional scan flip-flop.
// Drives random mode, functional and scan data for 400 clocks (plus resets)
// and compares DO and SO after every rising edge with a reference register
// kept in the testbench: SE=1 loads SI, SE=0 loads DI, reset clears.
module tb_sff;
  import sss_pkg::*;

  logic ck = 1'b0, rst_n = 1'b0, se = 1'b0, di = 1'b0, si = 1'b0;
  logic dout, so;
  logic ref_q;
  int   checks = 0, failures = 0;
  int   n_shift = 0, n_normal = 0;

  sff dut (.ck(ck), .rst_n(rst_n), .se(se), .di(di), .si(si), .dout(dout), .so(so));

  always #5 ck = ~ck;

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b at %0t", what, got, exp, $time);
    end
  endtask

  initial begin : watchdog
    repeat (2000) @(posedge ck);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_q = 1'b0;
    repeat (2) @(posedge ck);
    #1 check(dout, 1'b0, "reset dout");
    @(negedge ck) rst_n = 1'b1;
    for (int i = 0; i < 400; i++) begin
      @(negedge ck);
      se = ($urandom_range(0, 1) != 0) ? SHIFT_MODE : NORMAL_MODE;
      di = 1'($urandom);
      si = 1'($urandom);
      @(posedge ck);
      ref_q = se ? si : di;
      if (se) n_shift++; else n_normal++;
      #1;
      check(dout, ref_q, "dout");
      check(so,   ref_q, "so");
    end
    if (n_shift == 0 || n_normal == 0) begin
      failures++;
      $display("FAIL a mode never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
