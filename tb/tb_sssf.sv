// tb_sssf: self-checking testbench of the shatterproof secure scan flip-flop.
//
// Reference model, written independently of the RTL: two state bits qa, qb;
// normal mode loads {qa, qb} = di, shift mode loads qa = si, qb = old qa.
// The encoded scan output must be the inverted parity of qb, qa and si, and
// DO must equal the state. Besides random traffic, every one of the eight
// (qa, qb, si) combinations is set up through normal mode and its scan output
// checked, and two shifts of a stored pair show that the stored bits move
// unchanged while the output is encoded.
module tb_sssf;
  import sss_pkg::*;

  logic       ck = 1'b0, rst_n = 1'b0, se = 1'b0, si = 1'b0;
  logic [1:0] di = 2'b00;
  logic [1:0] dout;
  logic       so;
  logic       qa, qb;
  int         checks = 0, failures = 0;

  sssf dut (.ck(ck), .rst_n(rst_n), .se(se), .di(di), .si(si), .dout(dout), .so(so));

  always #5 ck = ~ck;

  task automatic check(input logic [1:0] got, input logic [1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b at %0t", what, got, exp, $time);
    end
  endtask

  function automatic logic enc(input logic b, input logic a, input logic s);
    return ~(b ^ a ^ s);
  endfunction

  initial begin : watchdog
    repeat (3000) @(posedge ck);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    qa = 1'b0; qb = 1'b0;
    repeat (2) @(posedge ck);
    #1 check(dout, 2'b00, "reset state");
    @(negedge ck) rst_n = 1'b1;

    // All eight (qa, qb, si) combinations of the scan-out encoding.
    for (int v = 0; v < 8; v++) begin
      @(negedge ck);
      se = NORMAL_MODE;
      di = v[2:1];
      @(posedge ck);
      #1;
      check(dout, v[2:1], "normal capture");
      @(negedge ck);
      se = SHIFT_MODE;
      si = v[0];
      #1;
      check({1'b0, so}, {1'b0, enc(v[1], v[2], v[0])}, "so truth table");
    end

    // Stored pair moves unchanged through the cell during shifting.
    @(negedge ck); se = NORMAL_MODE; di = 2'b10;
    @(negedge ck); se = SHIFT_MODE;  si = 1'b1;
    @(posedge ck); #1 check(dout, 2'b11, "shift 1 state");
    @(negedge ck); si = 1'b0;
    @(posedge ck); #1 check(dout, 2'b01, "shift 2 state");
    check({1'b0, so}, {1'b0, enc(1'b1, 1'b0, 1'b0)}, "shift 2 so");

    // Random traffic against the reference model.
    qa = dout[1]; qb = dout[0];
    for (int i = 0; i < 500; i++) begin
      @(negedge ck);
      se = ($urandom_range(0, 1) != 0) ? SHIFT_MODE : NORMAL_MODE;
      di = 2'($urandom);
      si = 1'($urandom);
      #1;
      check({1'b0, so}, {1'b0, enc(qb, qa, si)}, "random so");
      @(posedge ck);
      if (se) begin qb = qa; qa = si; end
      else    begin qa = di[1]; qb = di[0]; end
      #1;
      check(dout, {qa, qb}, "random state");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
