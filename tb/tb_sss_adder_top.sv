// tb_sss_adder_top: end-to-end testbench of the 4-bit adder with its secure
// scan chain, at the default parameters (14 cells, SSSF on the last pair).
//
// It walks the scan test procedure repeatedly:
//   c = 1: shift a chosen state into all 14 cells (and check that the sum
//          and carry pins then show the scanned-in result bits);
//   c = 0: one functional clock applies the operand pins and captures the
//          adder's response to the scanned-in operands;
//   c = 1: shift the captured state out while the next state shifts in.
// Every scan-out bit is compared with a bit-level model of the chain, and the
// unloaded stream is also decoded the way an authorised tester that knows the
// SSSF placement would (x_t = not out_t xor x_t+1 xor x_t+2, worked backwards
// from the known scan-in bits) and compared with the response computed here
// from the operands. A free-running normal-mode phase then checks that the
// registered sum follows a + b + cin two clocks later.
// Counted mechanisms: shift clocks, capture clocks, scan-out bits changed by
// the SSSF, carry-out captures and decoded unloads; each must occur.
module tb_sss_adder_top;
  import sss_pkg::*;

  localparam int N = 14;
  localparam logic [N-1:0] MASK = 14'b00_0000_0000_0001;

  logic       clk, rst_n, c, scan_in, cin, cout, scan_out;
  logic [3:0] a, b, sum;
  int         checks = 0, failures = 0;
  int         n_shift = 0, n_capture = 0, n_encoded = 0, n_cout = 0, n_decoded = 0;

  sss_adder_top dut (
    .clk(clk), .rst_n(rst_n), .c(c), .scan_in(scan_in), .a(a), .b(b), .cin(cin),
    .sum(sum), .cout(cout), .scan_out(scan_out));

  initial clk = 1'b0;
  always #5 clk = ~clk;

  task automatic check(input logic [N-1:0] got, input logic [N-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b at %0t", what, got, exp, $time);
    end
  endtask

  // Scan value leaving each cell for chain state m and scan input s.
  function automatic logic [N:0] links(input logic [N-1:0] m, input logic s);
    logic [N:0] l;
    l[N] = s;
    for (int k = N - 1; k >= 0; k--)
      l[k] = MASK[k] ? ~(m[k] ^ m[k+1] ^ l[k+2]) : m[k];
    return l;
  endfunction

  // Response of the adder registers to a state: operands unchanged from the
  // pins, result from the operands held in the state.
  function automatic logic [N-1:0] capture(input logic [N-1:0] m, input logic [3:0] pa,
                                           input logic [3:0] pb, input logic pc);
    logic [4:0] r;
    r = 5'(int'(m[13:10]) + int'(m[9:6]) + int'(m[5]));
    return {pa, pb, pc, r};
  endfunction

  logic [N-1:0] model;

  // One shift clock with model update and scan-out check; returns scan_out.
  task automatic shift_bit(input logic s, output logic o);
    logic [N:0] l;
    @(negedge clk);
    c = SHIFT_MODE;
    scan_in = s;
    #1;
    l = links(model, s);
    o = scan_out;
    check({13'b0, o}, {13'b0, l[0]}, "scan_out vs model");
    if (o != model[0]) n_encoded++;
    @(posedge clk);
    model = l[N:1];
    n_shift++;
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] pat, next_pat, exp_cap, dec;
    logic [N+1:0] x;
    logic [N-1:0] outs;
    logic [3:0]   pa, pb;
    logic         pc, o;
    logic [4:0]   pipe_exp [2];

    rst_n = 1'b0; c = NORMAL_MODE; scan_in = 1'b0; a = '0; b = '0; cin = 1'b0;
    model = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // Step: check the chain as a shift register with a walking pattern.
    for (int k = 0; k < 2 * N; k++) begin
      shift_bit(k % 3 == 0, o);
      #1 check({9'b0, cout, sum}, {9'b0, model[4:0]}, "flush state");
    end

    // Load the first pattern.
    pat = N'($urandom);
    for (int k = 0; k < N; k++) shift_bit(pat[k], o);
    #1 check({9'b0, cout, sum}, {9'b0, pat[4:0]}, "scanned-in result pins");

    for (int it = 0; it < 60; it++) begin
      // Functional clock: apply the test input pattern.
      @(negedge clk);
      c = NORMAL_MODE;
      pa = 4'($urandom); pb = 4'($urandom); pc = 1'($urandom);
      a = pa; b = pb; cin = pc;
      exp_cap = capture(pat, pa, pb, pc);
      @(posedge clk);
      model = exp_cap;
      n_capture++;
      if (exp_cap[4]) n_cout++;
      #1 check({9'b0, cout, sum}, {9'b0, exp_cap[4:0]}, "captured sum pins");

      // Unload the response while loading the next pattern.
      next_pat = N'($urandom);
      for (int k = 0; k < N; k++) begin
        shift_bit(next_pat[k], o);
        outs[k] = o;
      end
      // Decode: stream x_t = cell t's captured bit for t < N, then the bits
      // shifted in behind it; the SSSF on cells 1/0 outputs not(x_t^x_t+1^x_t+2).
      x[N]   = next_pat[0];
      x[N+1] = next_pat[1];
      for (int t = N - 1; t >= 0; t--)
        x[t] = ~outs[t] ^ x[t+1] ^ x[t+2];
      dec = x[N-1:0];
      check(dec, exp_cap, "decoded unload");
      if (dec == exp_cap) n_decoded++;
      pat = next_pat;
      #1 check({9'b0, cout, sum}, {9'b0, pat[4:0]}, "next pattern loaded");
    end

    // Normal mode: the registered sum follows the operands two clocks later.
    pipe_exp[0] = 5'(int'(pat[13:10]) + int'(pat[9:6]) + int'(pat[5]));
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      c = NORMAL_MODE;
      a = 4'($urandom); b = 4'($urandom); cin = 1'($urandom);
      pipe_exp[1] = 5'(int'(a) + int'(b) + int'(cin));
      @(posedge clk);
      #1 check({9'b0, cout, sum}, {9'b0, pipe_exp[0]}, "normal-mode sum");
      if (pipe_exp[0][4]) n_cout++;
      pipe_exp[0] = pipe_exp[1];
      n_capture++;
    end

    $display("mechanisms: shift=%0d capture=%0d encoded_bits=%0d carry_out=%0d decoded_unloads=%0d",
             n_shift, n_capture, n_encoded, n_cout, n_decoded);
    if (n_shift == 0)   begin failures++; $display("FAIL no shift clock");        end
    if (n_capture == 0) begin failures++; $display("FAIL no capture clock");      end
    if (n_encoded == 0) begin failures++; $display("FAIL SSSF never encoded");    end
    if (n_cout == 0)    begin failures++; $display("FAIL no carry out");          end
    if (n_decoded == 0) begin failures++; $display("FAIL no unload decoded");     end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
