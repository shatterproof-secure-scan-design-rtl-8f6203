// sss_adder_top: a 4-bit adder whose registers form one shatterproof secure
// scan chain.
//
// Every register of the example circuit is a scan cell: the operand registers
// a_r and b_r, the carry-in register, and the result registers (carry-out and
// sum). In normal mode (c = 0) each clock loads the operands from the pins and
// the result registers from the adder driven by the previous operands, so the
// registered sum appears two clocks after its operands. In shift-register mode
// (c = 1) the 3*W+2 cells are one chain
//
//     scan_in -> a_r[W-1..0] -> b_r[W-1..0] -> cin_r -> cout_r
//             -> sum_r[W-1..0] -> scan_out
//
// in which the pairs chosen by SSSF_MASK (bit i: chain cells i+1 and i) are
// secure scan flip-flops, so what leaves scan_out is encoded while the real
// state stays intact. A tester that knows the placement can decode the
// stream; one that does not sees scan-outs whose bit differences do not match
// those of the captured responses.
//
// The adder, the normal/shift behaviour and the mode pin c follow the design;
// which registers exist, their chain order and the default placement (one
// SSSF at the scan-out end, on sum[1] and sum[0]) are this implementation's
// choices. rst_n is an asynchronous active-low clear.
module sss_adder_top #(
  parameter int unsigned      W         = 4,
  parameter logic [3*W+1:0]   SSSF_MASK = (3*W+2)'(1)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         c,
  input  logic         scan_in,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout,
  output logic         scan_out
);

  localparam int unsigned N = 3 * W + 2;

  logic [N-1:0] st;       // state of every chain cell, cell 0 at scan_out
  logic [N-1:0] cap;      // what each cell captures in normal mode

  logic [W-1:0] a_r, b_r, sum_n;
  logic         cin_r, cout_n;

  assign a_r   = st[3*W+1 -: W];
  assign b_r   = st[2*W+1 -: W];
  assign cin_r = st[W+1];

  adder4 #(.W(W)) u_adder (
    .a    (a_r),
    .b    (b_r),
    .cin  (cin_r),
    .sum  (sum_n),
    .cout (cout_n)
  );

  assign cap = {a, b, cin, cout_n, sum_n};

  sss_chain #(.N(N), .SSSF_MASK(SSSF_MASK)) u_chain (
    .ck    (clk),
    .rst_n (rst_n),
    .se    (c),
    .si    (scan_in),
    .di    (cap),
    .dout  (st),
    .so    (scan_out)
  );

  assign sum  = st[W-1:0];
  assign cout = st[W];

endmodule
