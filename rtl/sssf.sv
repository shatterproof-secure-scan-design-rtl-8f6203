// sssf: shatterproof secure scan flip-flop (SSSF).
//
// An SSSF takes the place of two neighbouring scan flip-flops of a chain,
// a first cell A (nearer the chain's scan-in) and a second cell B (nearer its
// scan-out). In normal mode (se = 0) both cells capture their functional
// inputs exactly like ordinary scan flip-flops, and the extra gates sit only
// on the scan path, so functional timing is untouched. In shift mode the two
// flip-flops shift as usual (A <- si, B <- A), but the value that leaves the
// pair is encoded from the two neighbouring scan bits and the pair's scan
// input:
//
//     so_a = Q_A xor (not si)          inverter + XOR of cell A
//     so   = Q_B xor so_a              XOR of cell B
//          = not (Q_B xor Q_A xor si)
//
// Every bit shifted out of the chain through an SSSF is therefore the
// inverted parity of three consecutive chain bits, which changes the Hamming
// distances between pairs of scanned-out responses.
//
// The gate set (one inverter on the scan input, one XOR after each cell) and
// the pass-through of DI/DO follow the design. Where the gates sit follows the
// design's 4-cell response/scan-out table, which this wiring reproduces
// exactly; a drawing that puts the inverter in front of cell A's multiplexer
// does not reproduce that table.
//
// Interface: di[1]/dout[1] belong to cell A, di[0]/dout[0] to cell B;
// rst_n is an asynchronous active-low clear (this implementation's choice).
// Timing: two rising-edge registers; so is combinational from Q_A, Q_B, si.
module sssf
  import sss_pkg::*;
(
  input  logic       ck,
  input  logic       rst_n,
  input  logic       se,
  input  logic [1:0] di,
  input  logic       si,
  output logic [1:0] dout,
  output logic       so
);

  logic q_a, q_b;
  logic si_n;   // inverter on the scan input
  logic so_a;   // encoded scan output of cell A, scan input of cell B's XOR

  always_ff @(posedge ck or negedge rst_n) begin
    if (!rst_n) begin
      q_a <= 1'b0;
      q_b <= 1'b0;
    end else if (se == SHIFT_MODE) begin
      q_a <= si;
      q_b <= q_a;
    end else begin
      q_a <= di[1];
      q_b <= di[0];
    end
  end

  assign si_n = ~si;
  assign so_a = q_a ^ si_n;
  assign so   = q_b ^ so_a;
  assign dout = {q_a, q_b};

endmodule
