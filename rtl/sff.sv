// sff: traditional scan flip-flop.
//
// A 2:1 multiplexer in front of a D flip-flop selects the functional input DI
// when SE = 0 (normal mode) and the scan input SI when SE = 1 (shift mode).
// The flip-flop output drives both the functional output DO and the scan
// output SO, so a chain of these cells is a plain shift register in shift
// mode. This is the ordinary cell of the SSS chain; only selected neighbouring
// pairs are replaced by the secure cell (sssf).
//
// Interface: ck, rst_n (asynchronous, active low, clears to 0), se, di, si;
// outputs dout (DO; "do" is a keyword) and so.
// Timing: one rising-edge register; dout and so are the register output.
// The mux/flip-flop structure follows the design; the asynchronous reset is
// this implementation's choice, so the simulation starts from a known state.
module sff
  import sss_pkg::*;
(
  input  logic ck,
  input  logic rst_n,
  input  logic se,
  input  logic di,
  input  logic si,
  output logic dout,
  output logic so
);

  logic q;

  always_ff @(posedge ck or negedge rst_n) begin
    if (!rst_n)                 q <= 1'b0;
    else if (se == SHIFT_MODE)  q <= si;
    else                        q <= di;
  end

  assign dout = q;
  assign so   = q;

endmodule
