// sss_chain: shatterproof secure scan (SSS) chain.
//
// N scan cells are chained from the scan input (cell N-1) to the scan output
// (cell 0). Most cells are traditional scan flip-flops (sff); every set bit i
// of SSSF_MASK replaces the neighbouring cells i+1 and i by one secure scan
// flip-flop (sssf), whose scan output is the inverted XOR of the two cells
// and the bit entering them. With the defaults (8 cells, SSSF in place of
// cells 3 and 2) the chain is the eight-cell example of the design; N = 4 with
// SSSF_MASK = 4'b0001 is its 4-cell response/scan-out table.
//
// Normal mode (se = 0): every cell captures di[i]; dout[i] is cell i's state.
// Shift mode (se = 1): the states move one cell towards cell 0 per clock and
// cell N-1 takes si. The cell states themselves are shifted unchanged; only
// what leaves an SSSF is encoded, so so = f(states, si) is combinational.
//
// Any number of SSSFs may be placed, as long as they do not overlap
// (no two adjacent mask bits) and bit N-1 is clear; both rules are checked at
// elaboration. The asynchronous active-low reset is this implementation's
// choice. Cell numbering and the default placement follow the design.
module sss_chain #(
  parameter int unsigned          N         = 8,
  parameter logic [N-1:0]         SSSF_MASK = N'(8'b0000_0100)
) (
  input  logic         ck,
  input  logic         rst_n,
  input  logic         se,
  input  logic         si,
  input  logic [N-1:0] di,
  output logic [N-1:0] dout,
  output logic         so
);

  if (N < 2) begin : g_chk_n
    $error("sss_chain: N must be at least 2");
  end
  if (SSSF_MASK[N-1]) begin : g_chk_top
    $error("sss_chain: SSSF_MASK bit N-1 set, an SSSF needs cell N");
  end
  if ((SSSF_MASK & (SSSF_MASK >> 1)) != '0) begin : g_chk_overlap
    $error("sss_chain: SSSF_MASK places overlapping SSSFs");
  end

  // link[j] is the scan output of cell j; link[N] is the chain's scan input.
  logic [N:0] link;
  assign link[N] = si;
  assign so      = link[0];

  for (genvar j = 0; j < N; j++) begin : g_cell
    if (SSSF_MASK[j]) begin : g_sssf
      // Cells j+1 (A) and j (B) form one SSSF.
      sssf u_sssf (
        .ck    (ck),
        .rst_n (rst_n),
        .se    (se),
        .di    (di[j+1:j]),
        .si    (link[j+2]),
        .dout  (dout[j+1:j]),
        .so    (link[j])
      );
      // Cell A has no scan output outside the pair; this link is not read.
      assign link[j+1] = dout[j+1];
    end else if (j == 0 || !SSSF_MASK[j-1]) begin : g_sff
      sff u_sff (
        .ck    (ck),
        .rst_n (rst_n),
        .se    (se),
        .di    (di[j]),
        .si    (link[j+1]),
        .dout  (dout[j]),
        .so    (link[j])
      );
    end
  end

endmodule
