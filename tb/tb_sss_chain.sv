// tb_sss_chain: self-checking testbench of the secure scan chain.
//
// Three chains are simulated side by side:
//  * u_plain: 4 traditional cells. Every response R3..R0 captured in normal
//    mode must shift out unchanged (the traditional-scan table).
//  * u_t2: 4 cells whose last two (cells 1 and 0) form one SSSF. Every
//    response is captured, then shifted out with scan-in held at 0; the four
//    observed bits must equal the design's published response/scan-out table,
//    which is typed in below as constants. The pairwise Hamming-distance
//    statistics of the observed scan-outs are reported and checked.
//  * u_fig: the default 8-cell chain with an SSSF in place of cells 3 and 2,
//    driven by random normal/shift traffic and compared every clock with a
//    bit-level reference model of the chain written here.
//  * u_two: 8 cells with two SSSFs (cells 5/4 and 1/0), checked the same way
//    with a reference model that handles any non-overlapping placement.
module tb_sss_chain;
  import sss_pkg::*;

  logic ck, rst_n, se, si;
  logic [3:0] di4;
  logic [7:0] di8;
  logic [3:0] st_plain, st_t2;
  logic [7:0] st_fig;
  logic [7:0] st_two;
  logic       so_plain, so_t2, so_fig, so_two;
  localparam logic [7:0] TWO_MASK = 8'b0001_0001;
  int         checks = 0, failures = 0;
  int         n_encoded = 0;   // shift clocks where the SSSF changed the bit

  // Published scan-out (R3..R0 columns) for responses 0..15, SSSF at cells 1/0.
  localparam logic [3:0] TABLE2 [16] = '{
    4'b1111, 4'b1110, 4'b1100, 4'b1101, 4'b1000, 4'b1001, 4'b1011, 4'b1010,
    4'b0001, 4'b0000, 4'b0010, 4'b0011, 4'b0110, 4'b0111, 4'b0101, 4'b0100};

  sss_chain #(.N(4), .SSSF_MASK(4'b0000)) u_plain (
    .ck(ck), .rst_n(rst_n), .se(se), .si(si), .di(di4), .dout(st_plain), .so(so_plain));
  sss_chain #(.N(4), .SSSF_MASK(4'b0001)) u_t2 (
    .ck(ck), .rst_n(rst_n), .se(se), .si(si), .di(di4), .dout(st_t2), .so(so_t2));
  sss_chain u_fig (
    .ck(ck), .rst_n(rst_n), .se(se), .si(si), .di(di8), .dout(st_fig), .so(so_fig));

  sss_chain #(.N(8), .SSSF_MASK(TWO_MASK)) u_two (
    .ck(ck), .rst_n(rst_n), .se(se), .si(si), .di(di8), .dout(st_two), .so(so_two));

  initial ck = 1'b0;
  always #5 ck = ~ck;

  task automatic check(input logic [7:0] got, input logic [7:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b at %0t", what, got, exp, $time);
    end
  endtask

  // Reference of the 8-cell chain, SSSF on cells 3 (A) and 2 (B): the scan
  // value leaving each cell, given the states m and the chain input s.
  function automatic logic [7:0] fig_links(input logic [7:0] m);
    logic [7:0] l;
    l[7] = m[7];
    l[6] = m[6];
    l[5] = m[5];
    l[4] = m[4];
    l[3] = m[3];                        // not observed outside the pair
    l[2] = ~(m[2] ^ m[3] ^ l[4]);
    l[1] = m[1];
    l[0] = m[0];
    return l;
  endfunction

  // Generic reference: scan value leaving each cell (index 8 = chain input).
  // A pair's second cell outputs not(own ^ first cell ^ bit entering the pair).
  function automatic logic [8:0] gen_links(input logic [7:0] m, input logic s,
                                           input logic [7:0] mask);
    logic [8:0] l;
    l[8] = s;
    for (int k = 7; k >= 0; k--)
      l[k] = mask[k] ? ~(m[k] ^ m[k+1] ^ l[k+2]) : m[k];
    return l;
  endfunction

  initial begin : watchdog
    repeat (5000) @(posedge ck);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] obs_plain [16];
    logic [3:0] obs_t2 [16];
    logic [7:0] m, l, m2;
    logic [8:0] l2;
    int hd_changed, pos_changed, same;

    rst_n = 1'b0; se = NORMAL_MODE; si = 1'b0; di4 = '0; di8 = '0;
    repeat (2) @(posedge ck);
    @(negedge ck) rst_n = 1'b1;

    // Capture each 4-bit response, then shift it out with scan-in = 0.
    for (int r = 0; r < 16; r++) begin
      @(negedge ck);
      se = NORMAL_MODE;
      di4 = 4'(r);
      @(negedge ck);
      check({4'b0, st_plain}, {4'b0, 4'(r)}, "traditional capture");
      check({4'b0, st_t2}, {4'b0, 4'(r)}, "SSS capture");
      se = SHIFT_MODE;
      si = 1'b0;
      for (int t = 0; t < 4; t++) begin
        #1;
        obs_plain[r][t] = so_plain;
        obs_t2[r][t]    = so_t2;
        @(negedge ck);
      end
      check({4'b0, obs_plain[r]}, {4'b0, 4'(r)}, "traditional scan-out");
      check({4'b0, obs_t2[r]}, {4'b0, TABLE2[r]}, "SSS scan-out table");
    end

    // Hamming-distance statistics over all 136 pairs (a <= b).
    hd_changed = 0; pos_changed = 0; same = 0;
    for (int a = 0; a < 16; a++)
      for (int b = a; b < 16; b++) begin
        if ($countones(obs_t2[a] ^ obs_t2[b]) != $countones(obs_plain[a] ^ obs_plain[b]))
          hd_changed++;
        else if ((obs_t2[a] ^ obs_t2[b]) != (obs_plain[a] ^ obs_plain[b]))
          pos_changed++;
        else
          same++;
      end
    $display("pairs: %0d distance changed, %0d positions changed, %0d identical",
             hd_changed, pos_changed, same);
    check(8'(hd_changed), 8'd96, "pairs with changed distance");
    check(8'(pos_changed), 8'd16, "pairs with moved differences");
    check(8'(same), 8'd24, "unchanged pairs");

    // Default 8-cell chain against the reference model.
    @(negedge ck) rst_n = 1'b0;
    @(negedge ck) rst_n = 1'b1;
    m = '0;
    m2 = '0;
    for (int i = 0; i < 600; i++) begin
      @(negedge ck);
      se  = (i % 9 == 0) ? NORMAL_MODE : SHIFT_MODE;
      si  = 1'($urandom);
      di8 = 8'($urandom);
      #1;
      l = fig_links(m);
      check({7'b0, so_fig}, {7'b0, l[0]}, "8-cell so");
      l2 = gen_links(m2, si, TWO_MASK);
      check({7'b0, so_two}, {7'b0, l2[0]}, "two-SSSF so");
      @(posedge ck);
      if (se == SHIFT_MODE) begin
        if (l[2] != m[2]) n_encoded++;
        m = {si, l[7:1]};
        // cell 3 takes the raw bit from cell 4, cell 2 the raw bit of cell 3
        m[3] = l[4];
        m[2] = l[3];
        m2 = l2[8:1];
      end else begin
        m = di8;
        m2 = di8;
      end
      #1;
      check(st_fig, m, "8-cell state");
      check(st_two, m2, "two-SSSF state");
    end
    if (n_encoded == 0) begin
      failures++;
      $display("FAIL the SSSF never changed a passing bit");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
