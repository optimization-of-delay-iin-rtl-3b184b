// mac_pkg: default sizes of the pipelined multiply-accumulate unit and the
// elaboration-time functions that lay out its Wallace reduction tree.
//
// The partial product matrix reduced every cycle holds the N x N partial
// products plus the accumulator state fed back in carry-save form:
//   REG1 : one bit in every column 0 .. 2N-2
//   REG2 : one bit in every column L .. 2N-2, where L = 2N-1-K
//   REG3 : one bit in column L (carry out of the L-bit LSB adder)
//   tc   : one bit in column N (Baugh-Wooley constant, signed mode only)
// Column 2N-1 is never compressed: it only gathers the carries that leave
// column 2N-2 (the overflow carries counted by the alpha-bit adder).
//
// Wallace rule per stage and column: every group of three bits goes into a
// full adder, a remaining pair into a half adder, a single bit passes.
// Stages repeat until no column 0 .. 2N-2 holds more than two bits.
// The functions recompute the column heights from scratch, so they can be
// called with genvars inside generate loops. The Wallace rule follows the
// source paper; K = 17 is this design's choice (the paper gives no number).
package mac_pkg;

  // Sizes of the 16-bit unsigned/signed MAC unit.
  localparam int unsigned MAC_N     = 16;  // operand width
  localparam int unsigned MAC_K     = 17;  // upper columns kept in carry-save form
  localparam int unsigned MAC_ALPHA = 8;   // overflow counter width (REG4)

  localparam int WT_MAXCOL = 128;              // supports N up to 64
  localparam int WT_MAXSTG = 16;               // stage limit of the search
  typedef logic [WT_MAXCOL*8-1:0] wt_cols_t;   // 8-bit height per column

  // Height of column c of the initial matrix.
  function automatic int wt_init_height(int n, int k, int c);
    int h;
    int l;
    l = 2*n - 1 - k;
    if (c > 2*n - 2) return 0;
    h  = ((c < 2*n - 2 - c) ? c : 2*n - 2 - c) + 1;  // partial products
    h += 1;                                          // REG1
    if (c >= l) h += 1;                              // REG2
    if (c == l) h += 1;                              // REG3
    if (c == n) h += 1;                              // Baugh-Wooley constant
    return h;
  endfunction

  // Bits kept in a column of height h by one Wallace stage (sums and pass).
  function automatic int wt_own(int h);
    return h / 3 + ((h % 3) == 2 ? 1 : 0) + ((h % 3) == 1 ? 1 : 0);
  endfunction

  // Carries sent to the next column by one Wallace stage.
  function automatic int wt_carries(int h);
    return h / 3 + ((h % 3) == 2 ? 1 : 0);
  endfunction

  // All column heights after s Wallace stages (s = 0: initial matrix).
  function automatic wt_cols_t wt_heights(int n, int k, int s);
    wt_cols_t h;
    wt_cols_t nh;
    int nc;
    int own;
    int cry;
    nc = 2*n;
    h  = '0;
    for (int i = 0; i < nc; i++) h[i*8 +: 8] = 8'(wt_init_height(n, k, i));
    for (int st = 0; st < s; st++) begin
      nh  = '0;
      cry = 0;
      for (int i = 0; i < nc - 1; i++) begin
        own = wt_own(int'(h[i*8 +: 8]));
        nh[i*8 +: 8] = 8'(own + cry);
        cry = wt_carries(int'(h[i*8 +: 8]));
      end
      nh[(nc-1)*8 +: 8] = 8'(int'(h[(nc-1)*8 +: 8]) + cry);
      h = nh;
    end
    return h;
  endfunction

  // Height of column c after s Wallace stages.
  function automatic int wt_height(int n, int k, int s, int c);
    wt_cols_t h;
    h = wt_heights(n, k, s);
    return int'(h[c*8 +: 8]);
  endfunction

  // Tallest of columns 0 .. 2N-2 after s stages.
  function automatic int wt_tallest(int n, int k, int s);
    wt_cols_t h;
    int mx;
    h  = wt_heights(n, k, s);
    mx = 0;
    for (int i = 0; i < 2*n - 1; i++)
      if (int'(h[i*8 +: 8]) > mx) mx = int'(h[i*8 +: 8]);
    return mx;
  endfunction

  // Number of Wallace stages needed to bring columns 0 .. 2N-2 to two bits.
  function automatic int wt_stages(int n, int k);
    int ns;
    ns = WT_MAXSTG;
    for (int s = WT_MAXSTG - 1; s >= 0; s--)
      if (wt_tallest(n, k, s) <= 2) ns = s;
    return ns;
  endfunction

  // Number of overflow carries gathered in column 2N-1.
  function automatic int wt_ovf(int n, int k);
    return wt_height(n, k, wt_stages(n, k), 2*n - 1);
  endfunction

  // Tallest column of any stage (width of the per-column bit vectors).
  // Heights only fall from stage to stage except in column 2N-1.
  function automatic int wt_maxh(int n, int k);
    int a;
    int b;
    a = wt_tallest(n, k, 0);
    b = wt_ovf(n, k);
    return (a > b) ? a : b;
  endfunction

endpackage
