// wallace_tree_adder - sums the Booth partial products with half and full adders.
//
// Input pp[i] is the i-th sign-extended partial product (2*WIDTH-1 bits); it
// carries weight 2^i, so its bit k lands in column i+k. The product needs only
// columns 0 .. 2*WIDTH-2: for WIDTH = 8 that is 92 of the 120 partial product
// bits, and the 28 bits that would fall in columns 15..21 are left unconnected
// (they cannot change the low 16 bits). Carries out of the top column are
// dropped, so the sum is exact modulo 2^(2*WIDTH-1); product bit 2*WIDTH-1 is a
// copy of bit 2*WIDTH-2. That is exact whenever |MD*MR| < 2^(2*WIDTH-2), i.e.
// for every multiplicand other than -2^(WIDTH-1).
//
// How the tree is built (this design's own arrangement): in each Wallace stage
// every column is cut into groups of three bits, each going to a full adder,
// and a leftover pair going to a half adder; sums stay in the column, carries
// move to the next one. Stages repeat until no column holds more than two
// bits, then a ripple of half/full adders from column 0 upwards resolves the
// two rows. A lone bit in column 0 just passes through, as does column 1's pair
// through a single half adder. The netlist is derived from this rule while the
// module elaborates (function wt_build): every bit is a slot in one pool,
// inputs first, then a constant 0, then sum and carry of each adder in turn.
//
// Interface: pp in (WIDTH x (2*WIDTH-1) bits), product out (2*WIDTH bits,
// two's complement). Combinational; depth is the number of Wallace stages
// (four for WIDTH = 8) plus the final ripple.
module wallace_tree_adder #(
  parameter int WIDTH = 8,
  localparam int PPW  = 2*WIDTH - 1
) (
  input  logic [WIDTH-1:0][PPW-1:0] pp,
  output logic [2*WIDTH-1:0]        product
);
  localparam int COLS   = PPW;                              // columns summed
  localparam int NIN    = WIDTH*COLS - WIDTH*(WIDTH-1)/2;  // bits in those columns
  localparam int ZERO   = NIN;                              // constant-0 slot
  localparam int MAXC   = NIN + 6*COLS;                     // bound on adder count
  localparam int MAXS   = ZERO + 1 + 2*MAXC;                // bound on slot count
  localparam int MAXH   = 2*WIDTH + 4;                      // bound on column height
  localparam int FW     = 12;                               // field width
  localparam int CELLW  = 5*FW;                             // {level, is_fa, a, b, c}
  localparam int HDR    = 2*FW;                             // {levels, adder count}
  localparam int OUTOFS = HDR + MAXC*CELLW;
  localparam int SB     = OUTOFS + COLS*FW;

  // Slot of partial product bit pp[i][k] (k < COLS - i).
  function automatic int in_slot(int i, int k);
    return i*COLS - (i*(i-1))/2 + k;
  endfunction

  function automatic int max3(int a, int b, int c);
    int m;
    m = a;
    if (b > m) m = b;
    if (c > m) m = c;
    return m;
  endfunction

  // Returns {per-column output slot, per-adder fields, level count, adder count}.
  // Adder n drives slot ZERO+1+2n (sum) and ZERO+2+2n (carry).
  function automatic logic [SB-1:0] wt_build();
    logic [SB-1:0] r;
    int lev  [MAXS];
    int col  [COLS*MAXH];   // col[c*MAXH + j]: j-th bit slot of column c
    int cnt  [COLS];
    int ncol [COLS*MAXH];
    int ncnt [COLS];
    int nc, k, carry, tall, n, is_fa, ca, cb, cc, l, nlvl;
    int ops [3];
    r = SB'(0);
    nc = 0;
    nlvl = 0;
    for (int s = 0; s < MAXS; s++) lev[s] = 0;
    for (int c = 0; c < COLS; c++) cnt[c] = 0;
    for (int i = 0; i < WIDTH; i++)
      for (int kk = 0; kk < COLS - i; kk++) begin
        col[(i+kk)*MAXH + cnt[i+kk]] = in_slot(i, kk);
        cnt[i+kk]++;
      end
    // Wallace stages: groups of three -> full adder, leftover pair -> half adder
    for (int stage = 0; stage < MAXH; stage++) begin
      tall = 0;
      for (int c = 0; c < COLS; c++) if (cnt[c] > 2) tall = 1;
      if (tall == 0) break;
      for (int c = 0; c < COLS; c++) ncnt[c] = 0;
      for (int c = 0; c < COLS; c++) begin
        k = 0;
        while (cnt[c] - k >= 2) begin
          is_fa = (cnt[c] - k >= 3) ? 1 : 0;
          ca = col[c*MAXH + k];
          cb = col[c*MAXH + k+1];
          cc = (is_fa != 0) ? col[c*MAXH + k+2] : ZERO;
          l = max3(lev[ca], lev[cb], lev[cc]) + 1;
          lev[ZERO + 1 + 2*nc] = l;
          lev[ZERO + 2 + 2*nc] = l;
          if (l > nlvl) nlvl = l;
          r[HDR + nc*CELLW + 4*FW +: FW] = FW'(l);
          r[HDR + nc*CELLW + 3*FW +: FW] = FW'(is_fa);
          r[HDR + nc*CELLW + 2*FW +: FW] = FW'(ca);
          r[HDR + nc*CELLW + 1*FW +: FW] = FW'(cb);
          r[HDR + nc*CELLW +: FW]        = FW'(cc);
          k += 2 + is_fa;
          ncol[c*MAXH + ncnt[c]] = ZERO + 1 + 2*nc;
          ncnt[c]++;
          if (c + 1 < COLS) begin
            ncol[(c+1)*MAXH + ncnt[c+1]] = ZERO + 2 + 2*nc;
            ncnt[c+1]++;
          end
          nc++;
        end
        if (cnt[c] - k == 1) begin
          ncol[c*MAXH + ncnt[c]] = col[c*MAXH + k];
          ncnt[c]++;
        end
      end
      for (int j = 0; j < COLS*MAXH; j++) col[j] = ncol[j];
      for (int c = 0; c < COLS; c++) cnt[c] = ncnt[c];
    end
    // Final ripple over the remaining (at most two) rows
    carry = -1;
    for (int c = 0; c < COLS; c++) begin
      n = 0;
      for (int j = 0; j < cnt[c]; j++) begin
        ops[n] = col[c*MAXH + j];
        n++;
      end
      if (carry >= 0) begin
        ops[n] = carry;
        n++;
      end
      carry = -1;
      if (n == 0) begin
        r[OUTOFS + c*FW +: FW] = FW'(ZERO);
      end else if (n == 1) begin
        r[OUTOFS + c*FW +: FW] = FW'(ops[0]);
      end else begin
        is_fa = (n == 3) ? 1 : 0;
        ca = ops[0];
        cb = ops[1];
        cc = (is_fa != 0) ? ops[2] : ZERO;
        l = max3(lev[ca], lev[cb], lev[cc]) + 1;
        lev[ZERO + 1 + 2*nc] = l;
        lev[ZERO + 2 + 2*nc] = l;
        if (l > nlvl) nlvl = l;
        r[HDR + nc*CELLW + 4*FW +: FW] = FW'(l);
        r[HDR + nc*CELLW + 3*FW +: FW] = FW'(is_fa);
        r[HDR + nc*CELLW + 2*FW +: FW] = FW'(ca);
        r[HDR + nc*CELLW + 1*FW +: FW] = FW'(cb);
        r[HDR + nc*CELLW +: FW]        = FW'(cc);
        r[OUTOFS + c*FW +: FW] = FW'(ZERO + 1 + 2*nc);
        carry = ZERO + 2 + 2*nc;
        nc++;
      end
    end
    r[FW-1:0]  = FW'(nc);
    r[FW +: FW] = FW'(nlvl);
    return r;
  endfunction

  localparam logic [SB-1:0] SCHED  = wt_build();
  localparam int            NCELLS = int'(SCHED[FW-1:0]);
  localparam int            NLVL   = int'(SCHED[FW +: FW]);
  localparam int            NNETS  = ZERO + 1 + 2*NCELLS;

  function automatic int cell_field(int n, int f);
    return int'(SCHED[HDR + n*CELLW + f*FW +: FW]);
  endfunction

  // One copy of the slot pool per logic level: level 0 holds the partial
  // product bits, level L adds the outputs of the adders at level L and passes
  // every other slot on from level L-1. Adders read only from the level below,
  // so no signal feeds back into itself.
  for (genvar L = 0; L <= NLVL; L++) begin : g_lvl
    logic [NNETS-1:0] v;
    if (L == 0) begin : g_in
      for (genvar i = 0; i < WIDTH; i++) begin : g_pp
        for (genvar k = 0; k < COLS - i; k++) begin : g_bit
          assign v[in_slot(i, k)] = pp[i][k];
        end
      end
      assign v[NNETS-1:ZERO] = '0;   // constant 0 and adder slots not yet computed
    end else begin : g_add
      for (genvar n = 0; n < NCELLS; n++) begin : g_cell
        if (cell_field(n, 4) == L) begin : g_here
          if (cell_field(n, 3) != 0) begin : g_fa
            gdi_full_adder u_fa (
              .a(g_lvl[L-1].v[cell_field(n, 2)]), .b(g_lvl[L-1].v[cell_field(n, 1)]),
              .cin(g_lvl[L-1].v[cell_field(n, 0)]),
              .sum(v[ZERO+1+2*n]), .cout(v[ZERO+2+2*n]));
          end else begin : g_ha
            gdi_half_adder u_ha (
              .a(g_lvl[L-1].v[cell_field(n, 2)]), .b(g_lvl[L-1].v[cell_field(n, 1)]),
              .sum(v[ZERO+1+2*n]), .cout(v[ZERO+2+2*n]));
          end
        end else begin : g_pass
          assign v[ZERO+1+2*n] = g_lvl[L-1].v[ZERO+1+2*n];
          assign v[ZERO+2+2*n] = g_lvl[L-1].v[ZERO+2+2*n];
        end
      end
      assign v[ZERO:0] = g_lvl[L-1].v[ZERO:0];
    end
  end

  for (genvar c = 0; c < COLS; c++) begin : g_out
    assign product[c] = g_lvl[NLVL].v[int'(SCHED[OUTOFS + c*FW +: FW])];
  end
  assign product[2*WIDTH-1] = product[2*WIDTH-2];
endmodule
