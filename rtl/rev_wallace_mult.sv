// Unsigned WIDTH x WIDTH Wallace tree multiplier built only from reversible
// gates. It works in the three classic Wallace steps:
//   1. Partial products: one Toffoli gate per bit pair (C = 0, so R = a[i]&b[j]);
//      the bit a[i]b[j] has weight 2^(i+j) and goes into column i+j. The
//      operand bits pass from gate to gate through the P and Q outputs, so
//      no input drives more than one gate (the fan-out-of-one rule).
//   2. Reduction: in each layer, every column's bits are taken in groups of
//      three into a TSG gate used as a full adder (sum stays in the column,
//      carry goes to the next column); a remaining pair goes into a Peres gate
//      used as a half adder; a remaining single bit passes to the next layer.
//      Layers repeat until no column holds more than two bits (four layers
//      for 8 x 8).
//   3. The two remaining rows are added by a 2*WIDTH-bit TSG ripple-carry adder.
// The column heights of every layer are computed at elaboration time by
// constant functions, so the tree is built by generate loops for any WIDTH.
// Interface: a, b -> p (2*WIDTH bits). Purely combinational.
// The gate kinds (Toffoli, Peres, TSG) and the three-step structure follow
// the source design; the exact grouping of bits into gates is this design's
// own (plain Wallace rule), as is the ripple adder used for the final step.
// Carries out of the top column are always 0 for an unsigned product and are
// dropped.
module rev_wallace_mult #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0]   a,
  input  logic [WIDTH-1:0]   b,
  output logic [2*WIDTH-1:0] p
);
  localparam int unsigned NCOL = 2 * WIDTH;

  // Number of partial-product bits of weight 2^c.
  function automatic int unsigned init_height(int unsigned c);
    int unsigned lo, hi;
    if (c > 2 * WIDTH - 2) return 0;
    lo = (c >= WIDTH) ? c - WIDTH + 1 : 0;
    hi = (c < WIDTH) ? c : WIDTH - 1;
    return hi - lo + 1;
  endfunction

  function automatic int unsigned n_fa(int unsigned h);
    return h / 3;
  endfunction
  function automatic int unsigned n_ha(int unsigned h);
    return (h % 3 == 2) ? 1 : 0;
  endfunction
  function automatic int unsigned n_pass(int unsigned h);
    return (h % 3 == 1) ? 1 : 0;
  endfunction

  // Height of column c after 'layer' reduction layers.
  function automatic int unsigned height(int unsigned layer, int unsigned c);
    int unsigned h [NCOL];
    int unsigned hn[NCOL];
    for (int unsigned k = 0; k < NCOL; k++) h[k] = init_height(k);
    for (int unsigned l = 0; l < layer; l++) begin
      for (int unsigned k = 0; k < NCOL; k++) begin
        hn[k] = n_fa(h[k]) + n_ha(h[k]) + n_pass(h[k]);
        if (k > 0) hn[k] += n_fa(h[k-1]) + n_ha(h[k-1]);
      end
      h = hn;
    end
    return h[c];
  endfunction

  function automatic int unsigned max_height(int unsigned layer);
    int unsigned m = 0;
    for (int unsigned k = 0; k < NCOL; k++)
      if (height(layer, k) > m) m = height(layer, k);
    return m;
  endfunction

  function automatic int unsigned n_layers();
    int unsigned l = 0;
    while (max_height(l) > 2) l++;
    return l;
  endfunction

  localparam int unsigned NLAYER = n_layers();
  localparam int unsigned MAXH   = max_height(0);

  // pp[c][k]: bit k of column c of the partial products (k >= height is 0).
  logic pp [NCOL][MAXH];

  // Step 1: partial products from a grid of Toffoli gates. Gate (i,j) takes
  // a[i] from the P output of gate (i,j-1) and b[j] from the Q output of gate
  // (i-1,j), so every operand bit drives exactly one gate.
  for (genvar i = 0; i < WIDTH; i++) begin : g_ppi
    for (genvar j = 0; j < WIDTH; j++) begin : g_ppj
      localparam int unsigned C  = i + j;
      localparam int unsigned LO = (C >= WIDTH) ? C - WIDTH + 1 : 0;
      logic a_in, b_in;    // a[i] and b[j] as they reach this gate
      logic a_out, b_out;  // the same bits passed on by P and Q
      if (j == 0) begin : g_a0
        assign a_in = a[i];
      end else begin : g_an
        assign a_in = g_ppi[i].g_ppj[j-1].a_out;
      end
      if (i == 0) begin : g_b0
        assign b_in = b[j];
      end else begin : g_bn
        assign b_in = g_ppi[i-1].g_ppj[j].b_out;
      end
      rev_toffoli u_tf (
        .a (a_in), .b (b_in), .c (1'b0),
        .p (a_out), .q (b_out), .r (pp[C][j-LO])
      );
    end
  end
  for (genvar c = 0; c < NCOL; c++) begin : g_pad0
    for (genvar k = init_height(c); k < MAXH; k++) begin : g_k
      assign pp[c][k] = 1'b0;
    end
  end

  // Step 2: reduction layers. Layer l reads 'cur' (the previous layer's
  // result) and writes 'nxt'; bit k of a column is 0 for k >= its height.
  for (genvar l = 0; l < NLAYER; l++) begin : g_layer
    logic cur [NCOL][MAXH];
    logic nxt [NCOL][MAXH];
    if (l == 0) begin : g_first
      assign cur = pp;
    end else begin : g_next
      assign cur = g_layer[l-1].nxt;
    end

    for (genvar c = 0; c < NCOL; c++) begin : g_col
      localparam int unsigned H    = height(l, c);
      localparam int unsigned NFA  = n_fa(H);
      localparam int unsigned NHA  = n_ha(H);
      localparam int unsigned NPS  = n_pass(H);
      // Carries from this column land in column c+1 after that column's own
      // sums and pass-through bit.
      localparam int unsigned H1   = (c + 1 < NCOL) ? height(l, c + 1) : 0;
      localparam int unsigned COFF = n_fa(H1) + n_ha(H1) + n_pass(H1);

      for (genvar g = 0; g < NFA; g++) begin : g_fa
        logic gp, gq, cy;
        rev_tsg u_tsg (
          .a (cur[c][3*g]), .b (cur[c][3*g+1]), .c (1'b0), .d (cur[c][3*g+2]),
          .p (gp), .q (gq), .r (nxt[c][g]), .s (cy)
        );
        if (c + 1 < NCOL) begin : g_cy
          assign nxt[c+1][COFF+g] = cy;
        end
      end
      if (NHA == 1) begin : g_ha
        logic gp, cy;
        rev_peres u_pg (
          .a (cur[c][3*NFA]), .b (cur[c][3*NFA+1]), .c (1'b0),
          .p (gp), .q (nxt[c][NFA]), .r (cy)
        );
        if (c + 1 < NCOL) begin : g_cy
          assign nxt[c+1][COFF+NFA] = cy;
        end
      end
      if (NPS == 1) begin : g_pass
        assign nxt[c][NFA] = cur[c][3*NFA];
      end
      for (genvar k = height(l + 1, c); k < MAXH; k++) begin : g_pad
        assign nxt[c][k] = 1'b0;
      end
    end
  end

  // Step 3: add the two remaining rows.
  logic [NCOL-1:0] row0, row1;
  logic            cout_unused;
  for (genvar c = 0; c < NCOL; c++) begin : g_rows
    if (NLAYER == 0) begin : g_direct
      assign row0[c] = pp[c][0];
      assign row1[c] = pp[c][1];
    end else begin : g_reduced
      assign row0[c] = g_layer[NLAYER-1].nxt[c][0];
      assign row1[c] = g_layer[NLAYER-1].nxt[c][1];
    end
  end

  rev_ripple_adder #(.WIDTH(NCOL)) u_final (
    .a    (row0),
    .b    (row1),
    .cin  (1'b0),
    .sum  (p),
    .cout (cout_unused)
  );
endmodule
