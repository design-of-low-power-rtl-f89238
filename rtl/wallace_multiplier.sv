// wallace_multiplier: unsigned W x W Wallace tree multiplier (ALU select code 6).
//
// The W*W partial product bits x[i] & y[j] are placed in the column of
// weight i+j. Each reduction stage then works on every column at once: each
// full group of three bits goes to a full adder (a 3:2 counter), a leftover
// pair goes to a half adder, and a single leftover bit passes through. Sums
// stay in their column and carries move to the next column, so no carry
// propagates within a stage. Stages repeat until no column holds more than
// two bits; the two remaining rows are then added by one carry-propagate
// adder (written with '+', so the synthesis tool picks its fast structure).
// The number of stages grows as log(W): 4 stages at W = 8.
//
// The tree is laid out at elaboration. The constant function col_height
// replays the reduction to give the number of bits in each column before
// each stage; in stage s, column c, the bits of the next stage are placed in
// this order: full adder sums, then the half adder sum or the passed bit,
// then the carries arriving from column c-1 (full adder carries first).
//
// Counters in parallel and a final fast adder follow the specification; the
// grouping rule (full adders on triples, half adders on leftover pairs) is
// the classic Wallace one and this design's choice.
//
// Interface: x, y (W bits, unsigned) -> p (2W bits, unsigned).
// Timing: purely combinational, no clock.
module wallace_multiplier #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0]   x,
  input  logic [W-1:0]   y,
  output logic [2*W-1:0] p
);
  localparam int P = 2 * W;   // number of columns
  localparam int H = W;       // no column ever holds more than W bits

  // Bits in column c after s reduction stages.
  function automatic int col_height(int s, int c);
    int h  [P];
    int nh [P];
    for (int k = 0; k < P; k++) begin
      h[k] = (k <= 2*W-2) ? ((k < W) ? k + 1 : 2*W - 1 - k) : 0;
    end
    for (int t = 0; t < s; t++) begin
      for (int k = 0; k < P; k++) begin
        nh[k] = h[k] / 3 + ((h[k] % 3 != 0) ? 1 : 0);
        if (k > 0) nh[k] += h[k-1] / 3 + ((h[k-1] % 3 == 2) ? 1 : 0);
      end
      h = nh;
    end
    return h[c];
  endfunction

  // Number of stages until every column holds at most two bits.
  function automatic int num_stages();
    int s = 0;
    int tallest;
    do begin
      tallest = 0;
      for (int k = 0; k < P; k++) begin
        if (col_height(s, k) > tallest) tallest = col_height(s, k);
      end
      if (tallest > 2) s++;
    end while (tallest > 2);
    return s;
  endfunction

  localparam int NS = num_stages();

  // pp_mat[c] holds the partial product bits of column c; each stage
  // block holds the columns it starts from (cur) and produces (nxt).
  logic [H-1:0] pp_mat [P];
  logic [H-1:0] fin    [P];

  // The partial product bit matrix.
  for (genvar c = 0; c < P; c++) begin : g_pp
    localparam int LO = (c < W) ? 0 : c - W + 1;   // lowest y index in column
    localparam int HC = col_height(0, c);
    for (genvar k = 0; k < H; k++) begin : g_bit
      if (k < HC) begin : g_used
        assign pp_mat[c][k] = x[c-LO-k] & y[LO+k];
      end else begin : g_zero
        assign pp_mat[c][k] = 1'b0;
      end
    end
  end

  // Reduction stages.
  for (genvar s = 0; s < NS; s++) begin : g_stage
    logic [H-1:0] cur [P];
    logic [H-1:0] nxt [P];

    if (s == 0) begin : g_first
      assign cur = pp_mat;
    end else begin : g_next
      assign cur = g_stage[s-1].nxt;
    end

    for (genvar c = 0; c < P; c++) begin : g_col
      localparam int HC  = col_height(s, c);
      localparam int NFA = HC / 3;
      localparam int REM = HC % 3;
      localparam int OWN = NFA + ((REM != 0) ? 1 : 0);        // own outputs
      localparam int HP  = (c > 0) ? col_height(s, c - 1) : 0;
      localparam int CIN = HP / 3 + ((HP % 3 == 2) ? 1 : 0);  // carries in
      localparam int HN  = col_height(s + 1, c);

      // Full adders: sums stay here, carries go to column c+1.
      for (genvar f = 0; f < NFA; f++) begin : g_fa
        logic co;
        full_adder u_fa (
          .a (cur[c][3*f]),
          .b (cur[c][3*f+1]),
          .ci(cur[c][3*f+2]),
          .s (nxt[c][f]),
          .co(co)
        );
        if (c + 1 < P) begin : g_carry
          localparam int NOWN = col_height(s, c + 1) / 3 +
                                ((col_height(s, c + 1) % 3 != 0) ? 1 : 0);
          assign nxt[c+1][NOWN + f] = co;
        end
      end

      if (REM == 2) begin : g_ha
        assign nxt[c][NFA] = cur[c][3*NFA] ^ cur[c][3*NFA+1];
        if (c + 1 < P) begin : g_carry
          localparam int NOWN = col_height(s, c + 1) / 3 +
                                ((col_height(s, c + 1) % 3 != 0) ? 1 : 0);
          assign nxt[c+1][NOWN + NFA] = cur[c][3*NFA] & cur[c][3*NFA+1];
        end
      end else if (REM == 1) begin : g_pass
        assign nxt[c][NFA] = cur[c][3*NFA];
      end

      // Unused positions of the next stage read zero.
      for (genvar k = OWN + CIN; k < H; k++) begin : g_zero
        assign nxt[c][k] = 1'b0;
      end

      if (OWN + CIN != HN) begin : g_bad_count
        $error("wallace_multiplier: column bookkeeping mismatch");
      end
    end
  end

  // Final carry-propagate adder on the two remaining rows. Bits of the
  // top column's carry would weigh 2^P and cannot occur for a product.
  if (NS == 0) begin : g_no_stage
    assign fin = pp_mat;
  end else begin : g_last
    assign fin = g_stage[NS-1].nxt;
  end

  logic [P-1:0] row0, row1;
  for (genvar c = 0; c < P; c++) begin : g_rows
    assign row0[c] = fin[c][0];
    assign row1[c] = fin[c][1];
  end

  assign p = row0 + row1;
endmodule
