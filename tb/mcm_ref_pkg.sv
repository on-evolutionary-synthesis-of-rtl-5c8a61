// Reference model used by the testbenches of the evolutionary MCM
// accelerator: evaluates a chromosome the way the VRC and the fitness unit
// are specified (column by column, previous-column operands, outputs taken
// from the last column first) and computes its error, wire count and fitness.
// Written independently of the RTL, from the definitions in the README.
package mcm_ref_pkg;

  localparam int W = 16, COLS = 4, ROWS = 11, NOUT = 32, GENE_W = 10;
  localparam int CH_W = COLS * ROWS * GENE_W;

  typedef logic [W-1:0] word_t;
  typedef word_t outs_t [NOUT];

  // Gene of the CFB in column c, row r.
  function automatic logic [GENE_W-1:0] gene(logic [CH_W-1:0] ch, int c, int r);
    return ch[(c * ROWS + r) * GENE_W +: GENE_W];
  endfunction

  function automatic outs_t evaluate(logic [CH_W-1:0] ch, word_t x, output int wires);
    word_t cur[ROWS], nxt[ROWS], all[COLS][ROWS];
    word_t a, b;
    int fn, sa, sb;
    outs_t o;
    wires = 0;
    for (int r = 0; r < ROWS; r++) cur[r] = x;
    for (int c = 0; c < COLS; c++) begin
      for (int r = 0; r < ROWS; r++) begin
        fn = int'(gene(ch, c, r) & 10'h3);
        sa = int'(gene(ch, c, r) >> 2) & 15;
        sb = int'(gene(ch, c, r) >> 6) & 15;
        a = (sa >= 1 && sa <= ROWS) ? cur[sa-1] : x;
        b = (sb >= 1 && sb <= ROWS) ? cur[sb-1] : x;
        case (fn)
          0: nxt[r] = a + b;
          1: nxt[r] = a - b;
          2: nxt[r] = word_t'(32'(a) << sb);
          default: begin nxt[r] = a; wires++; end
        endcase
      end
      cur = nxt;
      all[c] = nxt;
    end
    for (int k = 0; k < NOUT; k++) o[k] = all[COLS - 1 - k / ROWS][k % ROWS];
    return o;
  endfunction

  function automatic longint error_of(outs_t o, word_t desired[NOUT], logic [NOUT-1:0] mask);
    longint e = 0;
    for (int k = 0; k < NOUT; k++)
      if (mask[k]) e += (o[k] > desired[k]) ? longint'(o[k] - desired[k]) : longint'(desired[k] - o[k]);
    return e;
  endfunction

  function automatic logic [31:0] fitness_of(logic [CH_W-1:0] ch, word_t desired[NOUT],
                                            logic [NOUT-1:0] mask, output longint err);
    int wires;
    outs_t o;
    o = evaluate(ch, word_t'(1), wires);
    err = error_of(o, desired, mask);
    return (err == 0) ? 32'h8000_0000 + 32'(wires) : 32'h8000_0000 - 32'(err);
  endfunction

endpackage
