// csa_tree42: carry-save reduction tree built from 4:2 compressors.
//
// Reduces ROWS partial-product rows of W bits each to two rows (sum and
// carry) whose sum, modulo 2^W, equals the sum of the inputs. At every level
// the rows are taken four at a time into a row of compressor42 cells, which
// turns four rows into two; a remainder of three rows goes through a row of
// full adders, and a remainder of one or two rows passes to the next level
// untouched. Within a compressor row the cout of bit j feeds the cin of bit
// j+1; cout does not depend on cin, so nothing ripples. The number of levels
// follows from ROWS at elaboration: 5 rows -> 3 -> 2, 6 rows -> 4 -> 2.
// Bits carried out of position W-1 are dropped (the result is modulo 2^W).
// Purely combinational; the final carry-propagate addition is left to the
// user of the tree. Using 4:2 compressors in the carry-save tree follows the
// original description; the row-wise level schedule is this design's choice.
module csa_tree42 #(
  parameter int unsigned ROWS = 6,
  parameter int unsigned W    = 16
) (
  input  logic [W-1:0] rows_in [ROWS],
  output logic [W-1:0] sum_o,
  output logic [W-1:0] carry_o
);

  // Row count after one reduction level.
  function automatic int unsigned next_rows(int unsigned r);
    if (r <= 2) return r;
    return 2 * (r / 4) + (((r % 4) == 3) ? 2 : (r % 4));
  endfunction

  function automatic int unsigned rows_at(int unsigned lvl);
    int unsigned r = ROWS;
    for (int unsigned i = 0; i < lvl; i++) r = next_rows(r);
    return r;
  endfunction

  function automatic int unsigned num_levels();
    int unsigned r = ROWS;
    int unsigned n = 0;
    while (r > 2) begin
      r = next_rows(r);
      n++;
    end
    return n;
  endfunction

  localparam int unsigned NLEV = num_levels();

  for (genvar l = 0; l < NLEV; l++) begin : g_lvl
    localparam int unsigned R   = rows_at(l);
    localparam int unsigned Q   = R / 4;
    localparam int unsigned REM = R % 4;
    localparam int unsigned RN  = rows_at(l + 1);

    logic [W-1:0] cur [ROWS];   // rows entering this level
    logic [W-1:0] nxt [ROWS];   // rows leaving it

    if (l == 0) begin : g_first
      assign cur = rows_in;
    end else begin : g_chain
      assign cur = g_lvl[l-1].nxt;
    end

    // Groups of four rows through a row of 4:2 compressors.
    for (genvar q = 0; q < Q; q++) begin : g_c42
      logic [W-1:0] s, c, co;
      for (genvar j = 0; j < W; j++) begin : g_bit
        logic ci;
        if (j == 0) begin : g_lsb
          assign ci = 1'b0;
        end else begin : g_mid
          assign ci = co[j-1];
        end
        compressor42 u_c42 (
          .x1(cur[4*q][j]), .x2(cur[4*q+1][j]), .x3(cur[4*q+2][j]), .x4(cur[4*q+3][j]),
          .cin(ci), .sum(s[j]), .carry(c[j]), .cout(co[j])
        );
      end
      assign nxt[2*q]   = s;
      assign nxt[2*q+1] = {c[W-2:0], 1'b0};
    end

    // Remainder rows.
    if (REM == 3) begin : g_fa
      logic [W-1:0] s, c;
      for (genvar j = 0; j < W; j++) begin : g_bit
        full_adder u_fa (
          .a(cur[4*Q][j]), .b(cur[4*Q+1][j]), .c(cur[4*Q+2][j]),
          .sum(s[j]), .carry(c[j])
        );
      end
      assign nxt[2*Q]   = s;
      assign nxt[2*Q+1] = {c[W-2:0], 1'b0};
    end else begin : g_pass
      for (genvar k = 0; k < REM; k++) begin : g_row
        assign nxt[2*Q+k] = cur[4*Q+k];
      end
    end

    // Rows no longer in use at the next level.
    for (genvar k = RN; k < ROWS; k++) begin : g_zero
      assign nxt[k] = '0;
    end
  end

  if (NLEV == 0) begin : g_none
    assign sum_o   = rows_in[0];
    assign carry_o = rows_in[ROWS-1];
  end else begin : g_out
    assign sum_o   = g_lvl[NLEV-1].nxt[0];
    assign carry_o = g_lvl[NLEV-1].nxt[1];
  end

  initial begin
    assert (ROWS >= 2) else $error("csa_tree42: ROWS must be at least 2");
  end

endmodule
