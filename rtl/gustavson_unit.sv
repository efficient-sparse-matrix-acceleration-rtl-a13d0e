// gustavson_unit: two-step bitmap decoder ("Gustavson calculation").
//
// For one activation row a (bitmap abm) and the weight matrix W (first-step
// bitmap fsb, second-step bitmap ssb) it visits the output columns n = 0 ..
// N-1, one per cycle.  For column n and every k in 0..K-1 it forms
//
//   valid[k] = fsb[block(k,n)] & abm[k] & ssb_bit(block(k,n), element(k,n))
//
// i.e. the first-step bitmap selects the activations whose weight block was
// kept, and that result is ANDed with the element bitmap.  The set positions
// are then compacted to the low end of the list (prefix count of ones), and
// each surviving k gets its index into the compressed activation row
// (popcount of abm below k) and into the compressed weight array (the kept
// weights of all earlier kept blocks, in row-major block order, plus the
// ones earlier inside the block).  The output bitmap bit of column n is the
// OR of valid[].
//
// Layout of the bitmaps: fsb bit (bi*NB + bj) is block row bi, block column
// bj.  The second-step bitmap of the o-th kept block (row-major order) is
// ssb bits o*BR*BC .. o*BR*BC+BR*BC-1, element (r,c) of the block at bit
// r*BC + c.  The nonzero weights are stored in that same order.
//
// Interface: pulse `start` for one cycle while the bitmaps are stable; the
// unit then produces one registered column result per cycle for N cycles on
// `out_valid`/`out_col`/`out_cnt`/`out_aidx`/`out_widx`/`out_obm` (entries 0 ..
// out_cnt-1 are valid), and pulses `done` with the last one.  The bitmaps must
// stay stable until `done`.
// The AND of bitmaps, the output bitmap and the shift-down of ones come from
// the source design; the column-per-cycle schedule and the index arithmetic
// are this implementation's choices.
module gustavson_unit #(
  parameter int unsigned K  = tsb_pkg::K_DEF,
  parameter int unsigned N  = tsb_pkg::N_DEF,
  parameter int unsigned BR = tsb_pkg::BR_DEF,
  parameter int unsigned BC = tsb_pkg::BC_DEF,
  localparam int unsigned KB    = K / BR,
  localparam int unsigned NB    = N / BC,
  localparam int unsigned NBLK  = KB * NB,
  localparam int unsigned BE    = BR * BC,
  localparam int unsigned AI_W  = $clog2(K),
  localparam int unsigned WI_W  = $clog2(K * N),
  localparam int unsigned COL_W = $clog2(N),
  localparam int unsigned CNT_W = $clog2(K + 1)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  input  logic [NBLK-1:0]            fsb,
  input  logic [NBLK*BE-1:0]         ssb,
  input  logic [K-1:0]               abm,
  output logic                       out_valid,
  output logic [COL_W-1:0]           out_col,
  output logic [CNT_W-1:0]           out_cnt,
  output logic [K-1:0][AI_W-1:0]     out_aidx,
  output logic [K-1:0][WI_W-1:0]     out_widx,
  output logic                       out_obm,
  output logic                       done
);

  // ---- per-block ordinal and weight base (prefix sums over the bitmaps) ----
  logic [NBLK-1:0][$clog2(NBLK+1)-1:0] blk_ord;
  logic [NBLK-1:0][WI_W:0]             blk_wbase;

  always_comb begin
    automatic int unsigned ord, wb;
    ord = 0;
    wb  = 0;
    for (int b = 0; b < NBLK; b++) begin
      blk_ord[b]   = ($clog2(NBLK+1))'(ord);
      blk_wbase[b] = (WI_W+1)'(wb);
      if (fsb[b]) begin
        for (int e = 0; e < BE; e++) wb += int'(ssb[ord*BE + e]);
        ord++;
      end
    end
  end

  // ---- column sequencer ----
  logic             busy;
  logic [COL_W-1:0] col;

  // ---- per-column valid vector and index arithmetic ----
  logic [K-1:0]            valid;
  logic [K-1:0][AI_W-1:0]  aidx;
  logic [K-1:0][WI_W-1:0]  widx;

  always_comb begin
    automatic int unsigned bj, c, bi, r, blk, e, base, off, acnt;
    bj   = int'(col) / BC;
    c    = int'(col) % BC;
    acnt = 0;
    for (int k = 0; k < K; k++) begin
      bi   = k / BR;
      r    = k % BR;
      blk  = bi * NB + bj;
      e    = r * BC + c;
      base = int'(blk_ord[blk]) * BE;
      off  = 0;
      for (int j = 0; j < BE; j++) if (j < e) off += int'(ssb[base + j]);
      valid[k] = fsb[blk] & abm[k] & ssb[base + e];
      aidx[k]  = AI_W'(acnt);
      widx[k]  = WI_W'(int'(blk_wbase[blk]) + off);
      acnt    += int'(abm[k]);
    end
  end

  // ---- compaction: move the ones of valid[] to the low end ----
  logic [K-1:0][AI_W-1:0] cmp_aidx;
  logic [K-1:0][WI_W-1:0] cmp_widx;
  logic [CNT_W-1:0]       cmp_cnt;

  always_comb begin
    automatic int unsigned pos;
    pos      = 0;
    cmp_aidx = '0;
    cmp_widx = '0;
    for (int k = 0; k < K; k++) begin
      if (valid[k]) begin
        cmp_aidx[pos] = aidx[k];
        cmp_widx[pos] = widx[k];
        pos++;
      end
    end
    cmp_cnt = CNT_W'(pos);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      col       <= '0;
      out_valid <= 1'b0;
      out_col   <= '0;
      out_cnt   <= '0;
      out_aidx  <= '0;
      out_widx  <= '0;
      out_obm   <= 1'b0;
      done      <= 1'b0;
    end else begin
      out_valid <= busy;
      done      <= 1'b0;
      if (busy) begin
        out_col  <= col;
        out_cnt  <= cmp_cnt;
        out_aidx <= cmp_aidx;
        out_widx <= cmp_widx;
        out_obm  <= |valid;
        if (32'(col) == N - 1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
        col <= col + 1'b1;
      end else if (start) begin
        busy <= 1'b1;
        col  <= '0;
      end
    end
  end

endmodule
