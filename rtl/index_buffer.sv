// index_buffer: the "store index to buffer" stage.  It keeps the compacted
// list of multiply jobs of one activation row and hands it to the SpGEMM core
// P entries at a time.
//
// Every entry is {activation index, weight index, output column}.  The
// decoder appends up to K entries per cycle (all jobs of one output column,
// already compacted, so they land at consecutive addresses).  Because the
// decoder visits columns in ascending order, the list is sorted by output
// column, which the switch/adder chain of the dot-product unit relies on.
//
// Interface: `clr` empties the list (write and read pointers to 0).
// `wr_en` appends entries 0 .. wr_cnt-1 of `wr_aidx`/`wr_widx`, all with column
// `wr_col`.  The read window `rd_*[i]` shows entry rptr+i with `rd_valid[i]`
// set when it exists; `pop` advances the read pointer by P (past the end is
// clamped).  `empty` is high when every written entry has been popped.
// Writes and pops take effect at the next rising edge; the window is
// combinational from the stored list.
// The buffer is named in the source design; its organisation is this
// implementation's choice.
module index_buffer #(
  parameter int unsigned K = tsb_pkg::K_DEF,
  parameter int unsigned N = tsb_pkg::N_DEF,
  parameter int unsigned P = tsb_pkg::P_DEF,
  localparam int unsigned DEPTH = K * N,
  localparam int unsigned PTR_W = $clog2(DEPTH + 1),
  localparam int unsigned AI_W  = $clog2(K),
  localparam int unsigned WI_W  = $clog2(K * N),
  localparam int unsigned COL_W = $clog2(N),
  localparam int unsigned CNT_W = $clog2(K + 1)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clr,
  input  logic                     wr_en,
  input  logic [CNT_W-1:0]         wr_cnt,
  input  logic [COL_W-1:0]         wr_col,
  input  logic [K-1:0][AI_W-1:0]   wr_aidx,
  input  logic [K-1:0][WI_W-1:0]   wr_widx,
  input  logic                     pop,
  output logic [P-1:0]             rd_valid,
  output logic [P-1:0][AI_W-1:0]   rd_aidx,
  output logic [P-1:0][WI_W-1:0]   rd_widx,
  output logic [P-1:0][COL_W-1:0] rd_col,
  output logic                     empty,
  output logic [PTR_W-1:0]         count
);

  logic [AI_W-1:0]  mem_a [DEPTH];
  logic [WI_W-1:0]  mem_w [DEPTH];
  logic [COL_W-1:0] mem_c [DEPTH];
  logic [PTR_W-1:0] wptr, rptr;

  always_ff @(posedge clk) begin
    if (wr_en && !clr) begin
      for (int i = 0; i < K; i++) begin
        if (i < int'(wr_cnt) && (int'(wptr) + i) < DEPTH) begin
          mem_a[int'(wptr) + i] <= wr_aidx[i];
          mem_w[int'(wptr) + i] <= wr_widx[i];
          mem_c[int'(wptr) + i] <= wr_col;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0;
      rptr <= '0;
    end else if (clr) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (wr_en) wptr <= wptr + PTR_W'(wr_cnt);
      if (pop && !empty) begin
        if (int'(rptr) + P >= int'(wptr)) rptr <= wptr;
        else                              rptr <= rptr + PTR_W'(P);
      end
    end
  end

  always_comb begin
    for (int i = 0; i < P; i++) begin
      automatic int unsigned a;
      a = int'(rptr) + i;
      rd_valid[i] = (a < int'(wptr));
      rd_aidx[i]  = (a < DEPTH) ? mem_a[a] : '0;
      rd_widx[i]  = (a < DEPTH) ? mem_w[a] : '0;
      rd_col[i]   = (a < DEPTH) ? mem_c[a] : '0;
    end
  end

  assign empty = (rptr >= wptr);
  assign count = wptr;

  // The list can never hold more than one entry per (k, n) pair.
  assert property (@(posedge clk) disable iff (!rst_n)
                   wr_en && !clr |-> (int'(wptr) + int'(wr_cnt)) <= DEPTH)
    else $error("index_buffer overflow");

endmodule
