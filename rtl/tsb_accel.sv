// tsb_accel: sparse matrix multiply accelerator for the two-step bitmap
// format (top level).
//
// It computes C = A x W, where W (K x N) is block-pruned and stored as a
// two-step bitmap (block bitmap, element bitmaps of kept blocks, nonzero
// weights) and each row of A (length K) as a bitmap plus its nonzero values.
// Rows of A are processed one at a time in Gustavson order (one full output
// row per activation row):
//
//   LOAD_W   load unit fetches the bitmaps and nonzero weights (once)
//   LOAD_A   load unit fetches one activation row into the input buffer
//   GUST     the bitmap decoder ANDs block bitmap, activation bitmap and
//            element bitmap per output column, writes the output bitmap,
//            and stores the compacted job list in the index buffer
//   CORE     the SpGEMM core multiplies P job pairs per cycle and reduces
//            them through the switch/adder chain into the output buffer
//   STORE    the store unit writes the output bitmap and row to DRAM
//
// and LOAD_A .. STORE repeat for each of the `num_rows` rows.  The phases do
// not overlap.  Zero blocks, zero activations and zero weight elements never
// cost a multiplier cycle: the core's time is ceil(jobs/P)+1 cycles per row.
//
// Interface: pulse `start` with `w_base` (weights), `a_base` (first activation
// row; the rows follow back to back), `o_base` (output rows of
// ceil(N/MEM_W) bitmap words then N values each) and `num_rows`.  `done` pulses when the last
// row has been written.  The DRAM read channel (`rd_*`) and write channel
// (`wr_*`) are request/grant; read data returns in order on `rd_rvalid`.
// `perf_*` count cycles in the compute phases, multiplications performed,
// all cycles of the last run, and switch splits (dot products
// finished before the last lane of a core cycle).
// The block set and connections follow the source design's architecture
// diagram; the phase sequencing, the DRAM layout and the counters are this
// implementation's choices.
module tsb_accel
  import tsb_pkg::*;
#(
  parameter int unsigned K      = K_DEF,
  parameter int unsigned N      = N_DEF,
  parameter int unsigned BR     = BR_DEF,
  parameter int unsigned BC     = BC_DEF,
  parameter int unsigned P      = P_DEF,
  parameter int unsigned DATA_W = DATA_W_DEF,
  parameter int unsigned ACC_W  = ACC_W_DEF,
  parameter int unsigned MEM_W  = MEM_W_DEF,
  parameter int unsigned ADDR_W = ADDR_W_DEF
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [ADDR_W-1:0] w_base,
  input  logic [ADDR_W-1:0] a_base,
  input  logic [ADDR_W-1:0] o_base,
  input  logic [15:0]       num_rows,
  output logic              busy,
  output logic              done,
  // DRAM read channel
  output logic              rd_req,
  output logic [ADDR_W-1:0] rd_addr,
  input  logic              rd_gnt,
  input  logic              rd_rvalid,
  input  logic [MEM_W-1:0]  rd_rdata,
  // DRAM write channel
  output logic              wr_req,
  output logic [ADDR_W-1:0] wr_addr,
  output logic [MEM_W-1:0]  wr_data,
  input  logic              wr_gnt,
  // performance counters (cleared by start)
  output logic [31:0]       perf_compute_cycles,
  output logic [31:0]       perf_macs,
  output logic [31:0]       perf_total_cycles,
  output logic [31:0]       perf_splits
);

  localparam int unsigned NBLK  = (K / BR) * (N / BC);
  localparam int unsigned BE    = BR * BC;
  localparam int unsigned AI_W  = $clog2(K);
  localparam int unsigned WI_W  = $clog2(K * N);
  localparam int unsigned COL_W = $clog2(N);
  localparam int unsigned CNT_W = $clog2(K + 1);
  localparam int unsigned SSB_WORDS = (NBLK * BE + MEM_W - 1) / MEM_W;
  localparam int unsigned SW_W  = (SSB_WORDS > 1) ? $clog2(SSB_WORDS) : 1;
  localparam int unsigned FSB_WORDS = (NBLK + MEM_W - 1) / MEM_W;
  localparam int unsigned FW_W  = (FSB_WORDS > 1) ? $clog2(FSB_WORDS) : 1;
  localparam int unsigned ABM_WORDS = (K + MEM_W - 1) / MEM_W;
  localparam int unsigned AW_W  = (ABM_WORDS > 1) ? $clog2(ABM_WORDS) : 1;
  localparam int unsigned OBW   = (N + MEM_W - 1) / MEM_W;   // output bitmap words

  // ------------------------------------------------------------ sequencer
  phase_e            ph;
  logic [15:0]       row;
  logic [ADDR_W-1:0] a_ptr, o_ptr;
  logic              ld_cmd_w, ld_cmd_a, gu_start, row_clr, co_start, st_start;
  logic [ADDR_W-1:0] ld_addr;

  logic              ld_done, gu_done, co_done, st_done;
  logic [ADDR_W-1:0] ld_next;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph       <= PH_IDLE;
      row      <= '0;
      a_ptr    <= '0;
      o_ptr    <= '0;
      ld_cmd_w <= 1'b0;
      ld_cmd_a <= 1'b0;
      ld_addr  <= '0;
      gu_start <= 1'b0;
      row_clr  <= 1'b0;
      co_start <= 1'b0;
      st_start <= 1'b0;
      done     <= 1'b0;
    end else begin
      ld_cmd_w <= 1'b0;
      ld_cmd_a <= 1'b0;
      gu_start <= 1'b0;
      row_clr  <= 1'b0;
      co_start <= 1'b0;
      st_start <= 1'b0;
      done     <= 1'b0;
      unique case (ph)
        PH_IDLE: if (start) begin
          ph       <= PH_LOAD_W;
          ld_cmd_w <= 1'b1;
          ld_addr  <= w_base;
          a_ptr    <= a_base;
          o_ptr    <= o_base;
          row      <= '0;
        end
        PH_LOAD_W: if (ld_done) begin
          if (num_rows == 0) begin
            ph   <= PH_IDLE;
            done <= 1'b1;
          end else begin
            ph       <= PH_LOAD_A;
            ld_cmd_a <= 1'b1;
            ld_addr  <= a_ptr;
          end
        end
        PH_LOAD_A: if (ld_done) begin
          a_ptr    <= ld_next;
          ph       <= PH_GUST;
          gu_start <= 1'b1;
          row_clr  <= 1'b1;
        end
        PH_GUST: if (gu_done) begin
          ph       <= PH_CORE;
          co_start <= 1'b1;
        end
        PH_CORE: if (co_done) begin
          ph       <= PH_STORE;
          st_start <= 1'b1;
        end
        PH_STORE: if (st_done) begin
          o_ptr <= o_ptr + ADDR_W'(OBW + N);
          row   <= row + 1'b1;
          if (row + 1'b1 == num_rows) begin
            ph   <= PH_IDLE;
            done <= 1'b1;
          end else begin
            ph       <= PH_LOAD_A;
            ld_cmd_a <= 1'b1;
            ld_addr  <= a_ptr;
          end
        end
        default: ph <= PH_IDLE;
      endcase
    end
  end

  assign busy = (ph != PH_IDLE);

  // ------------------------------------------------------------ load
  logic [MEM_W-1:0]  ld_wdata;
  logic              fsb_we, ssb_clr, ssb_we, w_we, abm_we, a_we;
  logic [SW_W-1:0]   ssb_waddr;
  logic [FW_W-1:0]   fsb_waddr;
  logic [AW_W-1:0]   abm_waddr;
  logic [WI_W-1:0]   w_waddr;
  logic [AI_W-1:0]   a_waddr;
  logic              ld_busy;

  load_unit #(
    .K(K), .N(N), .BR(BR), .BC(BC), .MEM_W(MEM_W), .ADDR_W(ADDR_W)
  ) u_load (
    .clk, .rst_n,
    .cmd_w(ld_cmd_w), .cmd_a(ld_cmd_a), .addr(ld_addr),
    .rd_req, .rd_addr, .rd_gnt, .rd_rvalid, .rd_rdata,
    .wdata(ld_wdata), .fsb_we, .fsb_waddr, .ssb_clr, .ssb_we, .ssb_waddr,
    .w_we, .w_waddr, .abm_we, .abm_waddr, .a_we, .a_waddr,
    .busy(ld_busy), .done(ld_done), .next_addr(ld_next)
  );

  // ------------------------------------------------------------ buffers
  logic [NBLK-1:0]    fsb;
  logic [NBLK*BE-1:0] ssb;
  logic [K-1:0]       abm;

  bitmap_buffer #(.BITS(NBLK), .WORD_W(MEM_W)) u_fsb_buf (
    .clk, .rst_n, .clr(1'b0), .we(fsb_we), .waddr(fsb_waddr), .wdata(ld_wdata), .bits(fsb)
  );

  bitmap_buffer #(.BITS(NBLK*BE), .WORD_W(MEM_W)) u_ssb_buf (
    .clk, .rst_n, .clr(ssb_clr), .we(ssb_we), .waddr(ssb_waddr), .wdata(ld_wdata), .bits(ssb)
  );

  bitmap_buffer #(.BITS(K), .WORD_W(MEM_W)) u_abm_buf (
    .clk, .rst_n, .clr(1'b0), .we(abm_we), .waddr(abm_waddr), .wdata(ld_wdata), .bits(abm)
  );

  logic [P-1:0][AI_W-1:0]   a_raddr;
  logic [P-1:0][DATA_W-1:0] a_rdata;
  logic [P-1:0][WI_W-1:0]   w_raddr;
  logic [P-1:0][DATA_W-1:0] w_rdata;

  value_buffer #(.DEPTH(K), .W(DATA_W), .NRD(P)) u_input_buf (
    .clk, .we(a_we), .waddr(a_waddr), .wdata(DATA_W'(ld_wdata)),
    .raddr(a_raddr), .rdata(a_rdata)
  );

  value_buffer #(.DEPTH(K*N), .W(DATA_W), .NRD(P)) u_weight_buf (
    .clk, .we(w_we), .waddr(w_waddr), .wdata(DATA_W'(ld_wdata)),
    .raddr(w_raddr), .rdata(w_rdata)
  );

  // ------------------------------------------------------------ decoder
  logic                   gu_valid, gu_obm;
  logic [COL_W-1:0]       gu_col;
  logic [CNT_W-1:0]       gu_cnt;
  logic [K-1:0][AI_W-1:0] gu_aidx;
  logic [K-1:0][WI_W-1:0] gu_widx;

  gustavson_unit #(.K(K), .N(N), .BR(BR), .BC(BC)) u_gust (
    .clk, .rst_n, .start(gu_start), .fsb, .ssb, .abm,
    .out_valid(gu_valid), .out_col(gu_col), .out_cnt(gu_cnt),
    .out_aidx(gu_aidx), .out_widx(gu_widx), .out_obm(gu_obm), .done(gu_done)
  );

  // ------------------------------------------------------------ index buffer
  logic [P-1:0]             ix_valid;
  logic [P-1:0][AI_W-1:0]   ix_aidx;
  logic [P-1:0][WI_W-1:0]   ix_widx;
  logic [P-1:0][COL_W-1:0]  ix_col;
  logic                     ix_empty, ix_pop;
  logic [$clog2(K*N+1)-1:0] ix_count;

  index_buffer #(.K(K), .N(N), .P(P)) u_index_buf (
    .clk, .rst_n, .clr(row_clr),
    .wr_en(gu_valid), .wr_cnt(gu_cnt), .wr_col(gu_col),
    .wr_aidx(gu_aidx), .wr_widx(gu_widx),
    .pop(ix_pop), .rd_valid(ix_valid), .rd_aidx(ix_aidx), .rd_widx(ix_widx),
    .rd_col(ix_col), .empty(ix_empty), .count(ix_count)
  );

  // ------------------------------------------------------------ SpGEMM core
  logic [P-1:0]             acc_en;
  logic [P-1:0][COL_W-1:0]  acc_col;
  logic [P-1:0][ACC_W-1:0]  acc_val;
  logic                     co_busy;
  logic [$clog2(P+1)-1:0]   co_split;

  spgemm_core #(.K(K), .N(N), .P(P), .DATA_W(DATA_W), .ACC_W(ACC_W)) u_core (
    .clk, .rst_n, .start(co_start),
    .ix_valid, .ix_aidx, .ix_widx, .ix_col, .ix_empty, .ix_pop,
    .a_raddr, .a_rdata, .w_raddr, .w_rdata,
    .acc_en, .acc_col, .acc_val,
    .busy(co_busy), .done(co_done), .split(co_split)
  );

  // ------------------------------------------------------------ output side
  logic [COL_W-1:0] ob_rd_col;
  logic [ACC_W-1:0] ob_rd_data;
  logic [N-1:0]     obm;

  output_buffer #(.N(N), .P(P), .ACC_W(ACC_W)) u_out_buf (
    .clk, .rst_n, .clr(row_clr),
    .acc_en, .acc_col, .acc_val,
    .obm_we(gu_valid), .obm_col(gu_col), .obm_bit(gu_obm),
    .rd_col(ob_rd_col), .rd_data(ob_rd_data), .obm
  );

  store_unit #(.N(N), .ACC_W(ACC_W), .MEM_W(MEM_W), .ADDR_W(ADDR_W)) u_store (
    .clk, .rst_n, .start(st_start), .base(o_ptr),
    .rd_col(ob_rd_col), .rd_data(ob_rd_data), .obm,
    .wr_req, .wr_addr, .wr_data, .wr_gnt, .done(st_done)
  );

  // ------------------------------------------------------------ counters
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      perf_compute_cycles <= '0;
      perf_macs           <= '0;
      perf_total_cycles   <= '0;
      perf_splits         <= '0;
    end else if (ph == PH_IDLE && start) begin
      perf_compute_cycles <= '0;
      perf_macs           <= '0;
      perf_total_cycles   <= '0;
      perf_splits         <= '0;
    end else if (busy) begin
      perf_total_cycles <= perf_total_cycles + 1;
      if (ph == PH_GUST || ph == PH_CORE) perf_compute_cycles <= perf_compute_cycles + 1;
      if (ix_pop) perf_macs <= perf_macs + 32'($countones(ix_valid));
      perf_splits <= perf_splits + 32'(co_split);
    end
  end

endmodule
