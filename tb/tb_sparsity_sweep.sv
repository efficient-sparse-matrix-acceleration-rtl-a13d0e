// tb_sparsity_sweep: runs the sparse-GEMM workloads of the evaluation on a
// 64 x 64 weight tile: column-balanced block pruning to 50 % and 75 % weight
// sparsity (every element of a kept block nonzero), each with activation
// sparsity 0 %, 12.5 %, ... 87.5 % (exactly that share of each activation
// row is zero).  Every output word is checked against a dense product
// computed here, the compute-cycle count against (N+2) + (ceil(jobs/P)+3)
// per row, and the multiplication count against the number of jobs.  For
// each point it prints the compute cycles next to those of a dense engine
// with the same P multipliers (K*N/P per row) and the DRAM words moved
// next to a dense layout (K*N weights + K per row).
module tb_sparsity_sweep;
  import tsb_pkg::*;

  localparam int K = 64, N = 64, BR = 2, BC = 2, P = 4;
  localparam int KB = K / BR, NB = N / BC;
  localparam int FW = (KB*NB + 31) / 32, AWD = (K + 31) / 32, OBW = (N + 31) / 32;
  localparam int MEMSZ = 16384;
  localparam int ROWS_MAX = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        start;
  logic [31:0] w_base, a_base, o_base;
  logic [15:0] num_rows;
  logic        busy, done;
  logic        rd_req, rd_gnt, rd_rvalid;
  logic [31:0] rd_addr, rd_rdata;
  logic        wr_req, wr_gnt;
  logic [31:0] wr_addr, wr_data;
  logic [31:0] perf_compute_cycles, perf_macs, perf_total_cycles, perf_splits;

  tsb_accel #(.K(K), .N(N), .BR(BR), .BC(BC), .P(P)) dut (
    .clk, .rst_n, .start, .w_base, .a_base, .o_base, .num_rows, .busy, .done,
    .rd_req, .rd_addr, .rd_gnt, .rd_rvalid, .rd_rdata,
    .wr_req, .wr_addr, .wr_data, .wr_gnt,
    .perf_compute_cycles, .perf_macs, .perf_total_cycles, .perf_splits
  );

  // ---------------------------------------------------------------- DRAM model
  logic [31:0] mem [MEMSZ];
  int          stall_pct;
  logic [31:0] rq_data [$];
  int          rq_due  [$];
  int          cyc;

  always_ff @(posedge clk) cyc <= cyc + 1;
  initial cyc = 0;

  always_ff @(negedge clk) begin
    rd_gnt <= ($urandom_range(99) >= stall_pct);
    wr_gnt <= ($urandom_range(99) >= stall_pct);
  end

  int rd_stalls, wr_stalls;
  always_ff @(posedge clk) begin
    rd_rvalid <= 1'b0;
    if (rst_n && rd_req && rd_gnt) begin
      rq_data.push_back(mem[rd_addr % MEMSZ]);
      rq_due.push_back(cyc + 1 + ((stall_pct > 0) ? int'($urandom_range(3)) : 0));
    end
    if (rst_n && rd_req && !rd_gnt) rd_stalls++;
    if (rst_n && wr_req && !wr_gnt) wr_stalls++;
    if (rq_due.size() > 0 && rq_due[0] <= cyc) begin
      rd_rvalid <= 1'b1;
      rd_rdata  <= rq_data.pop_front();
      void'(rq_due.pop_front());
    end
    if (rst_n && wr_req && wr_gnt) mem[wr_addr % MEMSZ] <= wr_data;
  end

  // ---------------------------------------------------------------- test data
  logic [31:0] W [K][N];
  logic [31:0] A [ROWS_MAX][K];
  int checks, failures;

  function automatic logic [31:0] rnd_nz();
    logic [31:0] v;
    v = $urandom() % 2001 - 1000;
    if (v == 0) v = 7;
    return v;
  endfunction

  // Weight matrix with a given set of kept blocks and element density (%).
  task automatic make_w(input logic [KB*NB-1:0] keep, input int elem_pct);
    for (int k = 0; k < K; k++)
      for (int n = 0; n < N; n++) begin
        if (keep[(k/BR)*NB + n/BC] && $urandom_range(99) < elem_pct) W[k][n] = rnd_nz();
        else W[k][n] = '0;
      end
  endtask

  // Column-balanced block pattern: each block column keeps `per_col` of KB blocks.
  function automatic logic [KB*NB-1:0] balanced_keep(input int per_col);
    logic [KB*NB-1:0] kp;
    kp = '0;
    for (int bj = 0; bj < NB; bj++) begin
      int got;
      got = 0;
      while (got < per_col) begin
        int bi;
        bi = $urandom_range(KB-1);
        if (!kp[bi*NB + bj]) begin
          kp[bi*NB + bj] = 1'b1;
          got++;
        end
      end
    end
    return kp;
  endfunction

  // Encode W in the two-step bitmap layout at w_base; returns words used.
  function automatic int encode_w(input int base);
    int p, nk;
    logic [FW*32-1:0] f;
    logic [K*N*BR*BC-1:0] sbits;
    f = '0; sbits = '0; nk = 0;
    for (int bi = 0; bi < KB; bi++)
      for (int bj = 0; bj < NB; bj++) begin
        logic any;
        any = 1'b0;
        for (int r = 0; r < BR; r++)
          for (int c = 0; c < BC; c++)
            if (W[bi*BR+r][bj*BC+c] != 0) any = 1'b1;
        // a block is kept when it was kept by pruning; a kept block whose
        // elements all became zero is still encoded as kept
        if (any || blk_keep[bi*NB+bj]) begin
          f[bi*NB+bj] = 1'b1;
          for (int r = 0; r < BR; r++)
            for (int c = 0; c < BC; c++)
              sbits[nk*BR*BC + r*BC + c] = (W[bi*BR+r][bj*BC+c] != 0);
          nk++;
        end
      end
    for (int i = 0; i < FW; i++) mem[base + i] = f[i*32 +: 32];
    p = base + FW;
    for (int i = 0; i < (nk*BR*BC + 31) / 32; i++) mem[p++] = sbits[i*32 +: 32];
    for (int bi = 0; bi < KB; bi++)
      for (int bj = 0; bj < NB; bj++)
        if (f[bi*NB+bj])
          for (int r = 0; r < BR; r++)
            for (int c = 0; c < BC; c++)
              if (W[bi*BR+r][bj*BC+c] != 0) mem[p++] = W[bi*BR+r][bj*BC+c];
    return p - base;
  endfunction

  logic [KB*NB-1:0] blk_keep;

  function automatic int encode_a(input int base, input int rows);
    int p;
    p = base;
    for (int m = 0; m < rows; m++) begin
      logic [AWD*32-1:0] bm;
      bm = '0;
      for (int k = 0; k < K; k++) bm[k] = (A[m][k] != 0);
      for (int i = 0; i < AWD; i++) mem[p++] = bm[i*32 +: 32];
      for (int k = 0; k < K; k++) if (A[m][k] != 0) mem[p++] = A[m][k];
    end
    return p - base;
  endfunction


  int rd_words;
  always_ff @(posedge clk) if (rst_n && rd_req && rd_gnt) rd_words <= rd_words + 1;

  task automatic run_point(input int w_sp, input int a_sp);
    int wl, al, exp_cycles, exp_macs, dense_cycles, dense_words;
    logic [31:0] acc;
    // weights: column-balanced block pruning, kept blocks fully dense
    blk_keep = balanced_keep(KB * (100 - w_sp) / 100);
    make_w(blk_keep, 100);
    // activations: exactly a_sp % zeros per row, at random positions
    for (int m = 0; m < ROWS_MAX; m++) begin
      int nz;
      for (int k = 0; k < K; k++) A[m][k] = rnd_nz();
      nz = 0;
      while (nz < K * a_sp / 1000) begin
        int k;
        k = $urandom_range(K-1);
        if (A[m][k] != 0) begin A[m][k] = '0; nz++; end
      end
    end
    w_base = 32'd16;
    wl = encode_w(16);
    a_base = 32'd16 + 32'(wl);
    al = encode_a(int'(a_base), ROWS_MAX);
    o_base = a_base + 32'(al) + 32'd8;
    num_rows = 16'(ROWS_MAX);
    rd_words = 0;
    @(posedge clk); start <= 1'b1;
    @(posedge clk); start <= 1'b0;
    while (!done) @(posedge clk);
    @(posedge clk);
    exp_cycles = 0; exp_macs = 0;
    for (int m = 0; m < ROWS_MAX; m++) begin
      int jobs;
      logic [OBW*32-1:0] bm, got;
      jobs = 0;
      bm = '0;
      for (int n = 0; n < N; n++) begin
        int cnt;
        acc = '0; cnt = 0;
        for (int k = 0; k < K; k++)
          if (A[m][k] != 0 && W[k][n] != 0) begin acc += A[m][k] * W[k][n]; cnt++; end
        jobs += cnt;
        bm[n] = (cnt != 0);
        checks++;
        if (mem[o_base + m*(OBW+N) + OBW + n] !== acc) begin
          failures++;
          $display("FAIL w%0d a%0d row %0d col %0d", w_sp, a_sp, m, n);
        end
      end
      for (int i = 0; i < OBW; i++) got[i*32 +: 32] = mem[o_base + m*(OBW+N) + i];
      checks++;
      if (got !== bm) begin
        failures++; $display("FAIL w%0d a%0d row %0d bitmap", w_sp, a_sp, m);
      end
      exp_cycles += (N + 2) + ((jobs + P - 1) / P + 3);
      exp_macs   += jobs;
    end
    checks++;
    if (perf_compute_cycles != exp_cycles || perf_macs != exp_macs) begin
      failures++;
      $display("FAIL w%0d a%0d cycles %0d/%0d macs %0d/%0d", w_sp, a_sp,
               perf_compute_cycles, exp_cycles, perf_macs, exp_macs);
    end
    dense_cycles = ROWS_MAX * K * N / P;
    dense_words  = K * N + ROWS_MAX * K;
    checks++;
    if (rd_words != wl + al) begin
      failures++; $display("FAIL words read %0d, encoded %0d", rd_words, wl + al);
    end
    $display("weight %0d%% act %0d.%0d%%: compute %0d cycles vs dense %0d (%0d.%0d%% less); words read %0d vs dense %0d",
             w_sp, a_sp / 10, a_sp % 10, perf_compute_cycles, dense_cycles,
             100 - perf_compute_cycles * 100 / dense_cycles,
             (1000 - perf_compute_cycles * 1000 / dense_cycles) % 10,
             rd_words, dense_words);
  endtask

  initial begin
    checks = 0; failures = 0; stall_pct = 0;
    start = 1'b0; num_rows = '0; w_base = '0; a_base = '0; o_base = '0;
    rd_stalls = 0; wr_stalls = 0;
    for (int i = 0; i < MEMSZ; i++) mem[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int ws = 50; ws <= 75; ws += 25)
      for (int as = 0; as <= 875; as += 125)
        run_point(ws, as);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
