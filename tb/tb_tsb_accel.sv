// tb_tsb_accel: end-to-end test of the two-step bitmap accelerator at its
// default sizes (8 x 8 weights, 2 x 2 blocks, 4 PEs).
//
// The testbench holds a behavioural DRAM (word array, request/grant channels
// with random grant stalls and random in-order read latency).  For each test
// it builds a dense weight matrix and activation rows, encodes them itself in
// the two-step bitmap layout, runs the accelerator, and compares every
// output word (bitmap and values) with a dense matrix product computed here.
// It also checks the compute-cycle count against ceil(jobs/P) per row plus
// the fixed per-row overhead, and counts how often each mechanism occurred:
// pruned-block skip, zero-activation skip, zero-element skip, a switch split
// inside a core cycle, a dot product spanning two core cycles, an all-zero
// output column, a row with no jobs, and read/write grant stalls.
// Test 0 is the block/element pattern of the two-step bitmap worked example
// (8 x 8, 2 x 2 blocks); the others are random at 50 % and 75 % block sparsity
// with activation sparsity from 0 % to 87.5 %.
module tb_tsb_accel;
  import tsb_pkg::*;

  localparam int K = K_DEF, N = N_DEF, BR = BR_DEF, BC = BC_DEF, P = P_DEF;
  localparam int KB = K / BR, NB = N / BC;
  localparam int FW = (KB*NB + 31) / 32, AWD = (K + 31) / 32, OBW = (N + 31) / 32;
  localparam int MEMSZ = 4096;
  localparam int ROWS_MAX = 8;

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

  tsb_accel dut (
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
  int ev_block_skip, ev_act_skip, ev_elem_skip, ev_split, ev_span, ev_zero_col,
      ev_empty_row;

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

  // Reference, job list statistics and expected compute cycles.
  int exp_cycles, exp_macs;
  task automatic check_results(input int rows, input string name);
    exp_cycles = 0;
    exp_macs   = 0;
    for (int m = 0; m < rows; m++) begin
      int jobs, pos;
      logic [OBW*32-1:0] bm, got;
      jobs = 0; bm = '0;
      for (int n = 0; n < N; n++) begin
        logic [31:0] acc;
        int first, cnt;
        acc = '0; cnt = 0; first = jobs;
        for (int k = 0; k < K; k++) begin
          if (A[m][k] != 0 && W[k][n] != 0) begin
            acc += A[m][k] * W[k][n];
            cnt++;
          end
          if (A[m][k] != 0 && !blk_keep[(k/BR)*NB + n/BC]) ev_block_skip++;
          if (A[m][k] == 0 && W[k][n] != 0) ev_act_skip++;
          if (A[m][k] != 0 && blk_keep[(k/BR)*NB + n/BC] && W[k][n] == 0) ev_elem_skip++;
        end
        jobs += cnt;
        if (cnt == 0) ev_zero_col++;
        if (cnt > 0 && (first / P) != ((first + cnt - 1) / P)) ev_span++;
        bm[n] = (cnt != 0);
        checks++;
        if (mem[o_base + m*(OBW+N) + OBW + n] !== acc) begin
          failures++;
          $display("FAIL %s row %0d col %0d: got %0d expected %0d", name, m, n,
                   $signed(mem[o_base + m*(OBW+N) + OBW + n]), $signed(acc));
        end
      end
      for (int i = 0; i < OBW; i++) got[i*32 +: 32] = mem[o_base + m*(OBW+N) + i];
      checks++;
      if (got !== bm) begin
        failures++;
        $display("FAIL %s row %0d bitmap: got %h expected %h", name, m, got, bm);
      end
      if (jobs == 0) ev_empty_row++;
      pos = (jobs + P - 1) / P;
      // per row: GUST phase = N decoder cycles + 2 (start and done hand-over),
      // CORE phase = ceil(jobs/P) + 1 core cycles + 2 hand-over cycles
      exp_cycles += (N + 2) + (pos + 3);
      exp_macs   += jobs;
    end
    checks++;
    if (perf_compute_cycles != exp_cycles) begin
      failures++;
      $display("FAIL %s compute cycles %0d expected %0d", name, perf_compute_cycles, exp_cycles);
    end
    checks++;
    if (perf_macs != exp_macs) begin
      failures++;
      $display("FAIL %s macs %0d expected %0d", name, perf_macs, exp_macs);
    end
    $display("%s: rows=%0d macs=%0d compute_cycles=%0d dense_mac_cycles=%0d total_cycles=%0d",
             name, rows, perf_macs, perf_compute_cycles, rows*K*N/P, perf_total_cycles);
  endtask

  task automatic run(input int rows, input string name);
    int wl, al;
    w_base = 32'd16;
    wl = encode_w(16);
    a_base = 32'd16 + 32'(wl);
    al = encode_a(int'(a_base), rows);
    o_base = a_base + 32'(al) + 32'd8;
    for (int i = 0; i < rows*(OBW+N); i++) mem[int'(o_base) + i] = 32'hdead_beef;
    num_rows = 16'(rows);
    @(posedge clk); start <= 1'b1;
    @(posedge clk); start <= 1'b0;
    while (!done) @(posedge clk);
    @(posedge clk);
    check_results(rows, name);
  endtask

  // activation row with a given zero percentage (ReLU-like)
  task automatic make_a(input int rows, input int zero_pct);
    for (int m = 0; m < rows; m++)
      for (int k = 0; k < K; k++)
        A[m][k] = ($urandom_range(99) < zero_pct) ? '0 : rnd_nz();
  endtask

  // Worked example of the two-step bitmap (element pattern, 1 = nonzero).
  localparam logic [7:0] FIG_ROWS [8] = '{
    8'b00010011, 8'b00100001, 8'b10001100, 8'b10000100,
    8'b01100000, 8'b10100000, 8'b00010010, 8'b00100010};
  localparam logic [15:0] FIG_FSB = 16'b1010_0011_0101_1010; // bit bi*4+bj

  initial begin
    checks = 0; failures = 0; stall_pct = 0;
    start = 1'b0; num_rows = '0; w_base = '0; a_base = '0; o_base = '0;
    rd_stalls = 0; wr_stalls = 0;
    ev_block_skip = 0; ev_act_skip = 0; ev_elem_skip = 0; ev_split = 0;
    ev_span = 0; ev_zero_col = 0; ev_empty_row = 0;
    for (int i = 0; i < MEMSZ; i++) mem[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);

    // Test 0: worked-example pattern, row k of the pattern read left to right
    blk_keep = FIG_FSB;
    for (int k = 0; k < K; k++)
      for (int n = 0; n < N; n++)
        W[k][n] = FIG_ROWS[k][N-1-n] ? rnd_nz() : '0;
    make_a(4, 25);
    run(4, "example");
    checks++;
    if (mem[16] !== 32'(FIG_FSB)) begin
      failures++;
      $display("FAIL example: first-step bitmap word %h", mem[16]);
    end

    // Random tests: 50 % and 75 % block sparsity, activation sparsity sweep
    for (int t = 0; t < 16; t++) begin
      stall_pct = (t % 2) ? 30 : 0;
      blk_keep = balanced_keep((t < 8) ? KB/2 : KB/4);
      make_w(blk_keep, 70 + (t % 3) * 15);
      make_a(ROWS_MAX, (t % 8) * 125 / 10);
      if (t == 5) for (int k = 0; k < K; k++) A[2][k] = '0;   // an all-zero row
      run(ROWS_MAX, $sformatf("rand%0d", t));
    end

    // Test with every block pruned: every row produces no jobs
    blk_keep = '0;
    make_w(blk_keep, 100);
    make_a(2, 0);
    run(2, "all_pruned");

    ev_split = split_seen;
    $display("events: split=%0d block_skip=%0d act_skip=%0d elem_skip=%0d zero_col=%0d span=%0d empty_row=%0d rd_stall=%0d wr_stall=%0d",
             ev_split, ev_block_skip, ev_act_skip, ev_elem_skip, ev_zero_col, ev_span,
             ev_empty_row, rd_stalls, wr_stalls);
    checks++; if (ev_block_skip == 0) begin failures++; $display("FAIL no block skip"); end
    checks++; if (ev_act_skip   == 0) begin failures++; $display("FAIL no activation skip"); end
    checks++; if (ev_elem_skip  == 0) begin failures++; $display("FAIL no element skip"); end
    checks++; if (ev_zero_col   == 0) begin failures++; $display("FAIL no zero output column"); end
    checks++; if (ev_split      == 0) begin failures++; $display("FAIL no switch split"); end
    checks++; if (ev_span       == 0) begin failures++; $display("FAIL no dot product spanning core cycles"); end
    checks++; if (ev_empty_row  == 0) begin failures++; $display("FAIL no empty row"); end
    checks++; if (rd_stalls     == 0) begin failures++; $display("FAIL no read stall"); end
    checks++; if (wr_stalls     == 0) begin failures++; $display("FAIL no write stall"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // switch splits seen at the core's dot-product unit
  int split_seen;
  initial split_seen = 0;
  always_ff @(posedge clk) if (dut.u_core.split != 0) split_seen <= split_seen + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
