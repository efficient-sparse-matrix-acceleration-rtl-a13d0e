// tb_spgemm_core: runs the SpGEMM core on random job lists sorted by output
// column.  The index window is served from a queue model, the input and
// weight buffers from arrays; the accumulate ports are summed into a model
// output row.  Each row is compared with sums of act[a]*wt[w] computed here,
// and the time from start to done must be ceil(jobs/P)+1 cycles.
module tb_spgemm_core;
  localparam int K = 8, N = 8, P = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic               start, ix_empty, ix_pop, busy, done;
  logic [P-1:0]       ix_valid, acc_en;
  logic [P-1:0][2:0]  ix_aidx, ix_col, acc_col, a_raddr;
  logic [P-1:0][5:0]  ix_widx, w_raddr;
  logic [P-1:0][31:0] a_rdata, w_rdata, acc_val;
  logic [2:0]         split;
  int checks = 0, failures = 0;

  spgemm_core #(.K(K), .N(N), .P(P), .DATA_W(32), .ACC_W(32)) dut (
    .clk, .rst_n, .start, .ix_valid, .ix_aidx, .ix_widx, .ix_col, .ix_empty, .ix_pop,
    .a_raddr, .a_rdata, .w_raddr, .w_rdata, .acc_en, .acc_col, .acc_val,
    .busy, .done, .split);

  logic [31:0] act [K];
  logic [31:0] wt [K*N];
  logic [11:0] q [$];          // {aidx, widx, col}
  logic [31:0] outrow [N];

  always_comb begin
    for (int i = 0; i < P; i++) begin
      ix_valid[i] = (i < q.size());
      {ix_aidx[i], ix_widx[i], ix_col[i]} = (i < q.size()) ? q[i] : 12'h0;
      a_rdata[i] = act[a_raddr[i]];
      w_rdata[i] = wt[w_raddr[i]];
    end
    ix_empty = (q.size() == 0);
  end

  always @(posedge clk) begin
    if (ix_pop) for (int i = 0; i < P && q.size() > 0; i++) void'(q.pop_front());
    for (int i = 0; i < P; i++) if (acc_en[i]) outrow[acc_col[i]] += acc_val[i];
  end

  initial begin
    start = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      logic [31:0] exp_row [N];
      int jobs, cyc;
      for (int k = 0; k < K; k++) act[k] = $urandom() % 1001 - 500;
      for (int i = 0; i < K*N; i++) wt[i] = $urandom() % 1001 - 500;
      for (int n = 0; n < N; n++) begin outrow[n] = '0; exp_row[n] = '0; end
      jobs = 0;
      for (int n = 0; n < N; n++) begin
        int c;
        c = $urandom_range(K);
        if (t == 0) c = 0;
        if (t == 1) c = K;
        if (t == 2) c = (n % 3 == 0) ? 1 : 0;
        for (int j = 0; j < c; j++) begin
          logic [2:0] a;
          logic [5:0] w;
          a = 3'($urandom());
          w = 6'($urandom());
          q.push_back({a, w, 3'(n)});
          exp_row[n] += act[a] * wt[w];
          jobs++;
        end
      end
      @(negedge clk); start = 1;
      @(posedge clk);
      @(negedge clk); start = 0;
      cyc = 0;
      while (!done) begin @(posedge clk); cyc++; #1; end
      checks++;
      if (cyc != (jobs + P - 1) / P + 1) begin
        failures++; $display("FAIL test %0d: %0d jobs took %0d cycles", t, jobs, cyc);
      end
      for (int n = 0; n < N; n++) begin
        checks++;
        if (outrow[n] !== exp_row[n]) begin
          failures++; $display("FAIL test %0d col %0d: %0d vs %0d", t, n,
                               $signed(outrow[n]), $signed(exp_row[n]));
        end
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
