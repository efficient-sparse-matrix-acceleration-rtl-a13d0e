// tb_index_buffer: appends bursts of 0..K entries per cycle (one output
// column each) and drains the list P entries per pop, comparing the read
// window, `empty` and `count` with a queue model; also checks clear and
// that pops on an empty list do nothing.
module tb_index_buffer;
  localparam int K = 8, N = 8, P = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic               clr, wr_en, pop, empty;
  logic [3:0]         wr_cnt;
  logic [2:0]         wr_col;
  logic [K-1:0][2:0]  wr_aidx;
  logic [K-1:0][5:0]  wr_widx;
  logic [P-1:0]       rd_valid;
  logic [P-1:0][2:0]  rd_aidx, rd_col;
  logic [P-1:0][5:0]  rd_widx;
  logic [6:0]         count;
  int checks = 0, failures = 0;

  index_buffer #(.K(K), .N(N), .P(P)) dut (
    .clk, .rst_n, .clr, .wr_en, .wr_cnt, .wr_col, .wr_aidx, .wr_widx, .pop,
    .rd_valid, .rd_aidx, .rd_widx, .rd_col, .empty, .count);

  logic [11:0] q [$];     // {aidx, widx, col}
  int          written;

  task automatic check_window(input string name);
    #1;
    for (int i = 0; i < P; i++) begin
      checks++;
      if (rd_valid[i] !== (i < q.size())) begin
        failures++; $display("FAIL %s lane %0d valid %b (q=%0d)", name, i, rd_valid[i], q.size());
      end else if (i < q.size() && {rd_aidx[i], rd_widx[i], rd_col[i]} !== q[i]) begin
        failures++; $display("FAIL %s lane %0d entry %h vs %h", name, i,
                             {rd_aidx[i], rd_widx[i], rd_col[i]}, q[i]);
      end
    end
    checks++;
    if (empty !== (q.size() == 0) || int'(count) != written) begin
      failures++; $display("FAIL %s empty=%b count=%0d (q=%0d written=%0d)", name, empty, count, q.size(), written);
    end
  endtask

  initial begin
    clr = 0; wr_en = 0; pop = 0; wr_cnt = 0; wr_col = 0; wr_aidx = '0; wr_widx = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int rnd = 0; rnd < 20; rnd++) begin
      // clear, then fill N columns
      @(negedge clk); clr = 1;
      @(posedge clk); q.delete(); written = 0;
      @(negedge clk); clr = 0;
      check_window("after clear");
      for (int n = 0; n < N; n++) begin
        @(negedge clk);
        wr_en = 1; wr_col = 3'(n);
        wr_cnt = 4'($urandom_range(K));
        if (rnd == 1) wr_cnt = 4'(K);
        if (rnd == 2) wr_cnt = 0;
        for (int i = 0; i < K; i++) begin wr_aidx[i] = $urandom(); wr_widx[i] = $urandom(); end
        @(posedge clk);
        for (int i = 0; i < int'(wr_cnt); i++) q.push_back({wr_aidx[i], wr_widx[i], wr_col});
        written += int'(wr_cnt);
      end
      @(negedge clk); wr_en = 0;
      check_window("filled");
      // drain, with some idle cycles, and a few extra pops
      while (q.size() > 0 || $urandom_range(3) != 0) begin
        @(negedge clk); pop = ($urandom_range(3) != 0);
        @(posedge clk);
        if (pop) for (int i = 0; i < P && q.size() > 0; i++) void'(q.pop_front());
        @(negedge clk); pop = 0;
        check_window("drain");
        if (q.size() == 0 && $urandom_range(1) == 0) break;
      end
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
