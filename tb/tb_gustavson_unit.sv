// tb_gustavson_unit: checks the two-step bitmap decoder.
//
// The expected job list of each output column is worked out here from a
// dense 0/1 pattern of the weight matrix and the activation bitmap: every k
// (ascending) with a nonzero activation and a nonzero weight, with its rank
// among the nonzero activations and among the stored weights (kept blocks
// in row-major order, elements row-major inside a block).  Test 0 uses the
// dense pattern and the printed first- and second-step bitmaps of the
// format's worked example; the others are random.  The test also checks
// the output bitmap bit and the timing: column n is presented n+1 cycles
// after start is sampled, one column per cycle, with done on the last.
module tb_gustavson_unit;
  localparam int K = 8, N = 8, BR = 2, BC = 2, KB = K/BR, NB = N/BC, NBLK = KB*NB, BE = BR*BC;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                   start;
  logic [NBLK-1:0]        fsb;
  logic [NBLK*BE-1:0]     ssb;
  logic [K-1:0]           abm;
  logic                   out_valid, out_obm, done;
  logic [2:0]             out_col;
  logic [3:0]             out_cnt;
  logic [K-1:0][2:0]      out_aidx;
  logic [K-1:0][5:0]      out_widx;
  int checks = 0, failures = 0;

  gustavson_unit #(.K(K), .N(N), .BR(BR), .BC(BC)) dut (
    .clk, .rst_n, .start, .fsb, .ssb, .abm,
    .out_valid, .out_col, .out_cnt, .out_aidx, .out_widx, .out_obm, .done);

  logic           wnz [K][N];
  logic [NBLK-1:0] keep;
  int             widx_of [K][N];

  // encode the dense pattern; also numbers the stored weights
  task automatic encode();
    int o, w;
    fsb = '0; ssb = '0; o = 0; w = 0;
    for (int bi = 0; bi < KB; bi++)
      for (int bj = 0; bj < NB; bj++)
        if (keep[bi*NB+bj]) begin
          fsb[bi*NB+bj] = 1'b1;
          for (int r = 0; r < BR; r++)
            for (int c = 0; c < BC; c++) begin
              ssb[o*BE + r*BC + c] = wnz[bi*BR+r][bj*BC+c];
              if (wnz[bi*BR+r][bj*BC+c]) widx_of[bi*BR+r][bj*BC+c] = w++;
            end
          o++;
        end
  endtask

  task automatic run(input string name);
    @(negedge clk); start = 1'b1;
    @(posedge clk);                 // start sampled
    @(negedge clk); start = 1'b0;
    for (int n = 0; n < N; n++) begin
      int cnt, ar;
      logic obm_e;
      @(posedge clk); #1;
      checks++;
      if (!out_valid || out_col !== 3'(n) || done !== (n == N-1)) begin
        failures++;
        $display("FAIL %s col %0d timing: valid=%b col=%0d done=%b", name, n, out_valid, out_col, done);
      end
      cnt = 0; ar = 0;
      for (int k = 0; k < K; k++) begin
        if (abm[k] && wnz[k][n]) begin
          checks++;
          if (out_aidx[cnt] !== 3'(ar) || out_widx[cnt] !== 6'(widx_of[k][n])) begin
            failures++;
            $display("FAIL %s col %0d entry %0d: a=%0d w=%0d expected a=%0d w=%0d", name, n, cnt,
                     out_aidx[cnt], out_widx[cnt], ar, widx_of[k][n]);
          end
          cnt++;
        end
        if (abm[k]) ar++;
      end
      obm_e = (cnt != 0);
      checks++;
      if (out_cnt !== 4'(cnt) || out_obm !== obm_e) begin
        failures++;
        $display("FAIL %s col %0d count %0d expected %0d, obm %b", name, n, out_cnt, cnt, out_obm);
      end
    end
    @(posedge clk); #1;
    checks++;
    if (out_valid || done) begin failures++; $display("FAIL %s did not stop", name); end
  endtask

  // worked example: dense pattern (row k, leftmost = column 0) and bitmaps
  localparam logic [7:0] FIG_ROWS [8] = '{
    8'b00010011, 8'b00100001, 8'b10001100, 8'b10000100,
    8'b01100000, 8'b10100000, 8'b00010010, 8'b00100010};
  localparam logic [15:0] FIG_FSB = 16'b1010_0011_0101_1010;
  localparam logic [31:0] FIG_SSB = 32'h5656_B5B6;   // 4 bits per kept block

  initial begin
    start = 0; fsb = '0; ssb = '0; abm = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    keep = FIG_FSB;
    for (int k = 0; k < K; k++) for (int n = 0; n < N; n++) wnz[k][n] = FIG_ROWS[k][N-1-n];
    encode();
    checks++;
    if (fsb !== FIG_FSB || ssb[31:0] !== FIG_SSB) begin
      failures++; $display("FAIL example encoding %h %h", fsb, ssb[31:0]);
    end
    fsb = '0; ssb = '0;
    fsb = FIG_FSB; ssb[31:0] = FIG_SSB;   // drive the printed bitmaps
    abm = 8'b1011_0111;
    run("example");
    abm = 8'hFF;
    run("example dense act");

    for (int t = 0; t < 40; t++) begin
      keep = NBLK'($urandom()) & NBLK'($urandom() | ((t % 2) ? 32'h0 : 32'hFFFF_FFFF));
      if (t == 3) keep = '0;
      if (t == 4) keep = '1;
      for (int k = 0; k < K; k++)
        for (int n = 0; n < N; n++)
          wnz[k][n] = keep[(k/BR)*NB + n/BC] && ($urandom_range(3) != 0);
      if (t == 4) for (int k = 0; k < K; k++) for (int n = 0; n < N; n++) wnz[k][n] = 1'b1;
      encode();
      abm = K'($urandom());
      if (t == 5) abm = '0;
      if (t == 4) abm = '1;
      run($sformatf("rand %0d", t));
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
