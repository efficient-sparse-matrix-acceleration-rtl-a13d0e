// tb_store_unit: stores rows from a model output buffer through a write
// channel with random grant stalls and checks every written address and word
// (bitmap first, then the N values), the single done pulse, and that an
// unstalled row takes exactly N+1 cycles.
module tb_store_unit;
  localparam int N = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        start, wr_req, wr_gnt, done;
  logic [31:0] base, wr_addr, wr_data, rd_data;
  logic [2:0]  rd_col;
  logic [N-1:0] obm;
  logic [31:0] vals [N];
  logic [31:0] mem [256];
  int          stall_pct, nwrites, ndone;
  int checks = 0, failures = 0;

  store_unit #(.N(N), .ACC_W(32), .MEM_W(32), .ADDR_W(32)) dut (
    .clk, .rst_n, .start, .base, .rd_col, .rd_data, .obm,
    .wr_req, .wr_addr, .wr_data, .wr_gnt, .done);

  assign rd_data = vals[rd_col];

  always @(negedge clk) wr_gnt <= ($urandom_range(99) >= stall_pct);
  always @(posedge clk) begin
    if (wr_req && wr_gnt) begin
      mem[wr_addr[7:0]] <= wr_data;
      nwrites <= nwrites + 1;
    end
    if (done) ndone <= ndone + 1;
  end

  initial begin
    start = 0; base = 0; obm = '0; stall_pct = 0; nwrites = 0; ndone = 0;
    for (int i = 0; i < 256; i++) mem[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 30; t++) begin
      int cyc;
      stall_pct = (t % 2) ? 40 : 0;
      base = 32'($urandom_range(200));
      obm = N'($urandom());
      for (int i = 0; i < N; i++) vals[i] = $urandom();
      @(negedge clk); start = 1;
      @(posedge clk);
      @(negedge clk); start = 0;
      cyc = 0;
      while (!done) begin @(posedge clk); cyc++; #1; end
      @(posedge clk); #1;
      checks++;
      if (stall_pct == 0 && cyc != N + 1) begin
        failures++; $display("FAIL row %0d took %0d cycles", t, cyc);
      end
      checks++;
      if (mem[base[7:0]] !== 32'(obm)) begin failures++; $display("FAIL bitmap word"); end
      for (int i = 0; i < N; i++) begin
        checks++;
        if (mem[base[7:0] + 8'(i) + 8'd1] !== vals[i]) begin
          failures++; $display("FAIL value %0d: %h vs %h", i, mem[base[7:0] + 8'(i) + 8'd1], vals[i]);
        end
      end
      checks++;
      if (nwrites != (t + 1) * (N + 1) || ndone != t + 1) begin
        failures++; $display("FAIL counts writes=%0d done=%0d", nwrites, ndone);
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
