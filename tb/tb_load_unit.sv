// tb_load_unit: loads an encoded weight matrix and a series of back-to-back
// activation rows from a memory model (random grant stalls, in-order reads
// with 1..4 cycles latency) and checks every buffer write the unit makes:
// the first-step bitmap word, the second-step words (by address), the
// nonzero weights and activations (by address) and the activation bitmaps,
// plus `next_addr`.  With no stalls and a fixed latency it also checks that
// a burst streams one word per cycle (load time grows by exactly one cycle
// per extra nonzero activation).  Cases include no kept block, all blocks
// kept, and an all-zero activation row.
module tb_load_unit;
  localparam int K = 8, N = 8, BR = 2, BC = 2, KB = K/BR, NB = N/BC, NBLK = KB*NB, BE = BR*BC;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        cmd_w, cmd_a, rd_req, rd_gnt, rd_rvalid, busy, done;
  logic [31:0] addr, rd_addr, rd_rdata, wdata, next_addr;
  logic        fsb_we, ssb_clr, ssb_we, w_we, abm_we, a_we;
  logic [0:0]  fsb_waddr, abm_waddr;
  logic [1:0]  ssb_waddr;
  logic [5:0]  w_waddr;
  logic [2:0]  a_waddr;
  int checks = 0, failures = 0;

  load_unit #(.K(K), .N(N), .BR(BR), .BC(BC), .MEM_W(32), .ADDR_W(32)) dut (
    .clk, .rst_n, .cmd_w, .cmd_a, .addr, .rd_req, .rd_addr, .rd_gnt, .rd_rvalid, .rd_rdata,
    .wdata, .fsb_we, .fsb_waddr, .ssb_clr, .ssb_we, .ssb_waddr, .w_we, .w_waddr, .abm_we, .abm_waddr, .a_we, .a_waddr,
    .busy, .done, .next_addr);

  // memory model
  logic [31:0] mem [1024];
  int          stall_pct, fixed_lat, cyc;
  logic [31:0] rq_data [$];
  int          rq_due [$];
  initial cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  always @(negedge clk) rd_gnt <= ($urandom_range(99) >= stall_pct);
  always @(posedge clk) begin
    rd_rvalid <= 1'b0;
    if (rst_n && rd_req && rd_gnt) begin
      rq_data.push_back(mem[rd_addr[9:0]]);
      rq_due.push_back(cyc + ((fixed_lat > 0) ? fixed_lat : int'($urandom_range(1, 4))));
    end
    if (rq_due.size() > 0 && rq_due[0] <= cyc) begin
      rd_rvalid <= 1'b1;
      rd_rdata  <= rq_data.pop_front();
      void'(rq_due.pop_front());
    end
  end

  // captured buffer writes
  logic [31:0] c_fsb, c_abm;
  logic [31:0] c_ssb [4];
  logic [31:0] c_w [64];
  logic [31:0] c_a [8];
  int          n_w, n_a, n_ssb;
  always @(posedge clk) begin
    if (fsb_we && fsb_waddr == 0) c_fsb <= wdata;
    if (abm_we && abm_waddr == 0) c_abm <= wdata;
    if (ssb_we) begin c_ssb[ssb_waddr] <= wdata; n_ssb <= n_ssb + 1; end
    if (w_we) begin c_w[w_waddr] <= wdata; n_w <= n_w + 1; end
    if (a_we) begin c_a[a_waddr] <= wdata; n_a <= n_a + 1; end
  end

  function automatic int popc(input logic [31:0] v);
    int c;
    c = 0;
    for (int i = 0; i < 32; i++) c += int'(v[i]);
    return c;
  endfunction

  task automatic issue(input bit w, input logic [31:0] a, output int cycles);
    @(negedge clk); cmd_w = w; cmd_a = !w; addr = a;
    @(posedge clk);
    @(negedge clk); cmd_w = 0; cmd_a = 0;
    cycles = 1;
    while (!done) begin @(posedge clk); cycles++; #1; end
  endtask

  initial begin
    cmd_w = 0; cmd_a = 0; addr = 0; stall_pct = 0; fixed_lat = 0;
    n_w = 0; n_a = 0; n_ssb = 0;
    for (int i = 0; i < 1024; i++) mem[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 24; t++) begin
      logic [15:0] f;
      int nk, nz, p, base, wl, cyc_a, zprev, cprev;
      stall_pct = (t % 3 == 1) ? 40 : 0;
      fixed_lat = (t % 3 == 0) ? 2 : 0;
      // weights
      base = 100 + t;
      f = 16'($urandom());
      if (t == 1) f = '0;
      if (t == 2) f = '1;
      nk = popc(32'(f));
      mem[base] = 32'(f) | 32'hABCD_0000;      // upper bits are not part of the bitmap
      nz = 0;
      for (int i = 0; i < (nk*BE + 31) / 32; i++) begin
        logic [31:0] s;
        s = $urandom();
        if (i == (nk*BE + 31) / 32 - 1 && (nk*BE % 32) != 0)
          s = s & ((32'd1 << (nk*BE % 32)) - 1);
        mem[base + 1 + i] = s;
        nz += popc(s);
      end
      p = base + 1 + (nk*BE + 31) / 32;
      for (int i = 0; i < nz; i++) mem[p + i] = $urandom();
      n_w = 0; n_ssb = 0;
      issue(1'b1, 32'(base), wl);
      @(posedge clk); #1;
      checks++;
      if (c_fsb !== mem[base] || n_ssb != (nk*BE + 31) / 32 || n_w != nz || next_addr != 32'(p + nz)) begin
        failures++;
        $display("FAIL t=%0d weight load: fsb %h ssb words %0d weights %0d/%0d next %0d/%0d",
                 t, c_fsb, n_ssb, n_w, nz, next_addr, p + nz);
      end
      for (int i = 0; i < (nk*BE + 31) / 32; i++) begin
        checks++;
        if (c_ssb[i] !== mem[base + 1 + i]) begin failures++; $display("FAIL ssb word %0d", i); end
      end
      for (int i = 0; i < nz; i++) begin
        checks++;
        if (c_w[i] !== mem[p + i]) begin failures++; $display("FAIL weight %0d", i); end
      end
      // activation rows back to back
      p = 600;
      zprev = -1; cprev = 0;
      for (int m = 0; m < 4; m++) begin
        logic [7:0] bm;
        bm = 8'($urandom());
        if (t == 4 && m == 1) bm = '0;
        mem[p] = {24'h5A5A5A, bm};              // bits above K are ignored
        for (int i = 0; i < popc(32'(bm)); i++) mem[p + 1 + i] = $urandom();
        n_a = 0;
        issue(1'b0, 32'(p), cyc_a);
        @(posedge clk); #1;
        checks++;
        if (c_abm[7:0] !== bm || n_a != popc(32'(bm)) || next_addr != 32'(p + 1 + popc(32'(bm)))) begin
          failures++;
          $display("FAIL t=%0d row %0d: bitmap %h count %0d next %0d", t, m, c_abm, n_a, next_addr);
        end
        for (int i = 0; i < popc(32'(bm)); i++) begin
          checks++;
          if (c_a[i] !== mem[p + 1 + i]) begin failures++; $display("FAIL act %0d", i); end
        end
        if (fixed_lat > 0 && stall_pct == 0) begin
          if (zprev >= 0 && popc(32'(bm)) > 0 && zprev > 0) begin
            checks++;
            if (cyc_a - cprev != popc(32'(bm)) - zprev) begin
              failures++;
              $display("FAIL burst rate: %0d words %0d cycles vs %0d words %0d cycles",
                       popc(32'(bm)), cyc_a, zprev, cprev);
            end
          end
          zprev = popc(32'(bm)); cprev = cyc_a;
        end
        p = int'(next_addr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
