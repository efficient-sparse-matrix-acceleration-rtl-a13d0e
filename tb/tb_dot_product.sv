// tb_dot_product: checks the multiply and switch/adder chain.  Directed cases
// cover one segment over all four lanes, four single-lane segments, a 1+3 and
// a 2+2 split, and partly empty windows; random cases draw a valid prefix and
// a non-decreasing column sequence.  Expected segment sums and ends are
// computed here from the lane data.
module tb_dot_product;
  localparam int P = 4;
  logic [P-1:0]        in_valid, out_valid;
  logic [P-1:0][31:0]  in_a, in_w, out_sum;
  logic [P-1:0][2:0]   in_col, out_col;
  logic [2:0]          split;
  int checks = 0, failures = 0;

  dot_product #(.P(P), .DATA_W(32), .ACC_W(32), .COL_W(3)) dut (
    .in_valid, .in_a, .in_w, .in_col, .out_valid, .out_sum, .out_col, .split);

  task automatic check(input string name);
    logic [P-1:0]       e_valid;
    logic [P-1:0][31:0] e_sum;
    logic [31:0]        run;
    int                 e_split;
    e_valid = '0; e_sum = '0; run = '0; e_split = 0;
    for (int i = 0; i < P; i++) begin
      if (in_valid[i]) run += in_a[i] * in_w[i];
      if (in_valid[i] && (i == P-1 || !in_valid[i+1] || in_col[i+1] != in_col[i])) begin
        e_valid[i] = 1'b1;
        e_sum[i]   = run;
        run        = '0;
        if (i < P-1 && in_valid[i+1]) e_split++;
      end
    end
    #1;
    checks++;
    if (out_valid !== e_valid) begin
      failures++; $display("FAIL %s valid %b vs %b", name, out_valid, e_valid);
    end
    for (int i = 0; i < P; i++) if (e_valid[i]) begin
      checks++;
      if (out_sum[i] !== e_sum[i] || out_col[i] !== in_col[i]) begin
        failures++;
        $display("FAIL %s lane %0d sum %0d vs %0d", name, i, $signed(out_sum[i]), $signed(e_sum[i]));
      end
    end
    checks++;
    if (int'(split) != e_split) begin
      failures++; $display("FAIL %s split %0d vs %0d", name, split, e_split);
    end
  endtask

  task automatic set(input logic [P-1:0] v, input int c0, c1, c2, c3);
    in_valid = v;
    in_col[0] = 3'(c0); in_col[1] = 3'(c1); in_col[2] = 3'(c2); in_col[3] = 3'(c3);
    for (int i = 0; i < P; i++) begin
      in_a[i] = $urandom() % 201 - 100;
      in_w[i] = $urandom() % 201 - 100;
    end
  endtask

  initial begin
    set(4'b1111, 2, 2, 2, 2); check("one segment");
    set(4'b1111, 0, 1, 2, 3); check("four segments");
    set(4'b1111, 1, 3, 3, 3); check("1+3");
    set(4'b1111, 4, 4, 6, 6); check("2+2");
    set(4'b0011, 5, 5, 0, 0); check("two valid lanes");
    set(4'b0001, 7, 0, 0, 0); check("one valid lane");
    set(4'b0000, 0, 0, 0, 0); check("empty");
    // negative values: -3 * 5 + 4 * -2 = -23
    in_valid = 4'b0011; in_col = '0;
    in_a[0] = -32'sd3; in_w[0] = 32'sd5; in_a[1] = 32'sd4; in_w[1] = -32'sd2;
    #1;
    checks++;
    if (out_sum[1] !== -32'sd23 || out_valid !== 4'b0010) begin
      failures++; $display("FAIL signed sum %0d", $signed(out_sum[1]));
    end
    for (int t = 0; t < 500; t++) begin
      int nv, c;
      nv = $urandom_range(P);
      c = $urandom_range(3);
      in_valid = '0;
      for (int i = 0; i < P; i++) begin
        if (i < nv) in_valid[i] = 1'b1;
        in_col[i] = 3'(c);
        if ($urandom_range(2) == 0 && c < 7) c++;
        in_a[i] = $urandom();
        in_w[i] = $urandom();
      end
      check($sformatf("rand %0d", t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
