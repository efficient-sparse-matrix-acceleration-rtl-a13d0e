// tb_output_buffer: random multi-lane accumulates (including several lanes on
// one column), output-bitmap writes, clears and reads, against a model.
module tb_output_buffer;
  localparam int N = 8, P = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #50 clk = ~clk;

  logic                 clr, obm_we, obm_bit;
  logic [P-1:0]         acc_en;
  logic [P-1:0][2:0]    acc_col;
  logic [P-1:0][31:0]   acc_val;
  logic [2:0]           obm_col, rd_col;
  logic [31:0]          rd_data;
  logic [N-1:0]         obm;
  logic [31:0]          m_acc [N];
  logic [N-1:0]         m_obm;
  int checks = 0, failures = 0;

  output_buffer #(.N(N), .P(P), .ACC_W(32)) dut (
    .clk, .rst_n, .clr, .acc_en, .acc_col, .acc_val, .obm_we, .obm_col, .obm_bit,
    .rd_col, .rd_data, .obm);

  initial begin
    clr = 0; obm_we = 0; obm_bit = 0; acc_en = '0; acc_col = '0; acc_val = '0;
    obm_col = '0; rd_col = '0;
    for (int c = 0; c < N; c++) m_acc[c] = '0;
    m_obm = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      clr = ($urandom_range(29) == 0);
      for (int i = 0; i < P; i++) begin
        acc_en[i]  = $urandom_range(1);
        acc_col[i] = 3'($urandom_range(N-1));
        acc_val[i] = $urandom();
      end
      obm_we = $urandom_range(1); obm_col = 3'($urandom_range(N-1)); obm_bit = $urandom_range(1);
      @(posedge clk);
      if (clr) begin
        for (int c = 0; c < N; c++) m_acc[c] = '0;
        m_obm = '0;
      end else begin
        for (int i = 0; i < P; i++) if (acc_en[i]) m_acc[acc_col[i]] += acc_val[i];
        if (obm_we) m_obm[obm_col] = obm_bit;
      end
      #1;
      for (int c = 0; c < N; c++) begin
        rd_col = 3'(c);
        #1;
        checks++;
        if (rd_data !== m_acc[c]) begin
          failures++; $display("FAIL t=%0d col %0d: %h vs %h", t, c, rd_data, m_acc[c]);
        end
      end
      checks++;
      if (obm !== m_obm) begin failures++; $display("FAIL obm %b vs %b", obm, m_obm); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
