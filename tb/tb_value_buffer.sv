// tb_value_buffer: random writes and four-port same-cycle reads of the value
// buffer (input and weight buffer), compared with a model array.
module tb_value_buffer;
  localparam int DEPTH = 64, NRD = 4;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                     we;
  logic [5:0]               waddr;
  logic [31:0]              wdata;
  logic [NRD-1:0][5:0]      raddr;
  logic [NRD-1:0][31:0]     rdata;
  logic [31:0]              model [DEPTH];
  int checks = 0, failures = 0;

  value_buffer #(.DEPTH(DEPTH), .W(32), .NRD(NRD)) dut (
    .clk, .we, .waddr, .wdata, .raddr, .rdata);

  initial begin
    we = 0; waddr = 0; wdata = 0; raddr = '0;
    // fill every entry once
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); we = 1; waddr = 6'(i); wdata = $urandom(); model[i] = wdata;
    end
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      we = ($urandom_range(1) == 1);
      waddr = 6'($urandom_range(DEPTH-1));
      wdata = $urandom();
      for (int p = 0; p < NRD; p++) raddr[p] = 6'($urandom_range(DEPTH-1));
      #1;
      for (int p = 0; p < NRD; p++) begin
        checks++;
        if (rdata[p] !== model[raddr[p]]) begin
          failures++;
          $display("FAIL port %0d addr %0d: %h vs %h", p, raddr[p], rdata[p], model[raddr[p]]);
        end
      end
      @(posedge clk);
      if (we) model[waddr] = wdata;
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
