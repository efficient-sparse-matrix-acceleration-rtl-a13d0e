// tb_bitmap_buffer: checks word writes, whole-vector read, clear and reset of
// the bitmap buffer, with a 40-bit bitmap over 32-bit words (two words, the
// second partly used) and a 16-bit one in a single word.
module tb_bitmap_buffer;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        clr, we;
  logic [0:0]  waddr;
  logic [31:0] wdata;
  logic [39:0] bits;
  logic [15:0] bits16;
  logic        we16;
  int checks = 0, failures = 0;

  bitmap_buffer #(.BITS(40), .WORD_W(32)) dut (
    .clk, .rst_n, .clr, .we, .waddr, .wdata, .bits);
  bitmap_buffer #(.BITS(16), .WORD_W(32)) dut16 (
    .clk, .rst_n, .clr(1'b0), .we(we16), .waddr(1'b0), .wdata, .bits(bits16));

  logic [63:0] model;

  task automatic chk(input string what);
    checks++;
    if (bits !== model[39:0]) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, bits, model[39:0]);
    end
  endtask

  initial begin
    clr = 0; we = 0; we16 = 0; waddr = 0; wdata = 0; model = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); chk("after reset");
    for (int i = 0; i < 50; i++) begin
      @(negedge clk);
      we = 1'b1; waddr = 1'($urandom_range(1)); wdata = $urandom();
      clr = (i % 7 == 3);
      we16 = 1'b1;
      @(posedge clk);
      if (clr) model = '0;
      else model[waddr*32 +: 32] = wdata;
      #1;
      chk($sformatf("step %0d", i));
      checks++;
      if (bits16 !== wdata[15:0]) begin
        failures++; $display("FAIL 16-bit buffer %h vs %h", bits16, wdata[15:0]);
      end
    end
    @(negedge clk); we = 0; clr = 0; we16 = 0;
    repeat (3) @(posedge clk);
    #1 chk("hold");
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
