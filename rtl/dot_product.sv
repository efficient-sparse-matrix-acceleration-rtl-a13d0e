// dot_product: the P-lane multiply and segmented reduction of the SpGEMM core.
//
// Lane i multiplies activation in_a[i] by weight in_w[i].  The products then
// run down a chain: product 0 enters switch 0; after switch i-1 an adder adds
// product i to what the switch passed on.  Each switch compares the output
// column of its lane with that of the next lane.  If they match, the running
// sum continues to the next adder; if they differ (or the next lane is
// empty), the switch sends the running sum to output lane i and passes the
// constant 0 to the next adder, which starts a new sum.  The last adder
// always ends at output lane P-1.  So one cycle can finish up to P dot
// products of different lengths, for outputs whose jobs sit at irregular
// places in the job list.
//
// Interface (purely combinational): lanes with `in_valid` low contribute
// nothing and must follow all valid lanes.  `out_valid[i]` marks lane i as
// the end of a segment, with its sum in `out_sum[i]` and its column in
// `out_col[i]`.  `split` counts how many switches ended a segment before the
// last valid lane (used for statistics).  Products and sums wrap at ACC_W bits.
// The multipliers, switches, adders and the zero input follow the source
// design's dot-product unit; the column-compare rule that drives the
// switches is this implementation's choice.
module dot_product #(
  parameter int unsigned P      = tsb_pkg::P_DEF,
  parameter int unsigned DATA_W = tsb_pkg::DATA_W_DEF,
  parameter int unsigned ACC_W  = tsb_pkg::ACC_W_DEF,
  parameter int unsigned COL_W  = 3
) (
  input  logic [P-1:0]              in_valid,
  input  logic [P-1:0][DATA_W-1:0]  in_a,
  input  logic [P-1:0][DATA_W-1:0]  in_w,
  input  logic [P-1:0][COL_W-1:0]   in_col,
  output logic [P-1:0]              out_valid,
  output logic [P-1:0][ACC_W-1:0]   out_sum,
  output logic [P-1:0][COL_W-1:0]   out_col,
  output logic [$clog2(P+1)-1:0]    split
);

  logic [P-1:0][ACC_W-1:0] prod;
  logic [P-1:0]            pass;   // switch i forwards its sum to adder i+1

  always_comb begin
    for (int i = 0; i < P; i++) begin
      prod[i] = in_valid[i]
              ? ACC_W'($signed(in_a[i]) * $signed(in_w[i]))
              : '0;
    end
    for (int i = 0; i < P - 1; i++) begin
      pass[i] = in_valid[i] && in_valid[i+1] && (in_col[i] == in_col[i+1]);
    end
    pass[P-1] = 1'b0;
  end

  always_comb begin
    automatic logic [ACC_W-1:0] run;
    automatic int unsigned nsplit;
    run    = prod[0];
    nsplit = 0;
    for (int i = 0; i < P; i++) begin
      out_col[i]   = in_col[i];
      out_valid[i] = in_valid[i] && !pass[i];
      out_sum[i]   = run;
      if (i < P - 1) begin
        if (out_valid[i] && in_valid[i+1]) nsplit++;
        // switch i: continue the sum or hand 0 to the next adder
        run = (pass[i] ? run : ACC_W'(0)) + prod[i+1];
      end
    end
    split = ($clog2(P+1))'(nsplit);
  end

endmodule
