// output_buffer: holds one output row while it is being computed and until
// the store unit has written it out.
//
// It keeps N accumulators and the N-bit output bitmap.  The SpGEMM core
// delivers up to P finished segment sums per cycle, each tagged with its
// output column; a sum is added to that column's accumulator, so a dot
// product whose jobs were split across two core cycles is completed here.
// The bitmap decoder writes the output bitmap bit of each column as it
// visits it.
//
// Interface: `clr` zeroes accumulators and bitmap.  `acc_en[i]` adds
// `acc_val[i]` into column `acc_col[i]` (several lanes may name the same
// column; all are added).  `obm_we` writes `obm_bit` at column `obm_col`.
// All updates happen at the next rising edge; `clr` wins.  `rd_col` selects
// the accumulator shown on `rd_data` (combinational); `obm` shows the bitmap.
// The buffer is named in the source design; accumulation in place is this
// implementation's choice.
module output_buffer #(
  parameter int unsigned N     = tsb_pkg::N_DEF,
  parameter int unsigned P     = tsb_pkg::P_DEF,
  parameter int unsigned ACC_W = tsb_pkg::ACC_W_DEF,
  localparam int unsigned COL_W = $clog2(N)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clr,
  input  logic [P-1:0]            acc_en,
  input  logic [P-1:0][COL_W-1:0] acc_col,
  input  logic [P-1:0][ACC_W-1:0] acc_val,
  input  logic                    obm_we,
  input  logic [COL_W-1:0]        obm_col,
  input  logic                    obm_bit,
  input  logic [COL_W-1:0]        rd_col,
  output logic [ACC_W-1:0]        rd_data,
  output logic [N-1:0]            obm
);

  logic [N-1:0][ACC_W-1:0] acc;
  logic [N-1:0][ACC_W-1:0] acc_nxt;

  always_comb begin
    acc_nxt = acc;
    for (int c = 0; c < N; c++) begin
      for (int i = 0; i < P; i++) begin
        if (acc_en[i] && int'(acc_col[i]) == c) acc_nxt[c] = acc_nxt[c] + acc_val[i];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0;
      obm <= '0;
    end else if (clr) begin
      acc <= '0;
      obm <= '0;
    end else begin
      acc <= acc_nxt;
      if (obm_we) obm[obm_col] <= obm_bit;
    end
  end

  assign rd_data = acc[rd_col];

endmodule
