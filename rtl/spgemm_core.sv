// spgemm_core: the sparse matrix multiply engine.
//
// Each cycle it takes the next window of P jobs from the index buffer, reads
// the P activations and P weights the jobs point at from the input and
// weight buffers, and feeds them to the dot-product unit (P multipliers and
// the switch/adder chain).  The finished segment sums are registered and
// then added into the output buffer at the column they carry.  Only jobs
// whose activation, block and element bits are all 1 ever reach the core,
// so every multiplication it performs has two nonzero operands.
//
// Timing: `start` (one cycle) begins a pass over the index list.  Each
// following cycle pops one window while the list is not empty; the cycle
// after the list runs empty the core goes idle and pulses `done`.  A list
// of L jobs therefore takes ceil(L/P) + 1 cycles from start to done, and the
// last sums have reached the output buffer when `done` is high.
// Fetching values according to available PEs and the dot-product unit follow
// the source design; the one-register pipeline is this implementation's
// choice.
module spgemm_core #(
  parameter int unsigned K      = tsb_pkg::K_DEF,
  parameter int unsigned N      = tsb_pkg::N_DEF,
  parameter int unsigned P      = tsb_pkg::P_DEF,
  parameter int unsigned DATA_W = tsb_pkg::DATA_W_DEF,
  parameter int unsigned ACC_W  = tsb_pkg::ACC_W_DEF,
  localparam int unsigned AI_W  = $clog2(K),
  localparam int unsigned WI_W  = $clog2(K * N),
  localparam int unsigned COL_W = $clog2(N)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  // index buffer window
  input  logic [P-1:0]              ix_valid,
  input  logic [P-1:0][AI_W-1:0]    ix_aidx,
  input  logic [P-1:0][WI_W-1:0]    ix_widx,
  input  logic [P-1:0][COL_W-1:0]   ix_col,
  input  logic                      ix_empty,
  output logic                      ix_pop,
  // input (activation) and weight buffer read ports
  output logic [P-1:0][AI_W-1:0]    a_raddr,
  input  logic [P-1:0][DATA_W-1:0]  a_rdata,
  output logic [P-1:0][WI_W-1:0]    w_raddr,
  input  logic [P-1:0][DATA_W-1:0]  w_rdata,
  // output buffer accumulate ports
  output logic [P-1:0]              acc_en,
  output logic [P-1:0][COL_W-1:0]   acc_col,
  output logic [P-1:0][ACC_W-1:0]   acc_val,
  output logic                      busy,
  output logic                      done,
  output logic [$clog2(P+1)-1:0]    split
);

  logic [P-1:0]             dp_valid;
  logic [P-1:0][ACC_W-1:0]  dp_sum;
  logic [P-1:0][COL_W-1:0]  dp_col;
  logic [$clog2(P+1)-1:0]   dp_split;
  logic [P-1:0]             lane_valid;

  assign ix_pop     = busy && !ix_empty;
  assign lane_valid = ix_pop ? ix_valid : '0;
  assign a_raddr    = ix_aidx;
  assign w_raddr    = ix_widx;
  assign split      = ix_pop ? dp_split : '0;

  dot_product #(
    .P(P), .DATA_W(DATA_W), .ACC_W(ACC_W), .COL_W(COL_W)
  ) u_dot (
    .in_valid (lane_valid),
    .in_a     (a_rdata),
    .in_w     (w_rdata),
    .in_col   (ix_col),
    .out_valid(dp_valid),
    .out_sum  (dp_sum),
    .out_col  (dp_col),
    .split    (dp_split)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      done    <= 1'b0;
      acc_en  <= '0;
      acc_col <= '0;
      acc_val <= '0;
    end else begin
      done    <= 1'b0;
      acc_en  <= ix_pop ? dp_valid : '0;
      acc_col <= dp_col;
      acc_val <= dp_sum;
      if (busy) begin
        if (ix_empty) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end else if (start) begin
        busy <= 1'b1;
      end
    end
  end

endmodule
