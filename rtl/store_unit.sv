// store_unit: writes a finished output row from the output buffer to DRAM.
//
// The row is written as OBW+N consecutive words starting at `base`: first
// the N-bit output bitmap in OBW = ceil(N/MEM_W) words (bit n in word
// n/MEM_W, zero-extended), then the N accumulator values of columns 0 ..
// N-1.  One word is offered per cycle on a valid/grant write
// channel; a word is taken when `wr_req` and `wr_gnt` are both high.
//
// Interface: pulse `start` with `base` valid (captured).  `rd_col` selects the
// output buffer column whose value arrives combinationally on `rd_data`.
// `done` pulses for one cycle after the last word was granted.
// An unstalled row takes OBW+N cycles.
// Sequential write-out by a store module follows the source design; the row
// layout (bitmap word followed by the dense row) and the handshake are this
// implementation's choices.
module store_unit #(
  parameter int unsigned N      = tsb_pkg::N_DEF,
  parameter int unsigned ACC_W  = tsb_pkg::ACC_W_DEF,
  parameter int unsigned MEM_W  = tsb_pkg::MEM_W_DEF,
  parameter int unsigned ADDR_W = tsb_pkg::ADDR_W_DEF,
  localparam int unsigned COL_W = $clog2(N),
  localparam int unsigned OBW   = (N + MEM_W - 1) / MEM_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [ADDR_W-1:0] base,
  output logic [COL_W-1:0]  rd_col,
  input  logic [ACC_W-1:0]  rd_data,
  input  logic [N-1:0]      obm,
  output logic              wr_req,
  output logic [ADDR_W-1:0] wr_addr,
  output logic [MEM_W-1:0]  wr_data,
  input  logic              wr_gnt,
  output logic              done
);

  logic                  busy;
  logic [ADDR_W-1:0]     addr_q;
  logic [$clog2(OBW+N+1)-1:0] idx;  // < OBW: bitmap word idx, else column idx-OBW
  logic [OBW*MEM_W-1:0]       obm_ext;

  assign obm_ext = (OBW*MEM_W)'(obm);
  assign rd_col  = (32'(idx) < OBW) ? '0 : COL_W'(32'(idx) - OBW);
  assign wr_req  = busy;
  assign wr_addr = addr_q + ADDR_W'(idx);

  always_comb begin
    wr_data = MEM_W'(rd_data);
    for (int i = 0; i < OBW; i++) if (32'(idx) == i) wr_data = obm_ext[i*MEM_W +: MEM_W];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      addr_q <= '0;
      idx    <= '0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      if (busy) begin
        if (wr_gnt) begin
          if (int'(idx) == OBW + N - 1) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
          idx <= idx + 1'b1;
        end
      end else if (start) begin
        busy   <= 1'b1;
        addr_q <= base;
        idx    <= '0;
      end
    end
  end

endmodule
