// value_buffer: on-chip buffer of compressed (nonzero-only) operand values.
//
// Used as the input (activation) buffer and as the weight buffer.  The load
// unit writes one value per cycle; the SpGEMM core reads NRD values per
// cycle, one per processing element, at arbitrary addresses given by the
// index list.
//
// Interface: `we`/`waddr`/`wdata` write at the next rising edge.  Each read
// port `raddr[i]` returns `rdata[i]` combinationally (same cycle), so the
// core can fetch and multiply in one cycle.  Contents are not reset; only
// addresses written by the load unit are ever read.
// Buffer contents follow the source design; the number of read ports equal to
// the PE count and the asynchronous read are this implementation's choices.
module value_buffer #(
  parameter int unsigned DEPTH = 64,
  parameter int unsigned W     = 32,
  parameter int unsigned NRD   = 4,
  localparam int unsigned A_W  = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                 clk,
  input  logic                 we,
  input  logic [A_W-1:0]       waddr,
  input  logic [W-1:0]         wdata,
  input  logic [NRD-1:0][A_W-1:0] raddr,
  output logic [NRD-1:0][W-1:0]   rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_comb begin
    for (int i = 0; i < NRD; i++) rdata[i] = mem[raddr[i]];
  end

endmodule
