// load_unit: fetches compressed operands from DRAM into the on-chip buffers.
//
// DRAM layout (word addresses, MEM_W-bit words):
//   weights at `addr`:   F words first-step bitmap (bit bi*NB+bj = block kept),
//                                F = ceil(NBLK/MEM_W), bit i in word i/MEM_W
//                        S words second-step bitmaps of the kept blocks, packed
//                                BR*BC bits per block, S = ceil(kept*BR*BC/MEM_W)
//                        Z words nonzero weights, Z = ones in the second step
//   activation row:      H words activation bitmap (bit k = a[k] nonzero),
//                                H = ceil(K/MEM_W)
//                        Z words nonzero activations, Z = ones in the bitmap
// The lengths are not stored: the unit counts the ones of each bitmap word
// as it arrives and sizes the next burst from that count.  Words of a burst
// are requested back to back, one per cycle while `rd_gnt` is high; read
// data returns in request order on `rd_rvalid`/`rd_rdata`, any number of
// cycles later.
//
// Interface: pulse `cmd_w` (load weights) or `cmd_a` (load one activation
// row) with `addr` valid.  Arriving words are steered to the first-step
// bitmap buffer (`fsb_we`/`fsb_waddr`), second-step buffer
// (`ssb_we`/`ssb_waddr`, cleared by `ssb_clr` at the start of a weight
// load), weight buffer (`w_we`/`w_waddr`), activation bitmap
// (`abm_we`/`abm_waddr`) or input buffer
// (`a_we`/`a_waddr`), all with data `wdata` = `rd_rdata`, in the cycle the
// word arrives.  `done` pulses when the last word has arrived, with
// `next_addr` holding the address after the last word read, so activation
// rows can be stored back to back.
// A load module filling the bitmap, input and weight buffers is from the
// source design; the layout and the read handshake are this implementation's
// choices.
module load_unit #(
  parameter int unsigned K      = tsb_pkg::K_DEF,
  parameter int unsigned N      = tsb_pkg::N_DEF,
  parameter int unsigned BR     = tsb_pkg::BR_DEF,
  parameter int unsigned BC     = tsb_pkg::BC_DEF,
  parameter int unsigned MEM_W  = tsb_pkg::MEM_W_DEF,
  parameter int unsigned ADDR_W = tsb_pkg::ADDR_W_DEF,
  localparam int unsigned NBLK  = (K / BR) * (N / BC),
  localparam int unsigned BE    = BR * BC,
  localparam int unsigned SSB_WORDS = (NBLK * BE + MEM_W - 1) / MEM_W,
  localparam int unsigned SW_W  = (SSB_WORDS > 1) ? $clog2(SSB_WORDS) : 1,
  localparam int unsigned FSB_WORDS = (NBLK + MEM_W - 1) / MEM_W,
  localparam int unsigned FW_W  = (FSB_WORDS > 1) ? $clog2(FSB_WORDS) : 1,
  localparam int unsigned ABM_WORDS = (K + MEM_W - 1) / MEM_W,
  localparam int unsigned AW_W  = (ABM_WORDS > 1) ? $clog2(ABM_WORDS) : 1,
  localparam int unsigned AI_W  = $clog2(K),
  localparam int unsigned WI_W  = $clog2(K * N),
  localparam int unsigned LEN_W = $clog2(K * N + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cmd_w,
  input  logic              cmd_a,
  input  logic [ADDR_W-1:0] addr,
  // DRAM read channel
  output logic              rd_req,
  output logic [ADDR_W-1:0] rd_addr,
  input  logic              rd_gnt,
  input  logic              rd_rvalid,
  input  logic [MEM_W-1:0]  rd_rdata,
  // buffer write ports
  output logic [MEM_W-1:0]  wdata,
  output logic              fsb_we,
  output logic [FW_W-1:0]   fsb_waddr,
  output logic              ssb_clr,
  output logic              ssb_we,
  output logic [SW_W-1:0]   ssb_waddr,
  output logic              w_we,
  output logic [WI_W-1:0]   w_waddr,
  output logic              abm_we,
  output logic [AW_W-1:0]   abm_waddr,
  output logic              a_we,
  output logic [AI_W-1:0]   a_waddr,
  output logic              busy,
  output logic              done,
  output logic [ADDR_W-1:0] next_addr
);

  typedef enum logic [2:0] {S_IDLE, S_W_HDR, S_W_SSB, S_W_VAL, S_A_HDR, S_A_VAL} state_e;

  state_e            st;
  logic [ADDR_W-1:0] b_addr;    // first address of the current burst
  logic [LEN_W-1:0]  b_len;     // words in the current burst
  logic [LEN_W-1:0]  issued, recvd;
  logic [LEN_W-1:0]  nblk_q;    // kept blocks (weight load)
  logic [LEN_W-1:0]  nnz_q;     // nonzero values counted so far

  // ones of the arriving word that belong to the bitmap being read
  logic [LEN_W-1:0]  ones;
  always_comb begin
    automatic int unsigned c, lim;
    c = 0;
    case (st)
      S_W_HDR: lim = NBLK - int'(recvd) * MEM_W;
      S_A_HDR: lim = K - int'(recvd) * MEM_W;
      S_W_SSB: lim = int'(nblk_q) * BE - int'(recvd) * MEM_W;
      default: lim = 0;
    endcase
    for (int i = 0; i < MEM_W; i++) if (i < lim) c += int'(rd_rdata[i]);
    ones = LEN_W'(c);
  end

  assign rd_req  = (st != S_IDLE) && (issued < b_len);
  assign rd_addr = b_addr + ADDR_W'(issued);
  assign busy    = (st != S_IDLE);
  assign wdata   = rd_rdata;

  assign fsb_we    = rd_rvalid && (st == S_W_HDR);
  assign fsb_waddr = FW_W'(recvd);
  assign ssb_we    = rd_rvalid && (st == S_W_SSB);
  assign ssb_waddr = SW_W'(recvd);
  assign w_we      = rd_rvalid && (st == S_W_VAL);
  assign w_waddr   = WI_W'(recvd);
  assign abm_we    = rd_rvalid && (st == S_A_HDR);
  assign abm_waddr = AW_W'(recvd);
  assign a_we      = rd_rvalid && (st == S_A_VAL);
  assign a_waddr   = AI_W'(recvd);
  assign ssb_clr   = (st == S_IDLE) && cmd_w;

  logic last_word;
  assign last_word = rd_rvalid && (recvd + 1'b1 == b_len);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= S_IDLE;
      b_addr    <= '0;
      b_len     <= '0;
      issued    <= '0;
      recvd     <= '0;
      nblk_q    <= '0;
      nnz_q     <= '0;
      done      <= 1'b0;
      next_addr <= '0;
    end else begin
      done <= 1'b0;
      if (rd_req && rd_gnt) issued <= issued + 1'b1;
      if (rd_rvalid)        recvd  <= recvd + 1'b1;
      unique case (st)
        S_IDLE: begin
          if (cmd_w || cmd_a) begin
            st     <= cmd_w ? S_W_HDR : S_A_HDR;
            b_addr <= addr;
            b_len  <= cmd_w ? LEN_W'(FSB_WORDS) : LEN_W'(ABM_WORDS);
            nblk_q <= '0;
            issued <= '0;
            recvd  <= '0;
            nnz_q  <= '0;
          end
        end
        S_W_HDR: if (rd_rvalid) begin
          nblk_q <= nblk_q + ones;
          if (last_word) begin
            // kept blocks known: fetch their second-step bitmaps
            b_addr <= b_addr + ADDR_W'(b_len);
            b_len  <= LEN_W'(((int'(nblk_q) + int'(ones)) * BE + MEM_W - 1) / MEM_W);
            issued <= '0;
            recvd  <= '0;
            st     <= S_W_SSB;
          end
        end
        S_W_SSB: begin
          if (b_len == 0) begin
            st <= S_W_VAL;            // no kept block: no weights either
            b_len <= '0;
            issued <= '0;
            recvd  <= '0;
          end else if (rd_rvalid) begin
            nnz_q <= nnz_q + ones;
            if (last_word) begin
              b_addr <= b_addr + ADDR_W'(b_len);
              b_len  <= nnz_q + ones;
              issued <= '0;
              recvd  <= '0;
              st     <= S_W_VAL;
            end
          end
        end
        S_A_HDR: if (rd_rvalid) begin
          nnz_q <= nnz_q + ones;
          if (last_word) begin
            b_addr <= b_addr + ADDR_W'(b_len);
            b_len  <= nnz_q + ones;
            issued <= '0;
            recvd  <= '0;
            st     <= S_A_VAL;
          end
        end
        S_W_VAL, S_A_VAL: begin
          if (b_len == 0 || last_word) begin
            st        <= S_IDLE;
            done      <= 1'b1;
            next_addr <= b_addr + ADDR_W'(b_len);
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
