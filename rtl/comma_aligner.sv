// comma_aligner: comma detector and word aligner for a fixed-latency receiver.
//
// The transceiver's own comma aligner is switched off because it leaves the
// recovered clock at whatever phase the CDR happened to lock with. This block
// instead looks at the raw, still-encoded 10-bit words and steers the
// transceiver's RXSLIDE input, which moves the recovered clock in steps of
// two bits (two slides per step, an odd slide adding a one-bit data shift).
//
// Detection: the current word and the previous one form a 20-bit window in
// arrival order. The comma (0011111 or 1100000) is searched at the ten
// offsets p = 0..9; finding it at offset p means the symbols start p bits
// into each word, so n = (10 - p) mod 10 slides are needed, each slide moving
// the data one bit towards the most significant end. The first comma found
// decides n directly, with no trial-and-error slides.
// Alignment: odd n would leave the word boundary at a recovered-clock phase
// that differs from the even case, so to keep a single phase the block
// rejects the lock: it pulses gtp_reset and waits for the CDR to lock again.
// Even n is applied as n one-cycle RXSLIDE pulses, SLIDE_GAP cycles apart;
// after the last one and SLIDE_GAP more cycles ALIGNED is raised. A comma
// found at a nonzero offset while aligned drops ALIGNED and restarts with a
// reset (a choice of this design, covering a later loss of lock).
//
// Interface: synchronous to the recovered user clock RXUSRCLK2, which keeps
// running while the transceiver is being reset. reject and slide are one-
// cycle event strobes for monitoring. The pulse widths, gaps and relock wait
// are this design's choice.
`timescale 1ps/1ps
module comma_aligner
  import fl_link_pkg::*;
#(
  parameter int unsigned RESET_CYCLES  = 4,
  parameter int unsigned RELOCK_CYCLES = 64,
  parameter int unsigned SLIDE_GAP     = 32
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [9:0] rxdata,      // raw 10-bit word, bit 0 received first
  output logic       rxslide,
  output logic       gtp_reset,
  output logic       aligned,
  output logic       reject,      // strobe: odd slide count, lock rejected
  output logic       slide,       // strobe: one RXSLIDE pulse issued
  output logic [3:0] last_n       // slide count computed at the last comma
);

  typedef enum logic [2:0] {S_RESET, S_RELOCK, S_SEARCH, S_SLIDE, S_GAP, S_ALIGNED} state_t;

  localparam int unsigned TW = $clog2(RELOCK_CYCLES + SLIDE_GAP + RESET_CYCLES + 1);

  state_t        state;
  logic [TW-1:0] timer;
  logic [3:0]    todo;        // slides still to issue
  logic [9:0]    prev;

  // Comma search over the 20-bit window.
  logic [19:0] window;
  logic        found;
  logic [3:0]  pos;
  logic [3:0]  n_need;

  assign window = {rxdata, prev};

  always_comb begin
    found = 1'b0;
    pos   = '0;
    for (int p = 9; p >= 0; p--) begin
      if (window[p +: 7] == COMMA_RDN || window[p +: 7] == COMMA_RDP) begin
        found = 1'b1;
        pos   = 4'(p);
      end
    end
    n_need = (pos == 4'd0) ? 4'd0 : 4'd10 - pos;
  end

  always_ff @(posedge clk) begin
    if (rst) prev <= '0;
    else     prev <= rxdata;
  end

  always_ff @(posedge clk) begin
    reject <= 1'b0;
    slide  <= 1'b0;
    if (rst) begin
      state     <= S_RESET;
      timer     <= '0;
      todo      <= '0;
      rxslide   <= 1'b0;
      gtp_reset <= 1'b0;
      aligned   <= 1'b0;
      last_n    <= '0;
    end else begin
      rxslide <= 1'b0;
      case (state)
        S_RESET: begin
          gtp_reset <= 1'b1;
          aligned   <= 1'b0;
          if (timer == TW'(RESET_CYCLES - 1)) begin
            state <= S_RELOCK;
            timer <= '0;
          end else timer <= timer + 1'b1;
        end
        S_RELOCK: begin
          gtp_reset <= 1'b0;
          if (timer == TW'(RELOCK_CYCLES - 1)) begin
            state <= S_SEARCH;
            timer <= '0;
          end else timer <= timer + 1'b1;
        end
        S_SEARCH: begin
          if (found) begin
            last_n <= n_need;
            if (n_need[0]) begin
              reject <= 1'b1;
              state  <= S_RESET;
              timer  <= '0;
            end else if (n_need == 4'd0) begin
              state   <= S_ALIGNED;
              aligned <= 1'b1;
            end else begin
              todo  <= n_need;
              state <= S_SLIDE;
            end
          end
        end
        S_SLIDE: begin
          rxslide <= 1'b1;
          slide   <= 1'b1;
          todo    <= todo - 1'b1;
          timer   <= '0;
          state   <= S_GAP;
        end
        S_GAP: begin
          if (timer == TW'(SLIDE_GAP - 1)) begin
            timer <= '0;
            if (todo == 4'd0) begin
              state   <= S_ALIGNED;
              aligned <= 1'b1;
            end else state <= S_SLIDE;
          end else timer <= timer + 1'b1;
        end
        S_ALIGNED: begin
          if (found && pos != 4'd0) begin
            aligned <= 1'b0;
            state   <= S_RESET;
            timer   <= '0;
          end
        end
        default: state <= S_RESET;
      endcase
    end
  end

  // RXSLIDE is a single-cycle pulse and never overlaps the transceiver reset.
  assert property (@(posedge clk) disable iff (rst) rxslide |=> !rxslide);
  assert property (@(posedge clk) disable iff (rst) !(rxslide && gtp_reset));

endmodule
