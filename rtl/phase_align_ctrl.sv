// phase_align_ctrl: fabric controller of the transmitter's phase-alignment circuit.
//
// The transceiver's parallel serializer clock (XCLK) is made from the
// reference clock by multiplication and division, so it comes up with an
// arbitrary phase. Its phase-alignment circuit moves XCLK onto the user clock
// TXUSRCLK while TXPHASE is held high. This controller runs that procedure at
// power-up and again after every loss of PLL lock: it waits for lock, waits
// WAIT_CYCLES more, holds TXPHASE for ALIGN_CYCLES and then reports tx_ready.
// Any loss of lock sends it back to the start.
//
// Interface: all signals are synchronous to the user clock; pll_lock is taken
// through a two-flop synchronizer. The two cycle counts are this design's
// choice, sized after the sequence the transceiver vendor recommends
// (a short wait, then a long phase-set interval).
`timescale 1ps/1ps
module phase_align_ctrl #(
  parameter int unsigned WAIT_CYCLES  = 32,
  parameter int unsigned ALIGN_CYCLES = 8192
) (
  input  logic clk,
  input  logic rst,
  input  logic pll_lock,
  output logic txphase,
  output logic tx_ready
);

  typedef enum logic [1:0] {S_LOCK, S_WAIT, S_ALIGN, S_READY} state_t;

  localparam int unsigned CW = $clog2((WAIT_CYCLES > ALIGN_CYCLES ? WAIT_CYCLES : ALIGN_CYCLES) + 1);

  state_t        state;
  logic [CW-1:0] cnt;
  logic [1:0]    lock_sync;

  always_ff @(posedge clk) begin
    if (rst) lock_sync <= '0;
    else     lock_sync <= {lock_sync[0], pll_lock};
  end

  always_ff @(posedge clk) begin
    if (rst || !lock_sync[1]) begin
      state <= S_LOCK;
      cnt   <= '0;
    end else begin
      case (state)
        S_LOCK: begin
          state <= S_WAIT;
          cnt   <= '0;
        end
        S_WAIT: begin
          if (cnt == CW'(WAIT_CYCLES - 1)) begin
            state <= S_ALIGN;
            cnt   <= '0;
          end else cnt <= cnt + 1'b1;
        end
        S_ALIGN: begin
          if (cnt == CW'(ALIGN_CYCLES - 1)) begin
            state <= S_READY;
            cnt   <= '0;
          end else cnt <= cnt + 1'b1;
        end
        default: ;
      endcase
    end
  end

  assign txphase  = (state == S_ALIGN);
  assign tx_ready = (state == S_READY);

endmodule
