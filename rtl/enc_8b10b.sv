// enc_8b10b: 8b10b encoder of the transmit PCS, one registered symbol per clock.
//
// The transmitter hands the transceiver 8-bit words plus an IS_K flag; IS_K
// marks a control character. The encoder maps the low five bits (EDCBA) to a
// 6-bit sub-block and the high three bits (HGF) to a 4-bit sub-block using
// the standard 8b10b tables, picking the positive or negative form of each
// sub-block from the running disparity so that the line stays DC balanced.
// The tables are written here in the usual abcdei / fghj letter order and
// stored in the output with bit 'a' in bit 0 (sent first).
//
// Interface: data/is_k are sampled on clk when en is high; code is valid one
// clock later (one cycle of latency, as the encoder stage of the transmitter).
// The running disparity starts negative after reset. Control characters are
// accepted for K28.0-K28.7, K23.7, K27.7, K29.7 and K30.7; other IS_K values
// are encoded as if they were data.
// The one-cycle latency follows the published latency budget of the
// transmitter; the code tables are the standard 8b10b ones.
`timescale 1ps/1ps
module enc_8b10b (
  input  logic       clk,
  input  logic       rst,     // synchronous, active high
  input  logic       en,
  input  logic [7:0] data,
  input  logic       is_k,
  output logic [9:0] code,    // bit 0 = 'a', transmitted first
  output logic       rd       // running disparity after 'code' (1 = positive)
);

  // 6-bit sub-block for RD- in abcdei order (a is the MSB of the literal).
  function automatic logic [5:0] tab6(input logic [4:0] x);
    case (x)
      5'd0:  tab6 = 6'b100111;  5'd1:  tab6 = 6'b011101;
      5'd2:  tab6 = 6'b101101;  5'd3:  tab6 = 6'b110001;
      5'd4:  tab6 = 6'b110101;  5'd5:  tab6 = 6'b101001;
      5'd6:  tab6 = 6'b011001;  5'd7:  tab6 = 6'b111000;
      5'd8:  tab6 = 6'b111001;  5'd9:  tab6 = 6'b100101;
      5'd10: tab6 = 6'b010101;  5'd11: tab6 = 6'b110100;
      5'd12: tab6 = 6'b001101;  5'd13: tab6 = 6'b101100;
      5'd14: tab6 = 6'b011100;  5'd15: tab6 = 6'b010111;
      5'd16: tab6 = 6'b011011;  5'd17: tab6 = 6'b100011;
      5'd18: tab6 = 6'b010011;  5'd19: tab6 = 6'b110010;
      5'd20: tab6 = 6'b001011;  5'd21: tab6 = 6'b101010;
      5'd22: tab6 = 6'b011010;  5'd23: tab6 = 6'b111010;
      5'd24: tab6 = 6'b110011;  5'd25: tab6 = 6'b100110;
      5'd26: tab6 = 6'b010110;  5'd27: tab6 = 6'b110110;
      5'd28: tab6 = 6'b001110;  5'd29: tab6 = 6'b101110;
      5'd30: tab6 = 6'b011110;  default: tab6 = 6'b101011;
    endcase
  endfunction

  // 4-bit sub-block for RD- in fghj order; index 8 is the alternate x.A7.
  function automatic logic [3:0] tab4(input logic [3:0] y);
    case (y)
      4'd0: tab4 = 4'b1011;  4'd1: tab4 = 4'b1001;
      4'd2: tab4 = 4'b0101;  4'd3: tab4 = 4'b1100;
      4'd4: tab4 = 4'b1101;  4'd5: tab4 = 4'b1010;
      4'd6: tab4 = 4'b0110;  4'd7: tab4 = 4'b1110;
      default: tab4 = 4'b0111;
    endcase
  endfunction

  function automatic int ones6(input logic [5:0] v);
    return $countones(v);
  endfunction

  logic [5:0] s6;       // chosen 6-bit sub-block, abcdei order
  logic [3:0] s4;       // chosen 4-bit sub-block, fghj order
  logic       rd_mid;   // disparity after the 6-bit sub-block
  logic       rd_next;

  always_comb begin
    logic [5:0] t6;
    logic [3:0] t4;
    logic       k28, alt7, bal6, bal4;
    k28  = is_k && (data[4:0] == 5'd28);
    t6   = k28 ? 6'b001111 : tab6(data[4:0]);
    bal6 = (ones6(t6) == 3);
    // Unbalanced sub-blocks, and D.07 (111000/000111), flip with disparity.
    if ((!bal6 || t6 == 6'b111000) && rd) s6 = ~t6;
    else                                 s6 = t6;
    rd_mid = bal6 ? rd : ~rd;

    // Alternate x.A7 avoids a run of five equal bits, and is used by K.x.7.
    alt7 = (data[7:5] == 3'd7) &&
           (is_k ||
            (!rd_mid && (data[4:0] == 5'd17 || data[4:0] == 5'd18 || data[4:0] == 5'd20)) ||
            ( rd_mid && (data[4:0] == 5'd11 || data[4:0] == 5'd13 || data[4:0] == 5'd14)));
    t4   = tab4(alt7 ? 4'd8 : {1'b0, data[7:5]});
    bal4 = ($countones(t4) == 2);
    if (!bal4 || t4 == 4'b1100) s4 = rd_mid ? ~t4 : t4;
    else if (k28)               s4 = rd_mid ? t4 : ~t4;  // K28.y balanced forms
    else                        s4 = t4;
    rd_next = bal4 ? rd_mid : ~rd_mid;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      code <= '0;
      rd   <= 1'b0;
    end else if (en) begin
      // Letter order a..j becomes bit 0..9.
      code <= {s4[0], s4[1], s4[2], s4[3], s6[0], s6[1], s6[2], s6[3], s6[4], s6[5]};
      rd   <= rd_next;
    end
  end

endmodule
