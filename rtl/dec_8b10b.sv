// dec_8b10b: 10b-to-8b decoder in the receiving fabric, one registered symbol per clock.
//
// The receiver keeps the transceiver's own decoder out of the data path so
// that the word alignment can be controlled from the fabric; this block
// decodes the aligned raw code words instead. The 6-bit sub-block (abcdei)
// is mapped back to EDCBA and the 4-bit sub-block (fghj) to HGF, accepting
// both disparity forms. A code word is a control character (is_k) when its
// 6-bit sub-block is K28 (001111 or 110000), or when it carries the
// alternate x.A7 sub-block after the sub-block of 23, 27, 29 or 30. For K28
// the 4-bit sub-block is inverted after 110000 before the lookup, matching the
// way K28.y is encoded. code_err flags a sub-block that is not in the tables;
// running-disparity errors are not checked.
//
// Interface: code (bit 0 = 'a', first received) is sampled on clk when en is
// high; data, is_k and code_err follow one clock later (one cycle of latency).
// The one-cycle latency follows the published latency budget of the
// receiver; not checking disparity is this design's choice.
`timescale 1ps/1ps
module dec_8b10b (
  input  logic       clk,
  input  logic       rst,       // synchronous, active high
  input  logic       en,
  input  logic [9:0] code,
  output logic [7:0] data,
  output logic       is_k,
  output logic       code_err
);

  logic [5:0] s6;   // abcdei, a in the MSB
  logic [3:0] s4;   // fghj, f in the MSB
  assign s6 = {code[0], code[1], code[2], code[3], code[4], code[5]};
  assign s4 = {code[6], code[7], code[8], code[9]};

  logic [4:0] x;
  logic       x_ok;
  logic [2:0] y;
  logic       y_ok, alt7, k28, k_out;
  logic [3:0] s4e;

  always_comb begin
    x_ok = 1'b1;
    x    = '0;
    case (s6)
      6'b100111, 6'b011000: x = 5'd0;
      6'b011101, 6'b100010: x = 5'd1;
      6'b101101, 6'b010010: x = 5'd2;
      6'b110001:            x = 5'd3;
      6'b110101, 6'b001010: x = 5'd4;
      6'b101001:            x = 5'd5;
      6'b011001:            x = 5'd6;
      6'b111000, 6'b000111: x = 5'd7;
      6'b111001, 6'b000110: x = 5'd8;
      6'b100101:            x = 5'd9;
      6'b010101:            x = 5'd10;
      6'b110100:            x = 5'd11;
      6'b001101:            x = 5'd12;
      6'b101100:            x = 5'd13;
      6'b011100:            x = 5'd14;
      6'b010111, 6'b101000: x = 5'd15;
      6'b011011, 6'b100100: x = 5'd16;
      6'b100011:            x = 5'd17;
      6'b010011:            x = 5'd18;
      6'b110010:            x = 5'd19;
      6'b001011:            x = 5'd20;
      6'b101010:            x = 5'd21;
      6'b011010:            x = 5'd22;
      6'b111010, 6'b000101: x = 5'd23;
      6'b110011, 6'b001100: x = 5'd24;
      6'b100110:            x = 5'd25;
      6'b010110:            x = 5'd26;
      6'b110110, 6'b001001: x = 5'd27;
      6'b001110:            x = 5'd28;
      6'b101110, 6'b010001: x = 5'd29;
      6'b011110, 6'b100001: x = 5'd30;
      6'b101011, 6'b010100: x = 5'd31;
      6'b001111, 6'b110000: x = 5'd28;   // K28
      default:              x_ok = 1'b0;
    endcase
    k28 = (s6 == 6'b001111) || (s6 == 6'b110000);

    s4e  = (s6 == 6'b110000) ? ~s4 : s4;
    y_ok = 1'b1;
    alt7 = 1'b0;
    y    = '0;
    case (s4e)
      4'b1011, 4'b0100: y = 3'd0;
      4'b1001:          y = 3'd1;
      4'b0101:          y = 3'd2;
      4'b1100, 4'b0011: y = 3'd3;
      4'b1101, 4'b0010: y = 3'd4;
      4'b1010:          y = 3'd5;
      4'b0110:          y = 3'd6;
      4'b1110, 4'b0001: y = 3'd7;
      4'b0111, 4'b1000: begin y = 3'd7; alt7 = 1'b1; end
      default:          y_ok = 1'b0;
    endcase
    k_out = k28 || (alt7 && (x == 5'd23 || x == 5'd27 || x == 5'd29 || x == 5'd30));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      data     <= '0;
      is_k     <= 1'b0;
      code_err <= 1'b0;
    end else if (en) begin
      data     <= {y, x};
      is_k     <= k_out;
      code_err <= !(x_ok && y_ok);
    end
  end

endmodule
