// hb_coeff_rom: coefficient ROM of the half-band second stage.
//
// A symmetric 51-tap half-band filter has zero odd taps except the centre
// tap h(25) = 0.5, and its even taps satisfy h(2m) = h(50-2m), so only the
// 13 values h(0), h(2), ..., h(24) are stored; addr = m selects h(2m).
// The values are this design's own: an equiripple (Parks-McClellan) 51-tap
// low-pass for a 125 MHz input rate with pass band 0-28 MHz and stop band
// from 34.5 MHz, rounded to integers as round(h * 2^10) (11-bit two's
// complement, 1.0 = 1024) with the odd taps forced to zero and h(25) = 512.
// Quantised this way it keeps about 45 dB stop-band attenuation and under
// 0.05 dB pass-band ripple.  Combinational; addresses above 12 read zero.
module hb_coeff_rom
  import decim_pkg::*;
(
  input  logic [HB_AW-1:0]        addr,
  output logic signed [HB_C-1:0]  coeff
);
  always_comb begin
    unique case (addr)
      4'd0:    coeff =  11'sd3;     // h(0)  = h(50)
      4'd1:    coeff = -11'sd3;     // h(2)  = h(48)
      4'd2:    coeff =  11'sd4;     // h(4)
      4'd3:    coeff = -11'sd6;     // h(6)
      4'd4:    coeff =  11'sd9;     // h(8)
      4'd5:    coeff = -11'sd12;    // h(10)
      4'd6:    coeff =  11'sd16;    // h(12)
      4'd7:    coeff = -11'sd22;    // h(14)
      4'd8:    coeff =  11'sd29;    // h(16)
      4'd9:    coeff = -11'sd41;    // h(18)
      4'd10:   coeff =  11'sd61;    // h(20)
      4'd11:   coeff = -11'sd106;   // h(22)
      4'd12:   coeff =  11'sd325;   // h(24) = h(26)
      default: coeff =  '0;
    endcase
  end
endmodule
