// coef_rom -- filter coefficient ROM: 6 filter settings x 20 coefficients of
// 20 bits, read one bit per cycle.
//
// Each setting is an 8th-order Chebyshev type II low- or high-pass filter
// (80 dB stop-band) for a 48 kHz sample rate, factored into four
// second-order sections of the form
//     w[n] = x[n] - a1*w[n-1] - a2*w[n-2]
//     y[n] = b0*w[n] + b1*w[n-1] + b2*w[n-2]
// The stop-band edge of each setting is placed so that the response is 6 dB
// down at the selected cut-off (80, 120 or 160 Hz): a low-pass and a
// high-pass of the same setting then add up to within 0.5 dB of flat, as a
// crossover's two outputs must.  Sections are ordered with
// the poles nearest the unit circle last, and each section is scaled to unity
// gain at DC (low-pass) or at fs/2 (high-pass), which keeps every internal
// value below 2**31 for a full-scale 16-bit input.
//
// Word k of section s sits at index 5*s+k in the order -a1, -a2, b2, b1, b0
// (the order the microprogram uses them).  A word is sign-magnitude:
// bit 19 the sign, bits 18:0 round(|c| * 2**18).
//
// The data sheet fixes the filter type, order, attenuation, cut-offs and the
// 20-bit word; the coefficient values, their order and the section scaling are
// this design's own, and freq = 2'b11 selects the 160 Hz table.  Combinational.
module coef_rom
  import bxf_pkg::*;
(
  input  logic          high_pass,
  input  logic [1:0]    freq,       // 0: 80 Hz, 1: 120 Hz, 2 and 3: 160 Hz
  input  logic [4:0]    index,      // coefficient 0..19
  input  logic [4:0]    bit_sel,    // bit of the word, 0..19
  output logic [CW-1:0] word,
  output logic          coef_bit
);
  logic [1:0] fsel;
  logic [7:0] addr;

  always_comb begin
    fsel = (freq == 2'd3) ? 2'd2 : freq;
    addr = {high_pass, fsel, index};
    unique case (addr)
      8'h00: word = 20'h7e8f5;
      8'h01: word = 20'hbe918;
      8'h02: word = 20'h00f41;
      8'h03: word = 20'h81e5f;
      8'h04: word = 20'h00f41;
      8'h05: word = 20'h7ee4a;
      8'h06: word = 20'hbee69;
      8'h07: word = 20'h06fd5;
      8'h08: word = 20'h8df8b;
      8'h09: word = 20'h06fd5;
      8'h0a: word = 20'h7f583;
      8'h0b: word = 20'hbf59f;
      8'h0c: word = 20'h0dd24;
      8'h0d: word = 20'h9ba2c;
      8'h0e: word = 20'h0dd24;
      8'h0f: word = 20'h7fc87;
      8'h10: word = 20'hbfca1;
      8'h11: word = 20'h11c92;
      8'h12: word = 20'ha390a;
      8'h13: word = 20'h11c92;
      8'h20: word = 20'h7dd87;
      8'h21: word = 20'hbddd6;
      8'h22: word = 20'h00f36;
      8'h23: word = 20'h81e1d;
      8'h24: word = 20'h00f36;
      8'h25: word = 20'h7e574;
      8'h26: word = 20'hbe5bb;
      8'h27: word = 20'h06f63;
      8'h28: word = 20'h8de7f;
      8'h29: word = 20'h06f63;
      8'h2a: word = 20'h7f03a;
      8'h2b: word = 20'hbf079;
      8'h2c: word = 20'h0dc9c;
      8'h2d: word = 20'h9b8f9;
      8'h2e: word = 20'h0dc9c;
      8'h2f: word = 20'h7fab9;
      8'h30: word = 20'hbfaf3;
      8'h31: word = 20'h11c5c;
      8'h32: word = 20'ha387e;
      8'h33: word = 20'h11c5c;
      8'h40: word = 20'h7d229;
      8'h41: word = 20'hbd2b3;
      8'h42: word = 20'h00f2f;
      8'h43: word = 20'h81dd4;
      8'h44: word = 20'h00f2f;
      8'h45: word = 20'h7dca2;
      8'h46: word = 20'hbdd20;
      8'h47: word = 20'h06ef6;
      8'h48: word = 20'h8dd6e;
      8'h49: word = 20'h06ef6;
      8'h4a: word = 20'h7eaea;
      8'h4b: word = 20'hbeb5a;
      8'h4c: word = 20'h0dc17;
      8'h4d: word = 20'h9b7be;
      8'h4e: word = 20'h0dc17;
      8'h4f: word = 20'h7f8de;
      8'h50: word = 20'hbf945;
      8'h51: word = 20'h11c28;
      8'h52: word = 20'ha37e9;
      8'h53: word = 20'h11c28;
      8'h80: word = 20'h7ed45;
      8'h81: word = 20'hbed5c;
      8'h82: word = 20'h3f6a8;
      8'h83: word = 20'hfed51;
      8'h84: word = 20'h3f6a8;
      8'h85: word = 20'h7f013;
      8'h86: word = 20'hbf02d;
      8'h87: word = 20'h3f811;
      8'h88: word = 20'hff01e;
      8'h89: word = 20'h3f811;
      8'h8a: word = 20'h7f549;
      8'h8b: word = 20'hbf566;
      8'h8c: word = 20'h3faad;
      8'h8d: word = 20'hff555;
      8'h8e: word = 20'h3faad;
      8'h8f: word = 20'h7fc24;
      8'h90: word = 20'hbfc44;
      8'h91: word = 20'h3fe1c;
      8'h92: word = 20'hffc30;
      8'h93: word = 20'h3fe1c;
      8'ha0: word = 20'h7e3f6;
      8'ha1: word = 20'hbe42a;
      8'ha2: word = 20'h3f208;
      8'ha3: word = 20'hfe410;
      8'ha4: word = 20'h3f208;
      8'ha5: word = 20'h7e821;
      8'ha6: word = 20'hbe85a;
      8'ha7: word = 20'h3f420;
      8'ha8: word = 20'hfe83b;
      8'ha9: word = 20'h3f420;
      8'haa: word = 20'h7efe2;
      8'hab: word = 20'hbf024;
      8'hac: word = 20'h3f805;
      8'had: word = 20'hfeffc;
      8'hae: word = 20'h3f805;
      8'haf: word = 20'h7fa1f;
      8'hb0: word = 20'hbfa67;
      8'hb1: word = 20'h3fd27;
      8'hb2: word = 20'hffa38;
      8'hb3: word = 20'h3fd27;
      8'hc0: word = 20'h7dab2;
      8'hc1: word = 20'hbdb0e;
      8'hc2: word = 20'h3ed70;
      8'hc3: word = 20'hfdae0;
      8'hc4: word = 20'h3ed70;
      8'hc5: word = 20'h7e032;
      8'hc6: word = 20'hbe098;
      8'hc7: word = 20'h3f035;
      8'hc8: word = 20'hfe060;
      8'hc9: word = 20'h3f035;
      8'hca: word = 20'h7ea74;
      8'hcb: word = 20'hbeae8;
      8'hcc: word = 20'h3f55d;
      8'hcd: word = 20'hfeaa2;
      8'hce: word = 20'h3f55d;
      8'hcf: word = 20'h7f80c;
      8'hd0: word = 20'hbf88b;
      8'hd1: word = 20'h3fc2f;
      8'hd2: word = 20'hff839;
      8'hd3: word = 20'h3fc2f;
      default: word = '0;
    endcase
    coef_bit = (bit_sel < 5'(CW)) ? word[bit_sel] : 1'b0;
  end
endmodule
