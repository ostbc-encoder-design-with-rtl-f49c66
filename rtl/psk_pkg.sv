// psk_pkg: constants and helper functions shared by the 16-phase PSK
// transmitter (clkcounter, tr, trm, generator), its inverse (inv_psk) and the
// BER tester top.
//
// A "cycle" is 16 samples of 4 bits (64 bits), as in the PSK module this RTL
// follows. The phase of a cycle is an index 0..15. The 8-bit PSK word is a
// binary angle: 256 codes per full turn, so a phase step of one sample is 16
// codes. The binary-angle coding and the reference waveform below are this
// design's own choices.
package psk_pkg;

  // Reference sine, phase 0:  round(7.5 + 7.5*sin(2*pi*k/16)), k = 0..15.
  // Its only rising crossing of mid-scale (8) is at k = 0, which is how the
  // phase detector in trm recognises phase 0.
  function automatic logic [3:0] sine16(input logic [3:0] k);
    logic [3:0] v;
    unique case (k)
      4'd0:  v = 4'd8;
      4'd1:  v = 4'd10;
      4'd2:  v = 4'd13;
      4'd3:  v = 4'd14;
      4'd4:  v = 4'd15;
      4'd5:  v = 4'd14;
      4'd6:  v = 4'd13;
      4'd7:  v = 4'd10;
      4'd8:  v = 4'd8;
      4'd9:  v = 4'd5;
      4'd10: v = 4'd2;
      4'd11: v = 4'd1;
      4'd12: v = 4'd0;
      4'd13: v = 4'd1;
      4'd14: v = 4'd2;
      default: v = 4'd5;
    endcase
    return v;
  endfunction

  // Full 64-bit cycle of the reference sine shifted to phase p:
  // sample k = sine16(k - p), sample k in bits [4k+3:4k].
  function automatic logic [63:0] sine_frame(input logic [3:0] p);
    logic [63:0] f;
    for (int k = 0; k < 16; k++) f[4*k +: 4] = sine16(4'(k) - p);
    return f;
  endfunction

endpackage
