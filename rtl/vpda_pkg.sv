// vpda_pkg -- constants and types shared by the VPDA MIMO equalizer.
//
// The equalizer works on the outputs of four 5-bit ADCs of a dual-polarization
// QPSK receiver, one bit plane (resolution step) at a time, MSB first. This
// package fixes the ADC count, the number of bit planes, the ordering of the
// four ADC streams, the QPSK decision type and the default suspicious-region
// sizes. The four region sizes (1.82, 0.86, 0.44, 0.19 of the symbol
// amplitude, MSB step first) and the 5-bit ADC are the published design
// point; the Q8 fixed-point encoding of the sizes is this design's choice.
package vpda_pkg;

  // Number of ADCs (XI, XQ, YI, YQ) and bits per ADC sample.
  localparam int unsigned NADC   = 4;
  localparam int unsigned NPLANE = 5;

  // ADC stream order inside every tap window.
  //   ADC_XI (ADC1) and ADC_YI (ADC3) form R_I and feed the A coefficients.
  //   ADC_XQ (ADC2) and ADC_YQ (ADC4) form R_Q and feed the B coefficients,
  //   whose products are rotated by j before they are summed.
  typedef enum logic [1:0] {
    ADC_XI = 2'd0,
    ADC_XQ = 2'd1,
    ADC_YI = 2'd2,
    ADC_YQ = 2'd3
  } adc_idx_e;

  // A coefficient branch is an in-phase ADC; a B branch a quadrature ADC.
  function automatic logic is_b_branch(input int unsigned a);
    return (a == 32'(ADC_XQ)) || (a == 32'(ADC_YQ));
  endfunction

  // Hard QPSK decision: 1 means the component is >= 0 (+1), 0 means -1.
  typedef struct packed {
    logic i;
    logic q;
  } qpsk_dec_t;

  // Suspicious-region half widths after resolution steps 1..4, as fractions of
  // the nominal symbol amplitude in Q8 (round(256 * {1.82, 0.86, 0.44, 0.19})).
  localparam int unsigned SUS_Q8 [NPLANE-1] = '{466, 220, 113, 49};

  // Suspicious-region threshold in output units for a symbol amplitude AMP.
  function automatic longint unsigned sus_threshold(input logic [1:0] step,
                                                    input longint unsigned amp);
    return (amp * 64'(SUS_Q8[step]) + 128) >> 8;
  endfunction

endpackage
