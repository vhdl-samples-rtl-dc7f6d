// tb_adc_pkg: test values of the behavioural ADC model.
//
// adc_word gives the 16-bit result channel ch returns for its conv-th
// conversion: a channel- and conversion-dependent pattern that differs
// between neighbouring channels and between successive conversions, so that
// swapped channels, stale data or shifted bits show up in a comparison.
package tb_adc_pkg;
  function automatic logic [15:0] adc_word(input int ch, input int conv);
    logic [31:0] x;
    x = 32'(ch) * 32'h9E37_79B1 ^ 32'(conv) * 32'h85EB_CA6B ^ 32'h0000_A5C3;
    return x[31:16] ^ x[15:0];
  endfunction
endpackage
