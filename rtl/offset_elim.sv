// offset_elim: DC offset elimination for one raw ADC sample.
//
// The receiver front end biases the piezo signal to 1.25 V, which the 12-bit
// converter reports as code 2048. This block subtracts that mid-scale code so
// the sample becomes a signed value centred on zero (Vin - 1.25 V). The
// offset of 2048 codes is the one the processing chain is specified with;
// the result is kept 17 bits wide so that no uint16 input can overflow.
//
// Interface: purely combinational, raw_i (uint16) -> centred_o (signed 17).
module offset_elim #(
  parameter int unsigned OFFSET = shm_pkg::ADC_OFFSET
) (
  input  shm_pkg::adc_word_t raw_i,
  output logic signed [16:0] centred_o
);
  assign centred_o = signed'({1'b0, raw_i}) - signed'(17'(OFFSET));
endmodule
