// Thermometer-to-binary converter of the 2-bit flash ADC that ends the
// pipeline.
//
// A resistor string between +Vref and -Vref gives the thresholds -Vref/2, 0
// and +Vref/2 to three comparators with outputs T0, T1, T2. The thermometer
// code T2..T0 = 000, 001, 011, 111 becomes D1 D0 = 00, 01, 10, 11 (inputs
// below -Vref/2, in -Vref/2..0, in 0..+Vref/2, above +Vref/2). A bubble in
// the thermometer code (a high comparator above a low one) is resolved by
// counting the high comparators, which is this implementation's choice.
// Combinational.
module flash2_encoder (
  input  logic [2:0] t,     // T2 T1 T0
  output logic [1:0] d      // D1 D0
);
  always_comb begin
    d = 2'(t[0]) + 2'(t[1]) + 2'(t[2]);
  end
endmodule
