// flash_frontend_model: behavioural model (not synthesizable, testbench use
// only) of the analog front end of an N-bit flash ADC: a string of 2^N equal
// resistors from VREF to ground and 2^N-1 comparators.
//
// Comparator k (k = 1 .. 2^N-1) compares the input voltage vin (its +
// input) with the ladder tap k*VREF/2^N (its - input) and outputs 1 when
// vin is above the tap, so the outputs form a thermometer code with therm[k-1]
// from comparator k. To exercise the encoder's bubble tolerance, setting
// bubble_en inverts the output of one comparator, therm[bubble_idx], as a
// comparator with offset or metastability would. The model is ideal otherwise
// (no offset, no delay, no noise).
//
// Interface: vin input voltage (real, volts); bubble_en, bubble_idx error
// injection; therm thermometer code. Timing: combinational, no delay.
module flash_frontend_model #(
  parameter int unsigned N    = 4,
  parameter real         VREF = 1.0
) (
  input  real                  vin,
  input  logic                 bubble_en,
  input  int unsigned          bubble_idx,
  output logic [2**N-2:0]      therm
);
  always_comb begin
    for (int k = 1; k < 2**N; k++) begin
      therm[k-1] = (vin > VREF * real'(k) / real'(2**N));
    end
    if (bubble_en && bubble_idx < 2**N - 1) therm[bubble_idx] = ~therm[bubble_idx];
  end
endmodule
