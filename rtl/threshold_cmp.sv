// threshold_cmp: the monitoring comparator. Each new ADC sample is compared
// with a fixed value; the LED is lit while the latest sample is greater than
// it and dark otherwise.
//
// The fixed value 3F hex (about 1.24 V on a 0..5 V scale) and the rule
// "LED on when the data exceeds the value" are the system's. Registering the
// result on sample_valid, so the LED holds its state between conversions,
// and clearing it at reset, are this design's choices.
//
// Interface: clk, rst (synchronous, active high), sample[7:0] with a
// one-cycle sample_valid strobe; led (1 = on). The LED changes one clock
// after sample_valid.
module threshold_cmp
  import daq_pkg::*;
#(
  parameter logic [7:0] THRESHOLD = LED_THRESHOLD
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] sample,
  input  logic       sample_valid,
  output logic       led
);

  always_ff @(posedge clk) begin
    if (rst)
      led <= 1'b0;
    else if (sample_valid)
      led <= (sample > THRESHOLD);
  end

endmodule
