// dcl_serializer: behavioural model of the full-custom 2:1 output serializer.
//
// The chip builds this stage, and the LVDS driver behind it, in differential
// current-mode logic; it is modelled here, not designed. bit_data changes on
// the rising edge of clk_800p. While clk_800p is high bit_data[1] is on the
// line, while it is low bit_data[0], so two bits leave per clk_800p period
// (1.6 Gbit/s at 800 MHz). data_out_p/data_out_n are the differential pair.
module dcl_serializer (
  input  logic       clk_800p,
  input  logic [1:0] bit_data,
  output logic       data_out_p,
  output logic       data_out_n
);
  assign data_out_p = clk_800p ? bit_data[1] : bit_data[0];
  assign data_out_n = ~data_out_p;
endmodule
