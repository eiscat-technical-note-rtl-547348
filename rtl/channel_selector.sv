// channel_selector: admits only the ADC words of one receiver channel.
//
// Each word from the receiver ADC arrives with three channel address bits.
// The selector compares them with the channel chosen on the front panel and
// lets the data strobe through only on a match, as the original's LS85
// comparator does. With the selection switched off (`sel_on` low) every
// strobe passes. Purely combinational; the strobe is active high here.
module channel_selector (
  input  logic [2:0] chan_addr,   // address bits travelling with the data
  input  logic [2:0] chan_select, // front-panel channel switch
  input  logic       sel_on,      // channel selection switched on
  input  logic       strobe_in,   // data strobe from the ADC
  output logic       strobe_out   // strobe admitted into the buffer
);

  always_comb strobe_out = strobe_in && (!sel_on || chan_addr == chan_select);

endmodule
