// interval_counter: counts down the scan shift cycles until the next halt.
//
// During each halt the tester loads, through its stimulus channels, the number of shift cycles
// the MISR may run before it has collected its budget of m-q X's (worked out off line). The
// counter then decrements once per shift cycle; last_o tells the controller that the current
// shift is the last one before the next halt. Loading through at most b bits in one clock
// follows the design; the meaning of the value (number of shift cycles, 0 ends the test
// session) is this implementation's choice.
//
// Interface: load_i/val_i load, dec_i decrements, count_o the value, last_o = (count_o <= 1),
// zero_o = (val_i == 0) for the value being loaded.
// Timing: one clock per operation, load has priority; asynchronous active-low reset to 0.
module interval_counter
  import xc_pkg::*;
#(
  parameter int unsigned W = CNT_W_DEFAULT
) (
  input  logic         clk_i,
  input  logic         rst_ni,
  input  logic         load_i,
  input  logic [W-1:0] val_i,
  input  logic         dec_i,
  output logic [W-1:0] count_o,
  output logic         last_o,
  output logic         zero_o
);

  logic [W-1:0] cnt_q;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni)                  cnt_q <= '0;
    else if (load_i)              cnt_q <= val_i;
    else if (dec_i && cnt_q != 0) cnt_q <= cnt_q - 1'b1;
  end

  assign count_o = cnt_q;
  assign last_o  = (cnt_q <= W'(1));
  assign zero_o  = (val_i == '0);

endmodule
