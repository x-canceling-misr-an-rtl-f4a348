// shadow_register: holds a completed intermediate signature while the MISR starts the next.
//
// In the continuous-shifting scheme the MISR is not stopped to read out its X-canceled
// combinations. When an intermediate signature is complete its contents move to this register
// in one clock, the MISR is reset in that same clock, and the programmable XOR then works on
// the copy while the scan chains keep shifting. The copy/reset in one clock follows the
// design; taking the MISR's next state (so the last scan slice is included) is this
// implementation's timing choice.
//
// Interface: load_i copies d_i; q_o the held signature. Timing: one clock to load;
// asynchronous active-low reset to 0.
module shadow_register
  import xc_pkg::*;
#(
  parameter int unsigned M = M_DEFAULT
) (
  input  logic         clk_i,
  input  logic         rst_ni,
  input  logic         load_i,
  input  logic [M-1:0] d_i,
  output logic [M-1:0] q_o
);

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni)     q_o <= '0;
    else if (load_i) q_o <= d_i;
  end

endmodule
