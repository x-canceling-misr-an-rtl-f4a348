// sel_shift_reg: builds each m-bit selection vector for the programmable XOR from the b tester
// channels while scan shifting is halted.
//
// While the scan chains are stopped, the channels that normally carry stimulus carry control
// data instead, b bits per clock, so one m-bit vector takes m/b clocks. New chunks enter at the
// top and move down by b bits per clock; after m/b clocks the first chunk sits in bits
// [b-1:0]. So that a vector costs exactly m/b clocks, sel_o presents the vector as it will be
// after the current shift, the last chunk taken live from the channels; the X-free bit is
// computed and compacted in that same clock, and the register is then free for the next
// vector. Using the stimulus channels for this follows the design; the chunk order and the
// live last chunk are this implementation's choice.
//
// Interface: shift_i takes ch_i; sel_o = {ch_i, register[m-1:b]}. Requires m a multiple of b.
// Timing: one chunk per clock; asynchronous active-low reset clears the register.
module sel_shift_reg
  import xc_pkg::*;
#(
  parameter int unsigned M = M_DEFAULT,
  parameter int unsigned B = B_DEFAULT
) (
  input  logic         clk_i,
  input  logic         rst_ni,
  input  logic         shift_i,
  input  logic [B-1:0] ch_i,
  output logic [M-1:0] sel_o
);

  logic [M-1:0] sr_q, sr_d;

  if (M > B) begin : g_wide
    assign sr_d = {ch_i, sr_q[M-1:B]};
  end else begin : g_one_chunk
    assign sr_d = ch_i[M-1:0];
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni)      sr_q <= '0;
    else if (shift_i) sr_q <= sr_d;
  end

  assign sel_o = sr_d;

  initial begin
    assert (B >= 1 && M >= B && M % B == 0)
      else $error("sel_shift_reg: M must be a multiple of B");
  end

endmodule
