// tristate_buf: gate between a driver and a shared bus. When en is high the
// output follows a; when en is low the output is high impedance, leaving
// the bus to other drivers. In the CPU it connects datapath_out to the
// data bus under control of dp_gate, as the CPU description asks.
// Combinational, no clock.
module tristate_buf #(
  parameter int unsigned W = 16
) (
  input  logic         en,
  input  logic [W-1:0] a,
  output tri   [W-1:0] y
);
  assign y = en ? a : 'z;
endmodule
