// retime_dff: bank of output D flip-flops clocked by a clean RF-derived clock.
//
// Each FPGA output is sampled once more by a discrete-style flip-flop whose
// clock comes straight from the RF comparator (optionally through a fine
// analog delay), so the output edge timing is set by that clock and not by
// the FPGA's own output path. `q` follows `d` one `clk` edge later. Like the
// discrete parts it stands for, the bank has no reset: its first value is
// defined after the first clock edge. One flip-flop retimes the divider
// output and 32 retime the channels of a delay unit.
module retime_dff #(
  parameter int unsigned WIDTH = 1
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  always_ff @(posedge clk) q <= d;
endmodule
