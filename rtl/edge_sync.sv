// edge_sync: brings an asynchronous level into the clock domain and marks its
// rising edges.
//
// Two flip-flops synchronise the input; a third holds the previous value. The
// output `rise` is high for exactly one cycle, two clock edges after the first
// edge that samples the input high (the cycle between the 2nd and 3rd edge);
// `fall` does the same for a falling edge.
// Reset clears all three stages, so an input that is already high at reset
// release is reported as an edge. The two-stage synchroniser is this design's
// choice; the external timing inputs it serves are only named as such.
module edge_sync (
  input  logic clk,
  input  logic rst,
  input  logic d,     // asynchronous input level
  output logic level, // synchronised level
  output logic rise,  // one-cycle pulse on a rising edge
  output logic fall   // one-cycle pulse on a falling edge
);
  logic s1, s2, s3;

  always_ff @(posedge clk) begin
    if (rst) begin
      s1 <= 1'b0;
      s2 <= 1'b0;
      s3 <= 1'b0;
    end else begin
      s1 <= d;
      s2 <= s1;
      s3 <= s2;
    end
  end

  assign level = s2;
  assign rise  = s2 & ~s3;
  assign fall  = ~s2 & s3;
endmodule
