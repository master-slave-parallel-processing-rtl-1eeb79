// Strobe edge detector of the slave module.
//
// Three D flip-flops in a row sample an asynchronous strobe at half the ISA
// clock rate (the flops advance only on cycles where ce is high, and ce is
// high every other ISA clock). The first two flops resynchronise the strobe,
// the third holds its previous value, and the output compares the last two.
// Each selected edge of the strobe therefore gives one pulse that is high
// for exactly one half-rate period, i.e. two ISA clocks, so a FIFO that acts
// on (pulse && ce) reads or writes once per strobe, never zero or two times.
// Three flops, the half-rate sampling and the two-clock pulse follow the
// document; the choice of edge (RISING = 1: low-to-high, 0: high-to-low) is
// a parameter here.
//
// Latency: counting the first clock edge that sees the new strobe level as
// edge 1, the pulse is high after edge 3 or 4 (depending on the phase of
// ce) and stays high for two clocks.
module edge_pulse #(
  parameter bit RISING = 1'b1
) (
  input  logic clk,
  input  logic rst,
  input  logic ce,
  input  logic strobe,
  output logic pulse
);

  logic [2:0] q;

  always_ff @(posedge clk) begin
    if (rst)     q <= '0;
    else if (ce) q <= {q[1:0], strobe};
  end

  assign pulse = RISING ? (q[1] && !q[2]) : (!q[1] && q[2]);

endmodule
