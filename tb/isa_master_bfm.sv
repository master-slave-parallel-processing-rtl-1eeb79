// ISA bus master model used by the testbenches.
//
// Drives 8 bit ISA IO cycles synchronous to the bus clock. io_write puts
// address and data on the bus, holds IOW low for STROBE_CLKS clocks and
// then leaves GAP_CLKS idle clocks; io_read does the same with IOR and
// returns the byte the card drives during the last clock of the strobe. With
// the defaults (68 ns clock) one cycle lasts about 560 ns, the master write
// cycle time given for the prototype. AEN may be raised for one cycle with
// dma_write to mimic a DMA cycle, which the card must ignore.
module isa_master_bfm #(
  parameter int unsigned STROBE_CLKS = 6,
  parameter int unsigned GAP_CLKS    = 8
) (
  input  logic       clk,
  output logic [9:0] sa,
  output logic       aen,
  output logic       iorn,
  output logic       iown,
  output logic [7:0] d_out,
  input  logic [7:0] d_in,
  input  logic       d_oe
);

  int unsigned n_cycles = 0;

  initial begin
    sa    = '0;
    aen   = 1'b0;
    iorn  = 1'b1;
    iown  = 1'b1;
    d_out = '0;
  end

  task automatic idle(input int unsigned n);
    repeat (n) @(negedge clk);
  endtask

  task automatic cycle_write(input logic [9:0] addr, input logic [7:0] data, input logic dma);
    @(negedge clk);
    sa    = addr;
    aen   = dma;
    d_out = data;
    @(negedge clk);
    iown  = 1'b0;
    repeat (STROBE_CLKS) @(negedge clk);
    iown  = 1'b1;
    @(negedge clk);
    aen   = 1'b0;
    d_out = '0;
    sa    = '0;
    n_cycles++;
    idle(GAP_CLKS);
  endtask

  task automatic io_write(input logic [9:0] addr, input logic [7:0] data);
    cycle_write(addr, data, 1'b0);
  endtask

  task automatic dma_write(input logic [9:0] addr, input logic [7:0] data);
    cycle_write(addr, data, 1'b1);
  endtask

  task automatic io_read(input logic [9:0] addr, output logic [7:0] data, output logic driven);
    @(negedge clk);
    sa   = addr;
    aen  = 1'b0;
    @(negedge clk);
    iorn = 1'b0;
    repeat (STROBE_CLKS - 1) @(negedge clk);
    @(posedge clk);
    data   = d_in;
    driven = d_oe;
    @(negedge clk);
    iorn = 1'b1;
    @(negedge clk);
    sa   = '0;
    n_cycles++;
    idle(GAP_CLKS);
  endtask

endmodule
