// Parallel-to-serial converter built as a shift-register chain, used twice
// in LATRIC0: 128 bits for the raw frame and 40 bits for the encoded frame.
//
// On a rising clk edge with `load` high the chain takes the whole word `din`;
// on every other edge it shifts one place towards bit 0, filling with 0.
// `dout` is bit 0 of the chain, so a frame leaves least significant bit
// first, one bit per clk cycle, starting in the cycle right after the load
// edge, and the line returns to 0 after WIDTH cycles. A load during a frame
// restarts with the new word. The chain structure and the widths follow the
// chip description; the shift direction, the zero fill and the reset are this
// design's choices.
module shift_serializer #(
  parameter int unsigned WIDTH = 128
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic [WIDTH-1:0] din,
  output logic             dout
);
  timeunit 1ps;
  timeprecision 1fs;

  logic [WIDTH-1:0] chain;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    chain <= '0;
    else if (load) chain <= din;
    else           chain <= {1'b0, chain[WIDTH-1:1]};
  end

  always_comb dout = chain[0];

endmodule
