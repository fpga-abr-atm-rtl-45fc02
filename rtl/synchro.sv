// synchro: carries a level signal into the clock domain of its output through
// two flip-flops (the 'synchro' sub-module of the utopia interfaces). The
// output follows the input two to three destination clock edges later. Both
// flip-flops are cleared by `aclr`.
module synchro (
  input  logic dclk,   // destination clock
  input  logic aclr,
  input  logic din,
  output logic dout
);
  logic meta;
  always_ff @(posedge dclk or posedge aclr) begin
    if (aclr) begin
      meta <= 1'b0;
      dout <= 1'b0;
    end else begin
      meta <= din;
      dout <= meta;
    end
  end
endmodule
