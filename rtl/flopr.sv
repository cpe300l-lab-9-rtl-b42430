// flopr: resettable register, used as the program counter (instance pcreg).
//
// On each rising clock edge q takes d; an asynchronous active-high reset
// forces q to RESET_VALUE (0, the address of the first instruction). The module and
// instance names follow the reference design; the asynchronous reset
// and the reset value are this design's choices.
module flopr #(
  parameter int unsigned WIDTH       = 32,
  parameter logic [WIDTH-1:0] RESET_VALUE = '0
) (
  input  logic             clk,
  input  logic             reset,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk or posedge reset)
    if (reset) q <= RESET_VALUE;
    else       q <= d;

endmodule
