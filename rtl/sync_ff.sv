// sync_ff: multi-stage flip-flop synchroniser for one asynchronous input.
//
// The parallel-port control lines, the drop sensor and the patient button
// change independently of the FPGA clock. Each one passes through STAGES
// flip-flops before any logic looks at it, so a metastable first stage has a
// full clock period to settle. Output q follows input d after STAGES rising
// clock edges. Reset clears every stage to 0. This synchroniser is not part
// of the original design, which used the raw signals; it is added here so the
// design is safe as a single-clock synchronous circuit.
module sync_ff #(
  parameter int unsigned STAGES = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);

  logic [STAGES-1:0] chain;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) chain <= '0;
    else        chain <= {chain[STAGES-2:0], d};
  end

  assign q = chain[STAGES-1];

  initial assert (STAGES >= 2) else $error("sync_ff needs at least two stages");

endmodule
