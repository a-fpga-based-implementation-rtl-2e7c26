// exec_unit: execution unit of the infusion-controller hardware. It runs one
// instruction: it counts the requested number of motor steps and tells the
// host when they are done.
//
// Three registers make it up, as in the original design:
//  * EN_I, the internal enable, set by the host's EN (load_req) and cleared
//    by RST_CONT;
//  * the internal step counter, which is loaded from the instruction's step
//    count on every clock while EN_I is high, and otherwise counts down by
//    one per clock until it reaches zero;
//  * RD_CONT, set once the counter has been loaded (the clock after EN_I
//    rises) and cleared by RST_CONT; its output A_RD_CONT asks the host to
//    send RST_CONT.
// While EN_I is high the counter keeps being reloaded, so counting starts
// only after the host has answered A_RD_CONT with RST_CONT. From the clock
// after EN_I falls, step is high for exactly `steps` consecutive clocks, one
// motor step each (this stands for the original's gated motor clock
// CK_MOTOR). done (DONE/END) is high when the counter is zero and no load is
// pending. RST_CONT wins over a simultaneous load request, as the original's
// direct flip-flop reset would.
// The original loaded the counter on the falling clock edge and reset the
// one-bit registers asynchronously; here everything is on the rising edge of
// one clock with the reset only for power-on, which is this design's choice.
module exec_unit #(
  parameter int unsigned STEP_BITS = 7
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 load_req,   // one-clock pulse: host raised EN
  input  logic                 rst_cont,   // host acknowledge RST_CONT (level)
  input  logic [STEP_BITS-1:0] steps,      // step count from the instruction register
  output logic                 en_i,       // EN_I register
  output logic                 a_rd_cont,  // RD_CONT register
  output logic                 done,       // counter empty, ready for a new instruction
  output logic                 step,       // one motor step this clock
  output logic [STEP_BITS-1:0] count       // internal counter N6..N0
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        en_i <= 1'b0;
    else if (rst_cont) en_i <= 1'b0;
    else if (load_req) en_i <= 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        a_rd_cont <= 1'b0;
    else if (rst_cont) a_rd_cont <= 1'b0;
    else if (en_i)     a_rd_cont <= 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          count <= '0;
    else if (en_i)       count <= steps;
    else if (count != 0) count <= count - 1'b1;
  end

  assign step = !en_i && (count != 0);
  assign done = !en_i && (count == 0);

endmodule
