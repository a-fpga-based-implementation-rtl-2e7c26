// motor_ctrl_tb: self-checking testbench for the stepper sequence generator.
//
// Drives random step/dir patterns and compares the phase lines, every clock,
// with a reference that walks its own list of the forward sequence
// 0110 -> 1100 -> 1001 -> 0011. It also checks that four steps in one
// direction return to the start pattern, that a step forward followed by a
// step back cancels, and that the lines hold while step is low.
module motor_ctrl_tb;

  logic       clk = 1'b0;
  logic       rst_n;
  logic       step, dir;
  logic [3:0] motor;

  int checks = 0, failures = 0;

  motor_ctrl dut (.clk, .rst_n, .step, .dir, .motor);

  always #5 clk = ~clk;

  localparam logic [3:0] FWD [4] = '{4'b0110, 4'b1100, 4'b1001, 4'b0011};
  int pos;

  task automatic check(input logic [3:0] exp, input string what);
    checks++;
    if (motor !== exp) begin
      failures++;
      $display("FAIL %s: motor=%b expected %b", what, motor, exp);
    end
  endtask

  task automatic do_step(input logic d, input logic s);
    step = s; dir = d;
    @(posedge clk); #1;
    if (s) pos = d ? (pos + 3) % 4 : (pos + 1) % 4;
    check(FWD[pos], "sequence");
  endtask

  initial begin
    step = 0; dir = 0; rst_n = 0; pos = 0;
    repeat (2) @(posedge clk);
    #1 check(4'b0110, "reset pattern");
    rst_n = 1;
    // full turn forward and backward
    repeat (4) do_step(1'b0, 1'b1);
    check(4'b0110, "four forward steps return to start");
    repeat (4) do_step(1'b1, 1'b1);
    check(4'b0110, "four reverse steps return to start");
    // explicit reverse order
    do_step(1'b1, 1'b1); check(4'b0011, "first reverse step");
    do_step(1'b1, 1'b1); check(4'b1001, "second reverse step");
    do_step(1'b0, 1'b1); check(4'b0011, "forward undoes reverse");
    // hold
    repeat (5) do_step(1'b0, 1'b0);
    check(4'b0011, "hold without step");
    // random
    repeat (400) do_step(1'($urandom), 1'($urandom));
    step = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
