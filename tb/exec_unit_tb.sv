// exec_unit_tb: self-checking testbench for the execution unit.
//
// Plays the host's side of the EN / A_RD_CONT / RST_CONT handshake for many
// step counts (0, 1, 127 and random ones) and checks:
//  * a_rd_cont rises exactly two clocks after the load request;
//  * while EN_I is high the counter is held at the step count and no step
//    is issued, however long the host waits before RST_CONT;
//  * after RST_CONT exactly `steps` step strobes follow on consecutive
//    clocks, the counter counts them down, and done rises the clock after
//    the last one;
//  * done is low from the load until the counter is empty.
module exec_unit_tb;

  localparam int unsigned SB = 7;

  logic          clk = 1'b0;
  logic          rst_n;
  logic          load_req, rst_cont;
  logic [SB-1:0] steps;
  logic          en_i, a_rd_cont, done, step;
  logic [SB-1:0] count;

  int checks = 0, failures = 0;

  exec_unit #(.STEP_BITS(SB)) dut (
    .clk, .rst_n, .load_req, .rst_cont, .steps,
    .en_i, .a_rd_cont, .done, .step, .count
  );

  always #5 clk = ~clk;

  task automatic expect_eq(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d (t=%0t)", what, got, exp, $time);
    end
  endtask

  task automatic run_instr(input int n, input int wait_ack);
    int cyc, nsteps;
    steps = SB'(n);
    @(negedge clk) load_req = 1;
    @(negedge clk) load_req = 0;
    expect_eq(int'(en_i), 1, "EN_I set by load");
    expect_eq(int'(done), 0, "done low after load");
    // wait for A_RD_CONT
    cyc = 1;
    while (!a_rd_cont && cyc < 10) begin @(negedge clk); cyc++; end
    expect_eq(cyc, 2, "A_RD_CONT latency after load");
    // host is slow to answer: counter is held
    repeat (wait_ack) begin
      @(negedge clk);
      expect_eq(int'(step), 0, "no step while EN_I");
      expect_eq(int'(count), n, "counter reloaded while EN_I");
    end
    rst_cont = 1;
    @(negedge clk) rst_cont = 0;
    expect_eq(int'(en_i), 0, "EN_I cleared by RST_CONT");
    expect_eq(int'(a_rd_cont), 0, "RD_CONT cleared by RST_CONT");
    nsteps = 0;
    cyc = 0;
    while (!done && cyc < 300) begin
      expect_eq(int'(step), 1, "steps on consecutive clocks");
      expect_eq(int'(count), n - nsteps, "counter value");
      nsteps++;
      @(negedge clk);
      cyc++;
    end
    expect_eq(nsteps, n, "number of steps");
    expect_eq(cyc, n, "cycles until done");
    expect_eq(int'(step), 0, "no step once done");
    expect_eq(int'(count), 0, "counter empty when done");
  endtask

  initial begin
    rst_n = 0; load_req = 0; rst_cont = 0; steps = '0;
    repeat (2) @(negedge clk);
    expect_eq(int'(done), 1, "done after reset");
    rst_n = 1;
    run_instr(5, 0);
    run_instr(0, 3);
    run_instr(1, 1);
    run_instr(127, 7);
    // RST_CONT and a load request in the same clock: RST_CONT wins
    @(negedge clk) begin load_req = 1; rst_cont = 1; end
    @(negedge clk) begin load_req = 0; rst_cont = 0; end
    expect_eq(int'(en_i), 0, "RST_CONT wins over load");
    repeat (30) run_instr(int'($urandom_range(0, 127)), int'($urandom_range(0, 6)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
