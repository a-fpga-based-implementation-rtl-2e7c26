// ivics_hw_tb: end-to-end testbench of the infusion-controller hardware at
// its default parameters.
//
// The initial block plays the host PC: it writes instructions on the data
// port, raises EN, waits for A_RD_CONT, answers with RST_CONT and waits for
// DONE, exactly as the host software would over the parallel port. A drop
// sensor and the patient button are driven too. An independent reference
// follows the motor: it knows only the forward phase order
// 0110 -> 1100 -> 1001 -> 0011 and checks that every change of the motor
// lines is one step in the instructed direction, that an instruction gives
// exactly its number of steps, and the cycle counts of the handshake.
// Each mechanism of the design is counted and must occur at least once:
// forward and reverse moves, a zero-step instruction, a full 127-step
// instruction, a host that is slow to answer A_RD_CONT (counter held),
// drop detection and clearing, and the patient button.
module ivics_hw_tb;

  localparam int NS = 2;   // synchroniser depth of the default design

  logic       clk = 1'b0;
  logic       rst_n;
  logic [7:0] data_in;
  logic       en, clr_drop, rst_cont, drop_in, buttom_in;
  logic       drop_out, buttom_out, done, a_rd_cont;
  logic [3:0] motor;

  int checks = 0, failures = 0;
  int n_fwd = 0, n_rev = 0, n_zero = 0, n_full = 0, n_slow_ack = 0;
  int n_drop = 0, n_clear = 0, n_button = 0;

  ivics_hw dut (
    .clk, .rst_n, .data_in, .en, .clr_drop, .rst_cont, .drop_in, .buttom_in,
    .drop_out, .buttom_out, .done, .a_rd_cont, .motor
  );

  always #5 clk = ~clk;

  // ---------------- motor reference ----------------
  localparam logic [3:0] FWD [4] = '{4'b0110, 4'b1100, 4'b1001, 4'b0011};

  function automatic int pos_of(logic [3:0] m);
    for (int i = 0; i < 4; i++) if (FWD[i] == m) return i;
    return -1;
  endfunction

  int   cur_dir = 0;      // direction of the current instruction (0/1)
  int   step_cnt = 0;     // motor changes seen since last cleared
  int   bad_moves = 0;
  logic [3:0] motor_q;

  always @(posedge clk) begin
    motor_q <= motor;
    if (rst_n && motor_q != motor) begin
      step_cnt <= step_cnt + 1;
      if (pos_of(motor) != (cur_dir != 0 ? (pos_of(motor_q) + 3) % 4
                                         : (pos_of(motor_q) + 1) % 4))
        bad_moves <= bad_moves + 1;
    end
  end

  // The motor lines only ever hold one of the four phase patterns.
  a_legal_pattern: assert property (@(posedge clk) disable iff (!rst_n)
                                    pos_of(motor) >= 0);
  // The host never sees A_RD_CONT and DONE together.
  a_rdcont_not_done: assert property (@(posedge clk) disable iff (!rst_n)
                                      !(a_rd_cont && done));

  task automatic expect_eq(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d (t=%0t)", what, got, exp, $time);
    end
  endtask

  // ---------------- host model ----------------
  task automatic run_instr(input bit dir, input int n, input int ack_delay);
    int cyc, pos0;
    expect_eq(int'(done), 1, "done before new instruction");
    pos0 = pos_of(motor);
    @(negedge clk) data_in = {dir, 7'(n)};
    @(negedge clk) begin en = 1; cur_dir = int'(dir); end
    cyc = 0;
    do begin @(posedge clk); #1 cyc++; end while (!a_rd_cont && cyc < 50);
    expect_eq(cyc, NS + 2, "A_RD_CONT latency");
    @(negedge clk) en = 0;
    // slow host: the counter must stay loaded, the motor must not move
    step_cnt = 0;
    repeat (ack_delay) @(negedge clk);
    expect_eq(step_cnt, 0, "no steps before RST_CONT");
    if (ack_delay > 5) n_slow_ack++;
    expect_eq(int'(done), 0, "done low while instruction pending");
    @(negedge clk) rst_cont = 1;
    step_cnt = 0;
    cyc = 0;
    do begin @(posedge clk); #1 cyc++; end while (!(done && !a_rd_cont) && cyc < 400);
    @(negedge clk) rst_cont = 0;
    expect_eq(cyc, NS + 1 + n, "cycles from RST_CONT to DONE");
    repeat (3) @(negedge clk);
    expect_eq(step_cnt, n, "number of motor steps");
    expect_eq(pos_of(motor), dir ? (pos0 + 4 * 32 - n) % 4 : (pos0 + n) % 4,
              "final motor position");
    if (n == 0) n_zero++;
    else if (dir) n_rev++;
    else n_fwd++;
    if (n == 127) n_full++;
  endtask

  task automatic drop_event();
    @(negedge clk) drop_in = 1;
    repeat (NS + 2) @(negedge clk);
    expect_eq(int'(drop_out), 1, "drop seen");
    if (drop_out) n_drop++;
    repeat (4) @(negedge clk);
    drop_in = 0;
    repeat (3) @(negedge clk);
    expect_eq(int'(drop_out), 1, "drop flag held");
    @(negedge clk) clr_drop = 1;
    @(negedge clk) clr_drop = 0;
    repeat (NS + 1) @(negedge clk);
    expect_eq(int'(drop_out), 0, "drop flag cleared");
    if (!drop_out) n_clear++;
  endtask

  task automatic expect_seen(input int cnt, input string what);
    checks++;
    $display("mechanism %-28s seen %0d times", what, cnt);
    if (cnt == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    rst_n = 0; data_in = '0; en = 0; clr_drop = 0; rst_cont = 0;
    drop_in = 0; buttom_in = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    expect_eq(int'(motor), int'(4'b0110), "motor reset pattern");
    expect_eq(int'(done), 1, "idle after reset");
    expect_eq(int'(buttom_out), 0, "patient not ready");

    // patient presses the button: host starts working
    @(negedge clk) buttom_in = 1;
    repeat (NS + 1) @(negedge clk);
    expect_eq(int'(buttom_out), 1, "patient ready");
    if (buttom_out) n_button++;

    // one control cycle per drop, as the host loop does
    drop_event();
    run_instr(1'b0, 5, 0);
    drop_event();
    run_instr(1'b1, 3, 10);
    run_instr(1'b0, 0, 2);
    run_instr(1'b1, 127, 1);
    run_instr(1'b0, 127, 8);
    for (int i = 0; i < 12; i++) begin
      drop_event();
      run_instr(1'($urandom), int'($urandom_range(0, 127)), int'($urandom_range(0, 12)));
    end

    expect_eq(bad_moves, 0, "every motor move is one step in the instructed direction");

    expect_seen(n_fwd,      "forward instruction");
    expect_seen(n_rev,      "reverse instruction");
    expect_seen(n_zero,     "zero-step instruction");
    expect_seen(n_full,     "127-step instruction");
    expect_seen(n_slow_ack, "counter held until RST_CONT");
    expect_seen(n_drop,     "drop detected");
    expect_seen(n_clear,    "drop flag cleared");
    expect_seen(n_button,   "patient button");

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
