// comm_block_tb: self-checking testbench for the communication block.
//
// Inputs change at the falling clock edge, like asynchronous signals that
// happen to arrive between rising edges. The testbench checks:
//  * en_pulse rises exactly SYNC_STAGES rising edges after EN rises and
//    lasts one clock, once per EN however long EN stays high; the
//    instruction register holds data_in one edge later
//    data_in changes while EN is low are ignored;
//  * DROP_FF is set by a drop (latency SYNC_STAGES+1), stays set after the
//    drop has passed, is cleared by CLR_DROP, is not set again by a drop that
//    is still in the beam, and a new drop wins over a simultaneous clear;
//  * BUTTOM_OUT and RST_CONT follow their inputs SYNC_STAGES edges later;
//  * DONE and A_RD_CONT are returned to the host unchanged.
module comm_block_tb;

  import ivics_pkg::*;

  localparam int unsigned NS = 2;

  logic       clk = 1'b0;
  logic       rst_n;
  logic [7:0] data_in;
  logic       en, clr_drop, rst_cont, drop_in, buttom_in, done_i, a_rd_cont_i;
  logic       drop_out, buttom_out, done, a_rd_cont, en_pulse, rst_cont_s;
  instr_t     instr;

  int checks = 0, failures = 0;
  int cycle = 0;
  int en_pulses = 0;

  comm_block #(.SYNC_STAGES(NS)) dut (
    .clk, .rst_n, .data_in, .en, .clr_drop, .rst_cont, .drop_in, .buttom_in,
    .done_i, .a_rd_cont_i,
    .drop_out, .buttom_out, .done, .a_rd_cont, .instr, .en_pulse, .rst_cont_s
  );

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (en_pulse) en_pulses <= en_pulses + 1;
  end

  task automatic expect_eq(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d (t=%0t)", what, got, exp, $time);
    end
  endtask

  // Cycles (rising edges) from now until sig is 1; checked after each edge.
  task automatic cycles_until_pulse(output int n);
    n = 0;
    do begin @(posedge clk); #1 n++; end while (!en_pulse && n < 20);
  endtask

  task automatic send_instr(input logic [7:0] d, input int hold);
    int n;
    @(negedge clk) data_in = d;
    @(negedge clk) en = 1;
    cycles_until_pulse(n);
    expect_eq(n, NS, "en_pulse latency");
    @(posedge clk); #1;
    expect_eq(int'(en_pulse), 0, "en_pulse one clock long");
    expect_eq(int'(instr), int'(d), "instruction register");
    expect_eq(int'(instr.dir), int'(d[7]), "direction bit");
    expect_eq(int'(instr.steps), int'(d[6:0]), "step field");
    repeat (hold) @(negedge clk);
    @(negedge clk) en = 0;
    data_in = ~d;  // host may change the data port once EN is low
    repeat (NS + 3) @(negedge clk);
    expect_eq(int'(instr), int'(d), "instruction held while EN low");
  endtask

  initial begin
    int n, base_cnt;
    rst_n = 0; data_in = '0; en = 0; clr_drop = 0; rst_cont = 0;
    drop_in = 0; buttom_in = 0; done_i = 0; a_rd_cont_i = 0;
    repeat (2) @(negedge clk);
    expect_eq(int'(drop_out), 0, "drop flag reset");
    expect_eq(int'(instr), 0, "instruction reset");
    rst_n = 1;
    repeat (3) @(negedge clk);

    // instructions
    base_cnt = en_pulses;
    send_instr(8'h85, 0);
    send_instr(8'h7F, 12);
    send_instr(8'h00, 3);
    for (int i = 0; i < 20; i++) send_instr(8'($urandom), int'($urandom_range(0, 5)));
    expect_eq(en_pulses - base_cnt, 23, "one en_pulse per EN");

    // drop flag
    @(negedge clk) drop_in = 1;
    n = 0;
    do begin @(posedge clk); #1 n++; end while (!drop_out && n < 20);
    expect_eq(n, NS + 1, "drop flag latency");
    @(negedge clk) drop_in = 0;
    repeat (6) @(negedge clk);
    expect_eq(int'(drop_out), 1, "drop flag held after drop passed");
    @(negedge clk) clr_drop = 1;
    @(negedge clk) clr_drop = 0;
    repeat (NS + 1) @(negedge clk);
    expect_eq(int'(drop_out), 0, "drop flag cleared");
    // drop still in the beam during the clear is not seen twice
    @(negedge clk) drop_in = 1;
    repeat (NS + 3) @(negedge clk);
    expect_eq(int'(drop_out), 1, "second drop");
    @(negedge clk) clr_drop = 1;
    @(negedge clk) clr_drop = 0;
    repeat (NS + 3) @(negedge clk);
    expect_eq(int'(drop_out), 0, "no re-set while drop in beam");
    @(negedge clk) drop_in = 0;
    repeat (NS + 2) @(negedge clk);
    // new drop and clear at the same time: drop wins
    @(negedge clk) begin drop_in = 1; clr_drop = 1; end
    @(negedge clk) clr_drop = 0;
    repeat (NS + 3) @(negedge clk);
    expect_eq(int'(drop_out), 1, "drop wins over clear");
    @(negedge clk) drop_in = 0;
    repeat (NS + 2) @(negedge clk);
    expect_eq(int'(drop_out), 1, "flag stays until next clear");

    // button and RST_CONT synchronisers
    @(negedge clk) begin buttom_in = 1; rst_cont = 1; end
    repeat (NS - 1) begin @(posedge clk); #1 expect_eq(int'(buttom_out), 0, "button latency"); end
    @(posedge clk); #1;
    expect_eq(int'(buttom_out), 1, "button after sync");
    expect_eq(int'(rst_cont_s), 1, "RST_CONT after sync");
    @(negedge clk) begin buttom_in = 0; rst_cont = 0; end
    repeat (NS + 1) @(negedge clk);
    expect_eq(int'(buttom_out), 0, "button released");
    expect_eq(int'(rst_cont_s), 0, "RST_CONT released");

    // status buffers
    for (int i = 0; i < 4; i++) begin
      @(negedge clk) begin done_i = i[0]; a_rd_cont_i = i[1]; end
      #1;
      expect_eq(int'(done), i & 1, "DONE buffer");
      expect_eq(int'(a_rd_cont), (i >> 1) & 1, "A_RD_CONT buffer");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
